// tb_memory1_staircase: reads every word of the staircase ROM, for the
// plain staircase, with a raised floor, and for the modified staircase (one
// full-scale step, then a fall from code 160), and compares it with the
// descending-staircase formula.
module tb_memory1_staircase;
  logic [7:0] addr;
  logic [7:0] data0, data1, data2;
  int checks = 0, failures = 0;

  memory1_staircase dut0 (.addr, .data(data0));
  memory1_staircase #(.W(8), .C_FLOOR(100)) dut1 (.addr, .data(data1));
  memory1_staircase #(.W(8), .HEAD(1), .C_START(160)) dut2 (.addr, .data(data2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 256; m++) begin
      int e0, e1, e2;
      addr = 8'(m);
      #1;
      e0 = 255 - m;
      e1 = (255 - m < 100) ? 100 : 255 - m;
      e2 = (m == 0) ? 255 : ((160 - (m - 1) < 0) ? 0 : 160 - (m - 1));
      checks += 3;
      if (data2 !== 8'(e2)) begin failures++; $display("modified m=%0d got %0d exp %0d", m, data2, e2); end
      if (data0 !== 8'(e0)) begin failures++; $display("m=%0d got %0d exp %0d", m, data0, e0); end
      if (data1 !== 8'(e1)) begin failures++; $display("floor m=%0d got %0d exp %0d", m, data1, e1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
