// tb_memory4_derivative: reads every Memory4 word and compares it with
// b = round(K_D / (K_P + K_I + K_D) * y2) worked out in floating point,
// for the default gains and for a gain set whose result needs clamping.
module tb_memory4_derivative;
  logic [7:0]         y2_prev;
  logic signed [10:0] b0, b1;
  int checks = 0, failures = 0;

  memory4_derivative dut0 (.y2_prev, .b(b0));
  memory4_derivative #(.KP(10), .KI(2), .KD(100)) dut1 (.y2_prev, .b(b1));

  function automatic int rnd(real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < 256; y++) begin
      int e0, e1;
      y2_prev = 8'(y);
      #1;
      e0 = rnd(-64.0 / -240.0 * y);
      e1 = rnd(100.0 / 112.0 * y);
      if (e1 > 1023) e1 = 1023;
      checks += 2;
      if (b0 !== 11'(e0)) begin failures++; $display("y=%0d b=%0d exp %0d", y, b0, e0); end
      if (b1 !== 11'(e1)) begin failures++; $display("y=%0d b1=%0d exp %0d", y, b1, e1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
