// tb_memory3_integral: reads every Memory3 word and compares it with
// a = round(K_I / (K_P + K_I + K_D) * n_I) worked out in floating point,
// for the default gains and for a second gain set.
module tb_memory3_integral;
  logic signed [7:0]  n_i;
  logic signed [10:0] a0, a1;
  int checks = 0, failures = 0;

  memory3_integral dut0 (.n_i, .a(a0));
  memory3_integral #(.KP(300), .KI(200), .KD(-20)) dut1 (.n_i, .a(a1));

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
    for (int n = -128; n < 128; n++) begin
      int e0, e1;
      n_i = 8'(n);
      #1;
      e0 = rnd(-48.0 / (-128.0 - 48.0 - 64.0) * n);
      e1 = rnd(200.0 / 480.0 * n);
      checks += 2;
      if (a0 !== 11'(e0)) begin failures++; $display("n=%0d a=%0d exp %0d", n, a0, e0); end
      if (a1 !== 11'(e1)) begin failures++; $display("n=%0d a1=%0d exp %0d", n, a1, e1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
