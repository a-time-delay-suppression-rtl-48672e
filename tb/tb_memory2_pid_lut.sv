// tb_memory2_pid_lut: reads every Memory2 word and compares it with
// u = u_Ref - (K_P + K_I) r + A * address', address' = 767 - p, A = K_P+K_I+K_D,
// worked out in floating point (gains in units of 1/256), rounded and
// clamped to 0..511. Also checks that the table rises monotonically with the address for
// the default (negative) gains and reaches the lower clamp.
module tb_memory2_pid_lut;
  logic [9:0] addr;
  logic [8:0] u;
  int checks = 0, failures = 0;

  memory2_pid_lut dut (.addr, .u);

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
    int prev, n0;
    prev = -1;
    n0 = 0;
    for (int p = 0; p < 1024; p++) begin
      real kp, ki, kd, ureal;
      int e;
      addr = 10'(p);
      #1;
      kp = -0.5; ki = -0.1875; kd = -0.25;
      ureal = 186.0 - (kp + ki) * 181.0 + (kp + ki + kd) * (767 - p);
      e = rnd(ureal);
      if (e < 0) e = 0;
      if (e > 511) e = 511;
      checks++;
      if (u !== 9'(e)) begin failures++; $display("p=%0d u=%0d exp %0d", p, u, e); end
      if (prev >= 0) begin
        checks++;
        if (int'(u) < prev) failures++;
      end
      prev = int'(u);
      if (u == 0) n0++;
    end
    checks++;
    if (n0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
