// tb_dpwm: runs the DPWM over many periods with random duty words and checks
// that every period is 512 counts long and that the on-time equals u counts
// (T_on = u / f_S'). It also changes u inside the on-time: lowering it below
// the current count ends the pulse at once, and raising it after the pulse
// has ended does not start a second one.
module tb_dpwm;
  logic clk = 0, rst_n = 0;
  logic [8:0] u, count;
  logic pwm;
  int checks = 0, failures = 0;
  int n_cut = 0;

  dpwm #(.UW(9)) dut (.clk, .rst_n, .u, .count, .pwm);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u = 9'd100;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Let the first period pass.
    while (count != 9'd511) @(negedge clk);
    for (int period = 0; period < 60; period++) begin
      int on, exp_on, edges, uu, cut;
      bit last;
      uu = (period % 10 == 0) ? 0 : ((period % 10 == 1) ? 511 : int'($urandom_range(1, 510)));
      cut = (period % 7 == 3 && uu > 40) ? int'($urandom_range(5, 30)) : -1;
      u = 9'(uu);
      exp_on = (cut >= 0) ? cut + 1 : uu;
      on = 0;
      edges = 0;
      last = 0;
      for (int c = 0; c < 512; c++) begin
        @(negedge clk);
        if (c == 0) begin
          checks++;
          if (count !== 9'd0) failures++;
        end
        if (pwm) on++;
        if (pwm && !last) edges++;
        last = pwm;
        if (c == cut) u = 9'(cut / 2);         // lower u below the count
        if (cut >= 0 && c == cut + 10) u = 9'(500); // raise it after the pulse
      end
      if (cut >= 0) n_cut++;
      checks++;
      if (on != exp_on) begin failures++; $display("period %0d u=%0d on=%0d exp %0d", period, uu, on, exp_on); end
      checks++;
      if (edges > 1) failures++;
    end
    checks++;
    if (n_cut == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
