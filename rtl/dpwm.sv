// dpwm: the digital pulse-width modulator.
//
// A UW-bit up counter clocked by f_S' (from the PLL) and a digital
// comparator. The counter wraps once per switching period; the output goes
// high when it wraps to 0 and low when the count reaches the duty word u, so
// the on-time is T_on = u / f_S'. The duty word comes from the f_S domain,
// which is phase-locked to f_S', and is compared directly. It may change
// during the on-time: the ATC
// delivers u(k) early in the period, and the comparison always uses the
// newest word. Once the output has gone low it stays low until the next wrap,
// so a late change of u cannot produce a second pulse.
//
// Interface and timing: pwm is registered. u = 0 gives no pulse, u = 2**UW-1
// an on-time of 2**UW - 1 counts. With f_S' = 2 f_S and UW = 8 + 1 the
// period equals that of the 8-bit ATC staircase; both domains must leave
// reset on the same f_S edge to stay in phase. The counter leaves reset at
// COUNT_INIT = 1 so that, after that edge, it always equals twice the ATC
// address (both advance on the first edge). The counter and comparator
// follow the document; the set/reset output stage is this design's choice.
module dpwm #(
  parameter int unsigned UW         = 9,
  parameter int unsigned COUNT_INIT = 1
) (
  input  logic          clk,     // f_S'
  input  logic          rst_n,
  input  logic [UW-1:0] u,
  output logic [UW-1:0] count,
  output logic          pwm
);

  logic [UW-1:0] count_n;

  assign count_n = count + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= UW'(COUNT_INIT);
      pwm   <= 1'b0;
    end else begin
      count <= count_n;
      if (count_n == '0)      pwm <= (u != '0);
      else if (count_n >= u)  pwm <= 1'b0;
    end
  end

endmodule
