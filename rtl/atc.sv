// atc: digital part of the analog-timing converter (ATC).
//
// The ATC replaces the A/D converter. The system-clock up counter addresses
// Memory1, whose staircase code c(m) is registered and sent to an external
// D/A converter; the DAC output V_ref' is compared with the converter output
// e_o by an external analog comparator, and the comparator output vcomp comes
// back to atc_latch, which turns the time of the crossing into the voltage
// code y2(k), the staircase code at the crossing (~address for the plain
// staircase). HEAD, C_START and C_FLOOR shape the staircase (see
// memory1_staircase). One conversion takes one switching period of
// 2**W system clocks and is finished as soon as the staircase crosses e_o,
// normally early in the period, long before the PWM on-time ends.
//
// Interface: dac_code goes to the DAC (registered, one clock after the
// address). vcomp is the asynchronous comparator output. capture/y2_next/y2,
// addr_d and the saturation strobes are those of atc_latch; frame_start marks
// count 0 of the undelayed counter. Latency from a staircase step to the
// capture strobe that can belong to it is LAG = 1 + SYNC clocks.
module atc #(
  parameter int unsigned W       = 8,
  parameter int unsigned HEAD    = 0,
  parameter int unsigned C_START = (1 << W) - 1,
  parameter int unsigned C_FLOOR = 0,
  parameter int unsigned SYNC    = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] dac_code,
  input  logic         vcomp,
  output logic [W-1:0] addr_d,
  output logic         capture,
  output logic [W-1:0] y2_next,
  output logic [W-1:0] y2,
  output logic         sat_high,
  output logic         sat_low,
  output logic         frame_start
);

  logic [W-1:0] address;
  logic [W-1:0] code;

  sys_up_counter #(.W(W)) u_counter (
    .clk, .rst_n, .count(address), .frame_start
  );

  memory1_staircase #(.W(W), .HEAD(HEAD), .C_START(C_START), .C_FLOOR(C_FLOOR)) u_memory1 (
    .addr(address), .data(code)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) dac_code <= '0;
    else        dac_code <= code;
  end

  atc_latch #(.W(W), .SYNC(SYNC), .LAG(SYNC + 1)) u_latch (
    .clk, .rst_n, .vcomp, .addr(address), .code, .addr_d, .capture, .y2_next, .y2,
    .sat_high, .sat_low
  );

endmodule
