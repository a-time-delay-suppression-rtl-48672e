// dpwm_controller_top: ADC-less digital PWM controller for a point-of-load
// DC-DC converter.
//
// The output voltage is digitised without an A/D converter: the
// analog-timing converter (atc) plays a falling staircase through an external
// DAC and reads back, through an external comparator, the step at which the
// staircase crosses the output voltage. The captured code y2(k) drives a PID
// law that is evaluated by table look-up (pid_lut_controller): the
// programmable counter is preset one period ahead, so the duty word u(k) is
// latched in the very clock the crossing is seen. The DPWM (dpwm) turns u(k)
// into an on-time of u(k) cycles of f_S' at the start of the same period.
//
// Interface: clk_s is the system clock f_S (one staircase step per cycle,
// 2**8 cycles per switching period). clk_sp is f_S' = 2 f_S from an external
// PLL, phase-locked to clk_s. rst_n is synchronous, active low, and must be
// released on a clk_s edge that is also a clk_sp edge. dac_code drives the
// external DAC; vcomp is the external comparator output (high when the
// output voltage is above the DAC voltage). pwm goes to the gate driver.
// The remaining outputs expose the loop state and one-cycle event strobes
// for observation. HEAD and C_START select the modified staircase (a jump
// from full scale to C_START after HEAD steps) that keeps the sample early
// in the period when the DAC range is narrowed; the defaults give the plain
// staircase. The partitioning follows the document's block diagram;
// clock-domain handling, reset and the status outputs are this design's.
module dpwm_controller_top
  import dpwm_pkg::*;
#(
  parameter int KP   = KP_Q8,
  parameter int KI   = KI_Q8,
  parameter int KD   = KD_Q8,
  parameter int R    = R_CODE,
  parameter int UREF = U_REF,
  parameter int unsigned HEAD    = 0,
  parameter int unsigned C_START = (1 << ADDR_W) - 1
) (
  input  logic                   clk_s,
  input  logic                   clk_sp,
  input  logic                   rst_n,
  output logic [ADDR_W-1:0]      dac_code,
  input  logic                   vcomp,
  output logic                   pwm,
  output logic [ADDR_W-1:0]      y2,
  output logic [U_W-1:0]         u,
  output logic signed [NI_W-1:0] n_i,
  output logic                   capture,
  output logic                   sat_high,
  output logic                   sat_low,
  output logic                   int_sat,
  output logic                   pc_clamp,
  output logic                   frame_start
);

  logic [ADDR_W-1:0] addr_d;
  logic [ADDR_W-1:0] y2_next;
  logic [ADDR_W-1:0] y2_prev;
  logic [PC_W-1:0]   pc;
  logic [U_W-1:0]    pwm_count;

  atc #(.W(ADDR_W), .HEAD(HEAD), .C_START(C_START)) u_atc (
    .clk(clk_s), .rst_n, .dac_code, .vcomp, .addr_d, .capture, .y2_next, .y2,
    .sat_high, .sat_low, .frame_start
  );

  pid_lut_controller #(
    .KP(KP), .KI(KI), .KD(KD), .R(R), .UREF(UREF), .OFFSET(int'(C_START + HEAD))
  ) u_pid (
    .clk(clk_s), .rst_n, .addr_d, .capture, .y2_next, .u, .n_i, .y2_prev, .pc,
    .int_sat, .pc_clamp
  );

  dpwm #(.UW(U_W)) u_dpwm (
    .clk(clk_sp), .rst_n, .u, .count(pwm_count), .pwm
  );

endmodule
