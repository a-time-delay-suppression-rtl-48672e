// pid_lut_controller: real-time PID control by table look-up.
//
// Works on the samples of the analog-timing converter. On each capture
// strobe (one per switching period) it
//   - latches u(k) = Memory2[pc], the word the programmable counter points at,
//   - updates the integrator n_I(k) = n_I(k-1) + e(k), e(k) = y2(k) - r,
//     saturating at the NI_W-bit two's-complement limits, and
//   - keeps y2(k) as the previous sample for the derivative term.
// Between the capture and the end of the period, Memory3 and Memory4 turn
// n_I and the previous sample into a = (K_I/A) n_I and b = (K_D/A) y2, and
// their difference sets the preset of the programmable counter for the next
// period: init = PC_BASE + 255 - OFFSET - (a - b), clamped to the counter
// range. OFFSET is the sum code + step that stays constant along the
// one-code-per-clock part of the staircase (255 for the plain staircase,
// C_START + HEAD for the modified one), so y2(k) = OFFSET - step there. Memory2 is
// stored in reverse so that, with the counter counting up while the staircase
// counts down, Memory2[pc] at the capture equals
//   u_Ref - (K_P + K_I) r + A (y2(k) + a - b)
// which is the PID law u = u_Ref + K_P e + K_I n_I + K_D (e(k) - e(k-1)).
//
// Interface and timing: addr_d, capture and y2_next come from the ATC latch.
// The preset is applied combinationally while addr_d = 0; u changes on the
// clock edge that ends the capture cycle, so the duty word is ready one clock
// after the comparator edge is seen. int_sat and pc_clamp are one-cycle
// status strobes. The structure (Memory2/3/4, delay flip-flops, PC preset
// from a - b) follows the document; the widths are its printed bus widths;
// saturation, clamping, reset values and gain numbers are this design's.
module pid_lut_controller
  import dpwm_pkg::*;
#(
  parameter int KP   = KP_Q8,
  parameter int KI   = KI_Q8,
  parameter int KD   = KD_Q8,
  parameter int R    = R_CODE,
  parameter int UREF = U_REF,
  parameter int OFFSET = (1 << ADDR_W) - 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [ADDR_W-1:0]      addr_d,
  input  logic                   capture,
  input  logic [ADDR_W-1:0]      y2_next,
  output logic [U_W-1:0]         u,
  output logic signed [NI_W-1:0] n_i,
  output logic [ADDR_W-1:0]      y2_prev,
  output logic [PC_W-1:0]        pc,
  output logic                   int_sat,
  output logic                   pc_clamp
);

  localparam int NI_MAX = (1 << (NI_W - 1)) - 1;
  localparam int NI_MIN = -(1 << (NI_W - 1));
  localparam int PC_MAX = (1 << PC_W) - 1;

  logic signed [AB_W-1:0] a;
  logic signed [AB_W-1:0] b;
  logic [PC_W-1:0]        init;
  logic [U_W-1:0]         u_lut;
  int                     ni_sum;
  int                     pc_init;

  memory3_integral #(.KP(KP), .KI(KI), .KD(KD)) u_memory3 (.n_i, .a);
  memory4_derivative #(.KP(KP), .KI(KI), .KD(KD)) u_memory4 (.y2_prev, .b);

  always_comb begin
    pc_init  = PC_BASE + ((1 << ADDR_W) - 1) - OFFSET - (int'(a) - int'(b));
    pc_clamp = (addr_d == '0) && (pc_init < 0 || pc_init > PC_MAX);
    init     = PC_W'(clamp(pc_init, 0, PC_MAX));
    ni_sum   = int'(n_i) + int'(y2_next) - R;
    int_sat  = capture && (ni_sum > NI_MAX || ni_sum < NI_MIN);
  end

  prog_counter #(.W(PC_W)) u_pc (
    .clk, .rst_n, .load(addr_d == '0), .init, .pc
  );

  memory2_pid_lut #(.KP(KP), .KI(KI), .KD(KD), .R(R), .UREF(UREF)) u_memory2 (
    .addr(pc), .u(u_lut)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u       <= '0;
      n_i     <= '0;
      y2_prev <= ADDR_W'(R);
    end else if (capture) begin
      u       <= u_lut;
      n_i     <= NI_W'(clamp(ni_sum, NI_MIN, NI_MAX));
      y2_prev <= y2_next;
    end
  end

endmodule
