// memory4_derivative: Memory4, the derivative-term table of the PID look-up
// scheme.
//
// Holds b = (K_D / A) y2(k-1), A = K_P + K_I + K_D, for every previous
// voltage code y2(k-1) (unsigned, W bits), rounded to the nearest integer and
// clamped to the DW-bit signed range.
//
// Interface: combinational read, b = table[y2_prev]. The formula and widths
// (8-bit address, 11-bit data) follow the document; gain values, their Q8.8
// format and the rounding are this design's choices. With the default gains
// K_D / A is about 0.27, so b stays within 0..68 and its top bits are
// constant; the full 11-bit word is kept for other gain settings.
module memory4_derivative
  import dpwm_pkg::*;
#(
  parameter int unsigned W  = ADDR_W,
  parameter int unsigned DW = AB_W,
  parameter int KP = KP_Q8,
  parameter int KI = KI_Q8,
  parameter int KD = KD_Q8
) (
  input  logic        [W-1:0]  y2_prev,
  output logic signed [DW-1:0] b
);

  localparam int unsigned DEPTH = 1 << W;
  localparam int A_SUM = KP + KI + KD;
  localparam int DMAX  = (1 << (DW - 1)) - 1;

  logic signed [DW-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++)
      rom[i] = DW'(clamp(div_round(longint'(KD) * longint'(i), longint'(A_SUM)), -DMAX - 1, DMAX));
  end

  assign b = rom[y2_prev];

  initial assert (A_SUM != 0) else $error("memory4_derivative: K_P+K_I+K_D must not be 0");

endmodule
