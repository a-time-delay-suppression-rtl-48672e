// memory3_integral: Memory3, the integral-term table of the PID look-up scheme.
//
// The PID law is rewritten so that one table read per period gives u(k):
// u(k) = u_Ref - (K_P+K_I) r + A (y2(k) + a - b), with A = K_P + K_I + K_D.
// Memory3 holds a = (K_I / A) n_I(k-1) for every value of the integrator
// n_I(k-1), rounded to the nearest integer and clamped to the AB_W-bit signed
// range. n_I is a two's-complement NI_W-bit number.
//
// Interface: combinational read, a = table[n_i]. The table is computed at
// elaboration from the gains. The formula and widths (8-bit address, 11-bit
// data) follow the document; the gain values, the Q8.8 format and rounding
// are this design's choices.
module memory3_integral
  import dpwm_pkg::*;
#(
  parameter int unsigned NW = NI_W,
  parameter int unsigned DW = AB_W,
  parameter int KP = KP_Q8,
  parameter int KI = KI_Q8,
  parameter int KD = KD_Q8
) (
  input  logic signed [NW-1:0] n_i,
  output logic signed [DW-1:0] a
);

  localparam int unsigned DEPTH = 1 << NW;
  localparam int A_SUM = KP + KI + KD;
  localparam int DMAX  = (1 << (DW - 1)) - 1;

  logic signed [DW-1:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      int n;
      n = int'($signed(NW'(i)));
      rom[i] = DW'(clamp(div_round(longint'(KI) * longint'(n), longint'(A_SUM)), -DMAX - 1, DMAX));
    end
  end

  assign a = rom[$unsigned(n_i)];

  initial assert (A_SUM != 0) else $error("memory3_integral: K_P+K_I+K_D must not be 0");

endmodule
