// memory2_pid_lut: Memory2, the PID look-up table that returns the duty word.
//
// With A = K_P + K_I + K_D, the PID law becomes
//   u(k) = u_Ref - (K_P + K_I) r + A * address',  address' = y2(k) + a - b.
// The programmable counter that addresses this table counts up while the
// staircase counts down, so the table is stored in reverse: word p holds the
// duty for address' = X_OFS - p, where X_OFS = PC_BASE + 2**ADDR_W - 1. The
// result is rounded and clamped to 0 .. 2**UW - 1 (the DPWM counter range).
//
// Interface: combinational read, u = table[addr]. The law, the 10-bit
// address and 9-bit data follow the document; the reversed order, the
// clamping, the Q8.8 gains and their values are this design's choices.
module memory2_pid_lut
  import dpwm_pkg::*;
#(
  parameter int unsigned AW = PC_W,
  parameter int unsigned UW = U_W,
  parameter int KP   = KP_Q8,
  parameter int KI   = KI_Q8,
  parameter int KD   = KD_Q8,
  parameter int R    = R_CODE,
  parameter int UREF = U_REF,
  parameter int X_OFS = PC_BASE + (1 << ADDR_W) - 1
) (
  input  logic [AW-1:0] addr,
  output logic [UW-1:0] u
);

  localparam int unsigned DEPTH = 1 << AW;
  localparam int A_SUM = KP + KI + KD;
  localparam int UMAX  = (1 << UW) - 1;

  logic [UW-1:0] rom [DEPTH];

  initial begin
    for (int p = 0; p < int'(DEPTH); p++) begin
      longint acc;
      acc = (longint'(UREF) << GAIN_FRAC)
          + longint'(A_SUM) * (longint'(X_OFS) - longint'(p))
          - (longint'(KP) + longint'(KI)) * longint'(R);
      rom[p] = UW'(clamp(div_round(acc, longint'(1) << GAIN_FRAC), 0, UMAX));
    end
  end

  assign u = rom[addr];

endmodule
