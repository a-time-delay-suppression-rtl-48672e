// memory1_staircase: Memory1 of the ATC, the pre-stored staircase reference.
//
// A ROM of 2**W words. Word m is the DAC code c(m) of the descending
// staircase V_ref' played once per switching period:
//   m <  HEAD : c = 2**W - 1            (full scale, V_ref+ at the DAC)
//   m >= HEAD : c = C_START - (m - HEAD), falling one code per system clock,
//               never below C_FLOOR     (flat at the bottom, V_ref-)
// With the defaults (HEAD = 0, C_START = 2**W - 1) this is the plain
// staircase c(m) = 2**W - 1 - m, whose code at the crossing is simply the
// bit-inverted address. The modified form (HEAD > 0, C_START below full
// scale) jumps from V_ref+ straight to C_START and so reaches an output
// voltage near the reference earlier in the period: this is how the
// sensing delay is kept inside the PWM on-time when the DAC range is
// narrowed for finer resolution.
//
// Interface: combinational read, data = c(addr). The table is computed at
// elaboration from the formula above. The descending staircase, the jump to
// V_ref+ and the flat V_ref- end follow the document's waveforms; the
// one-code-per-clock slope and the three shape parameters are this design's.
module memory1_staircase #(
  parameter int unsigned W       = 8,
  parameter int unsigned HEAD    = 0,
  parameter int unsigned C_START = (1 << W) - 1,
  parameter int unsigned C_FLOOR = 0
) (
  input  logic [W-1:0] addr,
  output logic [W-1:0] data
);

  localparam int unsigned DEPTH = 1 << W;

  function automatic logic [W-1:0] code_at(input int unsigned m);
    int c;
    if (int'(m) < int'(HEAD)) return W'(DEPTH - 1);
    c = int'(C_START) - (int'(m) - int'(HEAD));
    if (c < int'(C_FLOOR)) c = int'(C_FLOOR);
    return W'(c);
  endfunction

  logic [W-1:0] rom [DEPTH];

  initial begin
    for (int unsigned m = 0; m < DEPTH; m++) rom[m] = code_at(m);
  end

  assign data = rom[addr];

endmodule
