// dac_model: behavioural model of the external R-2R D/A converter (not
// synthesizable; for simulation only). Output voltage
//   vout = code / 2**W * (v_plus - v_minus) + v_minus,
// settling instantly. Used by the end-to-end testbench of the controller.
module dac_model #(
  parameter int  W       = 8,
  parameter real V_PLUS  = 1.7,
  parameter real V_MINUS = 0.0
) (
  input  logic [W-1:0] code,
  output real          vout
);
  always_comb vout = real'(code) / real'(1 << W) * (V_PLUS - V_MINUS) + V_MINUS;
endmodule
