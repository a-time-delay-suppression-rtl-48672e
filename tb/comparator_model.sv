// comparator_model: behavioural model of the external analog comparator
// (simulation only). The output is high while the + input (converter output
// voltage) is above the - input (DAC voltage). No delay, no hysteresis.
module comparator_model (
  input  real  vp,
  input  real  vn,
  output logic out
);
  always_comb out = (vp > vn);
endmodule
