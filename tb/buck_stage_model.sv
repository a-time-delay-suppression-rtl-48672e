// buck_stage_model: behavioural model of the synchronous buck power stage
// with its gate driver (simulation only). On every clk edge (time step DT
// seconds) the switch node is at E_I while pwm is high and at 0 otherwise;
// the inductor current and the capacitor voltage are integrated with the
// forward Euler method. The load is a resistor r_load that the testbench may
// change at any time; the output voltage includes the capacitor ESR drop.
module buck_stage_model #(
  parameter real DT    = 20.0e-9,
  parameter real E_I   = 3.3,
  parameter real L     = 4.7e-6,
  parameter real C     = 100.0e-6,
  parameter real R_L   = 0.05,
  parameter real R_ESR = 0.01
) (
  input  logic clk,
  input  logic pwm,
  input  real  r_load,
  output real  e_o,
  output real  i_l,
  output real  i_o
);
  real v_c = 0.0;

  initial i_l = 0.0;

  always_comb begin
    i_o = v_c / r_load;
    e_o = v_c + R_ESR * (i_l - i_o);
  end

  always @(posedge clk) begin
    real v_sw;
    v_sw = pwm ? E_I : 0.0;
    i_l <= i_l + (v_sw - e_o - i_l * R_L) / L * DT;
    v_c <= v_c + (i_l - i_o) / C * DT;
  end
endmodule
