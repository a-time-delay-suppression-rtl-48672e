// sys_up_counter: the system-clock address counter of the analog-timing
// converter (ATC).
//
// A free-running W-bit up counter clocked by the system clock f_S. Its value
// addresses Memory1, so one full count (2**W clocks) is one switching period:
// the staircase reference restarts at count 0. frame_start is high while the
// count is 0.
//
// Timing: count advances on every rising clk edge; synchronous active-low
// reset to 0. The counter and its 8-bit width follow the block diagram; the
// reset and the frame strobe are this design's own additions.
module sys_up_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] count,
  output logic         frame_start
);

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  assign frame_start = (count == '0);

endmodule
