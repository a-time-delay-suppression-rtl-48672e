// prog_counter: the programmable counter (PC) that addresses Memory2.
//
// At the first step of every period the counter is preset to init (derived
// from a - b, which was worked out during the previous period); on every
// following system clock it counts up by one. It therefore runs in step with
// the staircase, and at the moment the ATC latches y2(k) the counter already
// points at the Memory2 word for y2(k) + a - b, so u(k) is available in the
// same clock. The count saturates at its maximum instead of wrapping.
//
// Interface and timing: pc is combinational, init while load is high,
// otherwise the registered count; the count register takes pc + 1 on every
// clock. Preset and +1 counting follow the document; saturation and the
// synchronous active-low reset are this design's choices.
module prog_counter #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] init,
  output logic [W-1:0] pc
);

  logic [W-1:0] cnt;

  assign pc = load ? init : cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)          cnt <= '0;
    else if (pc != '1)   cnt <= pc + 1'b1;
    else                 cnt <= pc;
  end

endmodule
