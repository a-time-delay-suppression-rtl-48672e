// atc_latch: the latch register of the analog-timing converter (ATC).
//
// The analog comparator output vcomp goes high once the falling staircase
// V_ref' drops below the converter output e_o. The staircase code at that
// instant is the digitised output voltage y2(k): a higher e_o is crossed
// earlier and gives a larger code. The document draws this as a D flip-flop
// clocked by vcomp that stores the inverted address, which is the same
// number for the plain staircase c(m) = 255 - m; latching the code itself
// also covers the modified staircase (see memory1_staircase).
//
// Here the latch is synchronous to the system clock. vcomp passes a
// SYNC-stage synchroniser, and the address and code are delayed by LAG
// cycles (the DAC-code register in front of the DAC plus the synchroniser)
// so that addr_d and the delayed code name the staircase step that the
// synchronised comparator level belongs to. In each period (addr_d = 0 ..
// 2**W-1) the first cycle with the synchronised vcomp high captures
// y2 = code_d. If vcomp is already high at addr_d = 0 (e_o above the top of
// the staircase) that is the full-scale code (sat_high). If it never rises,
// the last step is captured anyway (sat_low), so every period yields exactly
// one sample. Reset fills the pipeline with the last step and marks it as
// sampled, so the first window opens cleanly LAG clocks after reset.
//
// Interface and timing: capture is a one-cycle strobe, combinational from
// the synchronised vcomp and addr_d; y2_next is the value captured with it,
// and y2 holds it from the following cycle. addr_d is exported so that the
// PID look-up address counter can run in step with the captured step.
module atc_latch #(
  parameter int unsigned W    = 8,
  parameter int unsigned SYNC = 2,
  parameter int unsigned LAG  = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         vcomp,      // asynchronous comparator output
  input  logic [W-1:0] addr,       // staircase address as driven now
  input  logic [W-1:0] code,       // staircase code c(addr)
  output logic [W-1:0] addr_d,     // address aligned with the synchronised vcomp
  output logic         capture,    // one strobe per period
  output logic [W-1:0] y2_next,    // value latched on this strobe
  output logic [W-1:0] y2,         // latched output-voltage code y2(k)
  output logic         sat_high,   // strobe: e_o above the whole staircase
  output logic         sat_low     // strobe: e_o below the whole staircase
);

  logic [SYNC-1:0] vsync;
  logic [W-1:0]    addr_pipe [LAG];
  logic [W-1:0]    code_pipe [LAG];
  logic            done;
  logic            vcomp_s;
  logic            window_start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vsync <= '0;
      for (int i = 0; i < int'(LAG); i++) begin
        addr_pipe[i] <= '1;
        code_pipe[i] <= '0;
      end
    end else begin
      vsync <= {vsync[SYNC-2:0], vcomp};
      addr_pipe[0] <= addr;
      code_pipe[0] <= code;
      for (int i = 1; i < int'(LAG); i++) begin
        addr_pipe[i] <= addr_pipe[i-1];
        code_pipe[i] <= code_pipe[i-1];
      end
    end
  end

  assign vcomp_s      = vsync[SYNC-1];
  assign addr_d       = addr_pipe[LAG-1];
  assign window_start = (addr_d == '0);
  assign capture      = (window_start || !done) && (vcomp_s || addr_d == '1);
  assign y2_next      = code_pipe[LAG-1];
  assign sat_high     = capture && window_start;
  assign sat_low      = capture && !vcomp_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b1;
      y2   <= '0;
    end else begin
      if (window_start)  done <= capture;
      else if (capture)  done <= 1'b1;
      if (capture) y2 <= y2_next;
    end
  end

  initial begin
    assert (SYNC >= 2) else $error("atc_latch: SYNC must be at least 2");
    assert (LAG >= 1)  else $error("atc_latch: LAG must be at least 1");
  end

  // At most one capture per period.
  assert property (@(posedge clk) disable iff (!rst_n)
                   capture && !window_start |-> !done);

endmodule
