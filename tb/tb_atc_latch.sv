// tb_atc_latch: drives the latch with a counting address and a comparator
// model (output voltage level E in DAC steps, compared with the staircase
// code of the previous address, as the DAC-code register would present it)
// and checks one capture per period with y2 = min(E - 1, 255) clipped at 0,
// the saturation strobes, and that the capture comes LAG clocks after the
// comparator crossing.
module tb_atc_latch;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic vcomp;
  logic [W-1:0] addr, addr_q, code;
  logic [W-1:0] addr_d, y2_next, y2;
  logic capture, sat_high, sat_low;
  int level;
  int checks = 0, failures = 0;
  int caps = 0, nhigh = 0, nlow = 0;

  atc_latch #(.W(W), .SYNC(2), .LAG(3)) dut (
    .clk, .rst_n, .vcomp, .addr, .code, .addr_d, .capture, .y2_next, .y2, .sat_high, .sat_low
  );

  always #5 clk = ~clk;

  // Address counter and DAC-code register of the ATC, modelled here.
  always_ff @(posedge clk) begin
    if (!rst_n) begin addr <= '0; addr_q <= '0; end
    else begin addr <= addr + 1'b1; addr_q <= addr; end
  end
  // The staircase code is 255 - address; the comparator is high when e_o is above it.
  always_comb vcomp = (level > (255 - int'(addr_q)));
  assign code = ~addr;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_y2, next_y2, prev_y2, cur_level, next_level;
    int t_cap, ncap, period;
    bit active, seen254;
    level = 300;
    active = 0;
    seen254 = 0;
    period = 0;
    ncap = 0;
    t_cap = -1;
    exp_y2 = 0;
    next_y2 = 0;
    prev_y2 = 0;
    cur_level = 300;
    next_level = 300;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (period < 40) begin
      @(negedge clk);
      if (active && capture) begin
        ncap++;
        t_cap = int'(addr_d);
        checks++;
        if (y2_next !== 8'(exp_y2)) begin
          failures++;
          $display("period %0d level %0d y2 %0d exp %0d", period, level, y2_next, exp_y2);
        end
        checks += 2;
        if (sat_high !== (cur_level > 255)) failures++;
        if (sat_low !== (cur_level <= 0)) failures++;
        if (sat_high) nhigh++;
        if (sat_low) nlow++;
      end
      if (active && addr_d == 8'd0 && period > 0) begin
        // y2 register holds the value captured in the previous period.
        checks++;
        if (y2 !== 8'(prev_y2)) begin
          failures++;
          $display("period %0d y2 register %0d exp %0d", period, y2, prev_y2);
        end
      end
      if (active && addr_d == 8'd255) begin
        checks++;
        if (ncap != 1) begin failures++; $display("period %0d: %0d captures", period, ncap); end
        // The step at which the sample is taken is 255 - y2.
        checks++;
        if (t_cap != 255 - exp_y2) begin
          failures++;
          $display("period %0d capture at step %0d exp %0d", period, t_cap, 255 - exp_y2);
        end
        caps += ncap;
        period++;
      end
      if (addr_d == 8'd255) begin
        ncap = 0;
        prev_y2 = exp_y2;
        exp_y2 = next_y2;
        cur_level = next_level;
        active = seen254;
      end
      if (addr_d == 8'd254) begin
        seen254 = 1;
        case (period % 8)
          0: level = 0;
          1: level = 257;
          2: level = 256;
          3: level = 1;
          default: level = 1 + int'($urandom_range(0, 254));
        endcase
        next_level = level;
        next_y2 = (level - 1 > 255) ? 255 : ((level - 1 < 0) ? 0 : level - 1);
      end
    end
    checks++;
    if (nhigh == 0 || nlow == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
