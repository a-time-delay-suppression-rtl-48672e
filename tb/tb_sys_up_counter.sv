// tb_sys_up_counter: checks that the address counter counts up by one per
// clock from reset, wraps after 2**W counts and flags count 0.
module tb_sys_up_counter;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] count;
  logic frame_start;
  int checks = 0, failures = 0;

  sys_up_counter #(.W(W)) dut (.clk, .rst_n, .count, .frame_start);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    int starts;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    expected = 1;
    starts = 0;
    for (int i = 0; i < 3 * (1 << W) + 17; i++) begin
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (count !== W'(expected)) begin
        failures++;
        $display("count %0d expected %0d", count, expected);
      end
      checks++;
      if (frame_start !== (expected == 0)) failures++;
      if (frame_start) starts++;
      expected = (expected + 1) % (1 << W);
    end
    checks++;
    if (starts != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
