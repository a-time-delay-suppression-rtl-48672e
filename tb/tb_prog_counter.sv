// tb_prog_counter: presets the programmable counter with random values,
// lets it count for random stretches and checks the count against a model,
// including saturation at the top of the range and the combinational preset.
module tb_prog_counter;
  logic clk = 0, rst_n = 0;
  logic load;
  logic [9:0] init, pc;
  int checks = 0, failures = 0;
  int nsat = 0;

  prog_counter #(.W(10)) dut (.clk, .rst_n, .load, .init, .pc);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    load = 0;
    init = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model = 0;
    for (int seg = 0; seg < 60; seg++) begin
      int len;
      @(negedge clk);
      load = 1;
      init = (seg % 5 == 0) ? 10'(1000 + $urandom_range(0, 23)) : 10'($urandom_range(0, 1023));
      #1;
      checks++;
      if (pc !== init) failures++;
      model = int'(init);
      len = int'($urandom_range(1, 300));
      @(negedge clk);
      load = 0;
      for (int i = 0; i < len; i++) begin
        model = (model < 1023) ? model + 1 : 1023;
        #1;
        checks++;
        if (pc !== 10'(model)) begin failures++; $display("seg %0d pc %0d exp %0d", seg, pc, model); end
        if (model == 1023) nsat++;
        @(negedge clk);
      end
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
