// tb_onoffhigh: drives random reset and on_off levels into onoffhigh and
// compares capture with a model: on_off clears, otherwise reset sets,
// otherwise it holds.
module tb_onoffhigh;
  logic clk = 0, reset = 1, on_off = 0, capture;
  logic model;
  int checks = 0, failures = 0;

  onoffhigh dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(negedge clk); @(negedge clk);
    model = 1'b1;
    reset = 0;
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (capture !== model) begin failures++; $display("FAIL %0d capture %b exp %b", i, capture, model); end
      reset  = ($urandom % 8) == 0;
      on_off = ($urandom % 8) == 0;
      @(posedge clk);
      if (on_off) model = 1'b0; else if (reset) model = 1'b1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
