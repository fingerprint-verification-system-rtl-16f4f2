// tb_sync_delay: random syncs must come out exactly two clocks later; reset
// drives both outputs high.
module tb_sync_delay;
  logic clk = 0, rst_n = 0, hsync = 0, vsync = 0, hsync_delay, vsync_delay;
  logic [1:0] hist [3];
  int checks = 0, failures = 0;

  sync_delay dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (hsync_delay !== 1'b1 || vsync_delay !== 1'b1) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      hsync = 1'($urandom); vsync = 1'($urandom);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = {hsync, vsync};
      @(negedge clk);
      if (i >= 1) begin
        checks++;
        if ({hsync_delay, vsync_delay} !== hist[1]) begin failures++; $display("FAIL i=%0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
