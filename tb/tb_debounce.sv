// tb_debounce: with DELAY = 20, bursts of bounces shorter than the delay
// never reach clean; a level held long enough appears DELAY+2 clocks after
// the last change (one clock to sample, DELAY to count, one to pass on).
module tb_debounce;
  localparam int D = 20;
  logic clk = 0, reset = 1, noisy = 0, clean;
  int checks = 0, failures = 0;

  debounce #(.DELAY(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic press(input logic level);
    int lat = 0;
    // bounce: toggles at random intervals shorter than the delay
    repeat (6) begin
      noisy = !noisy;
      repeat (1 + $urandom % (D - 2)) begin
        @(negedge clk);
        checks++;
        if (clean !== !level) begin failures++; $display("FAIL bounce passed"); end
      end
    end
    noisy = level;
    while (clean !== level && lat < 10 * D) begin @(negedge clk); lat++; end
    checks++;
    if (lat != D + 2) begin failures++; $display("FAIL latency %0d exp %0d", lat, D + 2); end
    repeat (3 * D) @(negedge clk);
    checks++;
    if (clean !== level) begin failures++; $display("FAIL level lost"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    checks++;
    if (clean !== 1'b0) begin failures++; $display("FAIL reset value"); end
    repeat (5) @(negedge clk);
    noisy = 1;           // start of press 1 is the first bounce edge
    noisy = 0;
    press(1'b1);
    press(1'b0);
    press(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
