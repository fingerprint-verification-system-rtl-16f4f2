// tb_image_capture: the acquisition path for a 16x16 image with a 8 ns
// frame-memory clock and a 13 ns pixel clock. The frame memory is modelled
// as a stream of random bytes; every byte the path takes is recorded. After
// print_done the print memory is read back through its read port and must
// hold the first 256 bytes taken, in order. Then on_off is pressed and the
// capture flag must fall after the debounce delay.
module tb_image_capture;
  localparam int M = 16, N = 16, AB = 8, DEB = 20;
  logic sys_clk = 0, clk = 0, sys_reset = 1, on_off_noisy = 0;
  logic [7:0] vram_read_data = 0, print_rd_data, prev_vrd = 0;
  logic vram_taken, capture, print_done;
  logic [AB-1:0] print_rd_addr = 0;
  byte unsigned taken[$];
  int checks = 0, failures = 0;

  image_capture #(.M(M), .N(N), .DEB_DELAY(DEB)) dut (.*);
  always #4 sys_clk = ~sys_clk;
  always #6.5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge sys_clk) begin
    if (vram_taken && !sys_reset) taken.push_back(prev_vrd);
    prev_vrd       <= vram_read_data;
    vram_read_data <= 8'($urandom);
  end

  initial begin
    repeat (4) @(posedge sys_clk);
    sys_reset <= 0;
    @(posedge sys_clk);
    checks++;
    if (!capture) begin failures++; $display("FAIL capture not set by reset"); end
    wait (print_done);
    @(negedge clk);
    checks++;
    if (taken.size() < M*N) begin failures++; $display("FAIL only %0d bytes taken", taken.size()); end
    for (int a = 0; a < M*N; a++) begin
      print_rd_addr = AB'(a);
      @(negedge clk); @(negedge clk);
      checks++;
      if (print_rd_data != taken[a]) begin
        failures++;
        if (failures < 10) $display("FAIL print[%0d] = %h exp %h", a, print_rd_data, taken[a]);
      end
    end
    // on_off stops capturing after the debounce delay
    on_off_noisy = 1;
    repeat (DEB + 5) @(posedge sys_clk);
    checks++;
    if (capture) begin failures++; $display("FAIL capture still high after on_off"); end
    on_off_noisy = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
