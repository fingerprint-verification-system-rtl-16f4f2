// tb_readfifomemory: drains a 4x4 image (16 bytes) from a FIFO model whose
// contents arrive at random and checks that no read is issued while the
// FIFO is empty, that the bytes come out in order with addresses 0..15 and
// image_valid, that empty_en follows the last byte exactly once per image,
// and that a second image is read after the next done.
module tb_readfifomemory;
  localparam int M = 4, N = 4, AB = 4;
  logic clk = 0, reset = 1, done = 0, empty, rd_en, image_valid, empty_en;
  logic [7:0] dout = 0, image_data;
  logic [AB-1:0] image_addr_read;
  byte unsigned q[$], sent[$];
  int checks = 0, failures = 0, got, n_last;

  readfifomemory #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  assign empty = (q.size() == 0);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (rd_en) begin
      chk(q.size() > 0, "no read while empty");
      if (q.size() > 0) dout <= q.pop_front();
    end
    if ($urandom % 3 == 0 && sent.size() < 40) begin
      automatic byte unsigned b = 8'($urandom);
      q.push_back(b); sent.push_back(b);
    end
  end

  always @(negedge clk) if (!reset) begin
    if (image_valid) begin
      chk(image_addr_read == AB'(got % (M*N)), "address");
      chk(image_data == sent[got], "data");
      got++;
    end
    if (empty_en) begin
      n_last++;
      chk(got == n_last * M*N, "empty_en after the last byte");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    repeat (10) @(negedge clk);
    chk(got == 0, "nothing read before done");
    for (int img = 0; img < 2; img++) begin
      done = 1; @(negedge clk); done = 0;
      while (n_last == img) @(negedge clk);
      repeat (10) @(negedge clk);
      chk(got == (img + 1) * M*N, "whole image read");
    end
    chk(n_last == 2, "two end pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
