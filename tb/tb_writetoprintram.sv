// tb_writetoprintram: random bytes with random valid strobes and addresses;
// each valid byte must appear one clock later on image_print/image_address
// with we low, we must be high in every other clock, and done_ram must rise
// one clock after empty_en and fall when the next byte arrives.
module tb_writetoprintram;
  localparam int AB = 16;
  logic clk = 0, reset = 1, image_valid = 0, empty_en = 0, we, done_ram;
  logic [7:0] image_data = 0, image_print;
  logic [AB-1:0] image_addr = 0, image_address;
  logic [7:0] d_q; logic [AB-1:0] a_q; logic v_q = 0, done_m = 0;
  int checks = 0, failures = 0, n_done = 0;

  writetoprintram dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 3000; i++) begin
      image_valid = 1'($urandom % 2);
      image_data  = 8'($urandom);
      image_addr  = AB'($urandom);
      empty_en    = !image_valid && ($urandom % 50 == 0);
      @(posedge clk);
      d_q = image_data; a_q = image_addr; v_q = image_valid;
      if (image_valid) done_m = 0;
      if (empty_en) begin done_m = 1; n_done++; end
      @(negedge clk);
      checks += 2;
      if (we != !v_q) begin failures++; $display("FAIL we at %0d", i); end
      if (done_ram != done_m) begin failures++; $display("FAIL done_ram at %0d", i); end
      if (v_q) begin
        checks++;
        if (image_print != d_q || image_address != a_q) begin failures++; $display("FAIL data/address at %0d", i); end
      end
    end
    checks++;
    if (n_done == 0) begin failures++; $display("FAIL no end of image"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
