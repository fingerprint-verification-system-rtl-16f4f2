// tb_image_rom: loads the image memory through its load port and reads it
// back through the read port with one cycle of latency.
module tb_image_rom;
  localparam int AB = 7;
  logic clk = 0, ld_we = 0;
  logic [AB-1:0] addr = 0, ld_addr = 0;
  logic [7:0] dout, ld_data = 0;
  byte unsigned model [2**AB];
  int checks = 0, failures = 0;

  image_rom #(.ADDR_BITS(AB)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 2**AB; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = AB'(i); ld_data = 8'($urandom); model[i] = ld_data;
    end
    @(negedge clk); ld_we = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk); addr = AB'($urandom);
      begin
        automatic int a = addr;
        @(negedge clk);
        checks++;
        if (dout !== model[a]) begin failures++; $display("FAIL %0d %0h %0h", a, dout, model[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
