// tb_sp_ram: random writes and reads against an array model; checks the
// one-cycle read latency and that a high we_n leaves the memory unchanged.
module tb_sp_ram;
  localparam int AB = 6;
  logic clk = 0, we_n = 1;
  logic [AB-1:0] addr = 0;
  logic [7:0] din = 0, dout;
  byte unsigned model [2**AB];
  int checks = 0, failures = 0;

  sp_ram #(.ADDR_BITS(AB), .DATA_BITS(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 2**AB; i++) begin
      @(negedge clk); we_n = 0; addr = AB'(i); din = 8'(i * 7 + 3); model[i] = din;
    end
    @(negedge clk); we_n = 1;
    repeat (600) begin
      @(negedge clk);
      addr = AB'($urandom);
      if ($urandom % 3 == 0) begin
        we_n = 0; din = 8'($urandom);
      end else begin
        we_n = 1; din = 8'($urandom);   // must not be written
      end
      begin
        automatic int a = addr;
        automatic byte unsigned old = model[a];
        if (!we_n) model[a] = din;
        @(negedge clk);
        checks++;
        if (dout !== old) begin failures++; $display("FAIL addr %0d got %0h exp %0h", a, dout, old); end
        we_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
