// tb_read_loc5x5: cell index of the 5x5 window, with wrap-around, one clock
// after the inputs.
module tb_read_loc5x5;
  localparam int M = 256, N = 256;
  logic clk = 0;
  logic [4:0] filt_loc = 0;
  logic [15:0] pixel = 0, read;
  int checks = 0, failures = 0;

  read_loc5x5 #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 1500; n++) begin
      int p, k, exp;
      @(negedge clk);
      p = (n < 25) ? 1 : (n < 50) ? M*N-2 : $urandom % (M*N);
      k = n % 25;
      pixel = 16'(p); filt_loc = 5'(k);
      @(negedge clk);
      exp = ((p + (k/5 - 2)*N + (k%5 - 2)) % (M*N) + M*N) % (M*N);
      checks++;
      if (int'(read) != exp) begin failures++; $display("FAIL p=%0d k=%0d got %0d exp %0d", p, k, read, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
