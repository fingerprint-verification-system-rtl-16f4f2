// tb_read_loc: neighbour index of the 3x3 window, with wrap-around, one
// clock after the inputs.
module tb_read_loc;
  localparam int M = 256, N = 256;
  logic clk = 0;
  logic [2:0] filt_loc = 0;
  logic [15:0] pixel = 0, read;
  int checks = 0, failures = 0;
  int dr [8] = '{-1,-1,-1, 0, 0, 1, 1, 1};
  int dc [8] = '{-1, 0, 1,-1, 1,-1, 0, 1};

  read_loc #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int p, k, exp;
      @(negedge clk);
      p = (n < 8) ? 0 : (n < 16) ? M*N-1 : $urandom % (M*N);
      k = n % 8;
      pixel = 16'(p); filt_loc = 3'(k);
      @(negedge clk);
      exp = ((p + dr[k]*N + dc[k]) % (M*N) + M*N) % (M*N);
      checks++;
      if (int'(read) != exp) begin failures++; $display("FAIL p=%0d k=%0d got %0d exp %0d", p, k, read, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
