// tb_imgdisp: shows a random 256x256 image and checks the colour of every
// raster position of the second frame: white/black by image bit inside the
// centred image, the border colour outside.
module tb_imgdisp;
  import fp_pkg::*;
  localparam int M = 256, N = 256, AB = 13;
  logic clk = 0;
  logic [9:0] pixel;
  logic [8:0] line;
  logic [23:0] color;
  logic [AB-1:0] addr;
  logic [7:0] data;
  int frame;
  byte unsigned mem [2**AB];
  int checks = 0, failures = 0, shown_white = 0;

  tb_raster u_r (.clk, .pixel, .line, .frame);
  imgdisp #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) data <= mem[addr];
  initial begin repeat (2000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int a = 0; a < 2**AB; a++) mem[a] = 8'($urandom);
    wait (frame == 1);
    while (frame == 1) begin
      @(negedge clk);
      begin
        automatic int r = int'(line) - (240 - M/2);
        automatic int c = int'(pixel) - (320 - N/2);
        automatic logic [23:0] exp;
        if (r >= 0 && r < M && c >= 0 && c < N) begin
          automatic int p = r * N + c;
          exp = mem[p/8][7 - p%8] ? WHITE : BLACK;
        end else exp = MIT_RED;
        checks++;
        if (color === WHITE) shown_white++;
        if (color !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL line %0d pixel %0d got %h exp %h", line, pixel, color, exp);
        end
      end
    end
    checks++;
    if (shown_white < M*N/4) begin failures++; $display("FAIL too few white pixels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
