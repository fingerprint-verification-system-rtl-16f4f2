// tb_imgdisp_dir: shows a random 256x256 direction map and checks colour
// and nibble at every raster position of the second frame.
module tb_imgdisp_dir;
  import fp_pkg::*;
  localparam int M = 256, N = 256, AB = 15;
  logic clk = 0;
  logic [9:0] pixel;
  logic [8:0] line;
  logic [23:0] color;
  logic [AB-1:0] addr;
  logic [7:0] data;
  logic [3:0] nibble;
  int frame;
  byte unsigned mem [2**AB];
  int checks = 0, failures = 0;

  function automatic logic [23:0] dcolor(input int code);
    case (code)
      5: return WHITE;
      1: return RED;
      2: return GREEN;
      3, 4: return BLUE;
      default: return BLACK;
    endcase
  endfunction

  tb_raster u_r (.clk, .pixel, .line, .frame);
  imgdisp_dir #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) data <= mem[addr];
  initial begin repeat (2000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int a = 0; a < 2**AB; a++) mem[a] = 8'(($urandom % 7) * 16 + ($urandom % 7));
    wait (frame == 1);
    while (frame == 1) begin
      @(negedge clk);
      begin
        automatic int r = int'(line) - (240 - M/2);
        automatic int c = int'(pixel) - (320 - N/2);
        automatic int code = 0;
        automatic logic [23:0] exp = MIT_RED;
        if (r >= 0 && r < M && c >= 0 && c < N) begin
          automatic int p = r * N + c;
          code = (p % 2) ? mem[p/2] % 16 : mem[p/2] / 16;
          exp = dcolor(code);
        end
        checks += 2;
        if (color !== exp || int'(nibble) != code) begin
          failures++;
          if (failures < 10) $display("FAIL line %0d pixel %0d got %h/%0d exp %h/%0d", line, pixel, color, nibble, exp, code);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
