// tb_gen_imgdisp: five 32x32 images in five behavioural memories; checks
// every viewer's colour and the vertical map's nibble over a whole frame.
module tb_gen_imgdisp;
  import fp_pkg::*;
  localparam int M = 32, N = 32, AB = 7, DB = 9;
  logic clk = 0;
  logic [9:0] pixel;
  logic [8:0] line;
  int frame;
  logic [AB-1:0] image_addr, vedge_addr, hedge_addr;
  logic [DB-1:0] vdir_addr, hdir_addr;
  logic [7:0] image_dout, vedge_dout, hedge_dout, vdir_dout, hdir_dout;
  logic [23:0] color_image, color_vedge, color_hedge, color_vdir, color_hdir;
  logic [3:0] nibble;
  byte unsigned mi [2**AB], mv [2**AB], mh [2**AB], mvd [2**DB], mhd [2**DB];
  int checks = 0, failures = 0;

  tb_raster u_r (.clk, .pixel, .line, .frame);
  gen_imgdisp #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    image_dout <= mi[image_addr]; vedge_dout <= mv[vedge_addr]; hedge_dout <= mh[hedge_addr];
    vdir_dout <= mvd[vdir_addr]; hdir_dout <= mhd[hdir_addr];
  end
  initial begin repeat (2000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [23:0] bcol(input byte unsigned m [2**AB], input int p);
    return m[p/8][7 - p%8] ? WHITE : BLACK;
  endfunction
  function automatic int dcode(input byte unsigned m [2**DB], input int p);
    return (p % 2) ? m[p/2] % 16 : m[p/2] / 16;
  endfunction
  function automatic logic [23:0] dcol(input int code);
    case (code) 5: return WHITE; 1: return RED; 2: return GREEN; 3, 4: return BLUE; default: return BLACK; endcase
  endfunction

  task automatic chk(input logic [23:0] got, input logic [23:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s l%0d p%0d", what, line, pixel); end
  endtask

  initial begin
    for (int a = 0; a < 2**AB; a++) begin mi[a] = 8'($urandom); mv[a] = 8'($urandom); mh[a] = 8'($urandom); end
    for (int a = 0; a < 2**DB; a++) begin
      mvd[a] = 8'(($urandom % 6) * 16 + $urandom % 6); mhd[a] = 8'(($urandom % 6) * 16 + $urandom % 6);
    end
    wait (frame == 1);
    while (frame == 1) begin
      @(negedge clk);
      begin
        automatic int r = int'(line) - (240 - M/2);
        automatic int c = int'(pixel) - (320 - N/2);
        if (r >= 0 && r < M && c >= 0 && c < N) begin
          automatic int p = r * N + c;
          chk(color_image, bcol(mi, p), "image");
          chk(color_vedge, bcol(mv, p), "vedge");
          chk(color_hedge, bcol(mh, p), "hedge");
          chk(color_vdir, dcol(dcode(mvd, p)), "vdir");
          chk(color_hdir, dcol(dcode(mhd, p)), "hdir");
          chk(24'(nibble), 24'(dcode(mvd, p)), "nibble");
        end else begin
          chk(color_image, MIT_RED, "border");
          chk(color_hdir, MIT_RED, "border");
          chk(24'(nibble), 24'd0, "nibble outside");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
