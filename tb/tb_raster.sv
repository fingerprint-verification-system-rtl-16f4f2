// tb_raster: behavioural 640x480 raster for display testbenches: 800 clocks
// a line, 525 lines a frame; pixel and line read 0 outside the active area.
module tb_raster (
  input  logic       clk,
  output logic [9:0] pixel,
  output logic [8:0] line,
  output int         frame
);
  int hc = 0, vc = 0;
  initial frame = 0;
  always @(posedge clk) begin
    if (hc == 799) begin
      hc <= 0;
      if (vc == 524) begin vc <= 0; frame <= frame + 1; end
      else vc <= vc + 1;
    end else hc <= hc + 1;
  end
  assign pixel = (hc < 640 && vc < 480) ? 10'(hc) : 10'd0;
  assign line  = (vc < 480) ? 9'(vc) : 9'd0;
endmodule
