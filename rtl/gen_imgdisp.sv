// gen_imgdisp: the five image viewers that share the VGA raster.
//
// One imgdisp each for the fingerprint image and the two edge images, and
// one imgdisp_dir each for the two direction maps. All run continuously from
// the same raster position; color_out picks one of their colours. The code
// under the raster in the vertical direction map is passed on as nibble for
// the matcher (as in the original, the horizontal map's code is not used).
// Lint reports hnibble as unused: it is the horizontal viewer's code output,
// left unconnected on purpose, the same as in the original.
module gen_imgdisp #(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned PIXEL_BITS    = $clog2(M*N),
  parameter int unsigned ADDR_BITS     = PIXEL_BITS - 3,
  parameter int unsigned DIR_ADDR_BITS = PIXEL_BITS - 1
) (
  input  logic                     clk,
  input  logic [9:0]               pixel,
  input  logic [8:0]               line,
  output logic [ADDR_BITS-1:0]     image_addr,
  input  logic [7:0]               image_dout,
  output logic [23:0]              color_image,
  output logic [ADDR_BITS-1:0]     vedge_addr,
  input  logic [7:0]               vedge_dout,
  output logic [23:0]              color_vedge,
  output logic [ADDR_BITS-1:0]     hedge_addr,
  input  logic [7:0]               hedge_dout,
  output logic [23:0]              color_hedge,
  output logic [DIR_ADDR_BITS-1:0] vdir_addr,
  input  logic [7:0]               vdir_dout,
  output logic [23:0]              color_vdir,
  output logic [DIR_ADDR_BITS-1:0] hdir_addr,
  input  logic [7:0]               hdir_dout,
  output logic [23:0]              color_hdir,
  output logic [3:0]               nibble
);
  logic [3:0] hnibble;   // horizontal map's code, not used further

  imgdisp #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_image (
    .clk, .pixel, .line, .color(color_image), .addr(image_addr), .data(image_dout));
  imgdisp #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_vedge (
    .clk, .pixel, .line, .color(color_vedge), .addr(vedge_addr), .data(vedge_dout));
  imgdisp #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_hedge (
    .clk, .pixel, .line, .color(color_hedge), .addr(hedge_addr), .data(hedge_dout));
  imgdisp_dir #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_vdir (
    .clk, .pixel, .line, .color(color_vdir), .addr(vdir_addr), .data(vdir_dout),
    .nibble(nibble));
  imgdisp_dir #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_hdir (
    .clk, .pixel, .line, .color(color_hdir), .addr(hdir_addr), .data(hdir_dout),
    .nibble(hnibble));
endmodule
