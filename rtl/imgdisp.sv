// imgdisp: shows a one-bit-per-pixel image in the centre of the VGA screen.
//
// The M x N image (M rows, N columns) is drawn 1:1 in the middle of the
// 640x480 raster: white for a 1 bit, black for a 0 bit, and a dark red
// border everywhere else. Instead of computing an address from the raster
// position, the block walks the memory with counters: a bit counter steps
// through the eight pixels of the byte on screen and a byte counter moves to
// the next byte after the eighth. The memory is always addressed one byte
// ahead (byte counter + 1) so that the next byte has arrived from the
// synchronous memory when the current one is finished.
//
// Interface: pixel/line are the raster position (0,0 also during blanking,
// as the VGA timing generator gives it); addr/data go to a memory with one
// cycle read latency; color is combinational from the current position.
//
// The counters restart whenever the raster is at (0,0). While it stays there
// (the blanking before the first line) the memory is addressed at byte 0 and
// that byte is preloaded, so the first byte of the image is shown correctly;
// this preload is this implementation's choice. Colours, centring and bit
// order (leftmost pixel in bit 7) follow the original design.
module imgdisp
  import fp_pkg::*;
#(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned PIXEL_BITS = $clog2(M*N),
  parameter int unsigned ADDR_BITS  = PIXEL_BITS - 3
) (
  input  logic                 clk,
  input  logic [9:0]           pixel,
  input  logic [8:0]           line,
  output logic [23:0]          color,
  output logic [ADDR_BITS-1:0] addr,
  input  logic [7:0]           data
);
  localparam int unsigned ROW_START = SCRN_H/2 - M/2;
  localparam int unsigned ROW_END   = SCRN_H/2 + M/2;
  localparam int unsigned COL_START = SCRN_W/2 - N/2;
  localparam int unsigned COL_END   = SCRN_W/2 + N/2;

  logic [ADDR_BITS-1:0] byte_cnt;
  logic [2:0]           bit_cnt;
  logic [7:0]           cur;
  logic                 in_area, frame_rst;

  assign in_area   = (32'(line)  >= ROW_START) && (32'(line)  < ROW_END) &&
                     (32'(pixel) >= COL_START) && (32'(pixel) < COL_END);
  assign frame_rst = (line == '0) && (pixel == '0);
  assign addr      = frame_rst ? '0 : byte_cnt + 1'b1;

  always_ff @(posedge clk) begin
    if (frame_rst) begin
      bit_cnt  <= '0;
      byte_cnt <= '0;
      cur      <= data;
    end else if (in_area) begin
      bit_cnt <= bit_cnt + 1'b1;
      if (bit_cnt == 3'd7) begin
        byte_cnt <= byte_cnt + 1'b1;
        cur      <= data;
      end
    end
  end

  always_comb begin
    if (in_area) color = cur[3'd7 - bit_cnt] ? WHITE : BLACK;
    else         color = MIT_RED;
  end
endmodule
