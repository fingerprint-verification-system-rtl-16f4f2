// imgdisp_dir: shows a direction map (four bits per pixel) in the centre of
// the VGA screen and hands the code of the pixel on screen to the matcher.
//
// Colours per direction code: "\" red, "/" green, "-" and "|" blue, no
// direction white, anything else black; a dark red border surrounds the
// M x N image. Like imgdisp it walks the memory with counters, here a
// nibble counter (high nibble first) and a byte counter, and addresses the
// memory one byte ahead to hide the one-cycle read latency.
//
// Interface: pixel/line raster position; addr/data to a memory with one
// cycle read latency; color and nibble are combinational from the current
// position, nibble being 0 outside the image.
//
// The counters restart at raster position (0,0); while the raster stays
// there byte 0 is preloaded so the first pixel pair is shown correctly (this
// implementation's choice). Colours, centring and nibble order follow the
// original design.
module imgdisp_dir
  import fp_pkg::*;
#(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned PIXEL_BITS = $clog2(M*N),
  parameter int unsigned ADDR_BITS  = PIXEL_BITS - 1
) (
  input  logic                 clk,
  input  logic [9:0]           pixel,
  input  logic [8:0]           line,
  output logic [23:0]          color,
  output logic [ADDR_BITS-1:0] addr,
  input  logic [7:0]           data,
  output logic [3:0]           nibble
);
  localparam int unsigned ROW_START = SCRN_H/2 - M/2;
  localparam int unsigned ROW_END   = SCRN_H/2 + M/2;
  localparam int unsigned COL_START = SCRN_W/2 - N/2;
  localparam int unsigned COL_END   = SCRN_W/2 + N/2;

  logic [ADDR_BITS-1:0] byte_cnt;
  logic                 low;       // showing the low nibble
  logic [7:0]           cur;
  logic                 in_area, frame_rst;

  assign in_area   = (32'(line)  >= ROW_START) && (32'(line)  < ROW_END) &&
                     (32'(pixel) >= COL_START) && (32'(pixel) < COL_END);
  assign frame_rst = (line == '0) && (pixel == '0);
  assign addr      = frame_rst ? '0 : byte_cnt + 1'b1;

  always_ff @(posedge clk) begin
    if (frame_rst) begin
      low      <= 1'b0;
      byte_cnt <= '0;
      cur      <= data;
    end else if (in_area) begin
      low <= ~low;
      if (low) begin
        byte_cnt <= byte_cnt + 1'b1;
        cur      <= data;
      end
    end
  end

  always_comb begin
    if (in_area) begin
      nibble = low ? cur[3:0] : cur[7:4];
      unique case (nibble)
        DIR_NONE:                     color = WHITE;
        DIR_DIAG_DOWN:                color = RED;
        DIR_DIAG_UP:                  color = GREEN;
        DIR_HORIZONTAL, DIR_VERTICAL: color = BLUE;
        default:                      color = BLACK;
      endcase
    end else begin
      nibble = 4'd0;
      color  = MIT_RED;
    end
  end
endmodule
