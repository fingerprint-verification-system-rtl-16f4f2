// read_loc5x5: address of one cell of the 5x5 window around a pixel.
//
// Window cells are numbered 0..24 in raster order, cell 12 being the pixel
// itself. Cell k lies (k/5 - 2) rows and (k%5 - 2) columns from the centre,
// so its raster index is pixel + (k/5-2)*N + (k%5-2). The result is
// registered, one clock after the inputs, and wraps modulo 2**PIXEL_BITS
// like the original. Numbers above 24 return the centre pixel.
module read_loc5x5 #(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned PIXEL_BITS = $clog2(M*N)
) (
  input  logic                  clk,
  input  logic [4:0]            filt_loc,
  input  logic [PIXEL_BITS-1:0] pixel,
  output logic [PIXEL_BITS-1:0] read
);
  logic [2:0]            row, col;
  logic [PIXEL_BITS-1:0] row_off, col_off;

  always_comb begin
    if (filt_loc > 5'd24) begin
      row = 3'd2;
      col = 3'd2;
    end else begin
      row = 3'(filt_loc / 5);
      col = 3'(filt_loc % 5);
    end
    // (row-2)*N and (col-2) in modulo-2**PIXEL_BITS arithmetic
    row_off = PIXEL_BITS'(row) * PIXEL_BITS'(N) - PIXEL_BITS'(2 * N);
    col_off = PIXEL_BITS'(col) - PIXEL_BITS'(2);
  end

  always_ff @(posedge clk) read <= pixel + row_off + col_off;
endmodule
