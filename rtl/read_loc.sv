// read_loc: address of one neighbour of a pixel for a 3x3 filter.
//
// Given the raster index of the pixel being filtered and a neighbour number
//   0 1 2
//   3 . 4
//   5 6 7
// it returns the raster index of that neighbour, one clock later (the output
// is registered, as in the original). Rows are N pixels wide. Indices wrap
// modulo 2**PIXEL_BITS, so pixels on the image border see the opposite
// border as neighbours; the original design behaves the same way.
module read_loc #(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned PIXEL_BITS = $clog2(M*N)
) (
  input  logic                  clk,
  input  logic [2:0]            filt_loc,
  input  logic [PIXEL_BITS-1:0] pixel,
  output logic [PIXEL_BITS-1:0] read
);
  logic [PIXEL_BITS-1:0] row_step;
  logic [PIXEL_BITS-1:0] off;

  assign row_step = PIXEL_BITS'(N);

  always_comb begin
    unique case (filt_loc)
      3'd0: off = -row_step - 1'b1;
      3'd1: off = -row_step;
      3'd2: off = -row_step + 1'b1;
      3'd3: off = '1;                 // -1
      3'd4: off = PIXEL_BITS'(1);
      3'd5: off = row_step - 1'b1;
      3'd6: off = row_step;
      default: off = row_step + 1'b1; // 7
    endcase
  end

  always_ff @(posedge clk) read <= pixel + off;
endmodule
