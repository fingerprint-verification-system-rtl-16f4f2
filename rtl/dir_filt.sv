// dir_filt: classifies the line direction through the centre of a 5x5
// window of edge pixels.
//
// Window bit k is cell k in raster order (cell 12 is the centre):
//    0  1  2  3  4
//    5  6  7  8  9
//   10 11 12 13 14
//   15 16 17 18 19
//   20 21 22 23 24
// A direction is reported when all five cells of its line are edge pixels.
// Both windows are tested for the two diagonals first, "\" (0,6,12,18,24)
// before "/" (20,16,12,8,4); then the vertical-edge window is tested for a
// vertical line (2,7,12,17,22) and the horizontal-edge window for a
// horizontal line (10..14). Otherwise the result is "no direction". Purely
// combinational; the tests and their priority follow the original design.
// The codes are 1..5 in a 4-bit field, so bit 3 of both results is always 0;
// the 4-bit width is kept because the direction maps store 4 bits a pixel.
module dir_filt
  import fp_pkg::*;
(
  input  logic [24:0] vval,
  input  logic [24:0] hval,
  output dir_t        vresult,
  output dir_t        hresult
);
  function automatic logic all5(input logic [24:0] w, input logic [4:0] a, input logic [4:0] b,
                                input logic [4:0] c, input logic [4:0] d, input logic [4:0] e);
    return w[a] & w[b] & w[c] & w[d] & w[e];
  endfunction

  always_comb begin
    if (all5(vval, 0, 6, 12, 18, 24))       vresult = DIR_DIAG_DOWN;
    else if (all5(vval, 20, 16, 12, 8, 4))  vresult = DIR_DIAG_UP;
    else if (all5(vval, 2, 7, 12, 17, 22))  vresult = DIR_VERTICAL;
    else                                    vresult = DIR_NONE;

    if (all5(hval, 0, 6, 12, 18, 24))       hresult = DIR_DIAG_DOWN;
    else if (all5(hval, 20, 16, 12, 8, 4))  hresult = DIR_DIAG_UP;
    else if (all5(hval, 10, 11, 12, 13, 14)) hresult = DIR_HORIZONTAL;
    else                                    hresult = DIR_NONE;
  end
endmodule
