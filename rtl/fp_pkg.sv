// fp_pkg: types, constants and the binary Sobel test shared by the
// fingerprint verification pipeline.
//
// Images are stored one bit per pixel, eight pixels per byte, with the
// leftmost (lowest-numbered) pixel in bit 7 of its byte. Direction maps are
// stored four bits per pixel, two pixels per byte, the even pixel in the high
// nibble. The direction codes, the screen size and colours and the display
// selection codes are defined here once; sobel_eval holds the two 3x3 masks
// used by the sobel block.
//
// Direction codes 1..5, the colours and the masks follow the original design;
// the enum and function forms are this implementation's own.
// A lint run on a single block that uses only part of this package reports
// the unused screen and colour constants; each one is used somewhere in the
// design.
package fp_pkg;

  // VGA raster of the display
  localparam int unsigned SCRN_W = 640;
  localparam int unsigned SCRN_H = 480;

  // 24-bit RGB colours
  localparam logic [23:0] BLACK   = 24'h000000;
  localparam logic [23:0] WHITE   = 24'hffffff;
  localparam logic [23:0] RED     = 24'hff0000;
  localparam logic [23:0] GREEN   = 24'h00ff00;
  localparam logic [23:0] BLUE    = 24'h0000ff;
  localparam logic [23:0] MIT_RED = 24'h5f1f1f;  // border around the image

  // Direction vector of one pixel, as stored in the direction memories
  typedef enum logic [3:0] {
    DIR_INVALID    = 4'd0,
    DIR_DIAG_DOWN  = 4'd1,   // "\"
    DIR_DIAG_UP    = 4'd2,   // "/"
    DIR_HORIZONTAL = 4'd3,   // "-"
    DIR_VERTICAL   = 4'd4,   // "|"
    DIR_NONE       = 4'd5    // no line through the pixel
  } dir_t;

  // Image shown on the VGA output, selected by switch[3:0]
  typedef enum logic [3:0] {
    SHOW_IMAGE    = 4'd0,
    SHOW_VEDGE    = 4'd1,
    SHOW_HEDGE    = 4'd2,
    SHOW_VDIR     = 4'd3,
    SHOW_HDIR     = 4'd4
  } show_t;

  // Binary Sobel test on a 3x3 neighbourhood. w[k] holds neighbour k:
  //   0 1 2
  //   3 . 4
  //   5 6 7
  // Returns {vertical_edge, horizontal_edge}: an edge where the positive
  // half of the mask exceeds the negative half by more than thresh.
  function automatic logic [1:0] sobel_eval(input logic [7:0] w,
                                            input logic [1:0] thresh);
    logic [2:0] vp, vn, hp, hn;
    logic v, h;
    vp = 3'(w[0]) + 3'({w[3], 1'b0}) + 3'(w[5]);
    vn = 3'(w[2]) + 3'({w[4], 1'b0}) + 3'(w[7]);
    hp = 3'(w[0]) + 3'({w[1], 1'b0}) + 3'(w[2]);
    hn = 3'(w[5]) + 3'({w[6], 1'b0}) + 3'(w[7]);
    v  = (vp > vn) && ((vp - vn) > 3'(thresh));
    h  = (hp > hn) && ((hp - hn) > 3'(thresh));
    return {v, h};
  endfunction

endpackage
