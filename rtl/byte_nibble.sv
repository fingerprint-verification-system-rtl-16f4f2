// byte_nibble: locates a pixel of a four-bit-per-pixel image (the direction
// maps) in memory. It splits the raster pixel index into the byte address
// that holds the pixel and a one-hot choice of the half of that byte.
//
// Two pixels share a byte: the byte address is the index divided by 2. The
// even pixel is kept in the high half (half_sel = 2'b10), the odd pixel in
// the low half (half_sel = 2'b01); the odd pixel completes a byte. Purely
// combinational.
//
// Interface: pixel_number (PIXEL_BITS) in; byte_addr (PIXEL_BITS-1) and
// half_sel (2, one-hot {high, low}) out. The split, the nibble order and the
// default width of 12 bits follow the original; the original outputs the low
// index bit as a nibble number, here it is decoded to a one-hot select, and
// byte is renamed because it is a keyword.
module byte_nibble #(
  parameter int unsigned PIXEL_BITS = 12,
  parameter int unsigned ADDR_BITS  = PIXEL_BITS - 1
) (
  input  logic [PIXEL_BITS-1:0] pixel_number,
  output logic [ADDR_BITS-1:0]  byte_addr,
  output logic [1:0]            half_sel
);
  assign byte_addr = pixel_number[PIXEL_BITS-1:1];
  assign half_sel  = pixel_number[0] ? 2'b01 : 2'b10;
endmodule
