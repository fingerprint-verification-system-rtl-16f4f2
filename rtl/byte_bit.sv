// byte_bit: locates a pixel of a one-bit-per-pixel image in memory. It splits
// the raster pixel index into the byte address that holds the pixel and a
// one-hot mask of the pixel's data bit in that byte.
//
// Eight pixels share a byte, so the byte address is the index divided by 8
// and the position in the byte is the low three index bits. Position 0 is the
// leftmost pixel and sits in data bit 7, so bit_mask = 8'h80 >> position.
// A caller reads a pixel as |(data & bit_mask) and writes it by setting or
// clearing the masked bit; bit_mask[0] marks the last pixel of a byte.
// Purely combinational.
//
// Interface: pixel_number (PIXEL_BITS) in; byte_addr (PIXEL_BITS-3) and
// bit_mask (8, one-hot) out. The split, the bit order and the default width of
// 12 bits follow the original; the original outputs the position as a 3-bit
// number, here it is decoded to the mask every caller needs, and the ports are
// renamed because byte and bit are keywords.
module byte_bit #(
  parameter int unsigned PIXEL_BITS = 12,
  parameter int unsigned ADDR_BITS  = PIXEL_BITS - 3
) (
  input  logic [PIXEL_BITS-1:0] pixel_number,
  output logic [ADDR_BITS-1:0]  byte_addr,
  output logic [7:0]            bit_mask
);
  assign byte_addr = pixel_number[PIXEL_BITS-1:3];
  assign bit_mask  = 8'h80 >> pixel_number[2:0];
endmodule
