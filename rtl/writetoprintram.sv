// writetoprintram: writes the drained image into the print memory.
//
// Every byte that readfifomemory passes on (image_valid) is written into the
// print memory at its address: image_print, image_address and the active-low
// we are registered, so the write happens one clock after the byte arrives.
// When readfifomemory signals the end of the image (empty_en), done_ram is
// raised one clock later and stays high until the next image starts; the
// print memory then holds a complete image.
//
// Interface: clk and reset (synchronous, active high) of the pixel-clock
// side. we is active low and held high between writes.
//
// The registered data/address/write-enable stage, the active-low write
// enable and the end-of-image handshake follow the original design; the
// original writes a fixed burst of three bytes per request, here each byte
// is written as it arrives, and done_ram is held rather than pulsed.
module writetoprintram #(
  parameter int unsigned ADDR_BITS = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [7:0]           image_data,
  input  logic [ADDR_BITS-1:0] image_addr,
  input  logic                 image_valid,
  input  logic                 empty_en,
  output logic [7:0]           image_print,
  output logic [ADDR_BITS-1:0] image_address,
  output logic                 we,
  output logic                 done_ram
);
  always_ff @(posedge clk) begin
    if (reset) begin
      image_print   <= '0;
      image_address <= '0;
      we            <= 1'b1;
      done_ram      <= 1'b0;
    end else begin
      we <= !image_valid;
      if (image_valid) begin
        image_print   <= image_data;
        image_address <= image_addr;
        done_ram      <= 1'b0;
      end
      if (empty_en) done_ram <= 1'b1;
    end
  end
endmodule
