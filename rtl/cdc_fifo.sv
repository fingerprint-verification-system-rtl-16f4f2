// cdc_fifo: first-in first-out buffer between two clock domains.
//
// It carries the captured image from the frame-memory side (wr_clk) to the
// pixel-clock side (rd_clk). The storage is a dual-port array of 2**ADDR_BITS
// words. Each side keeps a binary pointer one bit wider than the address and
// publishes it in Gray code; the other side samples that code through two
// flip-flops. full is raised on the write side and empty on the read side
// from the local pointer and the synchronised remote one, so both are
// pessimistic for two clocks after the other side moves, never wrong.
//
// Interface: a write with wr_en while full is ignored; a read with rd_en
// while empty is ignored. dout is registered: the word read with rd_en
// appears on dout the following rd_clk edge (standard, not first-word
// fall-through, read timing). wr_rst and rd_rst clear the two sides; each is
// synchronous to its own clock and active high, and both must be applied
// together (the original's single clear input is split so that each side
// is reset in its own clock domain).
//
// The buffer is only named in the original design (a generated FIFO core
// with these ports and a separate write and read clock); its depth is not
// given. The default depth of 2**16 bytes holds one 256x256 frame of one
// byte per pixel, which the writer and reader in this path assume. The
// Gray-code structure is this implementation's own.
module cdc_fifo #(
  parameter int unsigned DATA_BITS = 8,
  parameter int unsigned ADDR_BITS = 16
) (
  input  logic                 wr_clk,
  input  logic                 rd_clk,
  input  logic                 wr_rst,
  input  logic                 rd_rst,
  input  logic [DATA_BITS-1:0] din,
  input  logic                 wr_en,
  input  logic                 rd_en,
  output logic [DATA_BITS-1:0] dout,
  output logic                 full,
  output logic                 empty
);
  localparam int unsigned PB = ADDR_BITS + 1;

  logic [DATA_BITS-1:0] mem [2**ADDR_BITS];
  logic [PB-1:0] wbin, rbin, wgray, rgray;
  logic [PB-1:0] rgray_w1, rgray_w2;   // read pointer seen by the writer
  logic [PB-1:0] wgray_r1, wgray_r2;   // write pointer seen by the reader
  logic [PB-1:0] wbin_next, rbin_next;
  logic          do_wr, do_rd;

  function automatic logic [PB-1:0] to_gray(input logic [PB-1:0] b);
    return b ^ (b >> 1);
  endfunction

  assign do_wr     = wr_en && !full;
  assign do_rd     = rd_en && !empty;
  assign wbin_next = wbin + PB'(do_wr);
  assign rbin_next = rbin + PB'(do_rd);

  // full: the write pointer is one lap ahead of the read pointer, i.e. the
  // Gray codes differ in the top two bits only
  assign full  = (wgray == {~rgray_w2[PB-1:PB-2], rgray_w2[PB-3:0]});
  assign empty = (rgray == wgray_r2);

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[ADDR_BITS-1:0]] <= din;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= to_gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rd_clk) begin
    if (do_rd) dout <= mem[rbin[ADDR_BITS-1:0]];
  end

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= to_gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
