// ntsc_to_zbt: turns the luminance stream of a video decoder into 32-bit
// frame-memory writes.
//
// Video side (vclk): a column counter starts at COL_START at each
// horizontal sync and steps once per decoder clock with dv high, stopping at
// COL_MAX. A row counter starts at ROW_START at vertical sync and steps once
// per horizontal sync, stopping at ROW_MAX. Both only move while fvh[2] (the
// field bit) is low. The byte on din is held with each dv, and a one-clock
// write pulse marks the rising edge of dv. The even/odd bit flips at each
// rising edge of the field bit.
//
// System side (clk): column, row, byte, write pulse and even/odd bit each
// pass through two flip-flops. A rising edge of the synchronised write pulse
// shifts the byte into a 32-bit word. In normal mode (sw low) a write is
// issued when the column is a multiple of four. The address is
// {0, row[8:0], even_odd, col[9:2]} and the word holds the four bytes
// shifted in before the current one. In the alternate mode (sw high) every
// byte is written, repeated four times, at {0, row[8:0], even_odd, col[7:0]}.
// ntsc_addr and ntsc_data load only while capture is high. ntsc_we is the
// write strike and is not gated by capture.
//
// Interface: clk, vclk, fvh[2:0] (field, vertical, horizontal), dv,
// din[7:0], sw, capture in; ntsc_addr[18:0], ntsc_data[35:0] (top four bits
// 0), ntsc_we out. ntsc_addr/ntsc_data are registered on clk. ntsc_we is
// combinational.
//
// Follows the original: the counters and their limits, the address layout,
// the byte packing, the two modes, and the bit-by-bit two-flop transfer of
// the counters. That transfer can tear a counter value when it changes next
// to a clk edge. It is safe here because the write pulse arrives one video
// clock after the counters have settled.
// No register has a reset, as in the original. Each one is overwritten by
// normal operation: the counters at the next sync, the rest within a few
// clocks. The even/odd bit starts at an arbitrary value.
// Own choices: the even/odd bit is a plain register, and only the nine row
// bits that reach the address cross to clk.
module ntsc_to_zbt #(
  parameter logic [9:0] COL_START = 10'd30,
  parameter logic [9:0] ROW_START = 10'd30,
  parameter int unsigned COL_MAX = 1024,
  parameter int unsigned ROW_MAX = 768
) (
  input  logic        clk,
  input  logic        vclk,
  input  logic [2:0]  fvh,
  input  logic        dv,
  input  logic [7:0]  din,
  output logic [18:0] ntsc_addr,
  output logic [35:0] ntsc_data,
  output logic        ntsc_we,
  input  logic        sw,
  input  logic        capture
);
  // video clock side
  logic [9:0] col, row;
  logic [7:0] vdata;
  logic       vwe, dv_d, field_d, even_odd;

  always_ff @(posedge vclk) begin
    dv_d     <= dv;
    field_d  <= fvh[2];
    vwe      <= dv && !dv_d && !fvh[2];
    even_odd <= even_odd ^ (fvh[2] && !field_d);
    if (!fvh[2]) begin
      if (fvh[0])                       col <= COL_START;
      else if (!fvh[1] && dv && 32'(col) < COL_MAX) col <= col + 10'd1;
      if (fvh[1])                       row <= ROW_START;
      else if (fvh[0] && 32'(row) < ROW_MAX) row <= row + 10'd1;
      if (dv) vdata <= din;
    end
  end

  // system clock side
  logic [9:0]  x_s1, x_s2;
  logic [8:0]  y_s1, y_s2;
  logic [7:0]  d_s1, d_s2;
  logic        we_s1, we_s2, we_s3, eo_s1, eo_s2;
  logic [31:0] word;
  logic        we_edge;

  always_ff @(posedge clk) begin
    {x_s2, x_s1}   <= {x_s1, col};
    {y_s2, y_s1}   <= {y_s1, row[8:0]};
    {d_s2, d_s1}   <= {d_s1, vdata};
    {we_s3, we_s2, we_s1} <= {we_s2, we_s1, vwe};
    {eo_s2, eo_s1} <= {eo_s1, even_odd};
  end

  assign we_edge = we_s2 && !we_s3;
  assign ntsc_we = we_edge && (sw || x_s2[1:0] == 2'b00);

  always_ff @(posedge clk) begin
    if (we_edge) word <= {word[23:0], d_s2};
    if (ntsc_we && capture) begin
      ntsc_addr <= sw ? {1'b0, y_s2, eo_s2, x_s2[7:0]} : {1'b0, y_s2, eo_s2, x_s2[9:2]};
      ntsc_data <= {4'd0, sw ? {4{d_s2}} : word};
    end
  end
endmodule
