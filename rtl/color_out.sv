// color_out: chooses which image reaches the VGA output.
//
// switch[3:0] selects 0 the fingerprint image, 1 vertical edges,
// 2 horizontal edges, 3 vertical directions, 4 horizontal directions; any
// other setting gives a plain green screen. While either filter pass runs
// (en_filt or en_dir) the memories are busy with the filter, so a valid
// selection shows plain blue instead. Purely combinational; the selection
// and colours follow the original design.
module color_out
  import fp_pkg::*;
(
  input  logic [3:0]  switch_sel,
  input  logic        en_filt,
  input  logic        en_dir,
  input  logic [23:0] color_image,
  input  logic [23:0] color_vedge,
  input  logic [23:0] color_hedge,
  input  logic [23:0] color_vdir,
  input  logic [23:0] color_hdir,
  output logic [23:0] vga_color
);
  logic busy;
  assign busy = en_filt | en_dir;

  always_comb begin
    unique case (switch_sel)
      SHOW_IMAGE: vga_color = busy ? BLUE : color_image;
      SHOW_VEDGE: vga_color = busy ? BLUE : color_vedge;
      SHOW_HEDGE: vga_color = busy ? BLUE : color_hedge;
      SHOW_VDIR:  vga_color = busy ? BLUE : color_vdir;
      SHOW_HDIR:  vga_color = busy ? BLUE : color_hdir;
      default:    vga_color = GREEN;
    endcase
  end
endmodule
