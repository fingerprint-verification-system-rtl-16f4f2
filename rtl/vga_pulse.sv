// vga_pulse: 640x480 VGA timing generator.
//
// A horizontal counter steps through 640 active pixels, a 16-pixel front
// porch, a 96-pixel sync pulse and a 48-pixel back porch (800 clocks a line);
// a line counter steps through 480 active lines, an 11-line front porch, a
// 2-line sync pulse and a 32-line back porch (525 lines a frame). Both syncs
// are active low. pixel_count and line_count give the raster position inside
// the active area and read 0 outside it, which the viewers rely on: (0,0)
// recurs throughout blanking and restarts them. h_active and v_active are
// high in the active area (their AND is the DAC's blank_n).
//
// rst_n is synchronous and active low; after it the raster starts at the top
// left pixel. The porch and pulse lengths and the zero-outside-active
// convention follow the original design; the counter structure is this
// implementation's own.
module vga_pulse #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FRONT  = 16,
  parameter int unsigned H_PULSE  = 96,
  parameter int unsigned H_BACK   = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FRONT  = 11,
  parameter int unsigned V_PULSE  = 2,
  parameter int unsigned V_BACK   = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       hsync,
  output logic       vsync,
  output logic [9:0] pixel_count,
  output logic [8:0] line_count,
  output logic       h_active,
  output logic       v_active
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FRONT + H_PULSE + H_BACK;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FRONT + V_PULSE + V_BACK;

  logic [10:0] hc;
  logic [9:0]  vc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hc <= '0;
      vc <= '0;
    end else if (32'(hc) == H_TOTAL - 1) begin
      hc <= '0;
      vc <= (32'(vc) == V_TOTAL - 1) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  assign h_active    = 32'(hc) < H_ACTIVE;
  assign v_active    = 32'(vc) < V_ACTIVE;
  assign hsync       = !((32'(hc) >= H_ACTIVE + H_FRONT) && (32'(hc) < H_ACTIVE + H_FRONT + H_PULSE));
  assign vsync       = !((32'(vc) >= V_ACTIVE + V_FRONT) && (32'(vc) < V_ACTIVE + V_FRONT + V_PULSE));
  assign pixel_count = h_active ? hc[9:0] : '0;
  assign line_count  = v_active ? vc[8:0] : '0;
endmodule
