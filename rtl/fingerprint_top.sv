// fingerprint_top: the fingerprint verification system on the FPGA board.
//
// Push buttons are debounced (button0 is the reset, low while pressed;
// button_enter starts a run, low while pressed), a 640x480 VGA timing
// generator drives the raster, and fp_control runs the pipeline
// (Sobel edges -> 5x5 line directions -> per-quadrant diagonal counts) and
// draws the selected image. The syncs are delayed two clocks to match the
// colour path; the DAC clock is the inverted pixel clock.
//
// clk is the pixel clock (31.5 MHz on the original board, made there by a
// vendor clock manager that is not part of this RTL). The image load port
// writes the fingerprint into the image memory (this implementation's
// addition); the quadrant counts and the running flag are also brought out
// so the result can be read without the LEDs.
//
// Beside the pipeline sits the image acquisition path (image_capture): it
// copies one frame of pixel bytes from an external frame memory, read on
// sys_clk, through a two-clock FIFO into an on-chip print memory on the
// pixel clock. cap_reset (active high, on sys_clk) restarts it and
// cap_on_off_n (a button, low while pressed) stops capturing. The print
// memory is read through print_rd_addr/print_rd_data. As in the original,
// the pipeline still reads its own image memory, not the print memory.
// ntsc_to_zbt turns the video decoder's luminance stream (ntsc_vclk,
// ntsc_fvh, ntsc_dv, ntsc_din) into 32-bit frame-memory writes
// (ntsc_addr, ntsc_data, ntsc_we) on sys_clk. The writes are loaded only
// while capture is high. ntsc_sw selects its alternate mode. The frame
// memory itself is outside this RTL. xvga, a 1024x768 timing generator for
// the camera side's display, runs on sys_clk with its outputs brought out;
// the original leaves it unconnected. vga_sync_n is held at 1 (no composite
// sync), as in the original.
//
// Timing: a reset press must last DEB_DELAY clocks; after enter, the edge
// pass takes 26*M*N + M*N/8 clocks, the direction pass 77*M*N + M*N/2
// clocks and the count one full frame from the next frame start (about
// 0.06 s + 0.16 s + 0.03 s at 31.5 MHz for 256x256). The screen is blue
// while a filter pass runs.
module fingerprint_top #(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned DEB_DELAY = 270000,
  parameter int unsigned PIXEL_BITS = $clog2(M*N),
  parameter int unsigned ADDR_BITS  = PIXEL_BITS - 3,
  parameter string       INIT_FILE  = ""
) (
  input  logic                 clk,
  input  logic                 button0,
  input  logic                 button_enter,
  input  logic [7:0]           switches,
  output logic [7:0]           vga_red,
  output logic [7:0]           vga_green,
  output logic [7:0]           vga_blue,
  output logic                 vga_hsync,
  output logic                 vga_vsync,
  output logic                 vga_blank_n,
  output logic                 vga_sync_n,
  output logic                 vga_pixel_clock,
  output logic [7:0]           led,
  input  logic                 ld_we,
  input  logic [ADDR_BITS-1:0] ld_addr,
  input  logic [7:0]           ld_data,
  output logic [11:0]          up_cnt   [4],
  output logic [11:0]          down_cnt [4],
  output logic                 running,
  // image acquisition path, on its own clock
  input  logic                  sys_clk,
  input  logic                  cap_reset,
  input  logic                  cap_on_off_n,
  input  logic [7:0]            vram_read_data,
  output logic                  vram_taken,
  output logic                  capture,
  input  logic [PIXEL_BITS-1:0] print_rd_addr,
  output logic [7:0]            print_rd_data,
  output logic                  print_done,
  // camera stream to frame-memory writes, on sys_clk
  input  logic                  ntsc_vclk,
  input  logic [2:0]            ntsc_fvh,
  input  logic                  ntsc_dv,
  input  logic [7:0]            ntsc_din,
  input  logic                  ntsc_sw,
  output logic [18:0]           ntsc_addr,
  output logic [35:0]           ntsc_data,
  output logic                  ntsc_we,
  // 1024x768 timing generator, on sys_clk
  output logic [10:0]           xvga_hcount,
  output logic [9:0]            xvga_vcount,
  output logic                  xvga_hsync,
  output logic                  xvga_vsync,
  output logic                  xvga_blank
);
  logic       rst_n;      // debounced button0, low = reset
  logic       enter;
  logic       hsync, vsync, h_active, v_active;
  logic [9:0] pixel;
  logic [8:0] line;
  logic [23:0] color;

  debounce #(.DELAY(DEB_DELAY)) u_deb_reset (
    .clk, .reset(1'b0), .noisy(button0), .clean(rst_n));
  debounce #(.DELAY(DEB_DELAY)) u_deb_enter (
    .clk, .reset(!rst_n), .noisy(!button_enter), .clean(enter));

  vga_pulse u_vga (
    .clk, .rst_n, .hsync, .vsync, .pixel_count(pixel), .line_count(line),
    .h_active, .v_active);

  sync_delay u_delay (
    .clk, .rst_n, .hsync, .vsync, .hsync_delay(vga_hsync), .vsync_delay(vga_vsync));

  fp_control #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS), .INIT_FILE(INIT_FILE)) u_ctrl (
    .clk, .rst_n, .enter, .pixel, .line, .switches, .vga_color(color), .led,
    .ld_we, .ld_addr, .ld_data, .up_cnt, .down_cnt, .running);

  image_capture #(.M(M), .N(N), .ADDR_BITS(PIXEL_BITS), .DEB_DELAY(DEB_DELAY)) u_capture (
    .sys_clk, .sys_reset(cap_reset), .on_off_noisy(!cap_on_off_n), .vram_read_data,
    .vram_taken, .capture, .clk, .print_rd_addr, .print_rd_data, .print_done);

  ntsc_to_zbt u_n2z (
    .clk(sys_clk), .vclk(ntsc_vclk), .fvh(ntsc_fvh), .dv(ntsc_dv), .din(ntsc_din),
    .ntsc_addr, .ntsc_data, .ntsc_we, .sw(ntsc_sw), .capture);

  xvga u_xvga (
    .vclock(sys_clk), .hcount(xvga_hcount), .vcount(xvga_vcount), .hsync(xvga_hsync),
    .vsync(xvga_vsync), .blank(xvga_blank));

  assign vga_red         = color[23:16];
  assign vga_green       = color[15:8];
  assign vga_blue        = color[7:0];
  assign vga_blank_n     = h_active & v_active;
  assign vga_sync_n      = 1'b1;     // composite sync unused
  assign vga_pixel_clock = ~clk;
endmodule
