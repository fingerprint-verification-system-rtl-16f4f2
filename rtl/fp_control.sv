// fp_control: sequencer of the verification pipeline and owner of the
// memory buses.
//
// At rest it shows an image on the VGA output. When enter is seen it runs
// three passes in order, each started with a one-cycle start pulse and
// followed until the pass drops busy:
//   EDGE   sobel reads the fingerprint and writes the two edge images
//   DIR    dir_copy reads the edge images and writes the two direction maps
//   MATCH  match counts diagonal codes per quadrant while the vertical
//          direction map is scanned out by its viewer
// and then returns to the display state. enter is a level: if it is still
// high after a run, another run starts.
//
// Memory ownership: during EDGE (en_filt) the image memory and the edge
// memories' address, data and write enable come from sobel; during DIR
// (en_dir) the edge memories' address and the direction memories' address,
// data and write enable come from dir_copy; otherwise all memories are read
// by the viewers and the write enables are held inactive (high). While
// either filter runs a valid display selection shows blue.
//
// switch[1:0] sets the edge threshold, switch[3:0] the displayed image,
// switch[7:4] which of the eight counts appears, inverted for active-low
// LEDs, on led (low 8 bits of the 12-bit count; 8'hff for other settings).
// rst_n is active low and synchronous. The state sequence, bus sharing and
// switch use follow the original design; the image load port is this
// implementation's addition.
module fp_control
  import fp_pkg::*;
#(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned PIXEL_BITS    = $clog2(M*N),
  parameter int unsigned ADDR_BITS     = PIXEL_BITS - 3,
  parameter int unsigned DIR_ADDR_BITS = PIXEL_BITS - 1,
  parameter string       INIT_FILE     = ""
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enter,
  input  logic [9:0]           pixel,
  input  logic [8:0]           line,
  input  logic [7:0]           switches,
  output logic [23:0]          vga_color,
  output logic [7:0]           led,
  input  logic                 ld_we,
  input  logic [ADDR_BITS-1:0] ld_addr,
  input  logic [7:0]           ld_data,
  output logic [11:0]          up_cnt   [4],
  output logic [11:0]          down_cnt [4],
  output logic                 running
);
  typedef enum logic [2:0] {
    C_RESET, C_DISP, C_EDGE, C_WAIT_FILT, C_START_DIR, C_WAIT_DIR, C_RUN_MATCH, C_WAIT_MATCH
  } cstate_t;

  cstate_t state, next;
  logic    en_filt, start_filt, busy_filt;
  logic    en_dir, start_dir, busy_dir;
  logic    start_match, busy_match;
  logic    enables;

  // memory buses
  logic [ADDR_BITS-1:0]     image_addr, vedge_addr, hedge_addr;
  logic [7:0]               image_dout, vedge_dout, hedge_dout, vdir_dout, hdir_dout;
  logic [7:0]               vedge_din, hedge_din, vdir_din, hdir_din;
  logic [DIR_ADDR_BITS-1:0] vdir_addr, hdir_addr;
  logic                     edge_we_n, dir_we_n;

  // sobel side
  logic [ADDR_BITS-1:0]     sob_image_addr, sob_ram_addr;
  logic [7:0]               sob_vdin, sob_hdin;
  logic                     sob_we_n;
  // dir_copy side
  logic [ADDR_BITS-1:0]     dc_read_addr;
  logic [DIR_ADDR_BITS-1:0] dc_write_addr;
  logic [7:0]               dc_vdin, dc_hdin;
  logic                     dc_we_n;
  // viewers
  logic [ADDR_BITS-1:0]     disp_image_addr, disp_vedge_addr, disp_hedge_addr;
  logic [DIR_ADDR_BITS-1:0] disp_vdir_addr, disp_hdir_addr;
  logic [23:0]              c_image, c_vedge, c_hedge, c_vdir, c_hdir;
  logic [3:0]               nibble;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= C_RESET;
    else        state <= next;
  end

  always_comb begin
    en_filt     = 1'b0;
    start_filt  = 1'b0;
    en_dir      = 1'b0;
    start_dir   = 1'b0;
    start_match = 1'b0;
    next        = state;
    unique case (state)
      C_RESET:      next = C_DISP;
      C_DISP:       if (enter) next = C_EDGE;
      C_EDGE:       begin en_filt = 1'b1; start_filt = 1'b1; next = C_WAIT_FILT; end
      C_WAIT_FILT:  begin en_filt = 1'b1; if (!busy_filt) next = C_START_DIR; end
      C_START_DIR:  begin en_dir = 1'b1; start_dir = 1'b1; next = C_WAIT_DIR; end
      C_WAIT_DIR:   begin en_dir = 1'b1; if (!busy_dir) next = C_RUN_MATCH; end
      C_RUN_MATCH:  begin start_match = 1'b1; next = C_WAIT_MATCH; end
      C_WAIT_MATCH: if (!busy_match) next = C_DISP;
      default:      next = C_DISP;
    endcase
  end

  assign enables = en_filt | en_dir;
  assign running = (state != C_DISP) && (state != C_RESET);

  sobel #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_sobel (
    .clk, .rst_n, .enable(en_filt), .start(start_filt), .thresh_sel(switches[1:0]),
    .image_addr(sob_image_addr), .image_data(image_dout),
    .ram_addr(sob_ram_addr), .vert_din(sob_vdin), .horiz_din(sob_hdin),
    .we_n(sob_we_n), .busy(busy_filt));

  dir_copy #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_dir (
    .clk, .rst_n, .enable(en_dir), .start(start_dir),
    .read_addr(dc_read_addr), .readv_dout(vedge_dout), .readh_dout(hedge_dout),
    .write_addr(dc_write_addr), .writev_din(dc_vdin), .writeh_din(dc_hdin),
    .we_n(dc_we_n), .busy(busy_dir));

  match #(.M(M), .N(N)) u_match (
    .clk, .rst_n, .pixel, .line, .nibble, .start(start_match), .busy(busy_match),
    .up_cnt, .down_cnt);

  gen_imgdisp #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_disp (
    .clk, .pixel, .line,
    .image_addr(disp_image_addr), .image_dout, .color_image(c_image),
    .vedge_addr(disp_vedge_addr), .vedge_dout, .color_vedge(c_vedge),
    .hedge_addr(disp_hedge_addr), .hedge_dout, .color_hedge(c_hedge),
    .vdir_addr(disp_vdir_addr), .vdir_dout, .color_vdir(c_vdir),
    .hdir_addr(disp_hdir_addr), .hdir_dout, .color_hdir(c_hdir),
    .nibble);

  color_out u_color (
    .switch_sel(switches[3:0]), .en_filt, .en_dir,
    .color_image(c_image), .color_vedge(c_vedge), .color_hedge(c_hedge),
    .color_vdir(c_vdir), .color_hdir(c_hdir), .vga_color);

  // bus sharing
  assign image_addr = enables ? sob_image_addr : disp_image_addr;
  assign edge_we_n  = en_filt ? sob_we_n : 1'b1;
  assign vedge_addr = en_filt ? sob_ram_addr : en_dir ? dc_read_addr : disp_vedge_addr;
  assign hedge_addr = en_filt ? sob_ram_addr : en_dir ? dc_read_addr : disp_hedge_addr;
  assign vedge_din  = en_filt ? sob_vdin : 8'h00;
  assign hedge_din  = en_filt ? sob_hdin : 8'h00;
  assign dir_we_n   = en_dir ? dc_we_n : 1'b1;
  assign vdir_addr  = en_dir ? dc_write_addr : disp_vdir_addr;
  assign hdir_addr  = en_dir ? dc_write_addr : disp_hdir_addr;
  assign vdir_din   = en_dir ? dc_vdin : 8'h00;
  assign hdir_din   = en_dir ? dc_hdin : 8'h00;

  fp_mems #(.ADDR_BITS(ADDR_BITS), .DIR_ADDR_BITS(DIR_ADDR_BITS), .INIT_FILE(INIT_FILE)) u_mems (
    .clk, .image_addr, .image_dout, .ld_we, .ld_addr, .ld_data,
    .edge_we_n, .vedge_addr, .vedge_din, .vedge_dout,
    .hedge_addr, .hedge_din, .hedge_dout,
    .dir_we_n, .vdir_addr, .vdir_din, .vdir_dout,
    .hdir_addr, .hdir_din, .hdir_dout);

  // count shown on the LEDs
  always_comb begin
    unique case (switches[7:4])
      4'd0: led = ~up_cnt[0][7:0];
      4'd1: led = ~down_cnt[0][7:0];
      4'd2: led = ~up_cnt[1][7:0];
      4'd3: led = ~down_cnt[1][7:0];
      4'd4: led = ~up_cnt[2][7:0];
      4'd5: led = ~down_cnt[2][7:0];
      4'd6: led = ~up_cnt[3][7:0];
      4'd7: led = ~down_cnt[3][7:0];
      default: led = 8'hff;
    endcase
  end

  // a write enable may only be active while its filter owns the bus
  a_edge_we: assert property (@(posedge clk) disable iff (!rst_n) !edge_we_n |-> en_filt);
  a_dir_we:  assert property (@(posedge clk) disable iff (!rst_n) !dir_we_n |-> en_dir);
endmodule
