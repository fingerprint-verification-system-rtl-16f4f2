// fp_mems: the five image memories of the pipeline.
//
//   image   M*N/8 bytes   fingerprint, one bit per pixel (image_rom)
//   vedge   M*N/8 bytes   vertical edges, one bit per pixel, edge = 0
//   hedge   M*N/8 bytes   horizontal edges, one bit per pixel, edge = 0
//   vdir    M*N/2 bytes   vertical-edge directions, four bits per pixel
//   hdir    M*N/2 bytes   horizontal-edge directions, four bits per pixel
//
// The two edge memories share one active-low write enable, as do the two
// direction memories, since each filter writes its pair together. All reads
// are synchronous with one cycle of latency. The image memory has a load
// port for the fingerprint (this implementation's addition, see image_rom).
module fp_mems #(
  parameter int unsigned ADDR_BITS     = 13,
  parameter int unsigned DIR_ADDR_BITS = ADDR_BITS + 2,
  parameter string       INIT_FILE     = ""
) (
  input  logic                     clk,
  input  logic [ADDR_BITS-1:0]     image_addr,
  output logic [7:0]               image_dout,
  input  logic                     ld_we,
  input  logic [ADDR_BITS-1:0]     ld_addr,
  input  logic [7:0]               ld_data,
  input  logic                     edge_we_n,
  input  logic [ADDR_BITS-1:0]     vedge_addr,
  input  logic [7:0]               vedge_din,
  output logic [7:0]               vedge_dout,
  input  logic [ADDR_BITS-1:0]     hedge_addr,
  input  logic [7:0]               hedge_din,
  output logic [7:0]               hedge_dout,
  input  logic                     dir_we_n,
  input  logic [DIR_ADDR_BITS-1:0] vdir_addr,
  input  logic [7:0]               vdir_din,
  output logic [7:0]               vdir_dout,
  input  logic [DIR_ADDR_BITS-1:0] hdir_addr,
  input  logic [7:0]               hdir_din,
  output logic [7:0]               hdir_dout
);
  image_rom #(.ADDR_BITS(ADDR_BITS), .INIT_FILE(INIT_FILE)) u_image (
    .clk, .addr(image_addr), .dout(image_dout),
    .ld_we, .ld_addr, .ld_data);

  sp_ram #(.ADDR_BITS(ADDR_BITS)) u_vedge (
    .clk, .we_n(edge_we_n), .addr(vedge_addr), .din(vedge_din), .dout(vedge_dout));
  sp_ram #(.ADDR_BITS(ADDR_BITS)) u_hedge (
    .clk, .we_n(edge_we_n), .addr(hedge_addr), .din(hedge_din), .dout(hedge_dout));
  sp_ram #(.ADDR_BITS(DIR_ADDR_BITS)) u_vdir (
    .clk, .we_n(dir_we_n), .addr(vdir_addr), .din(vdir_din), .dout(vdir_dout));
  sp_ram #(.ADDR_BITS(DIR_ADDR_BITS)) u_hdir (
    .clk, .we_n(dir_we_n), .addr(hdir_addr), .din(hdir_din), .dout(hdir_dout));
endmodule
