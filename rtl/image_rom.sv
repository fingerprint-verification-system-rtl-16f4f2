// image_rom: the binary fingerprint image, 8 pixels per byte.
//
// In the original design this is a ROM whose contents are fixed when the
// FPGA is configured. The image itself is not part of the design, so this
// memory has two ways in: an optional hex file named by INIT_FILE (read at
// start of simulation) and a load port (ld_we, ld_addr, ld_data) through
// which a host or testbench writes the image. The load port is this
// implementation's addition. The read port is synchronous: data for the
// address of one cycle appears in the next.
module image_rom #(
  parameter int unsigned ADDR_BITS = 13,
  parameter string       INIT_FILE = ""
) (
  input  logic                 clk,
  input  logic [ADDR_BITS-1:0] addr,
  output logic [7:0]           dout,
  input  logic                 ld_we,
  input  logic [ADDR_BITS-1:0] ld_addr,
  input  logic [7:0]           ld_data
);
  logic [7:0] mem [2**ADDR_BITS];

  initial if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
    dout <= mem[addr];
  end
endmodule
