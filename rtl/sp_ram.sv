// sp_ram: single-port synchronous RAM, one clock, one address.
//
// Stands for the block RAMs that hold the two edge images (one bit per
// pixel) and the two direction maps (four bits per pixel). The read data is
// registered: the word at the address presented in one cycle appears on
// dout in the next. The write enable is active low, as in the original
// design, which holds it high whenever the memory is only read. A write
// also returns the old word (read-before-write); the pipeline never reads
// the word it is writing, so this choice is this implementation's own.
module sp_ram #(
  parameter int unsigned ADDR_BITS = 13,
  parameter int unsigned DATA_BITS = 8
) (
  input  logic                 clk,
  input  logic                 we_n,
  input  logic [ADDR_BITS-1:0] addr,
  input  logic [DATA_BITS-1:0] din,
  output logic [DATA_BITS-1:0] dout
);
  logic [DATA_BITS-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (!we_n) mem[addr] <= din;
    dout <= mem[addr];
  end
endmodule
