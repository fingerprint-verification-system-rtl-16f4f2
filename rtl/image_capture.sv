// image_capture: the acquisition path that moves a camera frame from the
// frame memory into the on-chip print memory.
//
//   frame memory bytes --> writefifomemory --> cdc_fifo --> readfifomemory
//        (sys_clk)                           (sys_clk -> clk)        |
//                                                                    v
//                           print memory (sp_ram) <-- writetoprintram
//
// After reset the capture flag (onoffhigh) is high and the writer streams
// bytes from vram_read_data into the FIFO, one per sys_clk, until the FIFO
// holds a full M*N-byte image; its done pulse sets a flag that is passed
// into the pixel-clock domain through two flip-flops. The rising edge of
// that flag starts readfifomemory, which drains M*N bytes into the print
// memory through writetoprintram. print_done then stays high and the print
// memory can be read on print_rd_addr/print_rd_data (one clock latency)
// while no image is being written. A press of on_off (debounced on
// sys_clk) clears the capture flag and stops further frames.
//
// Interface: vram_read_data is the frame memory's pixel byte stream, one
// byte per pixel in raster order. vram_taken high in a sys_clk cycle means
// the byte that was on vram_read_data in the cycle before was taken. sys_reset is synchronous to sys_clk and active high; the
// pixel-clock side is reset by the same signal passed through two
// flip-flops, so both sides of the FIFO are always reset together. Hold
// sys_reset for at least two pixel clocks. The blocks and their order
// follow the original design; the clock-domain flag and the print memory
// read port are this implementation's own.
module image_capture #(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned ADDR_BITS = $clog2(M*N),
  parameter int unsigned DEB_DELAY = 270000
) (
  input  logic                 sys_clk,
  input  logic                 sys_reset,
  input  logic                 on_off_noisy,
  input  logic [7:0]           vram_read_data,
  output logic                 vram_taken,
  output logic                 capture,
  input  logic                 clk,
  input  logic [ADDR_BITS-1:0] print_rd_addr,
  output logic [7:0]           print_rd_data,
  output logic                 print_done
);
  logic                 on_off;
  logic                 fifo_wr_en, fifo_full, fifo_empty, fifo_rd_en, wr_done;
  logic [7:0]           fifo_din, fifo_dout;
  logic                 filled, filled_s1, filled_s2, filled_s3;
  logic [7:0]           rd_data;
  logic [ADDR_BITS-1:0] rd_addr;
  logic                 rd_valid, rd_last;
  logic [7:0]           print_din;
  logic [ADDR_BITS-1:0] print_waddr, print_addr;
  logic                 print_we_n;
  logic                 rst, rst_s1;        // sys_reset seen on the pixel clock

  debounce #(.DELAY(DEB_DELAY)) u_deb (
    .clk(sys_clk), .reset(sys_reset), .noisy(on_off_noisy), .clean(on_off)
  );

  onoffhigh u_flag (.clk(sys_clk), .reset(sys_reset), .on_off(on_off), .capture(capture));

  writefifomemory u_wr (
    .clk(sys_clk), .reset(sys_reset), .vram_read_data(vram_read_data), .capture(capture),
    .full(fifo_full), .wr_en(fifo_wr_en), .image(fifo_din), .done(wr_done)
  );

  assign vram_taken = fifo_wr_en;

  cdc_fifo #(.DATA_BITS(8), .ADDR_BITS(ADDR_BITS)) u_fifo (
    .wr_clk(sys_clk), .rd_clk(clk), .wr_rst(sys_reset), .rd_rst(rst), .din(fifo_din), .wr_en(fifo_wr_en),
    .rd_en(fifo_rd_en), .dout(fifo_dout), .full(fifo_full), .empty(fifo_empty)
  );

  always_ff @(posedge clk) {rst, rst_s1} <= {rst_s1, sys_reset};

  // "FIFO filled once" flag, carried to the pixel clock
  always_ff @(posedge sys_clk) begin
    if (sys_reset)    filled <= 1'b0;
    else if (wr_done) filled <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) {filled_s3, filled_s2, filled_s1} <= '0;
    else     {filled_s3, filled_s2, filled_s1} <= {filled_s2, filled_s1, filled};
  end

  readfifomemory #(.M(M), .N(N), .ADDR_BITS(ADDR_BITS)) u_rd (
    .clk(clk), .reset(rst), .done(filled_s2 && !filled_s3), .dout(fifo_dout), .empty(fifo_empty),
    .rd_en(fifo_rd_en), .image_data(rd_data), .image_addr_read(rd_addr), .image_valid(rd_valid),
    .empty_en(rd_last)
  );

  writetoprintram #(.ADDR_BITS(ADDR_BITS)) u_print_wr (
    .clk(clk), .reset(rst), .image_data(rd_data), .image_addr(rd_addr), .image_valid(rd_valid),
    .empty_en(rd_last), .image_print(print_din), .image_address(print_waddr), .we(print_we_n),
    .done_ram(print_done)
  );

  assign print_addr = print_we_n ? print_rd_addr : print_waddr;

  sp_ram #(.ADDR_BITS(ADDR_BITS), .DATA_BITS(8)) u_print_ram (
    .clk(clk), .we_n(print_we_n), .addr(print_addr), .din(print_din), .dout(print_rd_data)
  );
endmodule
