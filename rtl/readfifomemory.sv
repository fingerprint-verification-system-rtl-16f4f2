// readfifomemory: drains one image from the FIFO on the pixel clock.
//
// A high done (the writer has filled the FIFO, brought into this clock
// domain by the caller) starts a transfer of M*N bytes. In each read state
// the block requests a byte from the FIFO when it is not empty; the byte
// arrives on dout the next clock and is passed on as image_data with its
// address image_addr_read (0 .. M*N-1) and image_valid. After the byte with
// address M*N-1 it pulses empty_en for one clock and returns to idle.
//
// Interface: clk and reset (synchronous, active high) of the pixel-clock
// side; rd_en/dout connect to the FIFO read port (one clock read latency);
// image_data, image_addr_read, image_valid and empty_en are registered and
// go to the print memory writer.
//
// The start on done, the count to M*N-1, the 16-bit byte address and the
// end-of-image pulse empty_en follow the original design. The original
// reads without looking at the FIFO's empty flag and its state logic is
// not complete; here a read is issued only when a byte is present, and
// bytes are counted as they arrive.
module readfifomemory #(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned ADDR_BITS = $clog2(M*N)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 done,
  input  logic [7:0]           dout,
  input  logic                 empty,
  output logic                 rd_en,
  output logic [7:0]           image_data,
  output logic [ADDR_BITS-1:0] image_addr_read,
  output logic                 image_valid,
  output logic                 empty_en
);
  typedef enum logic [1:0] {R_IDLE, R_READ, R_LAST} rstate_t;

  rstate_t              state;
  logic [ADDR_BITS-1:0] req_cnt;     // bytes requested so far
  logic [ADDR_BITS-1:0] got_cnt;     // address of the next byte to arrive
  logic                 pending;     // a byte arrives on dout this clock

  assign rd_en = (state == R_READ) && !empty;

  always_ff @(posedge clk) begin
    if (reset) begin
      state           <= R_IDLE;
      req_cnt         <= '0;
      got_cnt         <= '0;
      pending         <= 1'b0;
      image_data      <= '0;
      image_addr_read <= '0;
      image_valid     <= 1'b0;
      empty_en        <= 1'b0;
    end else begin
      pending     <= rd_en;
      image_valid <= pending;
      empty_en    <= 1'b0;
      if (pending) begin
        image_data      <= dout;
        image_addr_read <= got_cnt;
        got_cnt         <= got_cnt + 1'b1;
      end
      unique case (state)
        R_IDLE: if (done) begin
          req_cnt <= '0;
          got_cnt <= '0;
          state   <= R_READ;
        end
        R_READ: if (rd_en) begin
          req_cnt <= req_cnt + 1'b1;
          if (req_cnt == ADDR_BITS'(M*N-1)) state <= R_LAST;
        end
        R_LAST: if (!pending) begin   // last byte has been passed on
          empty_en <= 1'b1;
          state    <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
