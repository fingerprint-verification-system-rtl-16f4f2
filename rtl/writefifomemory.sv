// writefifomemory: streams pixel bytes from the frame memory into the FIFO.
//
// While capture is high the block pushes the byte on vram_read_data into the
// FIFO every clock. It cycles through three write states; in the third it
// looks at the FIFO's full flag: if the FIFO is full it raises done for that
// cycle and goes back to idle (from where it restarts at once while capture
// stays high), otherwise it carries on. Bytes offered while the FIFO is full
// are dropped by the FIFO.
//
// Interface: clk and reset (synchronous, active high) of the frame-memory
// side; vram_read_data is the pixel byte read from the frame memory;
// image/wr_en go to the FIFO's write port and are registered, so a byte
// present in one cycle is written at the end of the next. done is
// combinational from the state and full.
//
// The three-state cycle, the full test in the third state and the one-byte
// register stage follow the original design. The original also forms a
// frame-memory address from an address input; that output is left out here
// because nothing uses it, and the frame-memory read address is generated
// outside this block.
module writefifomemory (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] vram_read_data,
  input  logic       capture,
  input  logic       full,
  output logic       wr_en,
  output logic [7:0] image,
  output logic       done
);
  typedef enum logic [1:0] {W_IDLE, W_ONE, W_TWO, W_THREE} wstate_t;

  wstate_t state, next;
  logic    push;

  always_comb begin
    next = state;
    push = 1'b0;
    done = 1'b0;
    unique case (state)
      W_IDLE:  next = capture ? W_ONE : W_IDLE;
      W_ONE:   begin push = 1'b1; next = W_TWO; end
      W_TWO:   begin push = 1'b1; next = W_THREE; end
      W_THREE: begin
        push = 1'b1;
        if (full) begin done = 1'b1; next = W_IDLE; end
        else      next = W_ONE;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= W_IDLE;
      wr_en <= 1'b0;
      image <= '0;
    end else begin
      state <= next;
      wr_en <= push;
      image <= push ? vram_read_data : 8'd0;
    end
  end
endmodule
