// dir_copy: direction filter pass over the two edge images.
//
// For every pixel it gathers the 5x5 window around it from the vertical and
// horizontal edge memories (both are read at the same address, one window
// cell at a time; read_loc5x5 gives the cell's raster index, byte_bit its
// byte and bit), inverts the stored bits so that an edge reads as 1, and
// lets dir_filt pick a direction code for each image. The codes are packed
// two pixels per byte, the even pixel in the high nibble, and written to the
// vertical and horizontal direction memories (byte_nibble gives the byte)
// when the odd pixel of the pair is done.
//
// Interface: pulse start while enable is high; busy rises the next cycle and
// falls after the last byte is written. Dropping enable aborts the pass.
// Edge memories are read with one cycle of latency; direction memory write
// enable we_n is active low.
//
// Timing (this implementation's schedule): 3 cycles per window cell, one
// evaluate cycle, one write cycle every second pixel and one advance cycle:
// 77*M*N + M*N/2 cycles a pass. The window, the inversion, the packing and
// the classification follow the original; the state sequence is this
// implementation's own. Codes are 1..5, so bits 7 and 3 of every written
// byte are always 0.
module dir_copy
  import fp_pkg::*;
#(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned PIXEL_BITS      = $clog2(M*N),
  parameter int unsigned READ_ADDR_BITS  = PIXEL_BITS - 3,
  parameter int unsigned WRITE_ADDR_BITS = PIXEL_BITS - 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       enable,
  input  logic                       start,
  output logic [READ_ADDR_BITS-1:0]  read_addr,
  input  logic [7:0]                 readv_dout,
  input  logic [7:0]                 readh_dout,
  output logic [WRITE_ADDR_BITS-1:0] write_addr,
  output logic [7:0]                 writev_din,
  output logic [7:0]                 writeh_din,
  output logic                       we_n,
  output logic                       busy
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_REQ, S_CAPT, S_EVAL, S_WRITE, S_NEXT} state_t;

  state_t                state;
  logic [PIXEL_BITS-1:0] pixel;
  logic [4:0]            k;         // window cell being fetched
  logic [PIXEL_BITS-1:0] win_pix;   // its raster index
  logic [24:0]           vval, hval;
  dir_t                  vres, hres;
  logic [3:0]            vhi, hhi;  // codes of the even pixel of the pair
  logic [3:0]            vlo, hlo;  // codes of the odd pixel
  logic [7:0]            win_mask;  // data bit of the window cell (one-hot)
  logic [1:0]            half;      // {even, odd} pixel of its pair

  read_loc5x5 #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_loc (
    .clk(clk), .filt_loc(k), .pixel(pixel), .read(win_pix)
  );

  dir_filt u_filt (.vval(vval), .hval(hval), .vresult(vres), .hresult(hres));

  byte_bit #(.PIXEL_BITS(PIXEL_BITS), .ADDR_BITS(READ_ADDR_BITS)) u_rd_addr (
    .pixel_number(win_pix), .byte_addr(read_addr), .bit_mask(win_mask)
  );

  byte_nibble #(.PIXEL_BITS(PIXEL_BITS), .ADDR_BITS(WRITE_ADDR_BITS)) u_wr_addr (
    .pixel_number(pixel), .byte_addr(write_addr), .half_sel(half)
  );

  assign writev_din = {vhi, vlo};
  assign writeh_din = {hhi, hlo};
  assign busy       = (state != S_IDLE);
  assign we_n       = (state != S_WRITE);

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      state <= S_IDLE;
      pixel <= '0;
      k     <= '0;
      vval  <= '0;
      hval  <= '0;
      vhi   <= '0;
      hhi   <= '0;
      vlo   <= '0;
      hlo   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pixel <= '0;
          k     <= '0;
          state <= S_ADDR;
        end
        S_ADDR: state <= S_REQ;
        S_REQ:  state <= S_CAPT;
        S_CAPT: begin
          vval[k] <= ~|(readv_dout & win_mask);
          hval[k] <= ~|(readh_dout & win_mask);
          k       <= (k == 5'd24) ? 5'd0 : k + 1'b1;
          state   <= (k == 5'd24) ? S_EVAL : S_ADDR;
        end
        S_EVAL: begin
          case (half)
            2'b10: begin            // even pixel: high nibble, byte not full
              vhi   <= vres;
              hhi   <= hres;
              state <= S_NEXT;
            end
            default: begin          // odd pixel: low nibble, write the byte
              vlo   <= vres;
              hlo   <= hres;
              state <= S_WRITE;
            end
          endcase
        end
        S_WRITE: state <= S_NEXT;
        S_NEXT: begin
          if (pixel == PIXEL_BITS'(M*N-1)) begin
            state <= S_IDLE;
          end else begin
            pixel <= pixel + 1'b1;
            state <= S_ADDR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
