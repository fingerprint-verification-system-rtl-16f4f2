// sobel: binary Sobel edge filter over the whole fingerprint image.
//
// For every pixel it fetches the 8 neighbours from the image memory one at a
// time (read_loc gives the neighbour index, byte_bit splits it into the
// byte address and the bit), then applies the two 3x3 Sobel masks
//   vertical   [ 1 0 -1; 2 0 -2; 1 0 -1 ]
//   horizontal [ 1 2 1; 0 0 0; -1 -2 -1 ]
// to the one-bit pixels. Only positive responses count: a pixel is an edge
// when the positive half of a mask exceeds the negative half by more than
// the threshold (0..3, taken from the switches at start). Results are packed eight
// pixels per byte and written, inverted so that edges show black, to the
// vertical and horizontal edge memories at the same address and time.
//
// Interface: pulse start while enable is high; busy rises the next cycle and
// falls after the last byte is written. Dropping enable aborts the pass.
// Memory timing: image_addr is registered-memory style, its data is read one
// cycle later. Edge memory write enable we_n is active low.
//
// Timing (this implementation's schedule): each neighbour takes 3 cycles
// (address, memory read, capture), then one evaluate cycle, one write cycle
// every eighth pixel, and one advance cycle: 26*M*N + M*N/8 cycles a pass.
// The filter, the masks, the threshold, the packing and the inversion follow
// the original; the state sequence is this implementation's own.
module sobel
  import fp_pkg::*;
#(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned PIXEL_BITS = $clog2(M*N),
  parameter int unsigned ADDR_BITS  = PIXEL_BITS - 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 start,
  input  logic [1:0]           thresh_sel,
  output logic [ADDR_BITS-1:0] image_addr,
  input  logic [7:0]           image_data,
  output logic [ADDR_BITS-1:0] ram_addr,
  output logic [7:0]           vert_din,
  output logic [7:0]           horiz_din,
  output logic                 we_n,
  output logic                 busy
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_REQ, S_CAPT, S_EVAL, S_WRITE, S_NEXT} state_t;

  state_t                state;
  logic [PIXEL_BITS-1:0] pixel;
  logic [2:0]            k;          // neighbour being fetched
  logic [PIXEL_BITS-1:0] nb;         // its raster index (from read_loc)
  logic [7:0]            window;
  logic [7:0]            vbyte, hbyte;
  logic [1:0]            thresh;
  logic [1:0]            res;
  logic [7:0]            lane;       // data bit of the current pixel (one-hot)
  logic [7:0]            nb_mask;    // data bit of the neighbour (one-hot)

  read_loc #(.M(M), .N(N), .PIXEL_BITS(PIXEL_BITS)) u_loc (
    .clk(clk), .filt_loc(k), .pixel(pixel), .read(nb)
  );

  byte_bit #(.PIXEL_BITS(PIXEL_BITS), .ADDR_BITS(ADDR_BITS)) u_nb_addr (
    .pixel_number(nb), .byte_addr(image_addr), .bit_mask(nb_mask)
  );

  byte_bit #(.PIXEL_BITS(PIXEL_BITS), .ADDR_BITS(ADDR_BITS)) u_px_addr (
    .pixel_number(pixel), .byte_addr(ram_addr), .bit_mask(lane)
  );

  assign res        = sobel_eval(window, thresh);
  assign busy       = (state != S_IDLE);
  assign we_n       = (state != S_WRITE);
  assign vert_din   = ~vbyte;
  assign horiz_din  = ~hbyte;

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      state  <= S_IDLE;
      pixel  <= '0;
      k      <= '0;
      window <= '0;
      vbyte  <= '0;
      hbyte  <= '0;
      thresh <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          thresh <= thresh_sel;
          pixel  <= '0;
          k      <= '0;
          state  <= S_ADDR;
        end
        S_ADDR: state <= S_REQ;     // read_loc output settles
        S_REQ:  state <= S_CAPT;    // image memory read
        S_CAPT: begin
          window[k] <= |(image_data & nb_mask);
          k         <= k + 1'b1;
          state     <= (k == 3'd7) ? S_EVAL : S_ADDR;
        end
        S_EVAL: begin
          vbyte <= res[1] ? (vbyte | lane) : (vbyte & ~lane);
          hbyte <= res[0] ? (hbyte | lane) : (hbyte & ~lane);
          state <= lane[0] ? S_WRITE : S_NEXT;
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
