// match: counts diagonal line directions in the four quadrants of the
// screen, the feature vector of the fingerprint.
//
// The 640x480 screen is split at its centre into quadrants
//   0 | 1
//   --+--
//   2 | 3
// and, since the image is centred, each quadrant holds one quarter of it.
// While the vertical direction map is on screen, its code for the current
// pixel arrives as nibble; the block counts "/" (up) and "\" (down) codes
// per quadrant, giving eight 12-bit counts.
//
// Operation: a start pulse clears the counts and arms the block (busy goes
// high the next cycle); counting begins when the raster reaches (0,0) and
// runs for one frame, up to the first position past the image's bottom-right
// corner (line ROW_END, pixel COL_END); one cycle later busy falls and the
// counts hold until the next start. Counters wrap at 4096 as in the
// original; the counted codes, the quadrant split and the stop position
// follow the original design.
module match
  import fp_pkg::*;
#(
  parameter int unsigned M = 256,
  parameter int unsigned N = 256,
  parameter int unsigned CNT_BITS = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [9:0]          pixel,
  input  logic [8:0]          line,
  input  logic [3:0]          nibble,
  input  logic                start,
  output logic                busy,
  output logic [CNT_BITS-1:0] up_cnt   [4],
  output logic [CNT_BITS-1:0] down_cnt [4]
);
  localparam int unsigned ROW_END = SCRN_H/2 + M/2;
  localparam int unsigned COL_END = SCRN_W/2 + N/2;

  typedef enum logic [1:0] {M_IDLE, M_ARMED, M_COUNT, M_DONE} state_t;
  state_t     state;
  logic [1:0] quad;

  assign quad = {32'(line) >= SCRN_H/2, 32'(pixel) >= SCRN_W/2};
  assign busy = (state != M_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= M_IDLE;
      for (int q = 0; q < 4; q++) begin
        up_cnt[q]   <= '0;
        down_cnt[q] <= '0;
      end
    end else begin
      unique case (state)
        M_IDLE: if (start) state <= M_ARMED;
        M_ARMED: begin
          for (int q = 0; q < 4; q++) begin
            up_cnt[q]   <= '0;
            down_cnt[q] <= '0;
          end
          if (line == '0 && pixel == '0) state <= M_COUNT;
        end
        M_COUNT: begin
          if (nibble == DIR_DIAG_UP)   up_cnt[quad]   <= up_cnt[quad] + 1'b1;
          if (nibble == DIR_DIAG_DOWN) down_cnt[quad] <= down_cnt[quad] + 1'b1;
          if (32'(line) == ROW_END && 32'(pixel) == COL_END) state <= M_DONE;
        end
        default: state <= M_IDLE;   // M_DONE
      endcase
    end
  end
endmodule
