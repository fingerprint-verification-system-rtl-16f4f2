// sync_delay: delays hsync and vsync by two pixel clocks.
//
// The colour reaching the DAC lags the raster position by the viewers'
// pipeline, so the sync pulses are passed through two flip-flops each to
// line them up. rst_n (synchronous, active low) sets all stages to 1, the
// inactive level of the active-low syncs. Follows the original design.
module sync_delay (
  input  logic clk,
  input  logic rst_n,
  input  logic hsync,
  input  logic vsync,
  output logic hsync_delay,
  output logic vsync_delay
);
  logic [1:0] hs, vs;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hs <= 2'b11;
      vs <= 2'b11;
    end else begin
      hs <= {hs[0], hsync};
      vs <= {vs[0], vsync};
    end
  end

  assign hsync_delay = hs[1];
  assign vsync_delay = vs[1];
endmodule
