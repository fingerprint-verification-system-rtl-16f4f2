// onoffhigh: the capture flag of the image acquisition path.
//
// capture is set by reset and cleared by the on_off button; it then stays
// low until the next reset. While it is high the acquisition path copies
// camera frames into the frame memory and streams them into the FIFO; a
// press of on_off freezes the last frame. Both inputs are synchronous to
// clk and active high; when both are high, on_off wins.
//
// Interface: clk, reset, on_off in; capture out, registered. The behaviour
// and the priority of on_off over reset follow the original design.
module onoffhigh (
  input  logic clk,
  input  logic reset,
  input  logic on_off,
  output logic capture
);
  always_ff @(posedge clk) begin
    if (on_off)     capture <= 1'b0;
    else if (reset) capture <= 1'b1;
  end
endmodule
