// debounce: synchronises a push button and ignores bounces.
//
// The raw input is sampled every clock. Any change restarts a counter; only
// when the input has stayed the same for DELAY clocks is it passed to clean.
// DELAY = 270000 is 10 ms at 27 MHz (about 8.6 ms at the 31.5 MHz pixel
// clock used here). reset is synchronous and active high; it loads the
// current input into both the sample and the output. Follows the original
// design, including its 19-bit counter.
module debounce #(
  parameter int unsigned DELAY = 270000
) (
  input  logic clk,
  input  logic reset,
  input  logic noisy,
  output logic clean
);
  logic [18:0] count;
  logic        sample;

  always_ff @(posedge clk) begin
    if (reset) begin
      count  <= '0;
      sample <= noisy;
      clean  <= noisy;
    end else if (noisy != sample) begin
      sample <= noisy;
      count  <= '0;
    end else if (count == 19'(DELAY)) begin
      clean  <= sample;
    end else begin
      count  <= count + 1'b1;
    end
  end
endmodule
