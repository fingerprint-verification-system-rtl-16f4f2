// xvga: 1024x768 display timing at 60 Hz (XGA), for a 65 MHz pixel clock.
//
// A column counter runs over 1344 clocks per line and a row counter over
// 806 lines per frame. The first 1024 columns and 768 rows are visible.
// hsync is low for columns 1048..1183 and vsync is low for rows 777..782;
// both are active low. blank is high outside the visible area. All outputs
// are registered and line up with each other: in the clock where
// hcount/vcount show a position, hsync, vsync and blank belong to that
// position. vsync and the row counter change at column 0.
//
// Interface: vclock in; hcount[10:0], vcount[9:0], hsync, vsync, blank out.
// There is no reset, as in the original; every output is computed from the
// counters, so the block runs correctly from the first full frame on.
//
// Follows the original: the 1344/806 totals, the sync and blanking
// positions and the alignment of the outputs. Own choice: the counters
// wrap on reaching the last position or anything above it, so a counter
// that powers up out of range returns at once.
module xvga #(
  parameter int unsigned H_ACTIVE    = 1024,
  parameter int unsigned H_SYNC_ON   = 1048,
  parameter int unsigned H_SYNC_OFF  = 1184,
  parameter int unsigned H_TOTAL     = 1344,
  parameter int unsigned V_ACTIVE    = 768,
  parameter int unsigned V_SYNC_ON   = 777,
  parameter int unsigned V_SYNC_OFF  = 783,
  parameter int unsigned V_TOTAL     = 806
) (
  input  logic        vclock,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  logic [10:0] h_next;
  logic [9:0]  v_next;
  logic        line_end;

  always_comb begin
    line_end = 32'(hcount) >= H_TOTAL - 1;
    h_next   = line_end ? 11'd0 : hcount + 11'd1;
    if (!line_end)                      v_next = vcount;
    else if (32'(vcount) >= V_TOTAL - 1) v_next = 10'd0;
    else                                v_next = vcount + 10'd1;
  end

  always_ff @(posedge vclock) begin
    hcount <= h_next;
    vcount <= v_next;
    hsync  <= !(32'(h_next) >= H_SYNC_ON && 32'(h_next) < H_SYNC_OFF);
    vsync  <= !(32'(v_next) >= V_SYNC_ON && 32'(v_next) < V_SYNC_OFF);
    blank  <= 32'(h_next) >= H_ACTIVE || 32'(v_next) >= V_ACTIVE;
  end
endmodule
