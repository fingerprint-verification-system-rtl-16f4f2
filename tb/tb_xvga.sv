// tb_xvga: runs the 1024x768 timing generator at its default size until
// both counters have wrapped once, then follows two whole frames clock by
// clock. A free-running position model is checked against hcount/vcount.
// hsync, vsync and blank are checked against the standard XGA positions.
// The clocks between vsync falls must equal 1344*806 and the clocks between
// hsync falls must equal 1344.
module tb_xvga;
  logic vclock = 0;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;

  xvga dut (.*);
  always #5 vclock = ~vclock;
  initial begin #40000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    automatic int h, v, since_h = -1, since_v = -1, n_h = 0, n_v = 0;
    automatic logic hs_q, vs_q;
    // wait for the start of a frame
    @(negedge vclock);
    while (!(hcount == 0 && vcount == 0)) @(negedge vclock);
    h = 0; v = 0; hs_q = hsync; vs_q = vsync;
    for (int c = 0; c < 2*1344*806; c++) begin
      check(hcount == 11'(h) && vcount == 10'(v), $sformatf("position %0d,%0d exp %0d,%0d", hcount, vcount, h, v));
      check(hsync == !(h >= 1048 && h < 1184), $sformatf("hsync at %0d", h));
      check(vsync == !(v >= 777 && v < 783), $sformatf("vsync at line %0d", v));
      check(blank == (h >= 1024 || v >= 768), $sformatf("blank at %0d,%0d", h, v));
      if (hs_q && !hsync) begin
        if (since_h >= 0) begin check(since_h == 1344, $sformatf("line length %0d", since_h)); n_h++; end
        since_h = 0;
      end
      if (vs_q && !vsync) begin
        if (since_v >= 0) begin check(since_v == 1344*806, $sformatf("frame length %0d", since_v)); n_v++; end
        since_v = 0;
      end
      if (since_h >= 0) since_h++;
      if (since_v >= 0) since_v++;
      hs_q = hsync; vs_q = vsync;
      h = h + 1;
      if (h == 1344) begin h = 0; v = (v + 1) % 806; end
      @(negedge vclock);
    end
    check(n_h > 1000 && n_v >= 1, $sformatf("sync pulses seen: %0d lines %0d frames", n_h, n_v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
