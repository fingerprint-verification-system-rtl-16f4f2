// tb_vga_pulse: two frames of 640x480 timing: line period 800 with a 96-clock
// hsync pulse starting 16 clocks after the active area; frame period 525
// lines with a 2-line vsync pulse starting 11 lines after the active area;
// pixel_count/line_count follow the position inside the active area and
// read 0 outside it.
module tb_vga_pulse;
  logic clk = 0, rst_n = 0;
  logic hsync, vsync, h_active, v_active;
  logic [9:0] pixel_count;
  logic [8:0] line_count;
  int checks = 0, failures = 0;

  vga_pulse dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (1000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2 * 800 * 525; t++) begin
      automatic int h = t % 800, v = (t / 800) % 525;
      automatic bit ha = h < 640, va = v < 480;
      chk(h_active == ha && v_active == va, $sformatf("active t=%0d", t));
      chk(hsync == !(h >= 656 && h < 752), $sformatf("hsync h=%0d", h));
      chk(vsync == !(v >= 491 && v < 493), $sformatf("vsync v=%0d", v));
      chk(int'(pixel_count) == (ha ? h : 0), $sformatf("pixel t=%0d got %0d", t, pixel_count));
      chk(int'(line_count) == (va ? v : 0), $sformatf("line v=%0d", v));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
