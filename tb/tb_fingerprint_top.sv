// tb_fingerprint_top: end-to-end run of the whole board design at its
// default size (256x256 image, 270000-clock debounce). The testbench
// presses the reset button, loads a synthetic fingerprint through the load
// port, presses enter, and when the run is over checks against the
// reference models: both edge images, both direction maps, the eight
// quadrant counts and the LED readout. It counts each mechanism of the
// design and fails if one never happens: reset through the debouncer,
// enter through the debouncer, the edge pass, the direction pass, the
// match frame, the blue screen while filtering, the vertical and
// horizontal sync pulses and the image on screen afterwards.
// In parallel, on its own 125 MHz clock, the acquisition path is reset,
// fed a stream of random frame-memory bytes, and must deliver the first
// 65536 bytes it took into the print memory (checked in full, and at some
// addresses through the print memory's read port); then the on/off button
// must stop capturing. These count as the capture and on/off mechanisms.
// A short camera line is also fed in while capturing; its frame-memory
// writes (count, address, packed bytes) count as the camera mechanism.
// The 1024x768 timing generator's line length and blanking are checked
// on every sys_clk clock once its first hsync has been seen.
module tb_fingerprint_top;
  import fp_pkg::*;
  import tb_ref_pkg::*;
  localparam int M = 256, N = 256, AB = 13, DEB = 270000;
  logic clk = 0, button0 = 1, button_enter = 1, ld_we = 0;
  logic [7:0] switches = 0, led, ld_data = 0;
  logic [AB-1:0] ld_addr = 0;
  logic [7:0] vga_red, vga_green, vga_blue;
  logic vga_hsync, vga_vsync, vga_blank_n, vga_sync_n, vga_pixel_clock, running;
  logic [11:0] up_cnt [4], down_cnt [4];
  bit img[], ve[], he[];
  byte vd[], hd[];
  int checks = 0, failures = 0;
  int n_reset = 0, n_enter = 0, n_edge = 0, n_dir = 0, n_match = 0, n_blue = 0;
  int n_hsync = 0, n_vsync = 0, n_image = 0;
  logic hs_q = 1, vs_q = 1;
  logic sys_clk = 0, cap_reset = 1, cap_on_off_n = 1, vram_taken, capture, print_done;
  logic [7:0] vram_read_data = 0, prev_vrd = 0, print_rd_data;
  logic [15:0] print_rd_addr = 0;
  byte unsigned taken[$];
  int n_capture = 0, n_onoff = 0;
  bit cap_finished = 0;
  logic ntsc_vclk = 0, ntsc_dv = 0, ntsc_sw = 0, ntsc_we;
  logic [2:0] ntsc_fvh = 0;
  logic [7:0] ntsc_din = 0;
  logic [18:0] ntsc_addr;
  logic [35:0] ntsc_data;
  byte unsigned line_b[$];
  int n_ntsc = 0, n_strike = 0, n_xvga = 0, xv_since = -1;
  logic [10:0] xvga_hcount;
  logic [9:0]  xvga_vcount;
  logic xvga_hsync, xvga_vsync, xvga_blank, xv_q = 1;

  fingerprint_top dut (.*);
  always #5 clk = ~clk;
  always #4 sys_clk = ~sys_clk;
  always #18.5 ntsc_vclk = ~ntsc_vclk;
  always @(posedge sys_clk) if (ntsc_we) n_strike++;

  // 1024x768 timing: every hsync fall must come 1344 sys_clk clocks after
  // the previous one; blank must be low only in the visible area
  always @(negedge sys_clk) begin
    if (xv_q && !xvga_hsync) begin
      if (xv_since >= 0) begin
        chk(xv_since == 1344, $sformatf("xvga line length %0d", xv_since));
        n_xvga++;
      end
      xv_since = 0;
    end
    if (xv_since >= 0) begin
      xv_since++;
      chk(xvga_blank == (xvga_hcount >= 1024 || xvga_vcount >= 768), "xvga blank");
    end
    xv_q = xvga_hsync;
  end

  // camera stream: one vertical sync, one horizontal sync, then 16 bytes in
  // normal mode while capture is high. Columns 31..46 carry the bytes, so
  // four writes follow (columns 32, 36, 40, 44); the last one holds the
  // bytes of columns 40..43 at row 32.
  initial begin
    wait (capture);
    repeat (4) @(posedge ntsc_vclk);
    n_strike = 0;    // the writer's registers have settled by now
    ntsc_fvh <= 3'b010; repeat (3) @(posedge ntsc_vclk);
    ntsc_fvh <= 3'b001; repeat (2) @(posedge ntsc_vclk);
    ntsc_fvh <= 3'b000; repeat (3) @(posedge ntsc_vclk);
    for (int i = 0; i < 32; i++) begin
      @(posedge ntsc_vclk);
      ntsc_dv  <= ~ntsc_dv;
      if (!ntsc_dv) begin
        automatic byte unsigned b = 8'($urandom);
        ntsc_din <= b;
        line_b.push_back(b);
      end
    end
    @(posedge ntsc_vclk); ntsc_dv <= 0;
    repeat (6) @(posedge ntsc_vclk);
    chk(n_strike == 4, $sformatf("camera writes %0d", n_strike));
    chk(ntsc_addr[17:9] == 9'd32 && ntsc_addr[7:0] == 8'd11 && !ntsc_addr[18], $sformatf("camera address %h", ntsc_addr));
    chk(ntsc_data == {4'd0, line_b[9], line_b[10], line_b[11], line_b[12]}, $sformatf("camera data %h", ntsc_data));
    if (n_strike == 4) n_ntsc++;
  end

  // frame-memory model: a new random byte every clock, record what is taken
  always @(posedge sys_clk) begin
    if (vram_taken && !cap_reset) taken.push_back(prev_vrd);
    prev_vrd       <= vram_read_data;
    vram_read_data <= 8'($urandom);
  end

  initial begin
    repeat (5) @(posedge sys_clk);
    cap_reset <= 0;
    wait (print_done);
    @(negedge clk);
    n_capture++;
    chk(taken.size() >= M*N, $sformatf("bytes taken %0d", taken.size()));
    for (int a = 0; a < M*N; a++)
      chk(dut.u_capture.u_print_ram.mem[a] == taken[a], $sformatf("print[%0d]", a));
    for (int i = 0; i < 100; i++) begin
      automatic int a = $urandom % (M*N);
      print_rd_addr = 16'(a);
      @(negedge clk); @(negedge clk);
      chk(print_rd_data == taken[a], $sformatf("print port [%0d]", a));
    end
    chk(capture, "capturing before on/off");
    cap_on_off_n = 0;
    repeat (DEB + 10) @(posedge sys_clk);
    if (!capture) n_onoff++;
    cap_on_off_n = 1;
    cap_finished = 1;
  end
  initial begin repeat (30000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    hs_q <= vga_hsync; vs_q <= vga_vsync;
    if (hs_q && !vga_hsync) n_hsync++;
    if (vs_q && !vga_vsync) n_vsync++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int eu [4], ed [4];
    make_print(M, N, 17, img);
    ref_edges(M, N, img, 0, ve, he);
    ref_dirs(M, N, ve, he, vd, hd);
    // reset button: held long enough for any debouncer state to settle
    button0 = 0;
    repeat (900000) @(negedge clk);
    if (!dut.rst_n) n_reset++;
    button0 = 1;
    while (!dut.rst_n) @(negedge clk);
    for (int a = 0; a < M*N/8; a++) begin
      @(negedge clk); ld_we = 1; ld_addr = AB'(a); ld_data = pack8(img, a, 0);
    end
    @(negedge clk); ld_we = 0;
    switches = 8'h00;                       // threshold 0, show the image
    button_enter = 0;                       // press enter
    while (!running) @(negedge clk);
    n_enter++;
    button_enter = 1;                       // release long before the run ends
    while (running) begin
      if (dut.u_ctrl.en_filt) n_edge = 1;
      if (dut.u_ctrl.en_dir) n_dir = 1;
      if (dut.u_ctrl.busy_match) n_match = 1;
      if ((dut.u_ctrl.en_filt || dut.u_ctrl.en_dir) && {vga_red, vga_green, vga_blue} == BLUE) n_blue++;
      @(negedge clk);
    end
    for (int a = 0; a < M*N/8; a++) begin
      chk(dut.u_ctrl.u_mems.u_vedge.mem[a] == pack8(ve, a, 1), $sformatf("vedge %0d", a));
      chk(dut.u_ctrl.u_mems.u_hedge.mem[a] == pack8(he, a, 1), $sformatf("hedge %0d", a));
    end
    for (int a = 0; a < M*N/2; a++) begin
      chk(dut.u_ctrl.u_mems.u_vdir.mem[a] == 8'(vd[2*a] * 16 + vd[2*a+1]), $sformatf("vdir %0d", a));
      chk(dut.u_ctrl.u_mems.u_hdir.mem[a] == 8'(hd[2*a] * 16 + hd[2*a+1]), $sformatf("hdir %0d", a));
    end
    for (int q = 0; q < 4; q++) begin eu[q] = 0; ed[q] = 0; end
    for (int p = 0; p < M*N; p++) begin
      automatic int q = ((p / N) >= M/2 ? 2 : 0) + ((p % N) >= N/2 ? 1 : 0);
      if (vd[p] == 2) eu[q]++;
      if (vd[p] == 1) ed[q]++;
    end
    for (int q = 0; q < 4; q++) begin
      chk(int'(up_cnt[q]) == eu[q] % 4096, $sformatf("up[%0d] %0d exp %0d", q, up_cnt[q], eu[q]));
      chk(int'(down_cnt[q]) == ed[q] % 4096, $sformatf("down[%0d] %0d exp %0d", q, down_cnt[q], ed[q]));
      $display("quadrant %0d: up %0d down %0d", q, eu[q], ed[q]);
    end
    for (int s = 0; s < 8; s++) begin
      switches = 8'(s * 16);
      #1;
      chk(led == ~8'((s % 2 != 0) ? down_cnt[s/2] : up_cnt[s/2]), $sformatf("led sel %0d", s));
    end
    wait (cap_finished);
    // after the run the image is back on screen: look at one full frame
    switches = 8'h00;
    repeat (420000) begin
      @(negedge clk);
      if ({vga_red, vga_green, vga_blue} == WHITE || {vga_red, vga_green, vga_blue} == BLACK) n_image++;
    end
    $display("mechanisms: reset %0d enter %0d edge %0d dir %0d match %0d blue %0d hsync %0d vsync %0d image %0d capture %0d on/off %0d camera %0d xvga lines %0d",
             n_reset, n_enter, n_edge, n_dir, n_match, n_blue, n_hsync, n_vsync, n_image, n_capture, n_onoff, n_ntsc, n_xvga);
    chk(n_capture > 0, "image captured into the print memory");
    chk(n_ntsc > 0, "camera stream turned into frame-memory writes");
    chk(n_xvga > 0, "1024x768 timing lines");
    chk(n_onoff > 0, "capture stopped by on/off");
    chk(n_reset > 0, "reset through debouncer");
    chk(n_enter > 0, "enter through debouncer");
    chk(n_edge > 0, "edge pass");
    chk(n_dir > 0, "direction pass");
    chk(n_match > 0, "match frame");
    chk(n_blue > 0, "blue screen while filtering");
    chk(n_hsync > 0, "hsync pulses");
    chk(n_vsync > 0, "vsync pulses");
    chk(n_image == M*N, $sformatf("image pixels on screen %0d", n_image));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
