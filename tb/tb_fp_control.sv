// tb_fp_control: the pipeline controller with its filters, viewers, matcher
// and memories on a 16x16 image. Loads a synthetic fingerprint, raises
// enter and checks, against the reference models: both edge images, both
// direction maps, the eight quadrant counts and the LED selection. Also
// checks the colour shown while the filters run (blue) and for an invalid
// selection (green), that the passes run in order, and that the run takes
// the expected number of cycles for the two filter passes.
module tb_fp_control;
  import fp_pkg::*;
  import tb_ref_pkg::*;
  localparam int M = 16, N = 16, AB = 5, DB = 7;
  logic clk = 0, rst_n = 0, enter = 0, ld_we = 0, running;
  logic [9:0] pixel;
  logic [8:0] line;
  logic [7:0] switches = 0, led, ld_data = 0;
  logic [AB-1:0] ld_addr = 0;
  logic [23:0] vga_color;
  logic [11:0] up_cnt [4], down_cnt [4];
  int frame;
  bit img[], ve[], he[];
  byte vd[], hd[];
  int checks = 0, failures = 0;
  int n_edge = 0, n_dir = 0, n_match = 0, n_blue = 0;

  tb_raster u_r (.clk, .pixel, .line, .frame);
  fp_control #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (3000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int t_edge = 0, t_dir = 0;
    int eu [4], ed [4];
    make_print(M, N, 9, img);
    ref_edges(M, N, img, 1, ve, he);
    ref_dirs(M, N, ve, he, vd, hd);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < M*N/8; a++) begin
      @(negedge clk); ld_we = 1; ld_addr = AB'(a); ld_data = pack8(img, a, 0);
    end
    @(negedge clk); ld_we = 0;
    switches = 8'h01;                  // threshold 1, show vertical edges
    @(negedge clk); enter = 1;
    @(negedge clk); enter = 0;
    while (!running) @(negedge clk);
    while (running) begin
      if (dut.en_filt) begin t_edge++; if (n_dir != 0 || n_match != 0) n_edge = -1000; end
      if (dut.en_dir) t_dir++;
      if (dut.en_filt && n_edge >= 0) n_edge = 1;
      if (dut.en_dir) n_dir = 1;
      if (dut.busy_match) n_match = 1;
      if (dut.en_filt || dut.en_dir) begin
        checks++;
        if (vga_color === BLUE) n_blue++; else failures++;
      end
      @(negedge clk);
    end
    chk(n_edge == 1 && n_dir == 1 && n_match == 1, "passes ran in order");
    chk(n_blue > 0, "blue while filtering");
    // EDGE: start + 26 cycles/pixel + 1 write per byte + the cycle busy is seen low
    chk(t_edge == 26*M*N + M*N/8 + 2, $sformatf("edge pass %0d cycles", t_edge));
    chk(t_dir == 77*M*N + M*N/2 + 2, $sformatf("dir pass %0d cycles", t_dir));
    for (int a = 0; a < M*N/8; a++) begin
      chk(dut.u_mems.u_vedge.mem[a] == pack8(ve, a, 1), $sformatf("vedge %0d", a));
      chk(dut.u_mems.u_hedge.mem[a] == pack8(he, a, 1), $sformatf("hedge %0d", a));
    end
    for (int a = 0; a < M*N/2; a++) begin
      chk(dut.u_mems.u_vdir.mem[a] == 8'(vd[2*a] * 16 + vd[2*a+1]), $sformatf("vdir %0d", a));
      chk(dut.u_mems.u_hdir.mem[a] == 8'(hd[2*a] * 16 + hd[2*a+1]), $sformatf("hdir %0d", a));
    end
    for (int q = 0; q < 4; q++) begin eu[q] = 0; ed[q] = 0; end
    for (int p = 0; p < M*N; p++) begin
      automatic int q = ((p / N) >= M/2 ? 2 : 0) + ((p % N) >= N/2 ? 1 : 0);
      if (vd[p] == 2) eu[q]++;
      if (vd[p] == 1) ed[q]++;
    end
    for (int q = 0; q < 4; q++) begin
      chk(int'(up_cnt[q]) == eu[q], $sformatf("up[%0d] %0d exp %0d", q, up_cnt[q], eu[q]));
      chk(int'(down_cnt[q]) == ed[q], $sformatf("down[%0d] %0d exp %0d", q, down_cnt[q], ed[q]));
    end
    chk(eu[0] + eu[1] + eu[2] + eu[3] > 0 && ed[0] + ed[1] + ed[2] + ed[3] > 0, "diagonals present");
    for (int s = 0; s < 16; s++) begin
      switches = 8'(s * 16);
      #1;
      if (s < 8) chk(led == ~8'((s % 2) ? down_cnt[s/2] : up_cnt[s/2]), $sformatf("led sel %0d", s));
      else       chk(led == 8'hff, "led off");
    end
    switches = 8'h09;
    @(negedge clk);
    chk(vga_color == GREEN, "invalid selection green");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
