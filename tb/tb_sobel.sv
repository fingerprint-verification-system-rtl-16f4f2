// tb_sobel: runs the edge filter over a 16x16 synthetic fingerprint with a
// behavioural image memory and compares every written edge byte with the
// reference model, for two thresholds. Also checks the pass length
// (26 cycles a pixel plus one write cycle per byte) and an abort by
// dropping enable, and the mask test for all 256 neighbourhoods and all
// four thresholds.
module tb_sobel;
  import tb_ref_pkg::*;
  localparam int M = 16, N = 16, PB = 8, AB = 5;
  logic clk = 0, rst_n = 0, enable = 0, start = 0;
  logic [1:0] thresh_sel = 0;
  logic [AB-1:0] image_addr, ram_addr;
  logic [7:0] image_data, vert_din, horiz_din;
  logic we_n, busy;
  byte unsigned rom [2**AB];
  byte unsigned vram [2**AB], hram [2**AB];
  bit img[], ve[], he[];
  int checks = 0, failures = 0, writes, cycles;

  sobel #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    image_data <= rom[image_addr];
    if (!we_n) begin vram[ram_addr] <= vert_din; hram[ram_addr] <= horiz_din; writes++; end
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input int t);
    writes = 0; cycles = 0;
    @(negedge clk); thresh_sel = 2'(t); start = 1;
    @(negedge clk); start = 0; thresh_sel = 2'(3 - t);   // latched at start
    while (busy) begin cycles++; @(negedge clk); end
    ref_edges(M, N, img, t, ve, he);
    for (int a = 0; a < M*N/8; a++) begin
      checks += 2;
      if (vram[a] != pack8(ve, a, 1)) begin failures++; $display("FAIL t=%0d v[%0d] %h exp %h", t, a, vram[a], pack8(ve,a,1)); end
      if (hram[a] != pack8(he, a, 1)) begin failures++; $display("FAIL t=%0d h[%0d] %h exp %h", t, a, hram[a], pack8(he,a,1)); end
    end
    checks += 2;
    if (writes != M*N/8) begin failures++; $display("FAIL writes %0d", writes); end
    if (cycles != 26*M*N + M*N/8) begin failures++; $display("FAIL cycles %0d exp %0d", cycles, 26*M*N + M*N/8); end
  endtask

  initial begin
    make_print(M, N, 3, img);
    for (int a = 0; a < M*N/8; a++) rom[a] = pack8(img, a, 0);
    repeat (3) @(negedge clk);
    rst_n = 1; enable = 1;
    run(0);
    for (int a = 0; a < M*N/8; a++) begin vram[a] = 8'h5a; hram[a] = 8'h5a; end
    run(1);
    // abort: dropping enable stops the pass at once
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (100) @(negedge clk);
    enable = 0;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after abort"); end
    // the mask test itself, over every neighbourhood and threshold
    for (int w = 0; w < 256; w++)
      for (int t = 0; t < 4; t++) begin
        automatic int gx = w[0] + 2*w[3] + w[5] - w[2] - 2*w[4] - w[7];
        automatic int gy = w[0] + 2*w[1] + w[2] - w[5] - 2*w[6] - w[7];
        automatic logic [1:0] r = fp_pkg::sobel_eval(8'(w), 2'(t));
        checks += 2;
        if (r[1] != (gx > t)) begin failures++; $display("FAIL sobel_eval v w=%h t=%0d", w, t); end
        if (r[0] != (gy > t)) begin failures++; $display("FAIL sobel_eval h w=%h t=%0d", w, t); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
