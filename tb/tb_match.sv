// tb_match: feeds a direction code per raster position (a fixed pseudo-
// random pattern) and checks the eight quadrant counts after one start,
// that busy covers exactly the armed and counting frame, and that a second
// start clears the counts before counting again.
module tb_match;
  localparam int M = 256, N = 256;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [9:0] pixel;
  logic [8:0] line;
  logic [3:0] nibble;
  logic [11:0] up_cnt [4], down_cnt [4];
  int frame;
  int checks = 0, failures = 0;

  tb_raster u_r (.clk, .pixel, .line, .frame);
  match #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (3000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // code shown at a raster position: only inside the image, as the viewer does
  function automatic int code_at(input int l, input int p);
    if (l < 240 - M/2 || l >= 240 + M/2 || p < 320 - N/2 || p >= 320 + N/2) return 0;
    return ((l * 7 + p * 13) % 11) % 6;
  endfunction
  assign nibble = 4'(code_at(int'(line), int'(pixel)));

  task automatic run_and_check(input int salt);
    int eu [4], ed [4];
    bit counting = 0, ended = 0;
    for (int q = 0; q < 4; q++) begin eu[q] = 0; ed[q] = 0; end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not raised"); end
    // model: wait for (0,0), count until (ROW_END, COL_END) inclusive
    while (busy) begin
      if (!counting && line == 0 && pixel == 0) counting = 1;
      else if (counting && !ended) begin
        automatic int q = (int'(line) >= 240 ? 2 : 0) + (int'(pixel) >= 320 ? 1 : 0);
        if (nibble == 2) eu[q]++;
        if (nibble == 1) ed[q]++;
        if (line == 240 + M/2 && pixel == 320 + N/2) ended = 1;
      end
      @(negedge clk);
    end
    for (int q = 0; q < 4; q++) begin
      checks += 2;
      if (int'(up_cnt[q]) != eu[q] % 4096) begin failures++; $display("FAIL up[%0d] %0d exp %0d", q, up_cnt[q], eu[q]); end
      if (int'(down_cnt[q]) != ed[q] % 4096) begin failures++; $display("FAIL down[%0d] %0d exp %0d", q, down_cnt[q], ed[q]); end
    end
    checks++;
    if (!ended) begin failures++; $display("FAIL busy fell before the end position"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (frame == 0 && line == 300);
    run_and_check(0);
    repeat (1000) @(negedge clk);
    run_and_check(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
