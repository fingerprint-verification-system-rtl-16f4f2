// tb_dir_copy: runs the direction filter over the edge images of a 16x16
// synthetic fingerprint (held in behavioural memories, inverted as stored)
// and compares each written byte of both direction maps with the reference
// model. Also checks the pass length (77 cycles a pixel plus one write
// cycle per byte) and that each direction code occurs.
module tb_dir_copy;
  import tb_ref_pkg::*;
  localparam int M = 16, N = 16, RA = 5, WA = 7;
  logic clk = 0, rst_n = 0, enable = 0, start = 0;
  logic [RA-1:0] read_addr;
  logic [WA-1:0] write_addr;
  logic [7:0] readv_dout, readh_dout, writev_din, writeh_din;
  logic we_n, busy;
  byte unsigned ve_mem [2**RA], he_mem [2**RA], vd_mem [2**WA], hd_mem [2**WA];
  bit img[], ve[], he[];
  byte vd[], hd[];
  int checks = 0, failures = 0, writes = 0, cycles = 0;
  int seen [6];

  dir_copy #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    readv_dout <= ve_mem[read_addr];
    readh_dout <= he_mem[read_addr];
    if (!we_n) begin vd_mem[write_addr] <= writev_din; hd_mem[write_addr] <= writeh_din; writes++; end
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    make_print(M, N, 5, img);
    ref_edges(M, N, img, 0, ve, he);
    ref_dirs(M, N, ve, he, vd, hd);
    for (int a = 0; a < M*N/8; a++) begin ve_mem[a] = pack8(ve, a, 1); he_mem[a] = pack8(he, a, 1); end
    repeat (3) @(negedge clk);
    rst_n = 1; enable = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) begin cycles++; @(negedge clk); end
    for (int a = 0; a < M*N/2; a++) begin
      automatic byte unsigned ev = 8'(int'(vd[2*a]) * 16 + int'(vd[2*a+1]));
      automatic byte unsigned eh = 8'(int'(hd[2*a]) * 16 + int'(hd[2*a+1]));
      checks += 2;
      if (vd_mem[a] != ev) begin failures++; $display("FAIL v[%0d] %h exp %h", a, vd_mem[a], ev); end
      if (hd_mem[a] != eh) begin failures++; $display("FAIL h[%0d] %h exp %h", a, hd_mem[a], eh); end
    end
    for (int p = 0; p < M*N; p++) begin seen[vd[p]]++; seen[hd[p]]++; end
    for (int c = 1; c <= 5; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL direction %0d never produced", c); end
    end
    checks += 2;
    if (writes != M*N/2) begin failures++; $display("FAIL writes %0d", writes); end
    if (cycles != 77*M*N + M*N/2) begin failures++; $display("FAIL cycles %0d exp %0d", cycles, 77*M*N + M*N/2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
