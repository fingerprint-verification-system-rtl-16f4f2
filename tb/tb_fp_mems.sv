// tb_fp_mems: fills all five memories with distinct patterns and reads them
// back, checking that each memory keeps its own data and that the shared
// write enables write both memories of a pair.
module tb_fp_mems;
  localparam int AB = 6, DB = 8;
  logic clk = 0, ld_we = 0, edge_we_n = 1, dir_we_n = 1;
  logic [AB-1:0] image_addr = 0, ld_addr = 0, vedge_addr = 0, hedge_addr = 0;
  logic [DB-1:0] vdir_addr = 0, hdir_addr = 0;
  logic [7:0] ld_data = 0, vedge_din = 0, hedge_din = 0, vdir_din = 0, hdir_din = 0;
  logic [7:0] image_dout, vedge_dout, hedge_dout, vdir_dout, hdir_dout;
  int checks = 0, failures = 0;

  fp_mems #(.ADDR_BITS(AB), .DIR_ADDR_BITS(DB)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [7:0] pat(input int m, input int a);
    return 8'(a * 13 + m * 51 + 7);
  endfunction

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int a = 0; a < 2**DB; a++) begin
      @(negedge clk);
      ld_we = (a < 2**AB); ld_addr = AB'(a); ld_data = pat(0, a);
      edge_we_n = !(a < 2**AB); vedge_addr = AB'(a); hedge_addr = AB'(a);
      vedge_din = pat(1, a); hedge_din = pat(2, a);
      dir_we_n = 0; vdir_addr = DB'(a); hdir_addr = DB'(a); vdir_din = pat(3, a); hdir_din = pat(4, a);
    end
    @(negedge clk); ld_we = 0; edge_we_n = 1; dir_we_n = 1;
    for (int a = 0; a < 2**DB; a++) begin
      image_addr = AB'(a); vedge_addr = AB'(a + 1); hedge_addr = AB'(a + 2);
      vdir_addr = DB'(a); hdir_addr = DB'(a + 3);
      @(negedge clk);
      chk(image_dout, pat(0, a % 2**AB), "image");
      chk(vedge_dout, pat(1, (a + 1) % 2**AB), "vedge");
      chk(hedge_dout, pat(2, (a + 2) % 2**AB), "hedge");
      chk(vdir_dout, pat(3, a), "vdir");
      chk(hdir_dout, pat(4, (a + 3) % 2**DB), "hdir");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
