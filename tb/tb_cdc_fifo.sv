// tb_cdc_fifo: a 16-word cdc_fifo between a 10 ns write clock and a 13 ns
// read clock. Random writes and reads; every word read must be the next one
// accepted on the write side (a queue model), full must appear when only
// writing and empty when only reading, and after both sides have been idle
// the flags must match the model's fill level exactly.
module tb_cdc_fifo;
  localparam int AB = 4, DEPTH = 16;
  logic wr_clk = 0, rd_clk = 0, wr_rst = 1, rd_rst = 1;
  logic [7:0] din = 0, dout;
  logic wr_en = 0, rd_en = 0, full, empty;
  byte unsigned q[$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic rd_pending = 0;

  cdc_fifo #(.DATA_BITS(8), .ADDR_BITS(AB)) dut (.*);
  always #5 wr_clk = ~wr_clk;
  always #6.5 rd_clk = ~rd_clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int wprob = 50, rprob = 50;

  always @(posedge wr_clk) if (!wr_rst) begin
    if (wr_en && !full) q.push_back(din);
    if (full) n_full++;
    wr_en <= ($urandom % 100) < wprob;
    din   <= 8'($urandom);
  end

  always @(posedge rd_clk) if (!rd_rst) begin
    if (rd_pending) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL read from empty model"); end
      else begin
        automatic byte unsigned e = q.pop_front();
        if (dout != e) begin failures++; $display("FAIL dout %h exp %h", dout, e); end
      end
    end
    rd_pending <= rd_en && !empty;
    if (empty) n_empty++;
    rd_en <= ($urandom % 100) < rprob;
  end

  task automatic settle_and_check();
    automatic int wp = wprob, rp = rprob;
    wprob = 0; rprob = 0;
    repeat (10) @(posedge rd_clk);
    repeat (6) @(posedge wr_clk);
    checks += 2;
    if (full  != (q.size() == DEPTH)) begin failures++; $display("FAIL full=%b size=%0d", full, q.size()); end
    if (empty != (q.size() == 0))     begin failures++; $display("FAIL empty=%b size=%0d", empty, q.size()); end
    wprob = wp; rprob = rp;
  endtask

  initial begin
    repeat (3) @(posedge rd_clk);
    wr_rst = 0; rd_rst = 0;
    for (int phase = 0; phase < 12; phase++) begin
      case (phase % 4)
        0: begin wprob = 90; rprob = 10; end   // fill up
        1: begin wprob = 50; rprob = 50; end
        2: begin wprob = 10; rprob = 90; end   // drain
        3: begin wprob = 70; rprob = 70; end
      endcase
      repeat (400) @(posedge wr_clk);
      settle_and_check();
    end
    checks += 2;
    if (n_full == 0)  begin failures++; $display("FAIL never full"); end
    if (n_empty == 0) begin failures++; $display("FAIL never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
