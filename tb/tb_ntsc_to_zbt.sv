// tb_ntsc_to_zbt: drives a synthetic decoder stream (37 ns video clock)
// into ntsc_to_zbt (10 ns system clock) and checks every write.
// The stream has field and vertical/horizontal syncs, and dv toggles every
// video clock, so one byte arrives per two video clocks. A model of the
// video-side counters records column, row, even/odd bit and byte for each
// write pulse. On the system side the n-th write strike must carry the n-th
// record, in the address/data layout of the selected mode. Strikes in normal
// mode must fall only on columns that are multiples of four. The mode switch
// changes between lines. capture is dropped for some lines, and then the
// outputs must hold. The row and column limits are lowered so that both
// are reached.
module tb_ntsc_to_zbt;
  localparam int COLMAX = 50, ROWMAX = 40;
  logic clk = 0, vclk = 0, dv = 0, sw = 0, capture = 1;
  logic [2:0] fvh = 3'b000;
  logic [7:0] din = 0;
  logic [18:0] ntsc_addr;
  logic [35:0] ntsc_data;
  logic ntsc_we;
  int checks = 0, failures = 0, n_wr = 0, n_hold = 0, n_lim = 0;

  ntsc_to_zbt #(.COL_MAX(COLMAX), .ROW_MAX(ROWMAX)) dut (.*);
  always #5 clk = ~clk;
  always #18.5 vclk = ~vclk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // model of the video side
  int m_col = 0, m_row = 0;
  bit m_dv_d = 0, m_f_d = 0, m_eo;
  typedef struct { int col; int row; bit eo; byte unsigned b; } rec_t;
  rec_t recs[$];
  bit started = 0;

  always @(posedge vclk) begin
    automatic bit pulse = dv && !m_dv_d && !fvh[2];
    if (!fvh[2]) begin
      if (fvh[0]) m_col = 30;
      else if (!fvh[1] && dv && m_col < COLMAX) m_col = m_col + 1;
      if (fvh[1]) m_row = 30;
      else if (fvh[0] && m_row < ROWMAX) m_row = m_row + 1;
    end
    m_eo   ^= fvh[2] && !m_f_d;
    m_dv_d = dv;
    m_f_d  = fvh[2];
    if (m_col == COLMAX || m_row == ROWMAX) n_lim++;
    if (pulse && started) recs.push_back('{m_col, m_row, m_eo, din});
  end

  // system side: every write strike against the records
  int idx = 0;
  always @(negedge clk) begin
    if (started && ntsc_we) begin  // strike on the coming edge
      automatic rec_t r = recs[idx];
      automatic logic [18:0] prev_a = ntsc_addr;
      automatic logic [35:0] prev_d = ntsc_data;
      automatic logic [31:0] w = 0;
      automatic bit mode = sw, cap = capture;
      for (int k = 1; k <= 4; k++) if (idx - k >= 0) w |= 32'(recs[idx-k].b) << (8*(k-1));
      check(mode || r.col % 4 == 0, $sformatf("strike at column %0d in normal mode", r.col));
      @(negedge clk);
      if (!cap) begin
        n_hold++;
        check(ntsc_addr == prev_a && ntsc_data == prev_d, "outputs moved with capture low");
      end else if (mode) begin
        n_wr++;
        check(ntsc_addr == {1'b0, 9'(r.row), r.eo, 8'(r.col)}, $sformatf("alt addr %h rec %0d", ntsc_addr, idx));
        check(ntsc_data == {4'd0, {4{r.b}}}, $sformatf("alt data %h rec %0d", ntsc_data, idx));
      end else begin
        n_wr++;
        check(ntsc_addr == {1'b0, 9'(r.row), r.eo, 8'(r.col >> 2)}, $sformatf("addr %h rec %0d", ntsc_addr, idx));
        if (idx >= 4) check(ntsc_data == {4'd0, w}, $sformatf("data %h exp %h rec %0d", ntsc_data, w, idx));
      end
      idx = idx + 1;
    end else if (started && dut.we_edge) begin
      idx = idx + 1;   // normal mode, column not a multiple of four
    end
  end

  task automatic vcycles(int n);
    repeat (n) @(posedge vclk);
  endtask

  task automatic line(int bytes_n);
    @(posedge vclk); fvh[0] <= 1; vcycles(2); fvh[0] <= 0;
    vcycles(3);
    for (int i = 0; i < 2*bytes_n; i++) begin
      @(posedge vclk);
      dv  <= ~dv;
      din <= 8'($urandom);
    end
    @(posedge vclk); dv <= 0;
    vcycles(6);
  endtask

  initial begin
    m_eo = 0;
    // let every register of the block be overwritten once
    fvh = 3'b010; dv = 0;
    vcycles(4);
    fvh = 3'b000;
    line(4);
    vcycles(4);
    m_eo = dut.even_odd;
    m_col = int'(dut.col); m_row = int'(dut.row);
    m_dv_d = dut.dv_d; m_f_d = dut.field_d;
    started = 1;
    for (int fr = 0; fr < 12; fr++) begin
      @(posedge vclk); fvh[2] <= fr[0]; vcycles(2);
      @(posedge vclk); fvh[1] <= 1; vcycles(3); fvh[1] <= 0;
      for (int ln = 0; ln < 8; ln++) begin
        @(negedge clk);
        sw = ($urandom % 3 == 0);
        capture = ($urandom % 5 != 0);
        line(fr == 11 ? 24 : 12 + ln);
      end
    end
    vcycles(10);
    check(idx == recs.size(), $sformatf("%0d strikes for %0d records", idx, recs.size()));
    check(n_wr > 100, $sformatf("only %0d writes checked", n_wr));
    check(n_hold > 5, $sformatf("only %0d held writes", n_hold));
    check(n_lim > 10, "counter limits never reached");
    $display("writes %0d held %0d records %0d", n_wr, n_hold, recs.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
