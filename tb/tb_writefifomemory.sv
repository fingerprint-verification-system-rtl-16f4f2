// tb_writefifomemory: feeds a new random byte on vram_read_data every clock
// and models a FIFO of 10 words that is drained at random. Checks that
// nothing is written before capture, that while running each clock's byte
// is written at the end of the next clock in order, that done appears only
// in the third write state with the FIFO full (and then one idle clock
// follows), and that a capture drop stops the writer after its next idle.
module tb_writefifomemory;
  localparam int CAP = 10;
  logic clk = 0, reset = 1, capture = 0, full, wr_en, done;
  logic [7:0] vram_read_data = 0, image;
  int checks = 0, failures = 0, fill = 0, n_done = 0, n_drop = 0;
  logic [7:0] prev = 0;
  bit was_push = 0;
  int phase = 0;   // 1, 2, 3: position in the write cycle of the model

  writefifomemory dut (.*);
  always #5 clk = ~clk;
  assign full = (fill >= CAP);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // model of the write cycle, evaluated at each falling edge
  always @(negedge clk) if (!reset) begin : model_check
    // outputs of the previous clock
    chk(wr_en == was_push, "wr_en");
    if (was_push) chk(image == prev, "image byte");
    // done only in the third state with full
    chk(done == (phase == 3 && full), "done");
    if (done) n_done++;
    // FIFO model: take the byte now on the write port, drain at random
    if (wr_en) begin if (fill < CAP) fill++; else n_drop++; end
    if ($urandom % 4 == 0 && fill > 0) fill--;
  end

  always @(posedge clk) if (!reset) begin
    was_push <= (phase != 0);
    prev     <= vram_read_data;
    case (phase)
      0: phase <= capture ? 1 : 0;
      1: phase <= 2;
      2: phase <= 3;
      3: phase <= full ? 0 : 1;
    endcase
    vram_read_data <= 8'($urandom);
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    repeat (20) @(negedge clk);
    chk(n_done == 0 && fill == 0, "idle without capture");
    capture = 1;
    repeat (3000) @(negedge clk);
    capture = 0;
    repeat (20) @(negedge clk);
    chk(phase == 0, "stops after capture drops");
    chk(n_done > 0, "done seen");
    chk(n_drop > 0, "full FIFO seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
