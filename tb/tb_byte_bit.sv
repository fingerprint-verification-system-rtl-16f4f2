// tb_byte_bit: checks byte_bit for every index at the default 12-bit width
// and for random indices of a 16-bit instance (the 256x256 image): the byte
// address must be index/8 and the mask must select data bit 7 - index%8.
module tb_byte_bit;
  int checks = 0, failures = 0;
  logic [11:0] p12;
  logic [8:0]  b12;
  logic [7:0]  n12;
  logic [15:0] p16;
  logic [12:0] b16;
  logic [7:0]  n16;

  byte_bit u12 (.pixel_number(p12), .byte_addr(b12), .bit_mask(n12));
  byte_bit #(.PIXEL_BITS(16)) u16 (.pixel_number(p16), .byte_addr(b16), .bit_mask(n16));

  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      p12 = 12'(i);
      #1;
      checks += 2;
      if (int'(b12) != i / 8) begin failures++; $display("FAIL byte %0d -> %0d", i, b12); end
      if (n12 != 8'(1 << (7 - i % 8))) begin failures++; $display("FAIL bit %0d -> %0d", i, n12); end
    end
    for (int i = 0; i < 2000; i++) begin
      automatic int p = $urandom % 65536;
      p16 = 16'(p);
      #1;
      checks += 2;
      if (int'(b16) != p / 8) begin failures++; $display("FAIL byte16 %0d -> %0d", p, b16); end
      if (n16 != 8'(1 << (7 - p % 8))) begin failures++; $display("FAIL bit16 %0d -> %0d", p, n16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
