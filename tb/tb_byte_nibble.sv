// tb_byte_nibble: checks byte_nibble for every index at the default 12-bit
// width and for random indices of a 16-bit instance (the 256x256 direction
// maps): the byte address must be index/2 and the half select must be
// 2'b10 (high nibble) for even and 2'b01 (low nibble) for odd indices.
module tb_byte_nibble;
  int checks = 0, failures = 0;
  logic [11:0] p12;
  logic [10:0] b12;
  logic [1:0]  n12;
  logic [15:0] p16;
  logic [14:0] b16;
  logic [1:0]  n16;

  byte_nibble u12 (.pixel_number(p12), .byte_addr(b12), .half_sel(n12));
  byte_nibble #(.PIXEL_BITS(16)) u16 (.pixel_number(p16), .byte_addr(b16), .half_sel(n16));

  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      p12 = 12'(i);
      #1;
      checks += 2;
      if (int'(b12) != i / 2) begin failures++; $display("FAIL byte %0d -> %0d", i, b12); end
      if (n12 != ((i % 2) ? 2'b01 : 2'b10)) begin failures++; $display("FAIL nibble %0d -> %0d", i, n12); end
    end
    for (int i = 0; i < 2000; i++) begin
      automatic int p = $urandom % 65536;
      p16 = 16'(p);
      #1;
      checks += 2;
      if (int'(b16) != p / 2) begin failures++; $display("FAIL byte16 %0d -> %0d", p, b16); end
      if (n16 != ((p % 2) ? 2'b01 : 2'b10)) begin failures++; $display("FAIL nibble16 %0d -> %0d", p, n16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
