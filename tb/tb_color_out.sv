// tb_color_out: every switch setting with and without a filter running.
module tb_color_out;
  import fp_pkg::*;
  logic [3:0] switch_sel;
  logic en_filt, en_dir;
  logic [23:0] color_image = 24'h111111, color_vedge = 24'h222222, color_hedge = 24'h333333,
               color_vdir = 24'h444444, color_hdir = 24'h555555, vga_color;
  int checks = 0, failures = 0;

  color_out dut (.*);

  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int s = 0; s < 16; s++)
      for (int e = 0; e < 4; e++) begin
        logic [23:0] exp;
        switch_sel = 4'(s); en_filt = e[0]; en_dir = e[1];
        #1;
        if (s > 4) exp = GREEN;
        else if (e != 0) exp = BLUE;
        else exp = (s == 0) ? color_image : (s == 1) ? color_vedge : (s == 2) ? color_hedge :
                   (s == 3) ? color_vdir : color_hdir;
        checks++;
        if (vga_color !== exp) begin failures++; $display("FAIL s=%0d e=%0d %h", s, e, vga_color); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
