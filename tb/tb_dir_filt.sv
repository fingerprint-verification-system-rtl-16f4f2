// tb_dir_filt: random and hand-made 5x5 windows against a reference that
// walks the lines through the centre by row/column steps.
module tb_dir_filt;
  import fp_pkg::*;
  logic [24:0] vval, hval;
  dir_t vresult, hresult;
  int checks = 0, failures = 0;

  dir_filt dut (.*);

  function automatic bit on_line(input logic [24:0] w, input int dr, input int dc);
    for (int s = -2; s <= 2; s++) if (!w[(2 + s*dr) * 5 + (2 + s*dc)]) return 0;
    return 1;
  endfunction

  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int ev, eh;
      if (n < 16) begin
        // single clean lines: "\", "/", "-", "|"
        automatic logic [24:0] w = '0;
        int dr[4] = '{1,-1,0,1};
        int dc[4] = '{1, 1,1,0};
        for (int s = -2; s <= 2; s++) w[(2 + s*dr[n%4]) * 5 + (2 + s*dc[n%4])] = 1'b1;
        vval = (n < 8) ? w : '0;
        hval = (n < 8) ? '0 : w;
      end else begin
        vval = 25'($urandom) | 25'($urandom);   // dense, so lines occur
        hval = 25'($urandom) | 25'($urandom);
      end
      #1;
      ev = on_line(vval,1,1) ? 1 : on_line(vval,-1,1) ? 2 : on_line(vval,1,0) ? 4 : 5;
      eh = on_line(hval,1,1) ? 1 : on_line(hval,-1,1) ? 2 : on_line(hval,0,1) ? 3 : 5;
      checks += 2;
      if (int'(vresult) != ev) begin failures++; $display("FAIL v %h got %0d exp %0d", vval, vresult, ev); end
      if (int'(hresult) != eh) begin failures++; $display("FAIL h %h got %0d exp %0d", hval, hresult, eh); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
