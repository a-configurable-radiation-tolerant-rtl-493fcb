// tb_row_decoder: exhaustive check of the 7-to-128 decoder, with the
// evaluate strobe high (one-hot output at the address) and low (all low).
module tb_row_decoder;
  logic [6:0]   addr, addr_n;
  logic         en;
  logic [127:0] wl, exp;
  int checks = 0, failures = 0;

  row_decoder dut (.addr, .addr_n, .en, .wl);

  initial begin
    for (int a = 0; a < 128; a++) begin
      for (int e = 0; e < 2; e++) begin
        addr = 7'(a); addr_n = ~addr; en = e[0];
        exp = '0;
        if (e == 1) exp[a] = 1'b1;
        #1;
        checks++;
        if (wl !== exp) begin
          failures++;
          $display("FAIL addr=%0d en=%0d wl=%h", a, e, wl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
