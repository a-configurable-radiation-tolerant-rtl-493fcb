// tb_block_predecoder: exhaustive check of the 8-block pre-decoder with the
// access strobe high (one-hot) and low (no block selected).
module tb_block_predecoder;
  logic [2:0] addr, addr_n;
  logic       en;
  logic [7:0] sel, exp;
  int checks = 0, failures = 0;

  block_predecoder #(.NBLK(8)) dut (.addr, .addr_n, .en, .sel);

  initial begin
    for (int k = 0; k < 8; k++) begin
      for (int e = 0; e < 2; e++) begin
        addr = 3'(k); addr_n = ~addr; en = e[0];
        exp = (e == 1) ? 8'(1 << k) : 8'h00;
        #1;
        checks++;
        if (sel !== exp) begin
          failures++;
          $display("FAIL block=%0d en=%0d sel=%b", k, e, sel);
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
