// tb_column_decoder: exhaustive check of the column decoder in its 4-column
// and 2-column sizes.
module tb_column_decoder;
  logic [1:0] a4, a4_n;
  logic [3:0] s4;
  logic [0:0] a2, a2_n;
  logic [1:0] s2;
  int checks = 0, failures = 0;

  column_decoder #(.NCOL(4)) dut4 (.addr(a4), .addr_n(a4_n), .sel(s4));
  column_decoder #(.NCOL(2)) dut2 (.addr(a2), .addr_n(a2_n), .sel(s2));

  initial begin
    for (int c = 0; c < 4; c++) begin
      a4 = 2'(c); a4_n = ~a4; a2 = 1'(c); a2_n = ~a2;
      #1;
      checks += 2;
      if (s4 !== 4'(1 << c)) begin failures++; $display("FAIL 4-col c=%0d sel=%b", c, s4); end
      if (s2 !== 2'(1 << (c % 2))) begin failures++; $display("FAIL 2-col c=%0d sel=%b", c, s2); end
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
