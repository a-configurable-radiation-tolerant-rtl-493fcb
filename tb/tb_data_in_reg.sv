// tb_data_in_reg: checks that the write-data register samples on the rising
// edge, holds for the cycle and drives the complement on q_n.
module tb_data_in_reg;
  localparam int unsigned W = 18;
  logic clk = 1'b0;
  logic [W-1:0] d, q, q_n, exp;
  int checks = 0, failures = 0;

  data_in_reg #(.W(W)) dut (.clk, .d, .q, .q_n);

  always #5 clk = ~clk;

  initial begin
    repeat (200) begin
      @(negedge clk);
      d = W'($urandom); exp = d;
      @(posedge clk); #1;
      d = W'($urandom);
      @(negedge clk); #1;
      checks++;
      if (q !== exp || q_n !== ~exp) begin
        failures++;
        $display("FAIL q=%h q_n=%h exp=%h", q, q_n, exp);
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
