// tb_addr_mux_reg: checks the address register and clock-phase multiplexer.
// Random write and read addresses are applied before each rising edge; the
// bus must then show the sampled read address during the high phase and the
// sampled write address during the low phase, with addr_n its complement.
module tb_addr_mux_reg;
  localparam int unsigned AW = 12;
  logic clk = 1'b0;
  logic [AW-1:0] wa, ra, addr, addr_n, exp_wa, exp_ra;
  int checks = 0, failures = 0;

  addr_mux_reg #(.AW(AW)) dut (.clk, .wa, .ra, .addr, .addr_n);

  always #5 clk = ~clk;

  task automatic check(input logic [AW-1:0] exp, input string what);
    checks++;
    if (addr !== exp || addr_n !== ~exp) begin
      failures++;
      $display("FAIL %s: addr=%h addr_n=%h exp=%h", what, addr, addr_n, exp);
    end
  endtask

  initial begin
    repeat (200) begin
      @(negedge clk);
      wa = AW'($urandom); ra = AW'($urandom);
      exp_wa = wa; exp_ra = ra;
      @(posedge clk); #2;
      wa = ~wa; ra = ~ra;          // inputs change after the edge: no effect
      check(exp_ra, "high phase carries read address");
      @(negedge clk); #2;
      check(exp_wa, "low phase carries write address");
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
