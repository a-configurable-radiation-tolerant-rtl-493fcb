// tb_timing_logic: random read/write requests; the read strobe must be high
// exactly in the high phase after a rising edge that sampled ren, the write
// strobe exactly in the following low phase when wen was sampled, and no
// strobe may appear in a cycle without requests (standby).
module tb_timing_logic;
  logic clk = 1'b0;
  logic ren, wen, rd, wr, acc, er, ew;
  int checks = 0, failures = 0, standby = 0;

  timing_logic dut (.clk, .ren, .wen, .rd, .wr, .acc);

  always #5 clk = ~clk;

  task automatic check(input logic erd, input logic ewr, input string what);
    checks++;
    if (rd !== erd || wr !== ewr || acc !== (erd | ewr)) begin
      failures++;
      $display("FAIL %s: rd=%0d wr=%0d acc=%0d exp rd=%0d wr=%0d", what, rd, wr, acc, erd, ewr);
    end
  endtask

  initial begin
    repeat (300) begin
      @(negedge clk);
      ren = 1'($urandom); wen = 1'($urandom);
      er = ren; ew = wen;
      if (!ren && !wen) standby++;
      @(posedge clk); #2;
      ren = 1'($urandom); wen = 1'($urandom);   // change after the edge
      check(er, 1'b0, "high phase");
      @(negedge clk); #2;
      check(1'b0, ew, "low phase");
    end
    checks++;
    if (standby == 0) begin failures++; $display("FAIL no standby cycle exercised"); end
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
