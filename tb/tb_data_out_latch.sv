// tb_data_out_latch: the latch must follow its input while enabled and hold
// the last value while disabled, whatever the input does.
module tb_data_out_latch;
  localparam int unsigned W = 9;
  logic         en;
  logic [W-1:0] d, q, held;
  int checks = 0, failures = 0;

  data_out_latch #(.W(W)) dut (.en, .d, .q);

  initial begin
    repeat (100) begin
      en = 1'b1; d = W'($urandom); #1;
      checks++;
      if (q !== d) begin failures++; $display("FAIL transparent q=%h d=%h", q, d); end
      held = d;
      en = 1'b0; #1;
      repeat (3) begin
        d = W'($urandom); #1;
        checks++;
        if (q !== held) begin failures++; $display("FAIL hold q=%h exp=%h", q, held); end
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
