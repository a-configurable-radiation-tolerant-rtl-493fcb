// tb_wordline_buffers: the local wordlines must copy the global wordlines
// when the column is selected and stay low otherwise.
module tb_wordline_buffers;
  logic [127:0] gwl, lwl;
  logic         sel;
  int checks = 0, failures = 0;

  wordline_buffers dut (.gwl, .sel, .lwl);

  initial begin
    repeat (100) begin
      gwl = '0;
      gwl[$urandom_range(127)] = 1'b1;
      sel = 1'($urandom);
      #1;
      checks++;
      if (lwl !== (sel ? gwl : 128'd0)) begin
        failures++;
        $display("FAIL sel=%0d gwl=%h lwl=%h", sel, gwl, lwl);
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
