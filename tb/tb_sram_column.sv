// tb_sram_column: writes every row of a 128 x 9 column through one-hot
// local wordlines and differential bitlines, then reads all rows back.
// Also checks that a write with equal bitlines leaves the bits untouched,
// that reading with rd low or with no wordline returns zeros (precharged
// bitline), and that a write with wr low changes nothing.
module tb_sram_column;
  localparam int unsigned ROWS = 128, W = 9;
  logic [ROWS-1:0] lwl;
  logic            wr, rd;
  logic [W-1:0]    bl, bl_n, dout;
  logic [W-1:0]    model [ROWS];
  int checks = 0, failures = 0;

  sram_column #(.ROWS(ROWS), .W(W)) dut (.lwl, .wr, .rd, .bl, .bl_n, .dout);

  task automatic write_row(input int r, input logic [W-1:0] v, input logic [W-1:0] vn);
    lwl = '0; lwl[r] = 1'b1; bl = v; bl_n = vn; rd = 1'b0;
    #1 wr = 1'b1;
    #1 wr = 1'b0;
    #1 lwl = '0;
  endtask

  task automatic read_check(input int r, input string what);
    lwl = '0; lwl[r] = 1'b1; rd = 1'b1; wr = 1'b0;
    #1;
    checks++;
    if (dout !== model[r]) begin
      failures++;
      $display("FAIL %s row %0d: dout=%h exp=%h", what, r, dout, model[r]);
    end
    rd = 1'b0; lwl = '0; #1;
  endtask

  initial begin
    wr = 1'b0; rd = 1'b0; lwl = '0; bl = '0; bl_n = '1;
    for (int r = 0; r < ROWS; r++) begin
      model[r] = W'($urandom);
      write_row(r, model[r], ~model[r]);
    end
    for (int r = 0; r < ROWS; r++) read_check(r, "readback");
    // Equal bitlines on the upper 4 bits: only the lower 5 bits are written.
    for (int r = 0; r < ROWS; r += 7) begin
      logic [W-1:0] v;
      v = W'($urandom);
      write_row(r, v, {~v[8:5], ~v[4:0]} ^ 9'h1E0);
      model[r] = {model[r][8:5], v[4:0]};
    end
    for (int r = 0; r < ROWS; r++) read_check(r, "partial drive");
    // wr low: nothing is written.
    lwl = '0; lwl[3] = 1'b1; bl = ~model[3]; bl_n = model[3]; #2; lwl = '0;
    read_check(3, "no write without wr");
    // Precharged outputs.
    lwl = '0; lwl[5] = 1'b1; rd = 1'b0; #1;
    checks++; if (dout !== '0) begin failures++; $display("FAIL dout with rd low"); end
    lwl = '0; rd = 1'b1; #1;
    checks++; if (dout !== '0) begin failures++; $display("FAIL dout with no wordline"); end
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
