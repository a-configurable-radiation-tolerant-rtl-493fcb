// tb_sram_block: fills a block of 4 columns x 128 rows, 18 bits wide (two
// tiles per column), through global wordline, block select and column
// select, and reads it back. Also checks that nothing is read or written
// while the block is not selected (divided wordline).
module tb_sram_block;
  localparam int unsigned NCOL = 4, NBYTE = 2, W = NBYTE * 9, ROWS = 128;
  logic [ROWS-1:0] gwl;
  logic            blk_sel, wr, rd;
  logic [NCOL-1:0] col_sel;
  logic [W-1:0]    bl, bl_n, dout;
  logic [W-1:0]    model [NCOL * ROWS];
  int checks = 0, failures = 0;

  sram_block #(.NCOL(NCOL), .NBYTE(NBYTE)) dut (
    .gwl, .blk_sel, .col_sel, .rd, .wr, .bl, .bl_n, .dout
  );

  task automatic select(input int a, input logic bsel);
    gwl = '0; gwl[a % ROWS] = 1'b1;
    col_sel = NCOL'(1 << (a / ROWS));
    blk_sel = bsel;
  endtask

  task automatic write_word(input int a, input logic [W-1:0] v, input logic bsel);
    select(a, bsel); bl = v; bl_n = ~v; rd = 1'b0;
    #1 wr = 1'b1;
    #1 wr = 1'b0;
    #1 gwl = '0;
  endtask

  task automatic read_check(input int a, input logic bsel);
    logic [W-1:0] exp;
    select(a, bsel); rd = 1'b1; wr = 1'b0;
    #1;
    exp = bsel ? model[a] : '0;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL addr %0d sel=%0d: dout=%h exp=%h", a, bsel, dout, exp);
    end
    rd = 1'b0; #1;
  endtask

  initial begin
    wr = 1'b0; rd = 1'b0; gwl = '0; col_sel = '0; blk_sel = 1'b0; bl = '0; bl_n = '1;
    for (int a = 0; a < NCOL * ROWS; a++) begin
      model[a] = W'($urandom);
      write_word(a, model[a], 1'b1);
    end
    for (int a = 0; a < NCOL * ROWS; a++) read_check(a, 1'b1);
    // Unselected block: writes are ignored and reads return zeros.
    for (int a = 0; a < NCOL * ROWS; a += 13) begin
      write_word(a, ~model[a], 1'b0);
      read_check(a, 1'b0);
    end
    for (int a = 0; a < NCOL * ROWS; a += 13) read_check(a, 1'b1);
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
