// tb_cern_sram_full: the macro at its default size, 4096 words x 9 bits,
// run through the production test patterns of the memory:
//   all 0s and all 1s, a checkerboard (alternating 0x155 / 0x0AA words,
//   the pattern flipping between adjacent rows and between words),
//   marching 1s and marching 0s.
// The marching patterns read the old value and write the new one at the
// same address in the same clock cycle, in ascending and then descending
// address order, so every cycle of them is a simultaneous read and write.
// The solid and checkerboard patterns write word a while reading word a-1.
module tb_cern_sram_full;
  localparam int unsigned WORDS = 4096, W = 9, AW = 12;

  logic          clk = 1'b0;
  logic          ren, wen;
  logic [AW-1:0] ra, wa;
  logic [W-1:0]  d, q;
  logic [W-1:0]  model [WORDS];
  int checks = 0, failures = 0, cycles = 0;

  cern_sram dut (.clk, .ren, .ra, .wen, .wa, .d, .q);

  always #5 clk = ~clk;

  // Read rad (checked against the model) and write wd to wad in one cycle.
  task automatic cycle(input logic r, input int rad, input logic w, input int wad,
                       input logic [W-1:0] wd, input string what);
    logic [W-1:0] exp;
    ren = r; ra = AW'(rad); wen = w; wa = AW'(wad); d = wd;
    exp = model[rad];
    @(posedge clk); #2;
    cycles++;
    if (r) begin
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL %s: read %0d q=%h exp=%h", what, rad, q, exp);
      end
    end
    @(negedge clk);
    if (w) model[wad] = wd;
  endtask

  function automatic logic [W-1:0] checker_word(int a);
    return (((a ^ (a >> 7)) & 1) != 0) ? 9'h155 : 9'h0AA;
  endfunction

  task automatic solid(input string what, input int kind);
    for (int a = 0; a <= WORDS; a++) begin
      logic [W-1:0] v;
      v = (kind == 0) ? '0 : (kind == 1) ? '1 : checker_word(a);
      cycle(a > 0, (a > 0) ? a - 1 : 0, a < WORDS, (a < WORDS) ? a : 0, v, what);
    end
    // Second pass: read everything back.
    for (int a = 0; a < WORDS; a++) cycle(1'b1, a, 1'b0, 0, '0, what);
  endtask

  task automatic march(input logic [W-1:0] bg, input string what);
    for (int a = 0; a < WORDS; a++) cycle(1'b0, 0, 1'b1, a, bg, what);
    for (int a = 0; a < WORDS; a++) cycle(1'b1, a, 1'b1, a, ~bg, what);
    for (int a = WORDS - 1; a >= 0; a--) cycle(1'b1, a, 1'b1, a, bg, what);
    for (int a = 0; a < WORDS; a++) cycle(1'b1, a, 1'b0, 0, '0, what);
  endtask

  initial begin
    ren = 1'b0; wen = 1'b0; ra = '0; wa = '0; d = '0;
    @(negedge clk);
    solid("all 0s", 0);
    solid("all 1s", 1);
    solid("checkerboard", 2);
    march('0, "marching 1s");
    march('1, "marching 0s");
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
