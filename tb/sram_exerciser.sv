// sram_exerciser: test driver for one cern_sram configuration, used by
// tb_sram_configs. It writes every word with random data (write-only), then
// runs random simultaneous read/write cycles against a reference model and
// reads every word back. Reads are checked in the high phase of the cycle
// that sampled them. Results are reported on the output ports; done rises
// at the end.
module sram_exerciser #(
  parameter int unsigned WORDS = 128,
  parameter int unsigned NBYTE = 1,
  parameter int unsigned NRAND = 500
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned AW = $clog2(WORDS), W = NBYTE * 9;

  logic          ren, wen;
  logic [AW-1:0] ra, wa;
  logic [W-1:0]  d, q;
  logic [W-1:0]  model [WORDS];

  cern_sram #(.WORDS(WORDS), .NBYTE(NBYTE)) dut (.clk, .ren, .ra, .wen, .wa, .d, .q);

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom);
    return v;
  endfunction

  task automatic cycle(input logic r, input int rad, input logic w, input int wad,
                       input logic [W-1:0] wd);
    logic [W-1:0] exp;
    ren = r; ra = AW'(rad); wen = w; wa = AW'(wad); d = wd;
    exp = model[rad];
    @(posedge clk); #2;
    if (r) begin
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL %0dx%0d: read %0d q=%h exp=%h", WORDS, W, rad, q, exp);
      end
    end
    @(negedge clk);
    if (w) model[wad] = wd;
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    ren = 1'b0; wen = 1'b0; ra = '0; wa = '0; d = '0;
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) cycle(1'b0, 0, 1'b1, a, rand_word());
    for (int i = 0; i < NRAND; i++)
      cycle(1'($urandom), $urandom_range(WORDS - 1), 1'($urandom), $urandom_range(WORDS - 1), rand_word());
    for (int a = 0; a < WORDS; a++) cycle(1'b1, a, 1'b0, 0, '0);
    done = 1'b1;
  end
endmodule
