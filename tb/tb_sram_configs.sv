// tb_sram_configs: the macro in the configurations of the chips that use it,
// each exercised by an sram_exerciser: 128 x 27 (3 tiles wide), 256 x 9
// (one block of 2 columns), 128 x 18, 128 x 153 (17 tiles wide), 2K x 18
// (4 blocks of 4 columns, 2 tiles wide) and 1K x 9 (2 blocks).
module tb_sram_configs;
  logic clk = 1'b0;
  localparam int N = 6;
  logic [N-1:0] done;
  int ck [N];
  int fl [N];
  int checks, failures;

  always #5 clk = ~clk;

  sram_exerciser #(.WORDS(128),  .NBYTE(3))  u_128x27  (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  sram_exerciser #(.WORDS(256),  .NBYTE(1))  u_256x9   (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  sram_exerciser #(.WORDS(128),  .NBYTE(2))  u_128x18  (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]));
  sram_exerciser #(.WORDS(128),  .NBYTE(17)) u_128x153 (.clk, .done(done[3]), .checks(ck[3]), .failures(fl[3]));
  sram_exerciser #(.WORDS(2048), .NBYTE(2))  u_2kx18   (.clk, .done(done[4]), .checks(ck[4]), .failures(fl[4]));
  sram_exerciser #(.WORDS(1024), .NBYTE(1))  u_1kx9    (.clk, .done(done[5]), .checks(ck[5]), .failures(fl[5]));

  initial begin
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      checks += ck[i]; failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) checks += ck[i];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
