// data_in_reg: write-data input register.
//
// One D flip-flop per data bit captures the write data on the rising clock
// edge and offers it in true (q) and complementary (q_n) form, which drive
// the two bitlines of a column during a write. The register is sized by
// abutting one leaf cell per bit, here the parameter W. No reset: the
// register only matters in a cycle where a write is requested.
//
// Ports: clk, d[W] in; q[W], q_n[W] out. Timing: q follows d one rising edge
// later and holds for the whole cycle.
module data_in_reg #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] q_n
);

  always_ff @(posedge clk) q <= d;

  assign q_n = ~q;

endmodule
