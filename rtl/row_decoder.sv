// row_decoder: 7-to-128 global wordline decoder.
//
// Each output is the AND of one literal per address bit, taken from the
// true (addr) or complementary (addr_n) address lines according to the
// output's index, gated by the evaluate strobe en. With en low every output
// is low, which is the precharge state of the original dynamic NAND decoder;
// with en high exactly one output rises. The decoding function and the
// 7-to-128 size follow the original; the evaluate strobe and the gate-level
// form are this design's model of the dynamic circuit. The output latch (the
// keeper of the dynamic node) needs no separate storage here, since the
// decoded output is held for as long as en and the address are stable.
//
// Ports: addr[AW], addr_n[AW], en in; wl[2**AW] out (one-hot or all low).
// Timing: purely combinational.
module row_decoder #(
  parameter int unsigned AW   = sram_pkg::ROW_AW,
  parameter int unsigned ROWS = 2 ** AW
) (
  input  logic [AW-1:0]   addr,
  input  logic [AW-1:0]   addr_n,
  input  logic            en,
  output logic [ROWS-1:0] wl
);

  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      logic hit;
      hit = en;
      for (int unsigned b = 0; b < AW; b++) begin
        hit = hit & (((r >> b) & 1) != 0 ? addr[b] : addr_n[b]);
      end
      wl[r] = hit;
    end
  end

endmodule
