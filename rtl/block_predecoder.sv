// block_predecoder: selects the one block an access goes to.
//
// Decodes the block address bits into a one-hot select of NBLK blocks and
// gates it with the access strobe en. Only the selected block receives an
// active select; all other blocks keep their wordlines low and their
// bitlines precharged, which is where the divided-wordline organisation saves
// power. With en low (no access in this clock phase, e.g. standby) no block
// is selected at all. The block pre-decoder is named in the original cell
// library; its gate-level form and the strobe gating are this design's own.
//
// Ports: addr[BW], addr_n[BW], en in; sel[NBLK] out (one-hot or all low).
// Timing: purely combinational.
module block_predecoder #(
  parameter int unsigned NBLK = 8,
  parameter int unsigned BW   = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic [BW-1:0]   addr,
  input  logic [BW-1:0]   addr_n,
  input  logic            en,
  output logic [NBLK-1:0] sel
);

  always_comb begin
    for (int unsigned k = 0; k < NBLK; k++) begin
      logic hit;
      hit = en;
      for (int unsigned b = 0; b < BW; b++) begin
        hit = hit & (((k >> b) & 1) != 0 ? addr[b] : addr_n[b]);
      end
      sel[k] = hit;
    end
  end

endmodule
