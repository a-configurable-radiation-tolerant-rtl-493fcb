// column_decoder: static decoder selecting one column of a block.
//
// Decodes the column address bits into a one-hot select of NCOL columns
// (2 to 4 in the macro, set when the memory is configured). It is a static
// NAND-type decoder with no strobe: it may settle as soon as the address is
// on the bus, in parallel with row decoding, so it adds nothing to the access
// time. Its decoding function and static form follow the original; building
// it from true/complement literals is this design's model.
//
// Ports: addr[CW], addr_n[CW] in; sel[NCOL] out (one-hot).
// Timing: purely combinational.
module column_decoder #(
  parameter int unsigned NCOL = sram_pkg::MAX_COLS_PER_BLOCK,
  parameter int unsigned CW   = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic [CW-1:0]   addr,
  input  logic [CW-1:0]   addr_n,
  output logic [NCOL-1:0] sel
);

  always_comb begin
    for (int unsigned c = 0; c < NCOL; c++) begin
      logic hit;
      hit = 1'b1;
      for (int unsigned b = 0; b < CW; b++) begin
        hit = hit & (((c >> b) & 1) != 0 ? addr[b] : addr_n[b]);
      end
      sel[c] = hit;
    end
  end

endmodule
