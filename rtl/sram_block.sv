// sram_block: one block of NCOL columns (4 x 128 words = 512 words).
//
// A block holds NCOL column positions; each position is NBYTE column tiles
// of 128 x 9 bits side by side, so a word is NBYTE x 9 bits wide. Each
// column position has its own wordline buffers, which pass the global
// wordlines on only when this block (blk_sel) and this column (col_sel) are
// both selected: the divided wordline. The block output is the OR of its
// columns' outputs; unselected columns return zeros. The 4-column block and
// the n x 9 width follow the original organisation.
//
// Ports: gwl[ROWS], blk_sel, col_sel[NCOL], rd, wr, bl[W], bl_n[W] in;
// dout[W] out, with W = NBYTE*9. Timing: combinational reads, latch writes
// while wr is high.
module sram_block #(
  parameter int unsigned NCOL  = sram_pkg::MAX_COLS_PER_BLOCK,
  parameter int unsigned NBYTE = 1,
  localparam int unsigned ROWS = sram_pkg::ROWS,
  localparam int unsigned W    = NBYTE * sram_pkg::SLICE_W
) (
  input  logic [ROWS-1:0] gwl,
  input  logic            blk_sel,
  input  logic [NCOL-1:0] col_sel,
  input  logic            rd,
  input  logic            wr,
  input  logic [W-1:0]    bl,
  input  logic [W-1:0]    bl_n,
  output logic [W-1:0]    dout
);

  localparam int unsigned SW = sram_pkg::SLICE_W;

  logic [W-1:0] col_dout [NCOL];

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    logic [ROWS-1:0] lwl;

    wordline_buffers #(.ROWS(ROWS)) u_wlbuf (
      .gwl (gwl),
      .sel (blk_sel & col_sel[c]),
      .lwl (lwl)
    );

    for (genvar s = 0; s < NBYTE; s++) begin : g_slice
      sram_column #(.ROWS(ROWS), .W(SW)) u_col (
        .lwl  (lwl),
        .wr   (wr),
        .rd   (rd),
        .bl   (bl[s*SW +: SW]),
        .bl_n (bl_n[s*SW +: SW]),
        .dout (col_dout[c][s*SW +: SW])
      );
    end
  end

  always_comb begin
    dout = '0;
    for (int unsigned c = 0; c < NCOL; c++) dout = dout | col_dout[c];
  end

endmodule
