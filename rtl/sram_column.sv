// sram_column: one column tile of ROWS words by W bits (128 x 9 in the macro).
//
// The storage cells are single-port cross-coupled inverter cells, modelled
// as one level-sensitive latch row per local wordline. The macro reaches its
// dual-port behaviour by time sharing, so the column itself has a single
// port: in the write phase (wr high) the row whose local wordline is high
// takes the value forced by the differential write bitlines (bl, bl_n); in
// the read phase (rd high) the selected row drives the read bitlines and
// dout carries its word. A bit whose two write bitlines are equal is not
// driven differentially and keeps its value. A column whose local wordlines
// are all low (not selected) returns all zeros, the equivalent of a
// bitline left in its precharge state, so the outputs of many columns can be
// combined with an OR. Sensing (an asymmetric inverter on the bitline in the
// original) is folded into this read path. Sizes follow the original tile;
// the latch model and the OR combination of precharged bitlines are this
// design's choices.
//
// The cell array is a latch array on purpose (a static cell holds its value
// while its wordline is low), so a tool lists these bits as latches.
//
// Ports: lwl[ROWS] (one-hot or all low), wr, rd, bl[W], bl_n[W] in;
// dout[W] out. Timing: a write completes while wr and the wordline are high;
// reads are combinational.
module sram_column #(
  parameter int unsigned ROWS = sram_pkg::ROWS,
  parameter int unsigned W    = sram_pkg::SLICE_W
) (
  input  logic [ROWS-1:0] lwl,
  input  logic            wr,
  input  logic            rd,
  input  logic [W-1:0]    bl,
  input  logic [W-1:0]    bl_n,
  output logic [W-1:0]    dout
);

  logic [W-1:0] mem [ROWS];
  logic [W-1:0] drive;

  // Bits that the write drivers force (the two bitlines differ).
  assign drive = bl ^ bl_n;

  always_latch begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      for (int unsigned b = 0; b < W; b++) begin
        if (wr && lwl[r] && drive[b]) mem[r][b] = bl[b];
      end
    end
  end

  always_comb begin
    dout = '0;
    if (rd) begin
      for (int unsigned r = 0; r < ROWS; r++) begin
        if (lwl[r]) dout = dout | mem[r];
      end
    end
  end

endmodule
