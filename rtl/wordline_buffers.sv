// wordline_buffers: local wordline drivers of one column (divided wordline).
//
// The global wordlines from the row decoder run across the whole memory but
// drive no cells. Each column has its own row of buffers that forwards the
// global wordline onto the column's short local wordline only when that
// column is selected (block select AND column select). The local wordlines
// of all other columns stay low. The function follows the original
// divided-wordline scheme; the buffer is modelled as an AND gate.
//
// Ports: gwl[ROWS], sel in; lwl[ROWS] out. Timing: purely combinational.
module wordline_buffers #(
  parameter int unsigned ROWS = sram_pkg::ROWS
) (
  input  logic [ROWS-1:0] gwl,
  input  logic            sel,
  output logic [ROWS-1:0] lwl
);

  assign lwl = gwl & {ROWS{sel}};

endmodule
