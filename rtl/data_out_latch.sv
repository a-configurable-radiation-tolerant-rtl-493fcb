// data_out_latch: read-data output latch.
//
// A level-sensitive latch per output bit. While en is high (the read strobe
// of the macro, i.e. the high clock phase of a cycle with a read) q follows
// the read data; when en falls the last value is held until the next read.
// The outputs therefore keep their data through write-only, idle and standby
// cycles. One latch per bit follows the original cell; the choice of the
// read strobe as enable is this design's own.
//
// Ports: en, d[W] in; q[W] out. Timing: transparent while en is high.
module data_out_latch #(
  parameter int unsigned W = 9
) (
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_latch begin
    if (en) q = d;
  end

endmodule
