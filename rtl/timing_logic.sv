// timing_logic: access strobes of the macro.
//
// The read and write requests (ren, wen) are registered on the rising clock
// edge together with the addresses and data. Each clock cycle is then split
// in two accesses that share the decoders and the array: the high clock
// phase is the read access (rd strobe) and the low phase the write access
// (wr strobe). A phase with no request produces no strobe, so in standby no
// wordline or bitline cycle is started and the array stays precharged; the
// strobes return low at the end of each phase, ready for the next access.
// acc (rd or wr) enables the decoders.
//
// The original generates these strobes asynchronously, with self-timed
// loops that start on the clock edge and end when replica wordlines and
// bitlines report completion. That analog timing is not modelled: each strobe
// here simply lasts its whole clock phase, which gives the same function at
// the cost of modelling no access time. The read/write phase order is this
// design's choice.
//
// Ports: clk, ren, wen in; rd, wr, acc out.
// The write strobe needs no such care: it is gated by the low clock phase,
// and the write request only changes on the rising edge.
//
// Timing: ren/wen sampled at posedge clk; rd high during the following high
// phase, wr high during the following low phase.
module timing_logic (
  input  logic clk,
  input  logic ren,
  input  logic wen,
  output logic rd,
  output logic wr,
  output logic acc
);

  // The read request is kept as a pair of toggle flip-flops: rd_set flips on
  // the rising edge when a read is requested, rd_clr copies it on the
  // falling edge. They differ exactly from the rising edge of a read cycle
  // to the following falling edge, so the read request is back to its idle
  // state before the next rising edge and the read strobe cannot pulse on
  // the edge itself with the previous cycle's request.
  logic rd_set, rd_clr, wen_q;

  always_ff @(posedge clk) begin
    rd_set <= rd_set ^ ren;
    wen_q  <= wen;
  end

  always_ff @(negedge clk) rd_clr <= rd_set;

  always_comb begin
    rd  = clk & (rd_set ^ rd_clr);
    wr  = ~clk & wen_q;
    acc = rd | wr;
  end

  // The two accesses of a cycle never overlap.
  a_no_overlap: assert property (@(posedge clk) !(rd && wr));

endmodule
