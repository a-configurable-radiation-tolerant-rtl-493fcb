// addr_mux_reg: address input register and time-sharing multiplexer.
//
// The write address WA and the read address RA are each captured by a
// D flip-flop on the rising clock edge. A 2-to-1 multiplexer, selected by the
// clock itself, puts one of them on the single internal address bus: while
// the clock is high the bus carries the read address, while it is low the
// write address. The bus is delivered in true (addr) and complementary
// (addr_n) form, as the NAND-type decoders use both polarities.
//
// The flip-flop pair plus multiplexer per address bit, the clock as select
// and the true/complement outputs follow the original leaf cell. Which clock
// level selects which address is this design's choice (read in the high
// phase, write in the low phase). The flip-flops have no reset: the cell's
// set/clear pins are not used.
//
// Ports: clk, wa[AW], ra[AW] in; addr[AW], addr_n[AW] out.
// Timing: addresses are sampled at posedge clk; the bus changes with both
// clock edges.
module addr_mux_reg #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic [AW-1:0] wa,
  input  logic [AW-1:0] ra,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] addr_n
);

  logic [AW-1:0] wa_q, ra_q;

  always_ff @(posedge clk) begin
    wa_q <= wa;
    ra_q <= ra;
  end

  always_comb begin
    addr   = clk ? ra_q : wa_q;
    addr_n = ~addr;
  end

endmodule
