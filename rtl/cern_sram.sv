// cern_sram: configurable synchronous dual-port SRAM macro.
//
// A memory of WORDS words of NBYTE x 9 bits (128 to 4096 words, a power of
// two) that accepts one read and one write in every clock cycle although
// its storage cells have a single port. The second port is obtained by time
// sharing: all inputs are registered on the rising clock edge, then the
// shared address bus, decoders and bitlines serve the read address while
// the clock is high and the write address while it is low. Read data are
// caught in output latches at the end of the read phase and held until the
// next read.
//
// Organisation: column tiles of 128 words x 9 bits; NBYTE tiles side by side
// give the word width; four column positions form a block of 512 words;
// blocks are repeated up to the memory depth (a 4096 x 9 memory is 8 blocks
// of 4 columns). A 7-to-128 row decoder drives global wordlines; a block
// pre-decoder and a column decoder choose the one column whose local
// wordlines are driven (divided wordline), so every other column stays
// precharged. Phases without a request start no access at all (standby).
// Smaller memories use fewer columns per block (256 words: one block of 2).
//
// Interface (all inputs sampled at posedge clk):
//   ren, ra[AW]      read request and read address
//   wen, wa[AW], d   write request, write address, write data
//   q                read data: valid during the high phase of the cycle
//                    whose rising edge sampled ren, held afterwards
// A read and a write to the same address in one cycle return the old data
// (the read phase comes first); the new data are readable from the next
// cycle on.
//
// Follows the original: the tile, block and width organisation, the
// registered inputs and latched outputs, the time-shared address
// multiplexer, the divided wordline decoding and the idle-free standby.
// This design's own choices: the port names and active-high enables, the
// address bit assignment (row bits lowest, then column, then block), the
// read-then-write phase order, and strobes that last a whole clock phase in
// place of the self-timed internal timing loops.
module cern_sram #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned NBYTE = 1,
  localparam int unsigned AW   = $clog2(WORDS),
  localparam int unsigned W    = NBYTE * sram_pkg::SLICE_W
) (
  input  logic          clk,
  input  logic          ren,
  input  logic [AW-1:0] ra,
  input  logic          wen,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q
);

  import sram_pkg::*;

  localparam int unsigned NCOL = cols_per_block(WORDS);
  localparam int unsigned NBLK = num_blocks(WORDS);
  localparam int unsigned CB   = sel_bits(NCOL);
  localparam int unsigned BB   = sel_bits(NBLK);

  // Configuration rules of the macro.
  initial begin
    assert (WORDS >= MIN_WORDS && WORDS <= MAX_WORDS && (WORDS & (WORDS - 1)) == 0)
      else $error("WORDS must be a power of two from 128 to 4096");
    assert (NBYTE >= 1) else $error("NBYTE must be at least 1");
  end

  // ---- Registered inputs and time-shared address bus -------------------
  logic [AW-1:0] addr, addr_n;
  logic [W-1:0]  bl, bl_n;
  logic          rd, wr, acc;

  addr_mux_reg #(.AW(AW)) u_addr (
    .clk (clk), .wa (wa), .ra (ra), .addr (addr), .addr_n (addr_n)
  );

  data_in_reg #(.W(W)) u_din (
    .clk (clk), .d (d), .q (bl), .q_n (bl_n)
  );

  timing_logic u_timing (
    .clk (clk), .ren (ren), .wen (wen), .rd (rd), .wr (wr), .acc (acc)
  );

  // ---- Decoding --------------------------------------------------------
  logic [ROWS-1:0] gwl;
  logic [NCOL-1:0] col_sel;
  logic [NBLK-1:0] blk_sel;

  row_decoder #(.AW(ROW_AW), .ROWS(ROWS)) u_rowdec (
    .addr   (addr[ROW_AW-1:0]),
    .addr_n (addr_n[ROW_AW-1:0]),
    .en     (acc),
    .wl     (gwl)
  );

  if (NCOL > 1) begin : g_coldec
    column_decoder #(.NCOL(NCOL), .CW(CB)) u_coldec (
      .addr   (addr[ROW_AW +: CB]),
      .addr_n (addr_n[ROW_AW +: CB]),
      .sel    (col_sel)
    );
  end else begin : g_onecol
    assign col_sel = '1;
  end

  if (NBLK > 1) begin : g_blkdec
    block_predecoder #(.NBLK(NBLK), .BW(BB)) u_blkdec (
      .addr   (addr[ROW_AW + CB +: BB]),
      .addr_n (addr_n[ROW_AW + CB +: BB]),
      .en     (acc),
      .sel    (blk_sel)
    );
  end else begin : g_oneblk
    assign blk_sel = acc;
  end

  // ---- Array -----------------------------------------------------------
  logic [W-1:0] blk_dout [NBLK];
  logic [W-1:0] rdata;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    sram_block #(.NCOL(NCOL), .NBYTE(NBYTE)) u_blk (
      .gwl     (gwl),
      .blk_sel (blk_sel[k]),
      .col_sel (col_sel),
      .rd      (rd),
      .wr      (wr),
      .bl      (bl),
      .bl_n    (bl_n),
      .dout    (blk_dout[k])
    );
  end

  always_comb begin
    rdata = '0;
    for (int unsigned k = 0; k < NBLK; k++) rdata = rdata | blk_dout[k];
  end

  // Divided wordline: at most one block, one column and one global wordline
  // are active in either phase (sampled at the end of each phase).
  a_one_row_hi: assert property (@(negedge clk) $onehot0(gwl) && $onehot0(blk_sel));
  a_one_row_lo: assert property (@(posedge clk) $onehot0(gwl) && $onehot0(blk_sel));
  a_one_col:    assert property (@(posedge clk) $onehot(col_sel));

  // ---- Latched outputs -------------------------------------------------
  data_out_latch #(.W(W)) u_dout (
    .en (rd), .d (rdata), .q (q)
  );

endmodule
