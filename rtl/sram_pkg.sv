// sram_pkg: constants shared by the modules of the configurable dual-port
// SRAM macro.
//
// The macro is tiled from fixed "column" layouts of 128 words by 9 bits; a
// block groups up to four columns (512 words), and a memory is a row of
// blocks. A word of n x 9 bits is made of n column tiles side by side that
// share one wordline. These tile sizes are those of the original macro; the
// address bit assignment given below is this design's own choice.
//
// Address map of a WORDS-deep memory (AW = log2(WORDS)):
//   addr[6:0]            row inside a column (global wordline, 7 to 128)
//   addr[6+CB:7]         column inside a block (CB = log2(columns per block))
//   addr[AW-1:7+CB]      block
package sram_pkg;

  // Rows of one column tile (7-to-128 row decoder).
  localparam int unsigned ROWS    = 128;
  localparam int unsigned ROW_AW  = 7;
  // Bits of one column tile: the width granule (n x 9 bits).
  localparam int unsigned SLICE_W = 9;
  // Columns per block: a block is 4 columns of 128 words = 512 words.
  localparam int unsigned MAX_COLS_PER_BLOCK = 4;
  // Supported memory depth.
  localparam int unsigned MIN_WORDS = 128;
  localparam int unsigned MAX_WORDS = 4096;

  // Columns in one block of a WORDS-deep memory.
  function automatic int unsigned cols_per_block(int unsigned words);
    int unsigned ncol;
    ncol = words / ROWS;
    return (ncol < MAX_COLS_PER_BLOCK) ? ncol : MAX_COLS_PER_BLOCK;
  endfunction

  // Blocks in a WORDS-deep memory.
  function automatic int unsigned num_blocks(int unsigned words);
    return (words / ROWS) / cols_per_block(words);
  endfunction

  // Address bits needed to pick one of n items (0 when n is 1).
  function automatic int unsigned sel_bits(int unsigned n);
    return (n > 1) ? $clog2(n) : 0;
  endfunction

endpackage
