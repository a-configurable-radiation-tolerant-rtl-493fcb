# Configurable dual-port SRAM macro (time-shared single-port array)

This is a synchronous SRAM that accepts **one read and one write in every
clock cycle**. Its storage cells have only one port. A true dual-port cell
costs area, so the second port comes from sharing the array in time instead:

- while the clock is **high**, the address bus, decoders and bitlines serve
  the **read**;
- while the clock is **low**, they serve the **write**.

The memory is built from one fixed tile: a *column* of 128 words × 9 bits.
Tiles are combined into memories of 128 to 4096 words. A word is n × 9 bits
wide, with n tiles side by side. The default configuration is **4096 words ×
9 bits**: 8 blocks of 512 words, each block made of 4 columns of 128 × 9.

The RTL models the macro at the logic level. It covers the input registers,
the time-shared address multiplexer, the decoders, the divided wordlines, the
cell array and the output latches. Analog parts are not modelled: the sensing
inverter, the replica wordline and bitlines, and the self-timed delays. Their
logic effect is built into the modules listed below.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock. Inputs are sampled on its rising edge. |
| `ren` | in | 1 | read request, active high |
| `ra` | in | log2(WORDS) | read address |
| `wen` | in | 1 | write request, active high |
| `wa` | in | log2(WORDS) | write address |
| `d` | in | NBYTE×9 | write data |
| `q` | out | NBYTE×9 | read data, held in latches |

Parameters of `cern_sram`:

- `WORDS`: a power of two from 128 to 4096. The default is 4096.
- `NBYTE`: the number of 9-bit tiles per word. The default is 1.

One cycle, starting at rising edge *k*:

```
clk      ___/‾‾‾‾‾‾‾‾‾\_________/‾‾‾‾
             read phase  write phase
inputs   sampled at edge k (ren, ra, wen, wa, d)
q        follows the word at ra during the high phase, latched at the falling
         edge, held until the next cycle with ren=1
write    the word d is stored at wa during the low phase
```

- **Read latency.** `q` is valid in the same cycle, a short time after rising
  edge *k*. Sample it before the falling edge, or at any time before the next
  read. It keeps its value through write-only and idle cycles.
- **Read and write to the same address in one cycle.** The read phase comes
  first, so the read returns the **old** word. The new word can be read from
  the next cycle on.
- **No request (standby).** If neither `ren` nor `wen` is set, no wordline
  rises and no block leaves its precharge state. This holds even while the
  address and data inputs keep changing.
- **No reset.** Array contents and `q` are undefined until written or read.
  In the very first cycle after power-up, one spurious read may refresh `q`.

## How an access flows through the macro

```
 wa ─┐ ┌──────────────┐ addr/addr_n  ┌──────────────┐ gwl[127:0] ┌──────────┐
 ra ─┴─┤ addr_mux_reg ├─────┬────────┤ row_decoder  ├────────────┤ block 0  │─┐
 clk ──┤ (FF, FF, mux)│     │        └──────────────┘            │ block 1  │ │ OR
       └──────────────┘     ├─── column_decoder ─ col_sel ───────┤  ...     │ ├──► data_out_latch ─► q
                            └─── block_predecoder ─ blk_sel ─────┤ block 7  │─┘
 d ──── data_in_reg ── bl / bl_n ───────────────────────────────►└──────────┘
 ren,wen ── timing_logic ── rd (high phase), wr (low phase), acc = rd|wr
```

1. **Input registers.** On the rising edge, `addr_mux_reg` captures `wa` and
   `ra`, and `data_in_reg` captures `d`. `timing_logic` captures `ren` and
   `wen`.
2. **Address time sharing.** `addr_mux_reg` is a 2-to-1 multiplexer selected
   by the clock itself. Its bus carries `ra` while the clock is high and `wa`
   while it is low. The bus comes in true and complement form because the
   decoders are built from NAND-style literals.
3. **Decoding.** The decoders work as follows:
   - `row_decoder` (7 to 128) raises one global wordline, but only while the
     access strobe `acc` is high.
   - `column_decoder` is static. It settles as soon as the address is on the
     bus.
   - `block_predecoder` selects one block, again only while `acc` is high.
4. **Divided wordline.** The global wordlines run across all blocks but drive
   no cells themselves. Each column has its own `wordline_buffers`. They pass
   the global wordline on to the column's short local wordline only when the
   column's block and column are both selected. The other columns keep all
   their wordlines low. They therefore stay in precharge and their outputs
   read as zero. Assertions in `cern_sram` check that at most one global
   wordline and one block are active in either phase.
5. **Array.** `sram_column` is the 128 × 9 tile.
   - Reads: with `rd` high, the selected row drives the column output.
   - Writes: with `wr` high, the selected row takes the value forced by the
     differential write bitlines (`bl`, `bl_n`).
6. **Output.** The outputs of all columns and blocks are ORed together. This
   stands for the precharged bitlines. `data_out_latch` is transparent while
   `rd` is high and holds its value afterwards.

## The phase strobes, and the one subtle point

In the original circuit, the internal timing is asynchronous:

- each access starts a self-timed loop on a clock edge;
- replica (dummy) wordlines and bitlines detect when the access is complete;
- the loop then returns all control signals to their idle state.

This RTL replaces those loops with strobes that last a whole clock phase:

- `rd = clk & read_armed`
- `wr = ~clk & wen_q`
- `acc = rd | wr`

The read strobe needs care. If the registered read request were still high
from the previous cycle when the clock rises, `rd` would pulse for an instant
at the edge. During that pulse the output latch would open at the old address.

To prevent this, `timing_logic` disarms the read request at the falling edge.
It uses two toggle flip-flops: `rd_set` flips at a rising edge with `ren`, and
`rd_clr` copies `rd_set` at the falling edge. The read is armed while the two
differ. As in the original, the control state is therefore idle again before
the next edge.

The write strobe does not need this. It is gated by the low clock phase, and
the write request changes only at the rising edge.

The cell array is written as a **latch array** (`always_latch` in
`sram_column`). A static cell holds its value whenever its wordline is low,
and the write has to happen inside the low phase. Synthesis tools therefore
report 128 × 9 latches per tile. That is intended: the RTL describes the
macro's behaviour and is not meant to be mapped to flip-flops. On an FPGA or
in a standard-cell flow, replace `sram_column` with a memory of the target
technology.

## Module list

| module | role |
|---|---|
| `sram_pkg` | tile sizes (128 rows, 9 bits, 4 columns per block) and helper functions that derive the number of columns and blocks from `WORDS` |
| `cern_sram` | top: the macro, parameters `WORDS`, `NBYTE` |
| `addr_mux_reg` | WA/RA registers and the clock-selected address multiplexer, true and complement outputs |
| `data_in_reg` | write-data register, true and complement outputs |
| `timing_logic` | request registers and the `rd`, `wr` and `acc` strobes |
| `row_decoder` | 7-to-128 global wordline decoder with an evaluate strobe |
| `column_decoder` | static column decoder, its size set by a parameter |
| `block_predecoder` | block select, gated by the access strobe |
| `wordline_buffers` | local wordline drivers of one column |
| `sram_column` | 128 × 9 latch array with its read path |
| `sram_block` | 4 column positions × `NBYTE` tiles, with their wordline buffers |
| `data_out_latch` | output latches |

### Address map

| bits | meaning |
|---|---|
| `addr[6:0]` | row |
| next log2(columns per block) bits | column within the block |
| remaining high bits | block |

- For 4096 words, bits [8:7] select the column and bits [11:9] the block.
- Memories of fewer than 512 words have a single block of WORDS/128 columns.
  For example, 256 words is one block of 2 columns.

## Configurations

Configurations that the surrounding chips use, and how to set them:

| memory | `WORDS` | `NBYTE` | structure |
|---|---|---|---|
| 4K × 9 (default) | 4096 | 1 | 8 blocks × 4 columns |
| 1K × 9 | 1024 | 1 | 2 blocks × 4 columns |
| 2K × 18 | 2048 | 2 | 4 blocks × 4 columns, 2 tiles wide |
| 256 × 9 | 256 | 1 | 1 block × 2 columns |
| 128 × 18 / 27 / 153 | 128 | 2 / 3 / 17 | 1 column, n tiles wide |

More than 4096 words (for example 16K × 9) needs several instances and an
external decoder on the high address bits.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sram_pkg.sv \
          tb/tb_cern_sram_full.sv --top-module tb_cern_sram_full -o sim
./obj_dir/sim
```

| testbench | what it runs |
|---|---|
| `tb_cern_sram_full` | The default 4K × 9 macro through the production test patterns: all 0s, all 1s, checkerboard, marching 1s and marching 0s. Each march element reads and writes the same address in one cycle. About 57 000 cycles. |
| `tb_cern_sram` | 1K × 18 end to end against a reference model: random traffic with simultaneous read/write, same-address collisions, read-only, write-only, standby and idle cycles. It checks that `q` holds through the write phase and through cycles without a read. It checks that selects are one-hot during accesses and all low without a request. It counts each situation and fails if one never occurs. |
| `tb_sram_configs` | The 128×27, 256×9, 128×18, 128×153, 2K×18 and 1K×9 configurations, through the driver `sram_exerciser` |
| `tb_<module>` | One unit test per module |

## Limits and departures

These are the places where the RTL departs from the circuit it describes, or
where a choice had to be made:

- **No timing.** The RTL is zero-delay. It gives the right cycle behaviour:
  one read and one write per clock, and data in the read cycle. It says
  nothing about access time, the maximum frequency, or power. The original
  silicon reads in about 7.5 ns at 2.5 V, reaches about 70 MHz with
  simultaneous read and write, and is specified for 40 MHz operation.
- **Strobes last a full clock phase.** The self-timed loops and the replica
  wordline and bitlines are not modelled. A real implementation must end each
  access before its phase ends. In particular, the wordline must fall before
  the address multiplexer switches.
- **Phase order.** Reading in the high phase and writing in the low phase is a
  choice made here. It is what defines the "read returns old data" behaviour
  on an address collision.
- **Interface.** The port names, the active-high requests and the address bit
  assignment are choices made here. There is no chip select: `ren=wen=0` is
  standby.
- **Analog read path.** The sensing inverter on each bitline, and the row
  decoder's dynamic node with its output latch, are modelled only by their
  logic function.
