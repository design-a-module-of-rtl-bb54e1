# 256 x 16 RAM with row, column and diagonal word access

A conventional RAM hands out one word per access, and the word is always a
row of the cell array. Vector code often needs other slices of the same data:
the column of a bit matrix, or its diagonal. This RAM stores 256 words of
16 bits, and it can form the 16-bit word of an access in four ways: the
ordinary word, a column of bits, the main diagonal or the anti-diagonal. A
2-bit tag picks the way. With the tag at "row word", it behaves as a plain
256 x 16 RAM.

The second idea is two-dimensional word selection. A one-dimensional RAM
decodes its 8-bit address into 256 word lines. Here the address is split
into a 4-bit row number and a 4-bit column number. The two halves arrive one
after the other on a 4-bit bus, like RAS/CAS multiplexing in a DRAM. Two
4-to-16 decoders then drive 16 row lines and 16 column lines. A word is
selected where its row line and its column line cross. This uses fewer
decoder gates and shorter select wiring than one 8-to-256 decoder.

## Organisation

```
 address_bus[3:0] ──┬──► row register  (load: ras) ──► 4→16 decoder ──► 16 row lines ─┐
                    └──► column register (load: cas) ─► 4→16 decoder ──► 16 col lines ─┤
                                                          ▲ both enabled by rcde      │
 tag[1:0], r_w, input_bus[15:0] ─────────────────────────────────────► word memory ◄─┘
                                                                     16 rows x 16 words x 16 bits
                                                                         │
                                                                  output_bus[15:0]
```

| File | Module | Role |
|---|---|---|
| `rtl/mram_pkg.sv` | `mram_pkg` | tag type `access_tag_e`, `N_DEFAULT = 16`, read level of `r_w` |
| `rtl/addr_register.sv` | `addr_register` | 4-bit row or column register, loaded by its strobe |
| `rtl/line_decoder.sv` | `line_decoder` | 4-to-16 one-hot decoder with enable (RCDE) |
| `rtl/mem_cell.sv` | `mem_cell` | one-bit cell: clock-enabled flip-flop, AND-gated output |
| `rtl/vector_word_memory.sv` | `vector_word_memory` | 4096 cells, word-select lines, data lines |
| `rtl/mram_256x16.sv` | `mram_256x16` | top level: the two registers, the two decoders and the word memory |

The size is set by one parameter, `N` (default 16). The memory then has N
rows of N words of N bits, and the registers are log2(N) bits wide. The word
width must equal N, because a column word takes one bit from each of the N
words of a row.

## How a row becomes a vector memory

This is the least obvious part of the design. Each row of the word memory
holds 16 words of 16 bits, which is a 16 x 16 bit matrix. Call the cell that
holds bit `b` of word `w` cell (w, b). Once the row register has selected a
row, the column register supplies a 4-bit word number `c`, and the tag says
which 16 cells make up the word:

| `tag` | Name | Bit k of the accessed word is cell | Uses `c` |
|---|---|---|---|
| `2'b00` | `TAG_ROW` | (c, k): ordinary word c | yes |
| `2'b01` | `TAG_COL` | (k, c): bit c of every word | yes |
| `2'b10` | `TAG_DIAG` | (k, k) | no |
| `2'b11` | `TAG_ANTI` | (k, 15-k) | no |

Reads and writes work the same way for all four kinds. A column write
therefore changes bit c of all 16 words in the row. A diagonal write changes
one bit in each word.

In hardware, each row has 2N+2 = 34 word-select lines:

- 16 row-word lines, one per ordinary word;
- 16 column-word lines, one per bit position;
- the main-diagonal line;
- the anti-diagonal line.

The one-hot word number and the tag choose which of these lines is active
(`hw_line`, `vw_line`, `diag_line` and `anti_line` in `vector_word_memory`).
A cell is selected when one of the lines passing through it is active and
its row line is active too.

There are also two sets of 16 data lines:

- Horizontal line `b` carries bit `b` of a row word.
- Vertical line `k` carries bit `k` of a column or diagonal word.

Each cell is wired to horizontal line `b` and vertical line `w`. It writes
from one of the two, chosen by the tag. A cell that is not selected for
reading drives 0, so each data line is the OR of every cell on it. The
output takes the horizontal lines for `TAG_ROW` and the vertical lines for
the other tags. The bit order inside column and diagonal words (bit k comes
from word k) is a choice of this design.

## Interface and timing

| Port | Width | Meaning |
|---|---|---|
| `clk` | 1 | clock; every strobe is sampled on its rising edge |
| `rst_n` | 1 | asynchronous, active low; clears the two address registers only |
| `ras` | 1 | load `address_bus` into the row register |
| `cas` | 1 | load `address_bus` into the column register |
| `rcde` | 1 | enables both decoders; nothing is read or written while it is low |
| `r_w` | 1 | 1 = read, 0 = write |
| `tag` | 2 | kind of word, see the table above |
| `address_bus` | 4 | multiplexed row and column number |
| `input_bus` | 16 | write data |
| `output_bus` | 16 | read data; 0 when not reading |

An access takes three cycles:

1. A cycle with `ras` high loads the row number.
2. A cycle with `cas` high loads the column number.
3. A cycle with `rcde` high reads or writes the word.

Each register takes its new value at the clock edge that ends its strobe
cycle. The decoders and the read path are combinational. So in the `rcde`
cycle a read word appears on `output_bus` after gate delays, and a write
takes effect at the clock edge that ends the cycle. Consecutive accesses to
the same row can skip the `ras` cycle. Several `rcde` cycles in a row access
the same word again, which is useful for a read-modify-write.

During a write cycle, and whenever `rcde` is low, `output_bus` is 0. The
stored bits have no reset. A reset returns the registers to row 0, word 0
and leaves the contents untouched, which suits the non-volatile use the
memory is meant for. In simulation, a word that has never been written reads
as whatever the simulator initialised it to.

Two assertions in `vector_word_memory` flag an access where more than one
row line or more than one column line is active. With the decoders in this
design that cannot happen. The assertions guard later changes to the
decoders.

## Where this RTL makes its own choices

The register/decoder/word-memory structure, the signal names (RAS, CAS,
RCDE, r_w), the 4-bit multiplexed address, the 16-bit data buses and the
read/write polarity follow the published design. So do the vector
organisation: N row words, N column words, two diagonals, log2 N address
bits plus 2 tag bits, 2N+2 select lines and 2N data lines. The following
are choices of this RTL:

- **Clock.** In the original description each cell's flip-flop gets a
  clock pulse only when it is written, and the strobes act directly; no
  system clock appears. Here there is one clock: RAS, CAS and RCDE are
  synchronous enables, and each cell is a clock-enabled flip-flop rather
  than a gated clock. The reference implementation mapped its cells to
  latches.
- **Where the tag enters.** The published block diagram of the 2-D RAM shows
  no tag input. The vector access is described for an N x N bit memory.
  This RTL applies it inside each row, taken as a 16 x 16 bit plane, with
  the column register as the word number. With `tag = TAG_ROW` the RAM is
  the 2-D RAM of the block diagram.
- **Encodings.** The tag values, the bit order of column and diagonal words,
  the active-high strobes and enable, and the 3-cycle access sequence are
  this design's own.
- **Read path.** Output collection by an OR of AND-gated cell outputs is
  taken from how the one-bit cell is described. How the reference 2-D RAM
  gathers its outputs is not given.
- **Reset.** The address-register reset and the unreset storage are this
  design's own.

The published comparison also covers a conventional one-dimensional
256 x 16 RAM (one 8-to-256 decoder and 256-input OR gates). It served as a
baseline and is not included here.

## Size

Yosys coarse synthesis of `mram_256x16` gives 4104 flip-flop bits: the 4096
cells plus two 4-bit registers. That is about 21,500 word-level cells, most
of them the per-cell select, read and write gates.

The published comparison reports, for its FPGA flow, about 47,700 basic
elements for the 2-D RAM against 58,200 for the one-dimensional RAM. It also
reports a pad-to-pad read/write delay of 68.66 ns against 74.26 ns. Those
numbers belong to the reference implementation. They were not reproduced
with this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<m>` and has a cycle-count watchdog.

| Testbench | What it does |
|---|---|
| `tb_addr_register` | random strobes against a reference value; reset; hold |
| `tb_line_decoder` | all addresses with the enable high and low |
| `tb_mem_cell` | random write/read selects against a reference bit |
| `tb_vector_word_memory` | full-size array; fills every word, then 6000 random accesses of all four word kinds against a reference bit array; deselected accesses |
| `tb_mram_256x16` | the top at its default size, driven only through its pins (details below) |

`tb_mram_256x16` runs these steps:

1. Writes all 256 words and reads them back.
2. Runs 4000 random reads and writes of all four word kinds, some of them
   reusing the held row.
3. Checks that with `rcde` low nothing is written and the output is 0.
4. Checks that the column register changes only at the clock edge, so a new
   word appears one cycle after CAS.
5. Checks that after a reset all 256 words are still there.

It counts every mechanism and fails if one never happened.

Run a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mram_pkg.sv tb/tb_mram_256x16.sv --top-module tb_mram_256x16 -o sim
./obj_dir/sim +verilator+rand+reset+2
```

The full-size end-to-end test runs in about a second. Its
Verilator build takes about a minute, because every one of the 4096 cells is
a module instance.
