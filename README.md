# A content-addressable memory built from a two-multiplexer cell

A content-addressable memory (CAM) is searched by value, not by address: a
search word is compared with every stored word at once, and the memory reports
which words hold it. Each bit of such a memory needs two things: a place to
keep the bit, and a comparator that says whether the bit equals the bit being
searched for. This design builds that cell from only four gates. There are two
2:1 multiplexers, one inverter and one OR gate. It then puts cells together
into a small CAM array.

The cell was first laid out in quantum-dot cellular automata (QCA), a
nanotechnology in which logic is built from majority gates and inverters and
timed by a four-phase clock. This RTL keeps the cell's logic and its
structure. It replaces the QCA clock zones with one ordinary synchronous
clock.

## The cell

```
            R/W                          A
             |                           |
   F ---->[S=1]                  F --->[S=1]
             MUX ---- F           ~F ->[S=0] MUX --+
   I ---->[S=0]                            |       OR ---- M
             ^                             |   K --+
             +-- stored bit, fed back
```

**Memory part (`cam_mem`).** A multiplexer selected by R/W picks the next
value of the stored bit F:

    F_next = R/W ? F : I

When R/W is 0 the input I is written. When R/W is 1, F is fed back to itself
and keeps its value. This is the "read" state: the cell keeps presenting F on
its output and to its comparator. In the QCA original the loop is held by the
clock zones. Here a flip-flop closes the loop, so a write shows up on F one
rising clock edge after it is presented.

| I | R/W | F(t) | F(t+1) | operation |
|---|-----|------|--------|-----------|
| 1 | 0   | any  | 1      | write     |
| 0 | 0   | any  | 0      | write     |
| any | 1 | 0    | 0      | read      |
| any | 1 | 1    | 1      | read      |

**Matching part (`cam_match`).** This is the less obvious half. A multiplexer
selected by the *argument* bit A gets F on its S=1 input and the inverted F
on its S=0 input. So its output is F when A = 1 and ~F when A = 0. Either way
it is 1 exactly when A equals F. In effect it is an XNOR made from a
multiplexer and an inverter. The key bit K is then ORed in:

    M = K | (A == F)  =  K + ~K(AF + ~A~F)

| K | A | F | M |
|---|---|---|---|
| 1 | any | any | 1 |
| 0 | 0 | 1 | 0 |
| 0 | 0 | 0 | 1 |
| 0 | 1 | 1 | 1 |
| 0 | 1 | 0 | 0 |

K = 1 therefore means "don't care": the bit matches whatever is stored. A set
key bit *masks* a bit out of the search. It does not enable the bit.

The QCA work gives two layouts of this cell. One uses a compact corner
inverter and the other a more robust inverter. They differ only in geometry,
cell count and fault tolerance. Their logic is identical, so `cam_cell`
stands for both.

## The array

`cam_top` follows the usual CAM organisation. It has four parts:

- **Argument register** `arg_q`: the word being searched for.
- **Key register** `key_q`: a 1 masks that bit position in every word.
- **Associative array**: `WORDS` instances of `cam_word`. Each is a row of
  `WIDTH` cells that share one R/W line.
- **Match register** `match_q`: one bit per word.

A word matches when every one of its cells matches, so the word match is the
AND of its cells' M outputs. Put another way:
`match[w] = &((word[w] ~^ arg_q) | key_q)`.

Writes are decoded per word. With `wr_en` high, only word `wr_addr` has its
R/W line driven to 0 (write), and every other word stays at 1 (read). All
words receive the same `wr_data` as their cells' I inputs.

### Timing

All registers are clocked on the rising edge of `clk`. `rst_n` is an
asynchronous active-low reset that clears the array and all three registers.

| cycle n (inputs set up) | edge at end of cycle n | visible in cycle n+1 |
|---|---|---|
| `arg_load`/`key_load` | argument / key register loaded | new `arg_q`/`key_q` drive all cells |
| `wr_en`, `wr_addr`, `wr_data` | word written | `rd_data`, and the cells' M |
| `search` | `match_q` <= current match lines | `match_q` |

- **Search time.** A search takes one clock: the match register captures the
  result of comparing the current `arg_q`/`key_q` with the current contents.
  To search for a new word, load the argument in one cycle and strobe
  `search` in the next, or strobe `search` later.
- **Write and search together.** A write and a search in the same cycle
  compare against the contents *before* the write.
- **Reading.** `rd_data` is combinational: it shows the stored bits of word
  `rd_addr`.
- **Assertion.** `wr_addr` must name an existing word. An assertion checks
  this when `WORDS` is not a power of two.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `WORDS` | 4 | number of words (`cam_top`) |
| `WIDTH` | 8 | bits per word (`cam_top`, `cam_word`) |

Both sizes are this design's choice; the organisation names no sizes. The
logic grows as WORDS x WIDTH cells, with no shared structure between words.
Either parameter can be raised freely.

## What follows the original and what does not

These parts follow the original cell:

- the cell's structure (two multiplexers, one inverter, one OR)
- its next-state and match equations
- the R/W polarity (0 = write)
- the key semantics (1 = forced match)
- the one-cycle search of all words

These are this design's own choices:

- **The clock and reset.** A flip-flop holds the stored bit and there is an
  asynchronous reset. The QCA cell has neither a clock edge nor a reset. Its
  reported latency of 1.25 QCA clock cycles (five clock zones) is a property
  of the layout and has no counterpart here.
- **How cells become a CAM.** The organisation is given only as a block
  diagram with no sizes, control signals or combining logic. These pieces are
  all assumed: the AND of cell matches per word, per-word write decoding, the
  load and search strobes, the read port, and the sizes.
- **Match output.** The match register returns one bit per word. It does not
  return an encoded address, and there is no priority encoder.
- **Register arrangement.** The diagram draws the argument register feeding
  the key register. Here both registers feed the array side by side, and each
  cell applies its key bit to its argument bit.
- **What is not modelled.** The QCA-specific results are not modelled. These
  are cell counts, area, the four-phase adiabatic clock, and the energy
  dissipation comparison.

## Files

| file | contents |
|---|---|
| `rtl/cam_pkg.sv` | `rw_e` enum: `RW_WRITE` = 0, `RW_READ` = 1 |
| `rtl/mux2.sv` | 2:1 multiplexer |
| `rtl/cam_mem.sv` | memory part: multiplexer plus storage flip-flop |
| `rtl/cam_match.sv` | matching part: inverter, multiplexer, OR |
| `rtl/cam_cell.sv` | the cell: memory part feeding matching part |
| `rtl/cam_word.sv` | one word of `WIDTH` cells and the word match |
| `rtl/cam_top.sv` | the CAM: argument, key and match registers around `WORDS` words |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the block with a reference model written
independently in the testbench. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog that stops it if it hangs.

- `tb_mux2`, `tb_cam_match`: exhaustive. The match testbench applies the
  match table row by row and then the equation over all 8 inputs.
- `tb_cam_mem`: the four rows of the memory table, then 400 random cycles.
  F is checked just before each edge (it must not change early) and just
  after it (the write must show).
- `tb_cam_cell`: a counter drives {K, R/W, I, A} through all 16 combinations
  from both stored values, followed by 500 random cycles. The testbench counts
  writes, holds, key-masked bits and mismatches, and fails if any of them
  never happened.
- `tb_cam_word`: directed cases for an exact match, a one-bit mismatch, that
  bit masked, and an all-ones key. Then 600 random cycles.
- `tb_cam_top`: the whole CAM at its default size, with no parameter
  overridden. First a directed write, load and search checks that the result
  arrives one edge after the strobe. Then 3000 random cycles with the argument
  often copied from a stored word, and an asynchronous reset in the middle.
  After every edge the testbench compares `match_q`, `arg_q`, `key_q` and
  `rd_data`. It counts each mechanism and fails if any never occurs: write,
  hold of unaddressed words, exact match, mismatch, a match made only by the
  key, several words matching, a write and search in the same cycle that
  depends on the old contents, and reset.

Each testbench also fails against a deliberately broken copy of its module.
The broken copies tried were:

- swapped multiplexer inputs
- inverted R/W polarity
- a missing inverter
- comparing against I instead of F
- OR instead of AND across a word
- a write decoder that ignores the address

## Simulating

With Verilator 5, put the package first. For example, the full CAM test:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/cam_pkg.sv rtl/mux2.sv rtl/cam_mem.sv rtl/cam_match.sv \
  rtl/cam_cell.sv rtl/cam_word.sv rtl/cam_top.sv tb/tb_cam_top.sv \
  --top-module tb_cam_top
./obj_dir/Vtb_cam_top
```

For the other testbenches, replace `tb_cam_top` with their name. Every run
takes well under a second. `tb_cam_top` hard-codes the default sizes in its
local parameters `WORDS`, `WIDTH` and `AW`. If you change the defaults of
`cam_top`, change those too.
