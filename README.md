# Maximum subsequence and maximum sub-array in hardware (Kadane's algorithm)

Given a stream of signed integers, the *maximum subsequence* problem asks for
the contiguous run with the largest sum; for the stream

    7, -9, 15, 20, -37, 23, 4, 5, 19, -28, 17, -2, 1

it is positions 5..8 (23 + 4 + 5 + 19 = 51). The two-dimensional version asks
for the rectangle of largest sum inside an M x N array.

Kadane's algorithm solves the 1D problem in one pass: keep a running sum `t`
and the best sum `s`; add each word to `t`; if `t > s` remember `t` and its
start/end positions; if `t` drops below zero, throw it away and start a new
candidate run after the current word. The 2D problem reduces to the 1D one:
for each pair of rows i <= j, add rows i..j column by column and run Kadane
over the N column sums; the best result over all pairs is the best rectangle.

This RTL implements both as pipelined hardware that takes one word per clock:

* `kadane1d` — the 1D engine, sized for streams of up to 65,536 signed 9-bit
  words (a 65,536-word stream takes 65,538 clocks, 0.49 ms at 133 MHz).
* `kadane2d` — the 2D engine: an array memory, an address generator, an
  adding row buffer, a widened `kadane1d`, a MAX unit and a small controller.
  The default array is 256 x 256.
* `kadane_top` — the two engines side by side.

The design follows a published FPGA design (Virtex-II, VHDL) in structure,
register widths and initial values. Sections below mark where this
implementation makes its own choices.

## The 1D engine (`kadane1d`)

### Datapath

```
 din ─► [input buffer a_buf] ─► sign-extend ─► (+) ─► [accumulator t] ─► comparator t > s
                                                ▲          │               │
                                                └──────────┘               ▼
                                    sum < 0 ? load 0 : load sum     [s]  [x1] [x2]
 [counter j] ─► (+2) ─► [i]  (loaded when sum < 0)                  ▲     ▲    ▲
                                                                    t     i    j
```

| register | width | contents |
|---|---|---|
| `a_buf` | 9 | input buffer (one word) |
| `t` | 25 | running sum, never negative |
| `s` | 24 | best sum; the sign bit is dropped because `s >= 0` |
| `j` | 16 | position counter, starts at 2^16 - 2 |
| `i` | 16 | first position of the current candidate run |
| `x1`, `x2` | 16 | first and last positions of the best run |

The 25-bit accumulator is the worst case: 65,536 words of +255 sum to
16,711,680, which needs 24 bits of magnitude plus the sign of the adder
result.

### Why `i <- j + 2` and why the counter starts at -2

This is the least obvious part of the engine. Because the input is buffered,
the adder works on the word that arrived one clock earlier, and the sign of
its result is known *before* the accumulator loads it. So instead of loading
a negative sum and clearing it a clock later, the accumulator loads 0 at once
(a synchronous reset). At that clock edge the counter still reads one less
than the position of the word in the adder, so the next candidate run begins
at `j + 2`, not `j + 1` as in the software algorithm.

The counter starts at 2^16 - 2 (that is, -2). After two clocks it reads 0
exactly when the accumulator holds the sum that ends at the first word. The
comparator stage can then store `x2 <- j` with no correction.

With a word on `din` every clock, word *k* moves through the engine like this:

| after the clock edge at the end of cycle | `a_buf` | `t` | `j` | `s`, `x1`, `x2` |
|---|---|---|---|---|
| k | a[k] | sum ending at k-1 | k-1 | up to k-2 |
| k+1 | a[k+1] | sum ending at k (0 if negative; then `i` = k+1) | k | up to k-1 |
| k+2 | a[k+2] | sum ending at k+1 | k+1 | up to k |

So the result includes a word two enabled clocks after the word was sampled.
To read the final result of a stream, clock in two zero words after it. A zero
word never changes `s`, `x1` or `x2`.

### Choices of this implementation

* `s` starts at 0, not minus infinity. Only strictly positive sums are
  reported. An all-negative stream gives `s = 0, x1 = x2 = 0`. This agrees
  with the rule that every register except the counter resets to 0 and that
  `s` is never negative.
* Ties keep the earliest run (`t > s`, strict).
* `en` freezes every register, for stalls. `clr` re-initialises the engine
  synchronously between streams. `rst_n` is an asynchronous reset.
* Positions count from 0.
* The adder is 25 bits wide, the same as the accumulator. (One passage of the
  original sizing discussion gives it 24 bits.)

## The 2D engine (`kadane2d`)

### Data flow

```
        ┌───────────────┐ ADR ┌────────┐ DOUT ┌────────────┐ sum ┌──────────┐  s,x1,x2 ┌─────┐
start ─►│ Command Unit  │────►│ Memory │─────►│ RowBuffer  │────►│ Kadane1D │─────────►│ MAX │─► maxs, x1, x2, r1, r2
        │ (kadane_cmd)  │     └────────┘      │ N x 25 bit │     │ 25-bit in│          └─────┘
        └───────────────┘       ▲             └────────────┘     └──────────┘             ▲
              │  ┌──────────────┴─────┐                                                 │
              └─►│ Address generator  │  ADR = row * N + col                        r1 = i, r2 = j
                 └────────────────────┘
```

The array sits in `kadane_mem`, row after row: the element at row r, column c
is at address r*N + c. It has a write port for loading and a one-clock
synchronous read port, like a block RAM.

The address generator (`kadane_addrgen`) has a row counter, a column counter
and a multiplier. Each *pass* reads one row, N words, one per clock. Rows are
read in this order:

    0, 1, ..., M-1,   1, 2, ..., M-1,   2, ..., M-1,   ...,   M-1

A pass is named by its row pair (i, j): i is the first row of the current
sequence and j is the row being read.

The RowBuffer (`kadane_rowbuf`) is a ring of N registers. For each word of
row j it adds the word to the oldest stored value, which is the column sum of
rows i..j-1 for the same column. It writes the new sum back at the tail. The
ring therefore holds the column sums of rows i..j after the pass. The same new
sum goes straight to `kadane1d` in the same clock. In one pass the engine both
finds the best run over rows i..j and prepares the sums for pass (i, j+1).
When j reaches the last row, the RowBuffer is cleared and the next sequence
starts at i+1.

The 1D engine inside is the same `kadane1d` with a wider word:
9 + log2(M*N) = 25 bits at 256 x 256. Its counter has log2(N) bits, because
positions are now columns.

MAX (`kadane_max`) compares each pass's best sum with the best so far. If the
new sum is strictly larger, it stores it with the pass's `x1`, `x2` and row
pair. The final rectangle is from (r1, x1) to (r2, x2).

### The Command Unit (`kadane_cmd`)

| state | clocks | what happens |
|---|---|---|
| IDLE / DONE | – | wait for `start`; on start clear the address generator, RowBuffer, Kadane1D and MAX |
| RUN | N | one memory read per clock; each word is shifted into the RowBuffer and fed to Kadane1D one clock later |
| DRAIN | 3 | memory, address generator and RowBuffer held; Kadane1D gets zero words until the last element has reached `s` (1 clock of read latency + 2 of the Kadane1D pipeline) |
| UPDATE | 1 | MAX loads the Kadane1D result with (i, j); Kadane1D is cleared; j steps to j+1, or, at the last row, the RowBuffer is cleared and i, j move to i+1 |

One pass takes N + 4 clocks. A whole search takes
1 + M(M+1)/2 × (N+4) clocks from `start` to `done`: 8,552,961 clocks at
256 x 256.

### Choices of this implementation

* **Rows summed.** The RowBuffer accumulates rows i..j (`ROWBUF <- DOUT +
  ROWBUF`), which is what the correct 2D reduction needs. Some wording of the
  original speaks of adding pairs of rows; the accumulated form is built here.
* **Last row alone.** A last pass covers row M-1 alone. Without it, a
  rectangle that lies only in the last row would be missed.
* **Word width.** The RowBuffer stores the wide 25-bit sums, not 9-bit words,
  because 9 bits cannot hold sums of rows.
* **Defaults and control.** The default size M = N = 256 is a choice here.
  The original leaves M and N as generics; 256 x 256 matches the 65,536-word
  capacity of the 1D engine. The DRAIN length, the zero words, the
  `start`/`busy`/`done` handshake and the write port are also choices of this
  implementation.
* **Multiplier.** It is an ordinary `*`. The original used a dedicated
  MULT18x18 multiplier of the FPGA.
* **Smaller arrays.** A smaller array can be searched without changing the
  parameters. Load it into the top-left corner and fill the rest with zeros.
  Zero rows and columns at the bottom and right change neither the best
  positive sum nor where it is reported.

## Interfaces

`kadane_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `s1_clr` | in | 1 | 1D: synchronous clear before a new stream |
| `s1_en` | in | 1 | 1D: take `s1_din` this clock (0 = stall) |
| `s1_din` | in | 9 | 1D: signed input word |
| `s1_s`, `s1_x1`, `s1_x2` | out | 24, 16, 16 | 1D: best sum and its first/last position |
| `s2_we`, `s2_waddr`, `s2_wdata` | in | 1, 16, 9 | 2D: write element (row*N + col) while idle |
| `s2_start` | in | 1 | 2D: start a search (from idle or done) |
| `s2_busy`, `s2_done` | out | 1 | 2D: searching / finished, result valid |
| `s2_maxs` | out | 32 | 2D: best sum |
| `s2_x1`, `s2_x2`, `s2_r1`, `s2_r2` | out | 8 | 2D: left/right column, top/bottom row |

Parameters: `IDX_W` (1D position width, stream length 2^IDX_W, default 16),
`M`, `N` (2D array size, default 256). The word width is 9 bits throughout
(`kadane_pkg::WORD_W`). Assertions check the handshake rules: the
accumulator is never negative, a stored run never ends before it starts, the
array is written only while the engine is idle, and the address counters stay
in range.

## Files

| file | contents |
|---|---|
| `rtl/kadane_pkg.sv` | word width, counter start offset, Command Unit state type |
| `rtl/kadane1d.sv` | 1D engine |
| `rtl/kadane_mem.sv` | array memory |
| `rtl/kadane_addrgen.sv` | address generator |
| `rtl/kadane_rowbuf.sv` | RowBuffer |
| `rtl/kadane_max.sv` | MAX unit |
| `rtl/kadane_cmd.sv` | Command Unit |
| `rtl/kadane2d.sv` | 2D engine |
| `rtl/kadane_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_kadane_top_full.sv` | the top at its default sizes: two 65,536-word streams and a 256 x 256 search |
| `tb/tb_kadane_workloads.sv`, `tb/kadane2d_runner.sv` | streams of 10,000 to 65,536 words; arrays of 4 x 4 to 170 x 170 |

## Simulation

Every testbench checks the outputs against a model of the algorithm written
in the testbench itself. `tb_kadane2d` also checks the sum against a
brute-force search over all rectangles, and the 2D tests re-add the reported
rectangle from the array.
They check the cycle counts given above. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` at the end. The end-to-end tests also
count how often each mechanism occurred and fail if one never did:

* accumulator cleared on a negative sum
* new best sum stored
* stream stalled
* clear between streams
* RowBuffer cleared
* drain hold
* MAX replaced or kept its result

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/kadane_pkg.sv tb/tb_kadane_top.sv --top tb_kadane_top
./obj_dir/Vtb_kadane_top
```

Replace `tb_kadane_top` with any other testbench name. `tb_kadane_top` runs the
2D engine at 12 x 12 and finishes in well under a second. The full-size
`tb_kadane_top_full` takes about half a minute.

## How far to trust it

* Every module passes its own testbench. Each testbench has been shown to
  fail on a deliberately broken version of its module (for example
  `i <- j + 1` instead of `j + 2`, or a DRAIN one clock short).
* The design has been simulated at its full default size, and both the lint
  and the elaboration tools accept it.
* It has not been run on an FPGA, and no timing closure has been attempted.
  The 256-word RowBuffer is built from registers, not RAM, so that it can be
  cleared in one clock; at large N a RAM with a valid bit per word would be
  cheaper.
* Results match Kadane's algorithm with `s` starting at 0 (see above), not
  the textbook version that reports the largest single element of an
  all-negative input.
