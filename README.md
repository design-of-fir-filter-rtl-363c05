# FIR filters without multipliers: LUT-based and memory-based realisations

A finite impulse response filter computes

    y(n) = h(0)·x(n) + h(1)·x(n-1) + ... + h(N-1)·x(n-N+1)

and, done directly, needs one multiplier per tap. When the coefficients
h(k) are fixed, every product h(k)·x can instead be read from a table.
A full table for an 8-bit sample would need 256 words per tap. Split the
sample into two 4-bit halves and each tap needs only a 16-word table of
the multiples 0·|h|, 1·|h|, ..., 15·|h|. Two lookups and one shift-add then
give the product:

    |h|·x = |h|·x[7:4]·16 + |h|·x[3:0] = word(x[7:4]) << 4  +  word(x[3:0])

This repository holds two synthesizable SystemVerilog filters built on that
idea. They compute the same N-tap filter.

* `lut_fir`: the LUT-based filter. Each tap has its own table, the lookups
  and shift-adds are combinational, and the latency is one clock.
* `mem_fir`: the memory-based filter. The tables of all taps are merged
  into one memory core with a single address decoder per read port. The
  memory read and the shift-add are each registered, and the latency is
  three clocks.

`fir_top` instantiates both side by side.

## Multiplying by table lookup

`multiple_lut` is one tap's table. Word k holds k·|h|, computed when the
design is elaborated from the `MAG` parameter. There are no multipliers in
the hardware and no write port. The table has two read ports: `x[3:0]`
addresses one and `x[7:4]` the other, so both halves are looked up in the
same cycle.

`sa_cell` is the shift-add cell. Its high-nibble input is shifted left by
four bit positions (plain wiring) and added to the low-nibble input. Table
words are H_W+4 bits and the product is H_W+8 bits. Because the words are
multiples of |h| with k ≤ 15, the sum cannot overflow:
255·|h| < 2^(H_W+8).

`lut_multiplier` is `multiple_lut` followed by a combinational `sa_cell`.

The tables store magnitudes only. A coefficient's sign decides whether its
tap's add/subtract cell is an adder or a subtractor (see below). So one
unsigned table serves positive and negative coefficients alike.

## The transposed-form chain

Both filters use the transposed form. The current sample goes to every tap
at once. The delays sit in the chain of partial sums, not on the input:

    s(N-1) <= ± |h(N-1)|·x
    s(k)   <= s(k+1) ± |h(k)|·x        k = N-2 .. 0
    y       = s(0)

`as_cell` is one step of this chain: a register fed by `s_in + prod` or
`s_in - prod`. Its `SUB` parameter is set from the sign of `COEF[k]`, so each
cell holds just one adder or one subtractor. The products are unsigned.
The partial sums are two's complement and are H_W + 8 + clog2(N) + 1 bits
wide (21 bits at the defaults), which is enough that no sum can wrap.

The transposed form suits table multiplication: all taps multiply the
*same* sample in the same cycle. The memory-based filter relies on this.
One address (the current sample's nibble) selects word k of every tap's
table together.

## The memory-based filter and its pipeline

`segmented_memory` organises the memory core as 16 rows. Row k is the
concatenation of k·|h(j)| for all taps j (N words of H_W+4 bits). A read
port decodes its 4-bit address once and returns a whole row, which holds
one word for every tap. This replaces N separate tables, each with its own
decoder. The core has two such read ports (low and high nibble). Both are
synchronous: the row addressed at a clock edge appears after that edge.

`mem_fir` then places one registered `sa_cell` per tap after the core, and
an `as_cell` per tap after that. A sample taken at clock edge t therefore
passes through:

| edge | register              | holds                      |
|------|-----------------------|----------------------------|
| t    | memory read registers | k·abs(h(j)) for both nibbles |
| t+1  | shift-add registers   | abs(h(j))·x for every tap   |
| t+2  | add/subtract cell 0   | y for that sample          |

The filter accepts one sample and delivers one output every clock, with a
latency of three clocks. The LUT-based filter has no registers before the
add/subtract cells, so its output follows one clock after the sample.

### When the output is complete: `y_valid`

Reset clears every register, which acts as if all earlier samples were
zero. The first outputs after reset are therefore correct partial sums but
lack the older taps. The first output that contains all N taps is the one
for the N-th sample. In edges after reset is released, that is:

* `lut_fir`: N edges (N - 1 + 1)
* `mem_fir`: N + 2 edges (N - 1 + 3)

Each filter counts edges after reset up to this number and then raises
`y_valid`. It stays high until the next reset, and an assertion checks
this. `y_valid` is information only: the filter never stalls and has no
input handshake.

## Interfaces

All registers use `clk` and a synchronous, active-high `rst`.

| module    | port                   | width   | meaning                          |
|-----------|------------------------|---------|----------------------------------|
| `lut_fir`, `mem_fir` | `x`         | 8       | unsigned input sample, one per clock |
|           | `y`                    | ACC_W   | signed filter output             |
|           | `y_valid`              | 1       | `y` includes all N taps          |
| `fir_top` | `lut_x`, `lut_y`, `lut_y_valid` | | the LUT-based filter's ports |
|           | `mem_x`, `mem_y`, `mem_y_valid` | | the memory-based filter's ports |

Parameters (defaults in `fir_pkg`):

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 16      | number of taps |
| `H_W`     | 8       | coefficient magnitude width; every \|h\| must be below 2^H_W (checked at elaboration) |
| `COEF`    | −3, −6, −4, 9, 31, 60, 87, 102, 102, 87, 60, 31, 9, −4, −6, −3 | coefficients h(0)..h(N−1), signed integers |

The default coefficients are a symmetric (linear-phase) integer low-pass
with DC gain 588. If you override `N`, give a `COEF` array of length N as
well.

The sample width (8 bits), the 4-bit split, the 16-word tables, the shift
of four, the add-or-subtract cells and the three-cycle latency of the
memory-based filter come from the reference design. These are choices of
this implementation:

* the tap count and coefficients;
* the coefficient width;
* reading the sample as unsigned;
* the reset;
* `y_valid`;
* the one-cycle, combinational tables of the LUT-based filter.

## Files

| file | content |
|------|---------|
| `rtl/fir_pkg.sv` | widths, default coefficients, width functions |
| `rtl/multiple_lut.sv` | one tap's 16-word table, two read ports |
| `rtl/sa_cell.sv` | shift-add cell, optional pipeline register |
| `rtl/as_cell.sv` | add or subtract cell with its delay register |
| `rtl/lut_multiplier.sv` | table plus combinational shift-add |
| `rtl/lut_fir.sv` | LUT-based filter |
| `rtl/segmented_memory.sv` | shared table core for all taps |
| `rtl/mem_fir.sv` | memory-based filter |
| `rtl/fir_top.sv` | both filters side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench computes its expected values independently, with plain
multiplication and a convolution sum. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `tb_multiple_lut` and `tb_lut_multiplier` cover all addresses and all 256
  samples for several magnitudes, including 0 and 255.
* `tb_sa_cell`, `tb_as_cell` and `tb_segmented_memory` check random
  operands, the register latency and reset.
* `tb_lut_fir` and `tb_mem_fir` check every output cycle by cycle against
  the convolution sum, including the exact edge on which `y_valid` rises.
  They run two instances: the default filter and a 5-tap filter with
  coefficients 255, −255, 1, −128, 0. The stimulus is an impulse, a
  full-scale impulse, a full-scale step, random samples and a reset in
  mid-stream.
* `tb_fir_top` runs both filters at the default parameters. It checks them
  against the reference, and checks that the memory-based output equals
  the LUT-based output two clocks earlier. It then feeds the two filters
  different streams after a mid-stream reset. It also counts, and requires,
  each of these events:
  * subtractor taps contributing;
  * samples with both nibbles non-zero;
  * the pipeline filling twice in each filter;
  * a reset flushing a running filter;
  * the whole impulse response (h(0)..h(15)) appearing at the output.

For each module, a copy with one deliberate defect was built, and its
testbench failed on it. The defects were:

* a swapped nibble address;
* a shift of three instead of four;
* a subtractor turned into an adder;
* ignored coefficient signs;
* `y_valid` one edge early;
* cross-wired filter inputs.

To simulate with Verilator, for example the full design:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
    ./obj_dir/Vtb_fir_top

Every simulation finishes in well under a second.

## Departures and limits

* **Reduced-size tables are not included.** The reference design announces
  two improved table organisations that need about half the memory of the
  16-word table. It does not describe how they work. Both filters here use
  the conventional table of all 16 multiples.
* **One core or one memory per multiplier.** The memory-based filter's
  pipeline description assigns each multiplier its own dual-port 16-word
  memory. This implementation uses the shared segmented core that the
  reference design recommends for the transposed form instead. The timing
  is the same (one registered read). It saves N−1 decoders per port.
* **Unsigned samples.** With a signed 8-bit sample, the high nibble would
  need a table of signed multiples (−8..7). This is not implemented.
* **No output rounding or saturation.** `y` is the full-precision sum.
  Scale or truncate it outside the filter if needed.
* **Fixed coefficients.** The tables are ROMs computed from `COEF` at
  elaboration. Changing coefficients means re-elaborating. There is no run-time
  load port.
* The reference design reports synthesis memory use and path delays for
  an FPGA flow. These figures depend on that tool and device, and nothing
  here reproduces them.
