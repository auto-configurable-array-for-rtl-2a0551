# Auto-configurable pass-through array for integer GCD

This is a bit-serial coprocessor that computes the greatest common divisor of two
integers of any length. The two operands stream through a one-directional chain of
identical cells, least significant bit first. Each cell performs one step of the
*plus-minus* GCD algorithm. A cell does not know in advance which step it will do: it
configures itself from the first bits of the operand pair that reaches it. This is why
the array is called *auto-configurable*. The array's length does not depend on the
operand length. One pass does as many steps as there are cells. If the GCD is not
finished after a pass, the shortened operands are sent through again.

The default configuration has 150 cells. That is the number reported to fit, with the
pre- and post-processing, on one small FPGA of the early 1990s (Atmel 6010). It is
enough, on average, to reduce a pair of 100-bit operands in a single pass.

## The algorithm

Preprocessing:

1. Drop the least significant bits that are zero in both A and B.
2. If A is now even, exchange A and B, so that A is odd.

Reduction repeats until B = 0:

* If b0 = 0, then **shift**: B ← B/2.
* If b0 = 1, then **plus-minus**: (A, B) ← (B, (A ± B)/4). The sign is + when a1 ≠ b1
  and − otherwise.

A and B are both odd in a plus-minus step, so this choice makes A ± B a multiple of 4.
A therefore stays odd. Values can become negative, so the hardware works in two's
complement. Magnitudes never grow: |(A ± B)/4| ≤ max(|A|, |B|)/2. When B reaches 0, |A|
is the GCD of the operands after preprocessing. Multiply it by the dropped power of two
to get the GCD of the original operands.

On average, an n-bit pair needs about 0.75n shift steps and 0.75n plus-minus steps,
about 1.5n cells in all. In simulation, random 100-bit pairs took 0.70n shift steps
and 0.72n plus-minus steps. With 150 cells, 26 of 40 such pairs finished in one pass;
the others needed a second pass.

## Frames and the cell-to-cell link

This part matters most for understanding or modifying the RTL.

**Frames.** An operand pair is a *frame*: `start` is high for W consecutive clocks. In
clock p of the frame, the lines carry bit p of each operand. The host chooses W so that
the top bit is a sign bit; for positive n-bit operands, W = n + 1. Every value the
algorithm produces then fits in W bits. A frame keeps its length through the whole
array. Only the feeder shortens it, by the number of zero bits it drops.

**Link.** Between stages, five lines form the `gcd_pkg::link_t` struct:

| line    | carries in frame clock p              |
|---------|---------------------------------------|
| `start` | 1 during the W clocks of the frame    |
| `a0`    | bit p of A                            |
| `a1`    | bit p+1 of A                          |
| `b0`    | bit p of B                            |
| `b1`    | bit p+1 of B                          |

The lines carry two neighbouring bits because a cell must decide in the frame's first
clock. It needs b0 to choose shift or plus-minus, and a1 xor b1 to choose + or −.

**Before and after the frame.** Three rules apply outside the frame:

* **Pre-configuration bit.** One clock before `start` rises, line `b1` already carries
  bit 0 of B. The cell latches this bit to choose its mode before the data arrives.
* **Sign tail.** For the two clocks after a frame, all four data lines carry the sign
  bit of their operand.
  * Shifting B moves bits from above the frame into its top positions. A correct sign
    there keeps the top bits right.
  * Each stage produces this tail itself, so the array can be of any length.
  * The feeder repeats the last input bit of each operand after the host frame ends.
* **Frame spacing.** A cell is busy until two clocks after its input frame ends. The next
  frame must therefore leave at least three idle clocks at every cell input.
  * A shift cell delays a frame by one clock and a plus-minus cell by two. The gap
    between two frames can therefore shrink by one clock per cell.
  * The host must leave **at least NCELLS + 4 idle clocks** between operand pairs.
  * Every cell asserts this rule in simulation.

## Auto-configuration: `pcf` and `icf`

Two small units hold a configuration bit for the length of a frame:

* **`pcf` (pre-configure).** For a bit that arrives one clock *before* the data it
  controls. A flip-flop follows `d` while `enable` is low and holds while it is high. The
  output comes from the flip-flop, so the configuration adds no delay to the datapath.
  The cell uses one to hold its mode, latched from `b1` in the clock before `start`.
* **`icf` (instant configure).** For a bit that arrives *together with* the data. While
  `enable` is low, the output is `d` itself, through a multiplexer. The flip-flop copies
  the output every clock. The caller raises `enable` one clock later, and from then on
  the stored value is used.
  * The cell uses an `icf` to hold the choice of + or −, from a1 xor b1.
  * The feeder uses one to hold the exchange decision, from the first a0.

An FPGA cannot reconfigure itself from its own internal signals, so here the
"configuration" is ordinary multiplexer selects held in these units.

## The reduction cell (`gcd_cell`)

* **Shift mode** (mode = 0):
  * `start`, `a0` and `a1` go through one flip-flop each.
  * `b0` and `b1` pass straight through.
  * Relative to the frame, B moves down one bit position: B/2. Latency is 1 clock.
* **Plus-minus mode** (mode = 1):
  * Incoming B becomes outgoing A. `b0` is delayed by two flip-flops onto `a0` and by
    one onto `a1`. `start` is delayed by two.
  * A serial adder/subtractor drives the new B lines. In every clock it forms sum bits p
    and p+1 of A ± B, for `b0` and `b1`.
  * The carry into bit p+1 is stored, and the next clock recomputes that bit as its bit
    p. Subtraction is A + ~B + 1: in the frame's first clock the carry starts at 1
    instead of 0.
  * The output frame starts two clocks later, so the two zero sum bits come out before
    it. The sum is thus divided by 4. Latency is 2 clocks.
* **Holding the configuration.**
  * `pcf` holds from `start` until two clocks after the frame.
  * `icf` holds from one clock after `start` until two clocks after the frame.
  * This covers the extra clock of the plus-minus path and the sign tail.
* **Combinational B path.** `b0`/`b1` have no flip-flop inside a cell, so a run of cells
  forms one combinational path through their adders. `relay_buffer` breaks it.

`mode_o` and `plus_o` show the configuration for observation.

## Feeder, latch buffer, array, postprocessing

* **`feeder`**
  * An OR of the two input bits, remembered in a flip-flop and ANDed with the host
    `start`, opens the output frame at the first bit pair that is not 0,0. This drops
    the common zero bits.
  * An `icf` holds the exchange decision (a0 = 0) for the rest of the frame.
  * It is combinational from input to output.
  * An all-zero pair produces no frame.
* **`latch_buffer`**
  * Two flip-flops per line turn the single serial streams into the link format. `a1`
    and `b1` are one clock old, `a0`, `b0` and `start` two clocks old.
  * As a result, `b1` shows bit 0 of B one clock before `start`.
* **`cell_array`**
  * NCELLS cells in a chain.
  * A `relay_buffer` follows every BUF_EVERY-th cell, except the last. It registers all
    five lines by one clock, which keeps them aligned.
* **`postproc`**
  * Returns A and B as serial streams (`start_o`, `a_o`, `b_o`).
  * Computes two flags from the same frame:
    * `b_zero_o`: an AND of the inverted B bits, meaning the GCD is found.
    * `a_neg_o`: the last A bit, which is its sign.
  * `done_o` pulses for one clock, two clocks after the last frame bit, and the flags
    are valid with it.
  * A negative A is reported, not negated. Its sign is known only at the last bit, and
    the host can take the absolute value.
* **`gcd_array_top`**
  * Connects feeder → latch buffer → array → postprocessing.
  * Brings out the serial host interface and the cell configurations.

**Latency of one pass**, from the first input bit that the feeder keeps to the first
output bit:

    2 (latch buffer) + floor((NCELLS-1)/BUF_EVERY) (relay buffers)
      + 1 per shift cell + 2 per plus-minus cell

Once B is 0, the remaining cells all shift.

**Host protocol.** Send a pair in a W-bit frame. Wait for `done_o`. If `b_zero_o` is
set, the result is |A| × 2^k, where k is the number of zero bits the feeder dropped. The
array does not report k: the host finds it from the operands. Otherwise, send the
returned A and B, with the returned frame length, through again.

## Parameters

| parameter   | default | meaning |
|-------------|---------|---------|
| `NCELLS`    | 150     | cells in the array; the number reported for one Atmel 6010 |
| `BUF_EVERY` | 8       | cells between relay buffers; chosen here, the original gives only "a constant number" |

The operand length is not a parameter. It is set by the length of the frame.

## How far it can be trusted

Each module has a self-checking testbench in `tb/`. The testbenches compare the RTL
with a wide-integer model of the algorithm in `tb/gcd_ref_pkg.sv`.

* **`tb_gcd_array_top`** runs at the default size: 150 cells with 100-bit operands.
  * For 60 random pairs, a host model feeds each pair in and repeats passes until
    `b_zero_o` is set.
  * It checks every bit of every returned frame, the frame length, the exact arrival
    clock from the latency formula, and both flags.
  * It checks the final GCD against Euclid's algorithm.
  * It counts zero stripping, exchanges, shift, plus and minus steps, single- and
    multi-pass pairs and negative results. A mechanism that never occurs is a failure.
  * Typical output: for random pairs, 0.70 shift and 0.72 plus-minus steps per bit,
    with 26 of 40 pairs finishing in one pass. About 4 clocks per operand bit overall,
    including second passes.
* **`tb_cell_array`** uses 20 cells with a buffer after every 4th. Frames run back to
  back at the minimum spacing.
* **`tb_gcd_cell`** checks single steps with both signs, including the pre-configuration
  bit and the sign tail.
* **`tb_feeder`, `tb_latch_buffer`, `tb_relay_buffer`, `tb_pcf`, `tb_icf` and
  `tb_postproc`** check their blocks cycle by cycle.

Every testbench fails on a copy of its module with one deliberate error, for example a
wrong carry preset for subtraction.

Not verified:

* Timing closure or area on any device.
* The 5 MHz clock and the 22-logic-block cell of the original FPGA implementation. These
  belong to that technology, not to the RTL.

## Departures and own choices

The following are choices of this design where the original description is silent:

* The two-bits-per-clock adder.
* The five-line link with its pre-configuration and sign-tail rules.
* The hold windows of the configuration units.
* The minimum frame spacing.
* The relay-buffer spacing.
* The whole postprocessing circuit, of which only its purpose is known.

One point differs between the two accounts of the original. One says that in a
plus-minus step "A and START are delayed" by two clocks. The other, the algorithm
itself, makes the old B the new A. The RTL follows the algorithm: the delayed operand is
the incoming B.

Not included:

* The buffering between host and coprocessor.
* The buffering between chips of a multi-chip array.
* Any FPGA-specific placement.

The link is plain and one-directional, so chaining arrays only means connecting one
array's output link to the next one's input.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl \
        rtl/gcd_pkg.sv tb/gcd_ref_pkg.sv tb/tb_gcd_array_top.sv \
        --top-module tb_gcd_array_top
    ./obj_dir/Vtb_gcd_array_top

`-y rtl` lets Verilator find each module by its file name. Every testbench ends with a
line `TB_RESULT checks=N failures=M`, and any other `tb/tb_<module>.sv` builds with the
same command. The full-size run builds in about 15 s and simulates in well under a
second. `tb_cell_array` sets the array to 20 cells; change `N` and `BE` there to try
other sizes. To synthesise, read `rtl/` and choose `gcd_array_top` as the top.

## Files

| file | content |
|------|---------|
| `rtl/gcd_pkg.sv` | link struct shared by all stages |
| `rtl/pcf.sv`, `rtl/icf.sv` | configuration units |
| `rtl/feeder.sv` | preprocessing: zero stripping and exchange |
| `rtl/latch_buffer.sv` | serial streams to link |
| `rtl/gcd_cell.sv` | reduction cell |
| `rtl/relay_buffer.sv` | pipeline register between cells |
| `rtl/cell_array.sv` | chain of cells and relay buffers |
| `rtl/postproc.sv` | serial output, termination and sign flags |
| `rtl/gcd_array_top.sv` | complete coprocessor |
| `tb/gcd_ref_pkg.sv` | reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
