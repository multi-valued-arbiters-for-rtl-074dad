# Multi-arbiter PUF with metastability-detecting arbiters

An arbiter PUF (physical unclonable function) turns tiny, chip-specific delay
differences into bits. One edge is launched into two nominally identical
paths, a challenge word decides how the paths are routed, and an arbiter at
the end records which copy of the edge arrived first. The classical design has
two weaknesses that this RTL addresses:

* **One bit per long challenge.** A 128-bit challenge buys a single response
  bit. The *multi-arbiter PUF* (MA-PUF) puts an arbiter after every stage, so
  one challenge produces 128 responses, one per chain length. A multiplexer
  picks the one that is reported.
* **Unreliable bits.** When the two edges arrive almost together, the
  flip-flop arbiter goes metastable and the bit flips from one reading to the
  next. The *multi-valued arbiters* here do not try to resolve such races.
  They detect them and report a third value, **X**, so that each position
  reads 0, 1 or X. In the original FPGA measurements, X responses were as
  repeatable for a given challenge as 0 and 1. The reported reliability rose
  from about 0.58 with the classical arbiter to about 0.999 with the
  4-flip-flop and SR-latch arbiters.

The system in `rtl/` contains five PUFs side by side: a classical arbiter PUF
for reference, and MA-PUFs built with four arbiter circuits. It also contains
the control logic that feeds them challenges and start pulses, a response
register and a UART transmitter.

## How a race becomes a bit

Each stage (`puf_switch_stage`) is a pair of 2:1 multiplexers that share one
challenge bit. With the bit at 0 both paths run straight through; with it at
1 they cross. Both chain inputs are driven by the same start signal **S**.
Which copy wins depends only on the delays the two copies picked up along
the route the challenge selected. That is a property of the silicon, not of
the logic.

Logically, a chain is just a permutation: after an odd number of crossed
stages, the edge that entered on top leaves on the bottom. The testbenches
rely on this. If they launch the top input slightly early, the arbiter after
stage k must see the upper path win exactly when `ch[0..k]` has even parity.

## The multi-arbiter PUF (`mapuf`)

`mapuf` has `N` = 128 stages, with an arbiter after each one: arbiter k
(k = 0…127) watches the outputs of stage k+1. All arbiter outputs are
available on `arb_all` (arbiter k at `arb_all[k*W +: W]`). `arbiter_mux`
selects one of them with the address `adr`. The arbiter circuit is a
parameter, `ARB` (`puf_pkg::arb_kind_e`), and sets the output width
`W = arb_width(ARB)`:

| `ARB`        | module               | bits | values             |
|--------------|----------------------|------|--------------------|
| `ARB_DFF`    | `dff_arbiter`        | 1    | 0, 1               |
| `ARB_4DFF`   | `four_dff_arbiter`   | 4    | 0, 1, X            |
| `ARB_SR`     | `sr_latch_arbiter`   | 2    | 0, 1, X            |
| `ARB_SR_CNT` | `sr_counter_arbiter` | 8    | count of latch edges |

`apuf` is the classical PUF: the same chain with one `dff_arbiter` at the end.

## The arbiters

### Classical flip-flop (`dff_arbiter`)

The upper path drives D and the lower path drives the clock. Output 1 means
the upper path was faster. A near-tie is metastable and gives no warning.

### Four flip-flops (`four_dff_arbiter`)

S is a pulse, so each path carries a rising edge and then a falling edge.
Four flip-flops sample each path on both edges of the other:

| bit | samples | on           |
|-----|---------|--------------|
| R^0 | s1      | rising s2    |
| R^1 | s2      | rising s1    |
| R^2 | s1      | falling s2   |
| R^3 | s2      | falling s1   |

A clean race, where the same path leads on both edges, can give only two
codes. `R^0..R^3 = 1,0,0,1` means s1 (upper) leads and decodes to 1;
`0,1,1,0` means s2 leads and decodes to 0. On hardware these two codes make up
nearly all readings. Every other code means that some flip-flop saw its
inputs too close together, or that the leader changed between the edges. Such
codes decode to X (`puf_pkg::decode_4dff`).

### SR latch (`sr_latch_arbiter`, `nor_sr_latch`)

The two paths idle high and race on their falling edges into a cross-coupled
NOR latch. The path that falls first makes its own latch output rise. The
upper output `q_top` clocks two flip-flops. The first loads 1; the second
loads the first. So R^0 records "`q_top` rose" and R^1 records "`q_top` rose
again":

| R^0 R^1 | meaning                                        | value |
|---------|------------------------------------------------|-------|
| 0 0     | lower path fell first, `q_top` stayed low      | 1     |
| 1 0     | upper path fell first, `q_top` rose once       | 0     |
| 1 1     | near-tie: the latch oscillated before settling | X     |

This polarity (upper first = 0) is the opposite of the flip-flop arbiters.
It is kept as published.

### SR latch with counter (`sr_counter_arbiter`)

The same latch, but `q_top` clocks an 8-bit counter. After a race the count
is 0 or 1 for a clean result, or the number of oscillation cycles for a
near-tie, which gives a rough measure of how long the latch oscillated. The
counter wraps past 255.

## Clearing the arbiters: `init` and `init_fall`

This is the subtle part of the system. Every arbiter has an asynchronous
clear, and the clear must be released at the right moment:

* The flip-flop and 4-DFF arbiters race on the **rising** edge of S.
  Their clear, `init`, must be low before S rises.
* The SR-latch arbiters race on the **falling** edge. While S rises, one
  latch input can already be high while the other is still low. For that
  moment the latch output rises, and the arbiter would record the rising
  edge as a race. Their clear, `init_fall`, is therefore raised together
  with `init` but held until the middle of the S pulse. The test pulse
  generator signals that midpoint on `mid`.

Both clears are flip-flop outputs, so they cannot glitch.

## System (`mapuf_system`)

```
            +-------------- puf_control ---------------+
 start ---->|  FSM   tpg (S, mid)   lfsr (challenge)    |
            +---+------+---------+---------+-----------+
                |init  |init_fall| S       | challenge[127:0]
                v      v         v         v
         apuf, mapuf(DFF), mapuf(4DFF)   mapuf(SR), mapuf(SR_CNT)
                |   (adr selects one arbiter in each MA-PUF)
                v
           response_reg (resp) ---> uart_resp_tx ---> uart_txd
```

One **measurement** proceeds as follows:

1. INIT: `init` and `init_fall` are high for `INIT_CYCLES` cycles while the
   challenge settles.
2. FIRE: the pulse generator is started.
3. S is high for `PULSE_CYCLES` cycles. `init_fall` is released halfway
   through.
4. S falls. After `GAP_CYCLES` cycles the pulse generator reports done.
5. CAPTURE: `response_reg` loads all outputs.
6. SEND: the UART starts sending the word.
7. WAIT_TX: once the UART is idle, the LFSR steps to the next challenge.

From `start` to the first captured word takes INIT + PULSE + GAP + 4 cycles
(72 at the defaults). After that, one measurement takes
INIT + PULSE + GAP + 5 cycles plus the transmission, NBYTES × 10 × BAUD_DIV
cycles. An **experiment** is `NUM_CHALLENGES` = 10,000 measurements started
by one `start` pulse. `done` pulses at the end, and `index` counts the
finished measurements.

Response word `resp` (D = MA-PUFs per arbiter kind, default 1):

| bits                    | content                                      |
|-------------------------|----------------------------------------------|
| `[0]`                   | classical A-PUF                              |
| `[1 +: D]`              | single-DFF MA-PUFs                           |
| `[1+D +: 4D]`           | 4-DFF MA-PUFs, R^0..R^3 per instance         |
| `[1+5D +: 2D]`          | SR-latch MA-PUFs, R^0, R^1 per instance      |
| `[1+7D +: 8D]`          | SR-counter MA-PUFs, 8-bit count per instance |

The UART sends the word zero-padded to whole bytes, byte 0 (`resp[7:0]`)
first. Each byte is an 8N1 frame, LSB first, with `BAUD_DIV` clocks per bit.

The challenge LFSR is a 128-bit Fibonacci register with taps 128, 126, 101
and 99. It starts from `SEED` and takes one step per measurement.

## Parameters of `mapuf_system`

| parameter        | default | origin |
|------------------|---------|--------|
| `N`              | 128     | published (128 arbiters per MA-PUF) |
| `NUM_CHALLENGES` | 10000   | published (challenges per experiment) |
| `D`              | 1       | chosen; matches one instance per PUF kind in the published resource figures |
| `INIT_CYCLES`    | 4       | chosen |
| `PULSE_CYCLES`   | 32      | chosen; 320 ns at 100 MHz, enough for an edge to cross 128 stages |
| `GAP_CYCLES`     | 32      | chosen |
| `BAUD_DIV`       | 868     | chosen; 115200 baud from 100 MHz |
| `SEED`           | 128'h9E37…C834 | chosen; any non-zero value |

## Ternary responses and distances (`puf_pkg`)

`trit_e` is {0, 1, X}. `decode_4dff` and `decode_sr` map raw arbiter bits to
it. The distance used to compare ternary responses counts 1 for a 0/1
mismatch, 0.5 when exactly one side is X, and 0 for equal values (X against X
counts as equal). `trit_distance2` returns twice that distance so that sums
stay integers. Summed over positions and divided by 2m, this gives the
ternary (Sokal–Michener style) distance used to judge uniqueness.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=… failures=…`.
With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl +libext+.sv -Irtl \
  rtl/puf_pkg.sv tb/tb_mapuf_system.sv --top-module tb_mapuf_system
./obj_dir/Vtb_mapuf_system
```

Replace the name to run another one. `tb_<module>` tests `rtl/<module>.sv`.
`tb_mapuf_system` is the end-to-end test (N = 128, D = 2, 10 challenges,
fast UART). `tb_mapuf_system_full` runs the system with every parameter at
its default, for two measurements including the UART transfer.

**What simulation can and cannot show.** The RTL has no delays, so every race
in the unmodified system is an exact tie. How a simulator breaks such a tie is
arbitrary. It also cannot make the SR latch oscillate: a zero-delay simulator
settles a tie to one side. The testbenches therefore supply the physics
themselves:

* Block tests drive the arbiters with timed edges, including changing
  leaders (4-DFF X) and repeated latch edges (SR X, counter > 1).
* Chain and system tests force timed copies of S onto the two chain inputs
  (`force dut.…s_bot = …`).
* `tb_mapuf_system` runs three experiments with different `adr`:
  1. a clean race;
  2. a leader that changes between edges, so every 4-DFF response is X;
  3. an extra pulse on the SR chains, emulating oscillation, so the SR
     responses are X and the counters read 2.

  It counts each outcome and fails if any never occurs.
* `tb_workload_arbiter_sweep` runs the arbiter choices the design was
  evaluated with through the full 128-stage system. These are chain lengths
  2–8, 16, 32, 64 and 128, and the last eight arbiters, 121–128. Each gets
  8 challenges, checked against the parity model and the serial output. The
  test prints the histogram of 4-DFF codes and of ternary values.

Uniqueness, reliability and randomness are properties of real silicon.
Simulation does not measure them.

## Building it on an FPGA

* The chains must be placed and routed symmetrically (hard macros or
  placement constraints), and synthesis must be kept from touching them.
  The five PUFs share S and the challenge, so a generic synthesis run merges
  their identical chains and flip-flops. In this RTL it reports about 1,400
  flip-flop bits for the top instead of the roughly 2,160 it contains. Use
  keep/dont-touch attributes in the vendor flow; they are not in this RTL.
* Chain outputs clock the arbiter flip-flops. The timing tools must treat
  them as unrelated asynchronous clocks. The arbiters settle long before
  `response_reg` samples them, GAP_CYCLES after the last edge.
* `nor_sr_latch` is a deliberate combinational loop. Lint and synthesis tools
  report it; it is the latch itself.
* Approximate register budget at the defaults: A-PUF 1, DFF MA-PUF 128,
  4-DFF MA-PUF 512, SR MA-PUF 256, SR-counter MA-PUF 1024, LFSR 128, control
  and UART about 115. The published system, without the counter variant, used
  1263 registers.

## Where this RTL goes beyond or departs from the published design

* The published material shows the blocks and the arbiter circuits. The
  control sequence, every cycle count, the LFSR polynomial and seed, the REG
  layout and the UART format are choices made here.
* **`init_fall`**: a second clear for the SR-latch arbiters (see above). The
  original shows a single Init.
* The 4-DFF sampling relations were derived from the two example waveforms of
  that arbiter (s1 first → 1,0,0,1; s2 first → 0,1,1,0). Calling the s1-first
  code "1" is a choice.
* In the SR-latch arbiter, how the second flip-flop is fed was not fully
  recoverable. It loads R^0 on the same clock, which produces exactly the
  published code table.
* The SR-counter MA-PUF, described as a further technique, is included in the
  system. The published resource figures do not include it.
* `D`, the number of MA-PUFs per kind, defaults to 1. `adr` is a top-level
  input; where the address came from in the original set-up is not stated.
* Not included: the host-side software that computes uniqueness, reliability
  and the NIST randomness tests from the received responses.
