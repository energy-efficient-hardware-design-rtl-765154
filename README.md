# Power-managed accelerators: a PMB-controlled IDCT, adder and ALU, and an on-chip KNN engine

Leakage power goes down only when a block is really switched off, and
switching a block off safely takes a fixed ritual: clamp its outputs so the
powered neighbours never see floating values, save the state that must
survive, cut the supply, and run the same steps backwards on the way back.
This design puts that ritual into one small, reusable sequencer, the
**power management block (PMB)**. It wraps three example datapaths in
power-switchable domains around it:

* the IDCT of a JPEG decoder back end, with a FIFO that keeps coefficients
  while the IDCT sleeps;
* a 32-bit ripple-carry adder whose upper half can be switched off;
* an ALU whose multiplier and divider each have their own domain.

The same request that powers a domain down also stops its clock, so clock
gating and power gating are driven together.

A fourth design stands beside them: a **K-nearest-neighbour accelerator** in
which two kernels work through an on-chip distance buffer as a pipeline, so
the second kernel never has to wait for off-chip memory.

The four designs share only clock and reset. `lp_hls_top` places them side
by side and brings out every port.

This RTL models power gating at the logic level. The design drives the
control signals a real power switch, isolation cell and retention flop would
need, and it models what happens inside an unpowered domain. The physical
parts are not included: the header switch and the supply network come from
the physical implementation.

## The power management block (`pmb`)

The PMB has one request input, `enable` (1 = the domain may be switched
off), and four registered outputs:

| output       | 1 means                                       |
|--------------|-----------------------------------------------|
| `iso_enable` | the domain's outputs are clamped              |
| `ret_enable` | retention flops hold their saved state        |
| `pso_enable` | the power switch is open: the domain is off   |
| `cg`         | the domain's clock is stopped                 |

It works like a clocked thread that looks at `enable` every second cycle. A
power-down starts on the sample that finds `enable` high. A power-up starts
on the sample that finds it low while the domain is down:

```
cycle           0      1      2      3   ...   k     k+1    k+2
enable        __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾\_____________________
iso_enable    _____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______
ret_enable    ____________/‾‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾‾‾‾‾\_____________
pso_enable/cg ___________________/‾‾‾‾‾‾ ... ‾‾‾\____________________
```

Each step is one clock after the previous one. Once a sequence has started
it runs to its end before `enable` is looked at again. If the last step of
one sequence and the first step of the next fall on the same cycle, the
later assignment wins. That is the natural result of writing it as a thread
with two `wait()`s per pass.

Two assertions in the module guard the order:

* `pso_enable` may rise only while `iso_enable` is high;
* `cg` always equals `pso_enable`.

After reset all four outputs are 0, so the domain starts powered.

**Modelling an unpowered domain.** While `pso_enable` is high, every domain
in this design is held in reset (`rst_n && !pso_enable`). Whatever it held
is therefore lost, exactly as without a supply. The domain's clock comes
from `clock_gate`: a latch that is transparent while the clock is low,
followed by an AND, so the gated clock cannot glitch. It is enabled by
`!cg`.

**Retention** (`retention_reg`) is a behavioural model of a bank of
retention flops:

* a shadow copy on the always-on clock follows the register while
  `ret_enable` is low and freezes while it is high;
* while `ret_enable` is high, the register reloads the shadow.

So the value survives the reset that models the power loss. It is back in
the register before `ret_enable` falls, and before `iso_enable` falls.

**Isolation** (`iso_cell`) is a multiplexer to a constant, 0 by default.

## JPEG back end with a power-conscious IDCT

`jpeg_idct_decoder` chains three stages:

```
coefficients (zigzag order)
   -> zigzag      inverse zigzag, 64-entry single buffer, 128 cycles/block
   -> dequant     x quantisation table (8-bit steps), saturate to 12 bits
   -> pwr_idct_block
        always on:   pmb, clock_gate, sync_fifo (64 x 12 bits)
        switchable:  idct_2d, retention_reg (finished-block count)
        outputs:     iso_cell clamps valid/data/idle to 0
   -> 8-bit samples, row-major
```

Huffman decoding, colour conversion and re-ordering into the image are not
part of this RTL. The chain starts at quantised coefficients and ends at
level-shifted samples.

**The IDCT** (`idct_2d`) is separable:

1. a 1D 8-point IDCT on the eight columns, one column per cycle;
2. the same on the eight rows;
3. +128 and a clamp to 0..255.

`idct_1d` is the direct matrix form. It uses weights 0.5·cos(mπ/16)·4096,
rounded to integers, and builds the 8x8 matrix from the nine distinct
values by cosine symmetry. Columns keep 3 extra fraction bits. One block
takes 64 (load) + 8 + 8 + 64 (output) = 144 cycles, and the first sample
leaves 80 cycles after the first coefficient arrives. Against a
floating-point IDCT the result is within ±1 of the rounded exact value.

**Sleeping without losing data.** `pso_req` is the PMB's request. It would
come from a profiler or a system controller that knows when the IDCT is not
needed. The FIFO sits in front of the IDCT in the always-on domain and is
read only while the domain is fully on (PSO, RET and ISO all low). So:

* coefficients that arrive while the IDCT is off, or still waking up, wait
  in the FIFO;
* as soon as isolation drops, the IDCT drains them at full rate.

The finished-block count (`blocks_done`) is held in the retention register.
It survives every shut-off even though the rest of the IDCT is reset.

Raise `pso_req` only while `idct_idle` is high. Otherwise a block that is
half done is lost, which is what real power gating would do.

## Power-aware 32-bit ripple-carry adder (`pwr_rca32`)

Two 16-bit ripple-carry adders (`rca16`, chains of `full_adder`):

* `LSB_RCA` adds bits 0–15 and is always on;
* `MSB_RCA` adds bits 16–31 and sits in a switchable domain controlled by a
  PMB from `p_shutoff`.

Two output multiplexers follow `p_shutoff` directly:

| `p_shutoff` | `sum`                  | `cout`          |
|-------------|------------------------|-----------------|
| 0           | full 32-bit sum        | MSB carry       |
| 1           | `{16'b0, low half}`    | LSB carry       |

The MSB outputs pass through isolation cells. After `p_shutoff` falls, the
upper half therefore reads 0 for about four cycles, until the power-up
sequence has removed isolation. `msb_on` says when the 32-bit result is
valid.

The adder itself is combinational and has no clock to gate. The PMB is the
only clocked part.

## Power-aware ALU (`pwr_alu`)

`alu_encoder` turns the 3-bit `sel` (type `lp_pkg::alu_op_e`: AND, OR, ADD,
SUB, SHL, SHR, MUL, DIV) into a one-hot enable. An output multiplexer picks
the result.

* **Always on** (`alu_basic_ops`): the six simple units.
* **Two separate switchable domains**, each with its own PMB, clock gate and
  isolation:
  * MULTIPLY (`alu_multiply`): one-cycle registered product, low 32 bits;
  * DIVIDE (`alu_divide`): restoring division, one quotient bit per cycle;
    dividing by 0 gives all ones.
* `mp` and `dp` request shut-off of the multiplier and the divider.

Handshake: `op_valid`/`op_ready` in, a one-cycle `out_valid` pulse out.

| operation | latency from acceptance |
|-----------|-------------------------|
| basic     | 1 cycle                 |
| MULTIPLY  | 2 cycles                |
| DIVIDE    | W+2 = 34 cycles         |

Two rules keep power management from corrupting a result:

* an operation for a unit that is not fully on waits (`op_ready` low) until
  it is;
* a shut-off request is held back while its unit is working on an accepted
  operation.

Assertions check that the multiplier and the divider are never switched off
while they own an operation. Neither unit keeps state between operations,
so the retention enable of their PMBs drives nothing here.

## KNN accelerator (`knn_accel`)

The accelerator finds the K nearest of n reference points to a query point,
by squared Euclidean distance. The defaults are K = 5 and n up to 300,000.

```
points ──> knn_distance ──> dist_buffer (N x 32 bits, on chip)
                                  │ read back one cycle after the write
                                  v
                            knn_neighbor (sorted list of K) ──> nn_idx / nn_dist
```

* `knn_distance` computes (x−qx)² + (y−qy)² in IEEE 754 single precision.
  It is a three-stage pipeline: two subtractions, two squares, one sum.
  Every operation rounds to nearest even. The adder and multiplier are
  functions in `fp32_pkg`, which keeps them small with three shortcuts:
  * subnormal inputs are read as zero;
  * subnormal results are flushed to zero;
  * NaN and infinity get no special handling.

  Latitude/longitude-sized data never comes near these limits.
* Because a distance is never negative, its bit pattern orders like an
  unsigned integer. So the neighbour kernel needs no floating-point
  comparator.
* `dist_buffer` is a simple dual-port RAM: one write port and one registered
  read port. At the default size it holds 9.6 Mbit, which is block RAM on an
  FPGA.
* `knn_neighbor` keeps the K smallest distances in a sorted register list.
  Each new distance is compared with all K entries in parallel and inserted
  by shifting the larger ones down. An equal distance does not displace an
  earlier point, so ties go to the lower index. Keeping K entries gives the
  same answer as sorting all n distances, at a fraction of the storage.

Because the distance buffer is on chip, the neighbour kernel reads each
distance the cycle after it was written, instead of waiting for the first
kernel to finish.

Timing and use:

1. Pulse `start` with the query and `n_points`.
2. Stream points with `pt_valid`/`pt_ready`.
3. `done` rises n + 5 cycles after the first point when points come every
   cycle, and stays high until the next `start`. The results are then in
   `nn_idx`/`nn_dist`, nearest first.

For 300,000 points that is 300,005 cycles: 1.25 ms at 240 MHz.

## Top level (`lp_hls_top`)

The ports are grouped by prefix: `jpeg_*`, `alu_*`, `rca_*` and `knn_*`.
Each power-aware design brings out its control signals as a 4-bit bus
`{cg, pso_enable, ret_enable, iso_enable}`: `jpeg_pwr`, `rca_pwr`,
`alu_mul_pwr` and `alu_div_pwr`. These would drive the power switches and
isolation cells of the physical implementation.

Parameters:

| parameter | default | meaning                                     |
|-----------|---------|---------------------------------------------|
| `KNN_N`   | 300000  | largest reference set; sets the buffer size |
| `KNN_K`   | 5       | number of neighbours                        |

The IDCT path uses 12-bit coefficients and a 64-entry FIFO. The ALU is
32 bits wide.

## Where this RTL departs from the source design

* **KNN data path.** The source design reads the points from off-chip DDR
  under a host. Here they arrive as a stream. The source does not say which
  float precision it uses; single precision is assumed, with subnormals
  flushed to zero.
* **PMB polarity.** `pso_enable` is active high (1 = off), following the
  sequencing algorithm. A timing diagram of the original draws the PSO
  signal low while the domain is off; invert it if your switch cell
  expects that.
* **Isolation toggling.** Here isolation switches exactly once per shut-off
  and once per wake-up. The characterisation data of the source design lists
  a much higher toggle rate for the isolation enable than for the power
  switch. That mode is not modelled.
* **Adder naming.** The source text swaps the names of the two halves in
  one place. This RTL follows the block diagram: `MSB_RCA` adds bits 16–31.
* **ALU power requests.** The text says the select input also drives the
  power domains, while the block diagram shows separate MP and DP inputs.
  The block diagram is followed.
* **Chosen, not given.** These details are this design's own choices:
  * all widths except the 32-bit adder;
  * the handshakes;
  * the ALU opcode values and unit latencies;
  * the dequantiser's 8-bit table and saturation;
  * the IDCT's fixed-point format;
  * the FIFO depth;
  * the choice of the finished-block count as the retained state;
  * the reset-based model of power loss.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops at a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  --top-module tb_lp_hls_top -y rtl -y tb -Irtl -Itb \
  rtl/lp_pkg.sv rtl/fp32_pkg.sv tb/tb_lp_hls_top.sv
./obj_dir/Vtb_lp_hls_top
```

The system-level benches:

* **`tb_lp_hls_top`** drives all four designs at once, with KNN reduced to
  2048 points. It compares every output with a reference model written in
  the testbench: a floating-point IDCT, arithmetic models, and a brute-force
  neighbour search. It also counts every mechanism and fails if one never
  happened:
  * power-down and power-up of each domain;
  * a block buffered while the IDCT was off;
  * the retained count restored;
  * an ALU operation held for a sleeping unit;
  * isolation of the adder's upper half;
  * dequantiser saturation;
  * IDCT clamping;
  * finished KNN queries.
* **`tb_lp_hls_top_full`** runs the top at its default parameters:
  * a full 300,000-point KNN query, with results and the n + 5 cycle run
    time checked;
  * two JPEG blocks, one buffered while the IDCT is off;
  * ALU operations across shut-offs;
  * additions in both widths.

  It takes about a second in Verilator.
* **`tb_lp_hls_usage`** steps the adder's upper half through 90/70/50/30 %
  on-time. It steps the divider/multiplier pair through 1/10, 10/40, 20/50
  and 30/60 %. For each level it checks that the measured on-time matches,
  while random traffic is verified.
* **`tb_jpeg_toggle_sweep`** raises the IDCT's shut-off rate 1x, 4x, 8x and
  32x. It decodes 3, 12, 24 and 96 blocks per 120,000 cycles. A profiler in
  the bench powers the IDCT down whenever it is idle and wakes it when the
  next block arrives. Every sample and every restored block count is
  checked.
