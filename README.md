# Discrete simulated bifurcation Ising machine (SystemVerilog)

This is a digital Ising machine. It looks for low-energy spin configurations of

    E(s) = -1/2 * sum_ij J_ij s_i s_j - sum_i h_i s_i ,   s_i in {-1, +1}

This is equivalent to a QUBO problem. For max-cut, J_ij = -w_ij.

Each spin is modelled as an oscillator with a position x_i and a momentum y_i.
The oscillators are moved in small time steps while a control parameter a(t)
rises from 0 to 1. As a(t) rises, each oscillator is pushed towards x = -1 or
x = +1, and the side it ends on is the spin value. The rule used here is
*discrete* simulated bifurcation (dSB). In dSB the coupling term uses only the
**sign** of each position, sgn(x_j). That makes the large N x N
matrix-vector product cheap:

- every product J_ij * sgn(x_j) is just +J_ij or -J_ij, so no multiplier is needed;
- the vector read for the product is one bit per spin, so one memory word holds
  the signs of many spins.

The machine can also run a *heated* variant, which adds a term that feeds
energy back into the momenta.

The RTL is parameterised. Its default size is an 800-spin problem with 8-bit
signed couplings (an 800-node max-cut graph of the G-set family). A full run at
that size is simulated and checked bit for bit against an integer reference.

## The update the hardware computes

One time step k updates every spin i as follows. a0 = 1.

    field_i = sum_j J_ij * sgn(x_j(k))   +   h_i          (MAC units, then datapath)
    y_i    += dt * ( c0 * field_i  -  (1 - a(k)) * x_i )
    y_i    += dt * gamma * y_i(k)                         (only when heat = 1)
    x_i    += dt * y_i                                    (uses the new y_i)
    if |x_i| > 1:  x_i = sgn(x_i),  y_i = 0               (inelastic walls)
    a(k+1)  = a(k) + da

`field` always uses the signs from the *previous* step, for all N spins, so a
step can begin only when every spin of the step before has been updated. This
dependency shapes the whole schedule (see below).

Number formats (`rtl/sb_pkg.sv`):

| quantity | format |
|---|---|
| x, y | signed 16 bit, 12 fraction bits (1.0 = 4096) |
| dt, gamma | unsigned 16 bit, 12 fraction bits |
| a, da | unsigned 24 bit, 20 fraction bits |
| c0 | a power of two, 2^-c0_shift, applied as an arithmetic right shift |
| J | signed 8 bit |
| h | signed 16 bit |

Every product is rounded down (arithmetic shift right). y saturates at the
16-bit range. After the walls, x always lies in [-1, +1]. A spin with x = 0
counts as +1.

## Structure

```
            host load / read-back port
                       |
   +-------------------+----------------------------------------------+
   |  sb_ctrl (sequencer)            a_updater (a += da per step)      |
   |                                                                   |
   |  signx_dbuf: SIGNXMEM A | SIGNXMEM B -> selector -> PC-bit sign bus|
   |                                  |                                |
   |     +----------------------------+---------------------------+    |
   |     v                            v                           v    |
   |  mmte[0]                      mmte[1]        ...          mmte[PB-1]
   |   mm: PR x (j_mem -> mac) -> hand-over, one result per cycle  |    |
   |   dp: time-evolution datapath                                |    |
   |     |  x,y,h in / x',y',sign' out (PB lanes per cycle)       |    |
   |     +------------------------+-------------------------------+    |
   |                              v                                    |
   |          XMEM, YMEM, HMEM (N/PC rows x PC values)                 |
   +-------------------------------------------------------------------+
```

- **MMTE** (`mmte.sv`): one Matrix-vector Multiplication and Time Evolution
  block. There are PB copies. Each one holds PR rows of the coupling matrix at a
  time.
- **MM** (`mm.sv`): PR coupling banks (`j_mem.sv`), each feeding one MAC unit
  (`mac.sv`). A bank word is PC coefficients of 8 bits. Each cycle, every MAC
  adds or subtracts its PC coefficients according to the PC sign bits on the bus
  and accumulates. When a row ends, the PR results are handed to the datapath,
  one per cycle.
- **DP** (`dp.sv`): the update above for one spin. It is combinational, with
  four multipliers (for (1-a)*x, dt and gamma). c0 is a shift.
- **SIGNXMEM** (`sign_mem.sv`) and **selector** (`signx_dbuf.sv`): two sign
  memories of N/PC words of PC bits. One is read onto the sign bus. The other
  receives the new signs. They swap roles at the end of every step.
- **XMEM, YMEM, HMEM** (`var_mem.sv`): N/PC rows of PC values each, with a
  lane-masked write. This lets the PB datapaths store their spins of one row in
  the same cycle.
- **a updater** (`a_updater.sv`): a register and an adder.
- **Sequencer** (`sb_ctrl.sv`) and the wiring in `dsb_top.sv`.

## Schedule, and how the step-to-step dependency is met

The spins are processed in *row groups* of PB*PR consecutive spins: PB blocks
times PR MACs. Spin i belongs to group i / (PB*PR). Within its group it is
handled by MMTE (i mod PB*PR) / PR and by MAC (i mod PR).

For each group, the sequencer requests the WORDS = N/PC coefficient words and
sign words back to back, one per cycle. The sign word is broadcast to all PB
MMTEs, and each MAC consumes PC columns per cycle. The requests of the next
group follow without a gap. The time evolution of a group therefore overlaps
the multiplication of the next one.

| cycle (request of a group's last word = t) | what happens |
|---|---|
| t | last coupling/sign word address |
| t+1 | word arrives, MAC adds it |
| t+2 | MAC results registered (`res_ready`); XMEM/YMEM/HMEM row of the group read |
| t+3 .. t+2+PR | one result per cycle into each of the PB datapaths; x, y and sign written back |

Constraints:

- **PB*PR must divide PC.** Then a group lies in a single memory row. Its row
  is read once, and the PB datapaths write distinct lanes of it.
- **PR < N/PC.** The write-back of a group must finish before the next group's
  row is read.

The `dsb_top` elaboration checks both.

At the end of a step, the sequencer stalls (`draining`) until the last group
has written its results, which takes PR+2 cycles. At that point:

- the sign buffers swap;
- a advances by da;
- the next step starts reading signs that are now all up to date.

The new signs were written into the idle buffer during the step. Because of
this, a spin updated early in the step never changes the signs that later
groups of the same step still read.

One step takes GROUPS*WORDS + PR + 2 cycles. GROUPS = N/(PB*PR) and
WORDS = N/PC. At the defaults that is 50*50 + 6 = **2506 cycles**. Of these,
2500 cycles do 16 MAC operations of 16 coefficients each.

## Memory layout and host interface

All loading happens while `busy` is low. `ld_we` is ignored while a run is in
progress (an assertion flags it).

| `ld_sel` | target | `ld_addr` | `ld_data` |
|---|---|---|---|
| `LD_J` | bank `ld_r` of MMTE `ld_b` | g*WORDS + w | J[i][w*PC + l] in bits [8l +: 8], for the row i = g*PB*PR + ld_b*PR + ld_r |
| `LD_H` | HMEM row | row | h[row*PC + l] in bits [16l +: 16] |
| `LD_X` | XMEM row, and its signs into the current sign buffer | row | x in bits [16l +: 16] |
| `LD_Y` | YMEM row | row | y in bits [16l +: 16] |

To run:

1. Set `cfg`: dt, gamma, c0_shift, heat and da. Hold it constant during the run.
2. Pulse `start` with `n_iter` = the number of steps. This clears a to 0.
3. Wait for the one-cycle `done` pulse.
4. Read the results: `rd_addr` selects a row, and `rd_x`, `rd_y` and `rd_sign`
   hold it one cycle later. The spin values are `rd_sign`, where 1 means -1.

XMEM and YMEM keep the final state. To restart from a fresh initial state,
reload them.

Typical settings (from general dSB practice, not tuned here):

- dt ≈ 0.5 to 1.25;
- da = 1/n_iter;
- c0 ≈ 0.5 / (sqrt(N) * rms(J)), rounded to a power of two.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 800 | number of spins |
| `PC` | 16 | spins per memory word / coefficients per MAC per cycle |
| `PR` | 4 | MAC units per MMTE |
| `PB` | 4 | MMTE blocks |
| `JBITS` | 8 | coupling width |
| `HBITS` | 16 | single-spin coefficient width |
| `ITW` | 16 | width of the step counter |

Memory at the defaults:

- couplings: 16 banks x 2500 words x 128 bits = 5.12 Mbit, which holds a dense
  800 x 800 8-bit matrix;
- XMEM, YMEM and HMEM: 12.8 kbit each;
- the two sign memories: 800 bits each.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<m>`. For example, with plain Verilator from the
repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dsb_top \
    -y rtl -y tb +libext+.sv rtl/sb_pkg.sv tb/sb_ref_pkg.sv tb/tb_dsb_top.sv
./obj_dir/Vtb_dsb_top
```

Replace `tb_dsb_top` with any other testbench in `tb/`. Unit tests that do not
use the reference model do not need `tb/sb_ref_pkg.sv`.

| testbench | what it covers |
|---|---|
| `tb_dsb_full` | the default-size machine (800 spins), a random ±1 graph of about 6 % density, 300 unheated then 300 heated steps. Final x, y and signs are checked bit for bit against `tb/sb_ref_pkg.sv` plus the integer model in `tb/tb_dsb_harness.sv`, as are the cycle counts and the final a. The reached cut is printed. Takes about 30 s to build and 6 s to run. |
| `tb_dsb_top` | two reduced machines: one group per row (N=64, PC=8, PR=2, PB=4), and four groups per row (N=64, PC=16, PR=2, PB=2). Each runs an unheated and a heated run. Every mechanism must occur: drain stalls, buffer swaps, wall hits, heated steps, sign flips, non-zero h. |
| `tb_mmte`, `tb_mm` | one block against dot products and updates computed in the test, including hand-over timing |
| `tb_dp` | the datapath against the reference for 4000 random operands, plus directed wall and field cases |
| `tb_mac`, `tb_j_mem`, `tb_sign_mem`, `tb_var_mem`, `tb_signx_dbuf`, `tb_a_updater`, `tb_sb_ctrl` | each unit against a model, with latencies |

The reference model follows the same number formats and rounding. The tests
therefore check that the hardware does what this README specifies, bit for
bit. They cannot tell whether the fixed-point choices give good solutions. On
the 800-spin random graph, 300 unheated steps reached a cut of 2009 out of
19k edges, which is a plausible value. The G-set instances themselves were not
run.

## What follows the source architecture, and what is this design's own

These points follow the published architecture:

- PB MMTE blocks, each an MM block of PR MAC units followed by a
  time-evolution datapath;
- two sign memories feeding a PC-bit sign bus to the MACs;
- coefficient paths of PC x J_bits bits per MAC;
- 8-bit couplings with no multiplier in the matrix-vector product;
- XMEM and YMEM of N/PC rows x PC values;
- an `a` register with a da adder;
- datapath inputs gamma, dt, c0 and heat;
- support for single-spin coefficients;
- fixed-point arithmetic.

These are this design's own choices, because the source does not specify them:

- the values of PC, PR and PB, and the rule that PB*PR divides PC;
- all number formats and rounding;
- c0 as a power-of-two shift. The source says only that shifts replace
  multipliers; dt and gamma are true multiplications here;
- the form of the heating term (gamma*dt*y);
- a0 = 1;
- h kept in a separate memory (HMEM) and added in the datapath;
- using the two sign memories as a double buffer, and the PR+2-cycle drain
  stall per step;
- the one-per-cycle hand-over from the MACs to a single datapath per MMTE;
- the row-to-bank mapping;
- the sequencer;
- the host load and read-back interface;
- writing the initial signs together with x.

Limitations worth knowing before use:

- The datapath is a single combinational stage with several 48-bit
  multiplications. For an FPGA clock it should be pipelined. The hand-over
  schedule has slack for this: the datapath is busy PR out of every N/PC
  cycles.
- Nothing scales coefficients into the 8-bit/16-bit ranges. Problems with
  larger coefficients (knapsack-type QUBOs) need preconditioning in software.
- The accumulator width JBITS + clog2(N) + 1 is sized for dense rows of
  full-scale coefficients. `h` is added after it, in a 48-bit datapath.
- Only the discrete variant is implemented. The ballistic variants need real
  products J_ij * x_j and are not supported.
- Memories are not reset. Load J, H, X and Y before the first run. Unused
  coupling entries must be written as zero.
