# Binary-division SM selection for MMC capacitor voltage balancing

A modular multilevel converter (MMC) builds its output voltage from many
series-connected half-bridge submodules (SMs), each with its own floating
capacitor. Every control period the modulator decides how many SMs of an arm
to insert (the insertion index m). The balancing controller then has to decide
*which* m SMs: when the arm current charges the capacitors it inserts the m
with the lowest voltage, when it discharges them the m with the highest. The
classic way is to sort all N capacitor voltages of the arm, which costs
O(N²) steps for a simple sort and a lot of logic for a parallel sorting
network, and becomes the bottleneck for arms with hundreds or a thousand SMs.

The order among the selected SMs, and among the rejected ones, does not
matter. This RTL therefore does not sort. It selects the m extreme values by
looking at the binary voltage samples one bit at a time, from the MSB down,
and throws away every SM whose fate is already settled. The result is exact
(identical to taking the first m of a full sort) and takes at most
`VW` passes over at most N SMs: linear in N.

The RTL contains the selector, its memories, a gate-signal generator, a
simple nearest-level modulator and a six-arm top level for a three-phase
converter.

## The division algorithm

Let `Larger` be the SMs whose current bit is 1 (or 0 when the lowest voltages
are wanted) and `Smaller` the rest. Every SM in `Larger` beats every SM in
`Smaller`, whatever its lower bits. One pass over the remaining candidates
counts `Num(Larger)` and then takes one of three branches:

| branch | condition           | selected now        | next pass works on | with m  |
|--------|---------------------|---------------------|--------------------|---------|
| 1      | m > Num(Larger)     | all of `Larger`     | `Smaller`          | m − Num(Larger) |
| 2      | m = Num(Larger)     | all of `Larger`     | (done)             | —       |
| 3      | m < Num(Larger)     | nothing             | `Larger`           | m       |

If the LSB pass still leaves more candidates than are wanted, those candidates
have identical voltages and any of them will do; the selector takes the ones
with the lowest SM index. Ties are thus resolved deterministically: the
selection equals the first m entries of a list ordered by voltage and then by
SM index.

Example, 8 SMs with 4-bit voltages 9, 5, 6, 10, 12, 13, 3, 1 (SM 0 to 7), the
5 highest wanted:

* bit 3: `Larger` = {0, 3, 4, 5}, 4 < 5, branch 1: these four are in, 1 more
  is needed from {1, 2, 6, 7};
* bit 2: `Larger` = {1, 2} (5 and 6), 1 < 2, branch 3: drop {6, 7};
* bit 1: `Larger` = {2} (6), 1 = 1, branch 2: SM 2 is in, done.

Result {0, 2, 3, 4, 5} after three passes of 8, 4 and 2 candidates. The
worst case is an arm whose voltages are all equal: every pass then sees every
SM, `VW` passes of N.

## Hardware organisation (`cvdsa_selector`)

All per-SM data lives in four simple dual-port RAMs (`sdp_ram`, written so
that FPGA tools infer block RAM rather than spending logic-cell registers):

| array          | size             | contents |
|----------------|------------------|----------|
| voltage        | N × VW           | the sampled capacitor voltages of the run |
| index A, B     | 2 × N × log2 N   | candidate lists; one is read by a pass, the other written |
| state          | N × (log2 VW + 1)| per SM: bit level of the last pass that saw it, and whether it fell into `Larger` |

A run has three phases:

1. **Store** (N cycles): the voltages arrive one per cycle on a valid/ready
   stream in SM order; index array A is filled with 0 … N−1 at the same time.
2. **Division passes**: each pass is a three-stage pipeline that handles one
   candidate per clock — read an SM index from the source index array, read
   that SM's voltage, write the index into the destination array. `Larger`
   entries are written from address 0 upwards, `Smaller` entries from address
   N−1 downwards, so both groups fit into one array and the next pass simply
   reads the chosen region (bottom-up or top-down). The same stage also
   writes the SM's state word. After the last candidate the pipeline drains
   (2 cycles) and one cycle decides the branch, so a pass over L candidates
   takes L + 3 cycles. Source and destination arrays swap every pass.
3. **Read-out** (N cycles): the state array is read in SM order and one
   (index, insert) result per cycle is streamed out, followed by a `done`
   pulse.

### Why a state array instead of a result list

Under branch 1 or 2 a whole group is selected, but its size is known only
after the pass that produced it, and writing its members to a result list
would cost another pass. Instead, the selector remembers the branch taken at
each bit level (`VW` two-bit registers) and, per SM, the level of the last
pass that saw it and its group there. After the run an SM is selected when

* it was in `Larger` at a level whose branch was 1 or 2, or
* it is among the equal candidates left after the LSB pass and the pick quota
  (the m still missing) is not used up yet, counted in SM order.

This is correct because a candidate's state word is overwritten by every pass
that sees it: an SM that went on to later passes was not selected at an
earlier one, and an SM dropped by branch 3 carries the `Smaller` mark of the
level that dropped it. The first pass sees every SM, so no state survives from
the previous run and the array never needs clearing.

### Timing

With a gap-free sample stream, a run from `start` to `done` takes

    1 + N  (store)  +  Σ (L_pass + 3)  +  N + 4  (read-out)   cycles,

at most `1 + N + VW·(N+3) + N + 4`. For the default 1024 SMs and 12-bit
samples that is 14,377 cycles, 71.9 µs at 200 MHz; for 128, 256 and 512 SMs
it is 9.2 µs, 18.1 µs and 36.0 µs. A plain selection sort needs about
N²/2 cycles for the sort alone (2.6 ms at 1024 SMs and 200 MHz).

Memory per arm at the default size: 12,288 bits of voltages, 20,480 bits of
index arrays and 5,120 bits of state, 37,888 bits in all.

## Around the selector

* **`sm_pulse_gen`** collects the result stream in a shadow register and, on
  `done`, copies it to the SMs' gate outputs in one clock edge, so an arm
  never runs on a half-updated selection. Inserted means upper switch T1 on,
  lower switch T2 off; bypassed the reverse. SMs not reported by a run (when
  fewer than N are active) and all SMs after reset are bypassed. Dead time is
  left to the gate drivers.
* **`nlc`** is a nearest-level modulator: n = round(u_ref / U_c), clamped to
  0 … N, computed as a multiply by the reciprocal `uc_inv = 2^FW / U_c`.
* **`mmc_cvb_top`** instantiates six arms (phases a, b, c; upper and lower;
  arm index 2·phase + j). A `start` pulse samples each arm's voltage
  reference and current sign; the arm's selector starts one cycle later with
  the NLC's index and selects the lowest voltages for a positive arm current,
  the highest otherwise. A `start` that arrives while an arm is still busy is
  ignored by that arm. From `start` to new gates an arm takes
  `2 + N + VW·(N+3) + N + 4` cycles in the worst case.

Not part of the RTL, and brought out as ports instead: the outer output-power
and circulating-current controllers that produce the arm voltage references,
the ADCs and links that deliver capacitor voltages and arm currents, and the
power stage.

## Interfaces

`cvdsa_selector` (parameters `N_SM` = 1024, `VW` = 12):

| signal | dir | meaning |
|--------|-----|---------|
| `start` | in | one-cycle pulse while `!busy`; latches `num_sm`, `m_ins`, `sel_low` |
| `num_sm` | in | active SMs (0 or more than `N_SM` means `N_SM`) |
| `m_ins` | in | SMs to select; clamped to `num_sm` |
| `sel_low` | in | 1: lowest voltages, 0: highest |
| `cv_valid`/`cv_data`/`cv_ready` | in/in/out | voltage samples, SM 0 first |
| `res_valid`/`res_idx`/`res_insert` | out | one result per cycle, SM 0 first |
| `done` | out | one cycle after the last result |
| `br_valid`/`br_code`/`br_bit` | out | branch taken at the end of each pass |
| `passes` | out | passes of the last run |

Resets are asynchronous and active low; memories are not reset. The branch
codes are the `branch_e` enum in `cvdsa_pkg`. An assertion in the selector
checks that no pass is asked for more SMs than it has.

## Where this RTL goes its own way

* The selection of the lowest *or* highest voltages is a run-time input; both
  directions come from the balancing rule, the worked example uses the
  highest.
* Each pass costs 3 cycles on top of one per candidate, and the read-out 4
  cycles on top of N, which is why the 1024-SM worst case is 71.9 µs rather
  than the ideal (2 + VW)·N = 14,336 cycles (71.7 µs); FPGA measurements of the
  same algorithm at 200 MHz are reported at about 70 µs for 1024 SMs and
  17.7 µs for what is taken to be 256 SMs.
* The state array, the two-ended layout of the index arrays, the tie rule
  (lowest SM index), the run-time arm size `num_sm`, the streaming interfaces
  and the NLC rounding and number formats are choices of this design.
* The gate generator applies a selection as a whole and drives T1/T2 as plain
  complements; it does not limit switching frequency or insert dead time.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(watchdog included). With Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/cvdsa_pkg.sv tb/tb_mmc_cvb_top.sv --top-module tb_mmc_cvb_top
    ./obj_dir/Vtb_mmc_cvb_top

| testbench | what it runs |
|-----------|--------------|
| `tb_cvdsa_selector` | worked example with its branch sequence; all-equal worst case with cycle count; m = 0, m = N, m > N, one SM; 150 random runs with 4-bit voltages (many ties), cycle count of each run predicted from a reference model |
| `tb_cvdsa_workloads` | selector at its default size, worst case for 128, 256, 512, 1024 SMs with cycle counts and times at 200 MHz; random runs at each size |
| `tb_sdp_ram` | random writes and reads, hold, read during write |
| `tb_sm_pulse_gen` | random result streams, atomic update, T1/T2, count, fallback to bypass |
| `tb_nlc` | rounding, both clamps, latency |
| `tb_mmc_cvb_top` | six arms at 24 SMs × 5 bits, 60 control periods closed around a simple capacitor model; counts every branch, LSB ties, both current directions, both NLC clamps, an ignored `start` and a short arm; checks that the voltage spread stays bounded |
| `tb_mmc_cvb_full` | one control period of the top at its default size (6 × 1024 SMs, 12 bits), worst-case latency on one arm |

To change the size, override `N_SM` and `VW` on `mmc_cvb_top` or
`cvdsa_selector`; all widths follow from them.
