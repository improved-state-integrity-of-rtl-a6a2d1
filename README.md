# Parity-protected voltage-scaled state retention

A block of flip-flops that must keep its contents through standby can have its
supply lowered far below nominal: leakage falls roughly exponentially with the
supply, and a latch can hold its state at a few hundred millivolts. How low it
can safely go is not the same on every die. Process variation skews the noise
margins of the retaining latches, so the first flip-flop to lose its state does
so anywhere between about 245 mV and 315 mV depending on the die, and
temperature pushes that point up by tens of millivolts. Pick one retention
voltage for all dies and it must cover the worst die at the worst temperature,
which wastes leakage on every other die.

This design takes the other route. Each die measures its own **first failure
voltage (FFV)** and retains at a **minimum retention voltage MRV = FFV + RVM**,
where the retention voltage margin RVM (54 mV) covers temperature (30 mV) and
a safety margin SM (24 mV, 2 % of the 1.2 V nominal supply). Because that
leaves little headroom, the state is watched while it sleeps: every flip-flop
contributes to a **horizontal parity** (one bit per scan chain) and a
**vertical parity** (one bit per position along the chains). Both are stored in
an always-on domain before sleep and compared continuously during sleep. One
flipped flip-flop shows up as exactly one mismatching horizontal bit and one
mismatching vertical bit, which locate it, so it is corrected after the supply
is raised again. Anything else is reported as uncorrectable. After any error
the die's MRV is raised by SM, so the same failure does not repeat.

The RTL is written in SystemVerilog (IEEE 1800-2017) and needs only Verilator 5
to simulate.

## Organisation of the register block

| Item | Value |
|---|---|
| Flip-flops | 8192 = 64 scan chains x 128 flip-flops (two rows of four 32x32 tiles) |
| Horizontal parity | 64 bits, `HP[n] = XOR over m of b[n][m]` (one per chain) |
| Vertical parity | 128 bits, `VP[m] = XOR over n of b[n][m]` (one per depth) |
| Parity logic cost | two XOR inputs per flip-flop |
| Voltages | 11-bit unsigned millivolts; nominal 1200, SM 24, TVM 30, RVM 54, IRV 400, VSR 1 |

`b[n][m]` is the flip-flop at depth `m` of scan chain `n`. The parity trees are
wired along the scan chains because scan insertion is what turns scattered
flip-flops into a regular array: a horizontal tree follows one chain, and a
vertical tree joins the flip-flops at the same depth of every chain. Chains
can have different lengths. A position where a chain has no flip-flop simply
drops out of both trees (a direct connection in the netlist). The
`CHAIN_LEN` parameter of the two parity modules describes this. With chains of
length 3 and 2, for example, HP1 XORs three flip-flops, HP2 two, and VP3 is the
lone third flip-flop of the first chain. The number of horizontal parity bits
equals the number of chains, and the number of vertical bits equals the depth
of the longest chain.

The register block and its parity trees are in the scaled domain. The parity
stores, the locator and the controllers are in the always-on domain. On
silicon a level shifter sits on each parity bit between the two domains. Level
shifters carry no logic and are not modelled. While the block is not sleeping,
the parity trees' inputs are gated off, so they do not toggle with normal
operation.

## The control flow

`protection_ctrl` implements three resting states and the transitions between
them:

```
 ACTIVE --sleep_req--> GEN_PAR --> IDLE --(supply to MRV)--> SLEEP
   ^                    (capture     ^  (clock stopped,        |  |
   |                     parity)     |   outputs isolated)     |  | parity mismatch
   |                                 |                         |  v
   +--(supply to nominal)-- WAKE <---+---- wakeup_req ---------+ RAISE (supply to nominal)
                                     |                            |
                                     |                  single    | multi-bit
                                     |             CORR_RD/CORR_WR | -> uncorrectable,
                                     |                            |    parity re-captured
                                     +------ MRV_UP (MRV += SM) <--+
```

- **ACTIVE**: the block is clocked at nominal supply. The host writes and reads
  whole chains (`host_wr_*`, `host_rd_*`) and can shift the scan chains.
- **GEN_PAR**: the parity logic is enabled and both parity words are captured
  (one cycle).
- **IDLE**: the block's clock is stopped (`bank_clk_en = 0`), its outputs are
  clamped to 0, and the supply is asked for the current MRV.
- **SLEEP**: the live parity is compared with the stored parity on every
  cycle. `err_irq` is the mismatch interrupt. An error beats a simultaneous
  wake-up request.
- **RAISE → CORR_RD → CORR_WR**: the supply goes back to nominal first. No
  further flips can happen after that, so the location is taken from the parity
  at that point. The located chain is read and written back with the located
  bit inverted. That puts the state back in line with the stored parity.
- **Multi-bit error**: `uncorrectable` is set and held until the next sleep
  request. The parity is re-captured from the state as it stands, so
  monitoring can continue. Restoring the lost data is left to software, for
  example checkpointing.
- **MRV_UP**: MRV += SM after every error, corrected or not. MRV saturates at
  the 1200 mV nominal supply. The new MRV is then applied through IDLE.

The supply of the scaled domain is external. The design asks for a voltage by
pulsing `vdd_req` with the setpoint on `vdd_set_mv`. The supply answers with a
one-cycle `vdd_ack` once its output has settled. A bench supply with 1 mV steps
and 40 µs ramps is the intended partner. Only one request is outstanding at a
time, and an assertion checks this.

## Finding the die's MRV

`mrv_characterizer` binary-searches for the FFV between an initial retention
voltage IRV (400 mV, a voltage at which no die fails) and 0 V:

```
v_correct = IRV; v_fail = 0; v = (v_correct + v_fail) / 2
while (v_correct - v_fail > VSR):
    run a retention trial at v
    if error: v_fail = v  else: v_correct = v
    v = (v_correct + v_fail) / 2
FFV = v_fail; MRV = FFV + RVM
```

With IRV = 400 mV and VSR = 1 mV the search takes at most 9 steps and returns
the exact FFV (the highest failing millivolt). The mid-point rounds down.

Near the failure point the supply jitters by a few millivolts, so one trial is
not trusted. Each step runs the trial `REPEATS` = 10 times at the same voltage
and takes the most common outcome. A 5-5 tie counts as a failure, which errs
towards a higher, safer FFV. A full characterization is thus up to 90 trials.
The controller carries out each trial as a request/done handshake, in these
steps:

1. Fill every flip-flop with logic 1. Logic 1 is the more fragile value.
2. Capture the parity.
3. Scale the supply to the trial voltage.
4. Hold for `HOLD_CYCLES` cycles while monitoring.
5. Return to nominal supply.
6. Report whether the parity saw a mismatch.

When the search ends, MRV is loaded into the controller. The host can read MRV
(`mrv_mv`) at any time and overwrite it in ACTIVE (`mrv_load`). Keeping MRV
outside the chip between power cycles is the host's job.

Trials use the parity check, not a full read-back. A failing trial therefore
needs a flip pattern that the parity can see. Every single flip and every
double flip is visible. See the limits below.

## What the parity can and cannot do

- 1 flip: always detected, located and corrected.
- 2 flips: always detected (they differ in a chain, a depth or both) and
  reported as uncorrectable.
- 3 flips at three corners of a rectangle: the syndrome matches a single
  flip at the fourth corner. That bit gets "corrected", which adds a fourth
  error. 4 flips on the corners of a rectangle cancel out and go unseen.
- A flip that happens after the parity is re-captured at an uncorrectable
  error is measured against the corrupted state.

The design leans on a measured property: at the first failure voltage most
dies (about four in five) lose exactly one flip-flop, and the MRV margin sits
above that.

## Delay monitor

Two identical 95-stage NAND ring oscillators (`ring_osc`) are provided. The
frequency difference between them, measured against supply and temperature,
shows within-die variation. `ring_osc` is a behavioural model. It has a
combinational loop with modelled gate delays, it is not synthesizable, and its
stage delay (20 time units, 20 ps at a 1 ps unit) is an assumed figure.
Counting and comparing the two frequencies is done off-chip.

## Files

| File | Contents |
|---|---|
| `rtl/sp_pkg.sv` | sizes, millivolt type, voltage constants, controller state enum |
| `rtl/retention_bank.sv` | 64 x 128 flip-flops: row write/read, fill, scan, isolation, upset input, full state tap |
| `rtl/hparity_logic.sv`, `rtl/vparity_logic.sv` | parity trees with per-chain lengths |
| `rtl/parity_storage.sv` | always-on parity register and comparator (used for 64 and 128 bits) |
| `rtl/error_locator.sv` | classifies mismatches: none / single at (row, col) / multi |
| `rtl/mrv_characterizer.sv` | FFV binary search with 10-trial majority per step, MRV = FFV + RVM |
| `rtl/protection_ctrl.sv` | the Active/Idle/Sleep flow, correction, MRV update, trial execution |
| `rtl/ring_osc.sv` | behavioural NAND ring oscillator |
| `rtl/state_protect_top.sv` | everything wired together |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_table1_dies.sv` | the three-die retention experiment on the full design |

### Top-level interface (`state_protect_top`)

| Group | Ports |
|---|---|
| clock/reset | `clk`, `rst_n` (asynchronous, active low, power-on only) |
| commands | `sleep_req`, `wakeup_req` (levels, sampled in ACTIVE / SLEEP), `char_start`, `irv_mv`, `vsr_mv`, `rvm_mv`, `mrv_load`, `mrv_load_val` |
| data | `host_wr_en/row/data`, `host_rd_row/data` (128-bit chains, read is combinational), `scan_en`, `scan_in[64]`, `scan_out[64]` |
| supply | `vdd_set_mv`, `vdd_req`, `vdd_ack` |
| retention failure | `ret_fail_en/row/col`: inverts one flip-flop at the next edge |
| status | `state`, `mrv_mv`, `ffv_mv`, `char_busy`, `char_done`, `err_irq`, `uncorrectable`, `error_cnt`, `corrected_cnt` |
| delay monitor | `osc_en`, `osc_out[1:0]` |

`ret_fail_*` has no silicon counterpart. A real flip-flop loses its state
because of the supply, and this port lets a die model stand in for that
physics.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sp_pkg.sv \
  rtl/state_protect_top.sv tb/tb_state_protect_top.sv --top-module tb_state_protect_top
./obj_dir/Vtb_state_protect_top
```

Other blocks work the same way: `rtl/sp_pkg.sv rtl/<module>.sv
tb/tb_<module>.sv --top-module tb_<module>`. Every testbench initialises
what it reads, so it also runs with random initial values
(`+verilator+rand+reset+2`).

`tb_state_protect_top` runs the design at its default size, with a supply
model (4-cycle ramps) and a die model that has two weak flip-flops. It goes
through these steps:

1. Scan shift.
2. Characterization of an FFV = 285 mV die. It must give FFV 285 and MRV
   339 mV.
3. A clean sleep at 339 mV.
4. A sleep after the FFV has drifted to 345 mV. One flip-flop fails; the test
   checks detection, correction at nominal, MRV 363 mV and full read-back.
5. A multi-bit die failing at 370 mV. The test checks that the error is
   flagged uncorrectable and MRV rises to 387 mV.
6. The ring oscillators run.

It counts each mechanism (passing and failing trials, sleep entries, isolation,
interrupts, MRV updates, wake-ups, scan shifts, oscillation) and fails if one
never happens. It takes well under a second.

`tb_table1_dies` repeats the three-die retention experiment at full size. It
uses dies with a room-temperature FFV of 315, 285 and 250 mV. Each must
characterize to an MRV of 369, 339 and 304 mV. Each then sleeps with all 8192
flip-flops at logic 1 while heated by the full 30 mV temperature margin, with
no error and no lost bit. A fourth run heats the last die 60 mV, beyond the
margin: the one resulting flip is caught, corrected, and MRV rises to 328 mV.

## Choices made in this implementation

These points are not fixed by the technique. They were chosen here and are easy
to change:

- The flow is a hardware state machine. On the original test chip it runs as
  micro-controller firmware and a host script, and a Cortex-M0 drives the
  parity capture and correction.
- Host access is by whole 128-bit chains. There is a one-cycle fill port for
  the trials. Scan shifts in at depth 0 and out at depth 127, and only in
  ACTIVE.
- Isolation clamps to 0. The stopped clock is modelled as a clock enable, and
  one clock serves both domains.
- A trial holds for `HOLD_CYCLES` = 64 cycles. Bench trials held the low
  voltage for seconds to minutes, so in practice set this from the clock rate.
- MRV rises by SM with each error and saturates at nominal rather than
  wrapping.
- The supply handshake and the 11-bit millivolt width are this design's own.
- The block organisation is 64 chains of 128. A die photo labels the block
  "32x256"; the parity widths (64 and 128) and the tile arrangement decide
  the organisation used here.
