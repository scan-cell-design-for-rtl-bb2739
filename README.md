# A scan cell for delay fault testing with a built-in instability sensor

A delay fault test applies two vectors to a combinational circuit, one after
the other: an *initial* vector and then a *final* vector. The test checks that
every output settles within one clock period after the final vector arrives.
When the circuit's inputs and outputs are the flip-flops of a scan path, the
usual scan flip-flop gets in the way in three places:

* **Launch.** The final vector has to be shifted in. A plain scan flip-flop
  shows every intermediate shift state to the logic. Those states are hazards
  that can hide or fake a delay fault.
* **Observation.** Sampling an output once, at the end of the period, does not
  prove the path is fault free. With a non-robust test, the correct value can
  be sampled while a late glitch is still on its way.
* **Timing.** Scan paths are slow and their skew is poorly controlled. So the
  moments that decide the test must not depend on scan-path timing.

The cell in this repository handles all three with no control line beyond a
normal scan flip-flop's clock and select:

* an extra *system slave* latch holds the circuit's input steady while
  scanning;
* an *instability sensor* records whether the circuit's output moved at all
  during an observation window;
* the launch of the transition and the start of the observation window are
  both set by one signal edge, the falling edge of `sel`, inside each cell.

## Structure of one cell

```
 sys_in ---+--[0 mux]--> M latch --+--[1 mux]--> S' latch ----------> scan_out
 scan_in --|--[1    ]    (clock=1) |  [0    ]    (clock=0)
           |   sel                 |    ^  sel
           |                       |    | instability_sensed_n
           +--> instability_sensor -----+
                (reset = sel)      |
                                   +--> S latch ---------------------> sys_out
                                        (clock=0 and sel=0)
```

| element | open (transparent) while | input | drives |
|---|---|---|---|
| master latch M | `clock = 1` | `sel ? scan_in : sys_in` | S' and S |
| scan slave S' | `clock = 0` | `sel ? M : instability_sensed_n` | `scan_out` |
| system slave S | `clock = 0` and `sel = 0` | M | `sys_out` |
| instability sensor | armed while `sel = 0`, cleared while `sel = 1` | senses `sys_in` | the S' multiplexer |

M and S' together form a flip-flop that loads on the falling clock edge, so
a bit moves one cell down the scan path per clock pulse. M and S' are never
open together, so the path is race free. S is a third latch that only opens
while `sel = 0`. While shifting (`sel = 1`) it holds, so `sys_out` does not
move.

`sel` therefore has one meaning per level:

| | `sel = 1` | `sel = 0` |
|---|---|---|
| master input | `scan_in` | `sys_in` |
| scan slave input | M (shift) | sensor result (capture) |
| system slave | holds | follows M while `clock = 0` |
| instability sensor | held in reset | watching `sys_in` |

## The instability sensor

The sensor has two set-reset flags. `seen_one` is set while `sense` is 1 and
`seen_zero` while `sense` is 0. Both are cleared while `reset` is 1. If both
levels have appeared since `reset` fell, the input was unstable, and the NAND
of the flags, `instability_sensed_n`, drops to 0. The flags respond to
levels, not to clock edges, so a glitch of any width inside the window is
caught. A pulse while `reset` is 1 is forgotten.

In the enhanced cell `reset` is `sel` and `sense` is `sys_in`. The result is
**active low**: a 0 shifted out of a cell means its `sys_in` was unstable
during the window, and a 1 means it was steady.

## Running a delay fault test

All cells share `clock` and `sel`. The tester drives both as levels; the
sequence below is the protocol. The first bit shifted in ends in the last
cell (`N_CELLS-1`), and the last cell's bit comes out of `scan_out` first.

1. **Initial vector.** With `sel = 1`, shift the initial vector in with
   `N_CELLS` clock pulses. With `clock = 0`, pulse `sel` to 0 briefly: every S
   takes its M, and `sys_out` shows the initial vector.
2. **Final vector.** With `sel = 1`, shift the final vector in. `sys_out`
   keeps the initial vector throughout, because S is closed.
3. **Launch.** With `clock = 0`, drop `sel` to 0. Every S opens at that edge
   and `sys_out` changes to the final vector in a single step. The
   transitions now run through the circuit.
4. **Reset the sensors.** Raise `sel`. This clears the sensors; S closes but
   keeps the final vector.
5. **Arm the sensors.** Drop `sel` at the moment the circuit should have
   settled. This edge starts the observation window. A late transition or a
   glitch on `sys_in` from here on sets both flags.
6. **Capture.** At the end of the observation time, raise `clock`. S' closes
   and holds each cell's sensor result. The last cell's result is already on
   `scan_out`.
7. **Shift the results out.** Raise `sel`. Each further clock pulse brings the
   next cell's result out; it is valid after the falling edge.
8. **Steady-state values.** With `clock = 1`, set `sel = 0`, then `clock = 0`,
   so M captures `sys_in`. Then set `sel = 1` and shift the captured values
   out in the same way, the last cell first.

A cell passes when the captured value in step 8 is correct **and** step 7
reported it stable. Steps 3 and 5 are the only moments where timing matters.
Each is one edge of `sel`, applied in every cell at once, so the accuracy of
the test depends only on how cleanly `sel` is distributed. The scan path's
own speed does not enter.

## Modules

| module | role |
|---|---|
| `scan_path` | top: `N_CELLS` enhanced cells in one scan chain, `sys_in[i]`/`sys_out[i]` per cell |
| `enhanced_scan_cell` | one cell: `hazard_free_src` with its observation multiplexer, plus `instability_sensor` |
| `hazard_free_src` | multiplexer, M, S' and S; parameter `OBS_MUX` adds the multiplexer in front of S' |
| `instability_sensor` | the two-flag sensor |
| `d_latch` | the level-sensitive latch used for M, S' and S |
| `scan_cell_pkg` | the `sel` level names `SEL_SCAN` / `SEL_SYSTEM` |

With `OBS_MUX = 0` (its default), `hazard_free_src` is a plain hazard-free
scan cell with no sensor. It can be used on its own, for example on flip-flops
whose outputs need no observation.

Parameters: `scan_path.N_CELLS` (default 8) sets the chain length. Any length
works; 8 is only a convenient default.

There is no reset: every latch is loaded by the protocol above. A simulation
or a chip must clock data in (steps 1 and 8 both do this) before it relies on
`sys_out` or `scan_out`.

## How far the model goes

* **Ideal latches.** The original cell is a transistor-level circuit:
  transmission-gate latches and a dynamic sensor with precharged nodes. Here
  each part is an ideal latch or multiplexer. The behaviour at the signal
  level is the same. The analog limits are not modelled: the minimum glitch
  widths the real sensor catches (roughly 1.5 ns for a positive and 1.3 ns for
  a negative glitch), the delay before it responds, and how long the dynamic
  nodes keep their charge. In this model a pulse of any width inside the
  window is detected, and the flags hold until the next reset.
* **The sensor result is active low.** The sensor ends in a NAND that feeds
  the scan slave directly, so `0` means unstable.
* **Which `sel` level selects the sensor.** `sel = 0` routes the sensor into
  S' and `sel = 1` routes M. The test protocol needs this: the sensor is
  captured while armed (`sel = 0`) and shifted out with `sel = 1`. The
  opposite assignment would make the capture in step 6 load master data.
* **Where the window starts.** The sensor is armed by the *falling* edge of
  `sel` and cleared while `sel` is high.
* **Latches are intended.** Synthesis infers 5 latch bits per cell: M, S',
  S and the two sensor flags. Some lint tools report that they find no latch
  in `d_latch`'s single guarded assignment, and that `obs_in` is unused when
  `OBS_MUX = 0`. Both reports are expected.
* **Not included:** a controller that generates the protocol. The protocol is
  applied by the tester, and the testbenches play that part.

## Simulating

Every testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/scan_cell_pkg.sv tb/tb_scan_path.sv --top-module tb_scan_path
./obj_dir/Vtb_scan_path +verilator+rand+reset+2
```

Replace `tb_scan_path` with `tb_enhanced_scan_cell`, `tb_hazard_free_src` or
`tb_instability_sensor` to run the unit tests. `+verilator+rand+reset+2`
starts every latch at a random value; the tests bring the design to a known
state through the protocol, so they must pass with any starting state.

* `tb_instability_sensor`: stable inputs, 1.3 ns negative and 1.5 ns
  positive glitches, pulses during reset (ignored), and random sequences
  checked against the levels applied since reset.
* `tb_hazard_free_src`: shifting, with `sys_out` checked to hold; transfer by
  a `sel` pulse; capture of `sys_in`; a 2000-step random walk over the four
  inputs, compared with a reference model of M, S' and S.
* `tb_enhanced_scan_cell`: the full protocol on one cell for all four
  initial/final bit pairs and four `sys_in` behaviours, plus a random walk
  compared with a reference that also models the two sensor flags.
* `tb_scan_path`: the full protocol on the default 8-cell path over 40 random
  rounds. The testbench models the circuit under test as
  `y = x ^ rotr(x,1) ^ 8'b1010_1010`. Each output bit gets a random timing
  behaviour: settles early, settles late, glitches after arming, or glitches
  during the sensor reset. Every sensor result and every steady-state value is
  checked. The test also counts each mechanism: shift, hold, launch, a glitch
  caught, a late transition caught, a stable result, an early glitch ignored,
  and a capture. A mechanism that never occurred counts as a failure.
