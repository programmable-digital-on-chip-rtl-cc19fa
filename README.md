# Digitally calibrated on-chip termination: control logic

A high-speed input pad needs a termination resistor close to the receiver, and a
resistor built from MOS transistors drifts with process, supply voltage and
temperature. This RTL is the digital half of a scheme that keeps such on-chip
terminators matched to one precise off-chip resistor. A calibration loop
finds the transistor-array setting that matches the external resistor. It
does this once for the pull-down side and once for the pull-up side. The two
5-bit codes then go over a single serial line to every terminated pad. A pad
applies a new code only in a quiet moment of its input data, and it applies
it as a *segmented thermometer code*, so that the impedance barely glitches
while the code changes.

The architecture follows the paper "Programmable Digital On-Chip Terminator"
(S.-C. Kim et al.). That paper describes the circuit partly at transistor
level. Here the digital behaviour is written as synchronous SystemVerilog.
The analog parts are left outside as ports. Where the paper does not settle
a detail, this implementation makes a choice, and each one is listed below.

```
           ud_pd, ud_pu (from the analog comparators)
                 |
   +-------------v--------------+        +------------------+
   | pic                        | bcda_* | code_transmitter |  code_line   +---------------+
   |  impedance_detector (pd)   |------->|  2 x parallel-to-|------------->| code_receiver | x NUM_TERM
   |  impedance_detector (pu)   |        |  serial + MUX    |              |  shift regs,  |--> term_tch/tcl_pd/pu[i]
   +-------------^--------------+        +--------^---------+              |  latch, b->T  |    (to each terminator)
        tch/tcl_* to the detection arrays         |                        +-------^-------+
                 ^                                |                                |
   +-------------+-------------------------------+--------------------------------+--+
   | update_timing: UPDATE_CK, CODE_CK, SAM_CK, CK1/CK2 enables;  ck3_gen x2: CK3U/CK3D |
   +-----------------------------------------------------------------------------------+
```

## 1. Calibration loop (`impedance_detector`)

Analog context, outside this RTL: an amplifier holds the reference pad at
VDDH/2, so the external resistor RT carries a current of VDDH/(2·RT).
Current mirrors copy this current into two detection circuits. In each one,
the current flows through a transistor array of the same kind the terminators
use. A comparator then reports whether the array's node voltage V_MID is
above VDDH/2. For the pull-down array, V_MID above VDDH/2 means the array is
too narrow (its resistance is too high), so the comparator's output
`ud = 1` means "add width".

The digital loop, clocked by the CK1 step enable (`ck1_en`), has four parts:

* **Up/down counter** (`updn_counter`). BC moves by ±1 per step, following
  `ud`. It starts at mid-scale (16) and saturates at 0 and 31.
* **Binary to segmented thermometer** (`seg_therm_encoder`). BC drives the
  array as TCH/TCL (section 2), and this closes the loop.
* **Selector** (`down_selector`). A five-deep shift register holds the last
  five `ud` samples, Q1 (newest) to Q5. The loop cannot settle exactly; once
  it has reached the reference it *dithers*. The selector recognises two
  dithering signatures:

  | Q1 Q2 Q3 Q4 Q5 | meaning | BC at that moment |
  |---|---|---|
  | 1 0 1 0 1 | `ud` alternates; BC toggles between the two codes either side of the reference | the upper code (more width, impedance just below RT) |
  | 1 0 0 1 1 | a window of up,up,down,down: BC walks over three codes, as happens when the comparator is metastable at the middle code | the centre code |

  Either match raises `enable` for that CK1 period. `lock` is set by the
  first match and stays set until reset.
* **Hold register** (`hold_register`). It loads BC while `enable` is high.
  Its output BCDA is the code sent to the terminators. BCDA therefore changes
  only when a fresh dithering pattern is found, for example after a supply or
  temperature drift moves the reference point. It does not change with every
  step of the dither.

A worked example at default size. The reference is 25.4 unit widths and the
loop starts from reset. It takes ten up steps (16→26), then down, up, down,
up. The 14th CK1 step completes `1 0 1 0 1`, and BCDA becomes 26. The
testbench checks exactly this step count.

`pic` holds two such loops, one for pull-down and one for pull-up, on the
same CK1 enable. The pull-up loop is assumed to be identical. Its comparator
must be wired so that `ud_pu = 1` means "add pull-up width".

## 2. Segmented thermometer arrays (`seg_therm_encoder`)

A 5-bit binary-weighted array (widths 1, 2, 4, 8, 16) switches almost every
transistor on a step such as 15→16. If the transistors do not all switch at
the same instant, the impedance spikes. The code is therefore split:

* the top M = 2 bits become a coarse thermometer of 2^M − 1 = 3
  transistors, each 2^(N−M) = 8 units wide (TCH);
* the low N − M = 3 bits become a fine thermometer of 2^(N−M) − 1 = 7
  unit-width transistors (TCL).

The total width switched on equals BC, exactly as in a binary-weighted
array. Thermometer bit k is 1 when the field value exceeds k. The worst
one-step update is now 7→8 (or 15→16, and so on): one coarse transistor
turns on while seven fine ones turn off.

`tb/tb_update_glitch.sv` computes, for every one-step update, how far the
width can leave the interval between the old and new value when the
switching is skewed. The binary array's worst case is 15 units; the
segmented array's is 7. M is a parameter. The paper does not give the value
of m; M = 2 and M = 3 both need 10 transistors for N = 5.

## 3. Serial code distribution and update timing

There is one clock, `clk`, the data sampling clock. The derived clocks of
the original scheme appear here as levels (for observation) and single-cycle
enables. An enable is high in the first cycle after the edge it marks, and
the register it enables acts at the end of that cycle.

One update period is 64 cycles. Cycle numbers are those of the
`update_timing` counter:

| cycle | event |
|---|---|
| 0 | UPDATE_CK rises; the transmitter captures the pull-down BCDA (`load_d`) |
| 4, 8, 12, 16, 20 | CODE_CK rises (`ck1d`); the next pull-down bit, MSB first, goes onto `code_line` |
| 6, 10, 14, 18, 22 | CODE_CK falls (`ck2d`); every receiver shifts the bit into its pull-down shift register |
| 4 (and every 8) | SAM_CK rises (`sam_rise`), which is also CK1 of the calibration loops |
| 5 | **CK3U**: every receiver applies the pull-up code received in the previous period |
| 32 | UPDATE_CK falls; the transmitter captures the pull-up BCDA (`load_u`) |
| 36 … 52 / 38 … 54 | pull-up bits: CODE_CK rises (`ck1u`) / falls (`ck2u`) |
| 37 | **CK3D**: every receiver applies the pull-down code just received |

The transmitter (`code_transmitter`) has two parallel-to-series registers
and a MUX, which puts the pull-down register on the line while UPDATE_CK is
high and the pull-up register while it is low. Each receiver
(`code_receiver`) has two 5-bit shift registers, two series-to-parallel
registers latched by CK3D/CK3U, and two thermometer encoders.

The shift registers fill long before their CK3 pulse comes. What a receiver
applies therefore changes only on CK3U or CK3D, once per period each. These
pulses are aligned to SAM_CK, so a pad's impedance changes only at a fixed
point of the sampling clock, in the hold time of the input data.

A newly held code reaches all terminators within two update periods (at
most 128 cycles). The end-to-end testbench checks this bound.

## 4. CK3 pulse generator (`ck3_gen`)

The original circuit is dynamic logic. A short pulse generator fires on the
UPDATE_CK edge and charges a standby node STBY. The next SAM_CK rising edge
then fires CK3, and CK3 in turn discharges STBY. The result is exactly one
CK3 pulse per update period, phase-locked to SAM_CK.

`ck3_gen` does the same with flip-flops: `update_ck2` (the SPG pulse), `stby`
and a one-cycle `ck3`. `RISING = 1` triggers on the UPDATE_CK rising edge
and gives CK3U. `RISING = 0` triggers on the falling edge and gives CK3D. An
assertion checks that `ck3` never lasts two cycles.

## 5. Module list and ports

| module | role |
|---|---|
| `odt_pkg` | shared constants (N = 5, M = 2, 64-cycle period, SAM_CK ÷ 8, CODE_CK placement) and `ones()` |
| `updn_counter`, `down_selector`, `hold_register`, `seg_therm_encoder` | parts of one calibration loop |
| `impedance_detector` | one calibration loop |
| `pic` | pull-down and pull-up loops |
| `update_timing` | UPDATE_CK / CODE_CK / SAM_CK and their enables |
| `ck3_gen` | CK3U / CK3D |
| `code_transmitter`, `code_receiver` | serial link ends |
| `odt_top` | everything, with `NUM_TERM` (default 4) receivers |

`odt_top` ports:

* inputs:
  * `clk` and `rst_n` (asynchronous, active low);
  * the comparator outputs `ud_pd` and `ud_pu`;
* outputs:
  * the detection-array codes `tch_pd/tcl_pd/tch_pu/tcl_pu`;
  * the held codes `bcda_pd/bcda_pu` and `lock_pd/lock_pu`;
  * for observation: `code_line`, `update_ck`, `sam_ck`, `code_ck`, `ck3u`
    and `ck3d`;
  * per terminator i: `term_tch_pd[i]`, `term_tcl_pd[i]`, `term_tch_pu[i]`
    and `term_tcl_pu[i]`, which drive that pad's arrays.

In the real chip the receivers sit at the pads, around the die. They share
only `code_line` and the timing signals.

Not in the RTL, because these parts are analog circuits:

* the reference-current generator (amplifiers and current mirrors);
* the comparators;
* the detection transistor arrays;
* the pass-gate CMOS terminators themselves;
* the pads and the external resistor.

`tb/detector_array_model.sv` is a behavioural stand-in for one array plus
its comparator. UD is 1 while the array width is below a real-valued
target. Within ±`meta` of the target, UD is random, which models
metastability.

## 6. Choices made here, and departures

* **Single clock.** UPDATE_CK, CODE_CK, SAM_CK and CK1/2/3 are decoded from
  one counter of the sampling clock, instead of being separate clock nets.
  The hold register, which the original clocks with `enable`, is a
  load-enabled register.
* **Decisions the paper leaves open.** The values chosen here are:
  * CK1 runs once per SAM_CK period;
  * CODE_CK has a 4-cycle period and starts 4 cycles into each half;
  * SAM_CK rises 4 cycles after each multiple of 8, so that it never
    coincides with an UPDATE_CK edge;
  * MSB is sent first;
  * the transmitter captures BCDA at the start of its half period.
* **Reset and range limits.** All codes reset to mid-scale (16). The counter
  saturates instead of wrapping.
* **The `lock` output.** Its meaning here (sticky after the first detected
  dither) is an interpretation.
* **The comparator threshold.** The paper calls it both VDDH/2 and ½·VDDQ.
  The digital side only relies on the meaning of UD.
* **Coarse transistor width.** The paper's array figure labels the coarse
  transistors "(n−m)W/L". For the segmented array to equal the binary one,
  each coarse unit must be 2^(n−m)·W/L, and the encoder assumes that.
* **Not implemented.** The paper mentions generating more than two
  impedance values from the same reference current. That is not
  implemented.

## 7. Simulating

Each block in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. The
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_odt_top` runs the whole design at its default parameters, in about
1,400 cycles:

* both loops lock;
* every terminator receives the codes;
* CK3U comes every 64 cycles and CK3D 32 cycles after it;
* terminator codes change only after CK3;
* the references move and the new codes propagate;
* a metastable comparator produces three-code dithering, and the centre
  code is held.

The testbench counts each of these mechanisms and fails if any one never
happened. `tb_update_glitch` is the binary-versus-segmented comparison from
section 2.

```
verilator --binary --timing --assert --top-module tb_odt_top \
    -y rtl -y tb +libext+.sv rtl/odt_pkg.sv tb/tb_odt_top.sv -o sim
./obj_dir/sim
```

To run another test, replace `tb_odt_top` with its name. The package must be
listed first. The other modules are found through `-y`.
