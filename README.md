# A mixed-signal watchpoint built into an IEEE 1149.4 test port

Setting a breakpoint on a mixed-signal chip usually needs probes: a logic
analyser on the digital side, an oscilloscope on the analog side, and physical
access to the nodes. This design replaces the probes with logic reached only
through the chip's IEEE 1149.4 test access port. Two word comparators watch a
digital word and the digitised value of an analog node. A single output pin,
**VCO** (Valid Condition Output), goes high when a chosen combination of the
two conditions holds. On the board, VCO can reset the flip-flop that supplies
the processor clock, which freezes the system at the moment the condition
occurs.

The key idea is cheap reuse of the boundary-scan cell. A digital boundary
module (DBM) already has two flip-flops per bit:

* the **capture/shift** stage (C/S);
* the **update** stage (U).

The design stores **limit A** in U and **mask or limit B** in C/S. It adds a
small combinational block **F** per bit that compares the live parallel input
with both. Chaining the F blocks gives a word comparator, the **Condition
Detector Register**. The digital instance replaces the boundary cells that
would sit between a mission ADC and the digital core anyway. The analog
instance is new and is fed by a test ADC on analog test bus AB2.

## Conditions and the comparator chain

Each register is set to one of eight condition types (C2,C1,C0):

| code | condition      | uses                        |
|------|----------------|-----------------------------|
| 000  | word = A       | mask in C/S (0 = don't care) |
| 001  | word ≠ A       | mask in C/S                 |
| 010  | word > A       |                             |
| 011  | word < A       |                             |
| 100  | word ≥ A       |                             |
| 101  | word ≤ A       |                             |
| 110  | A ≤ word ≤ B   | limit B in C/S              |
| 111  | outside [A, B] | limit B in C/S              |

The chain runs from the most significant bit to the least significant one:

```
 op ──► FA ──code──► F[N-1] ──► F[N-2] ──► ... ──► F[0] ──code──► FB ──► VC
                      ▲ PI,C/S,U  ▲                  ▲
```

Each F turns the partial result of the bits above it into the partial result
including its own bit. There are five 3-bit codes (`cdd_pkg::cmp_code_t`):

| code  | meaning after the bits seen so far                  |
|-------|-----------------------------------------------------|
| FALSE | condition already known to fail                     |
| TRUE  | condition already known to hold (or, for = and ≠, "all unmasked bits equal so far") |
| EQ    | still equal to A (and to B for the range conditions) |
| GTA   | range only: already above A, still equal to B       |
| LTB   | range only: already below B, still equal to A       |

* **FA** picks the start code: TRUE for =A and ≠A, EQ for all others.
* For the magnitude conditions, the first bit where PI differs from A decides
  TRUE or FALSE. Later bits then pass the code on unchanged.
* For the range conditions, A and B are tracked at the same time, which is
  why GTA and LTB exist.
* **FB** decodes the last code. EQ at the end means the word equals A, so it
  counts as true for ≥, ≤ and the inclusive range. ≠ and "outside" are the
  complements of = and "inside".

The truth table for =A is the one fixed point taken over directly:

* an incoming FALSE stays FALSE;
* with mask bit 0 the bit is ignored;
* otherwise the result stays TRUE only if PI = A.

The rules for the other seven conditions, the numeric code values, and the
FA/FB mappings are this implementation's own. They are the simplest rules
consistent with the list of five result values.

Everything in the chain is combinational. VC follows the input word within
one combinational delay of N cells, with no clock needed. That is why the
detector keeps working with TCK stopped in Run-Test/Idle.

## Scan paths and the new instructions

```
TDI ─┬─ BSR: DBM(EN) DBM(S1) DBM(S0) DCDR[11..0] ─┬──────────────────────► mux 3
     │                                            └─ ACDR[11..0] ─────────► mux 2
     ├─ Bypass ──────────────────────────────────────────────────────────► mux 1
     ├─ Detection Configuration Register (C2D C1D C0D C2A C1A C0A VS1 VS0) ► mux 0
     └─ Instruction Register ───────────────────────────────────────────► TDO (in Shift-IR)
```

Abbreviations: DCDR = Digital Condition Detector Register, ACDR = Analog
Condition Detector Register, BSR = boundary-scan register.

| opcode | instruction     | register        | effect |
|--------|-----------------|-----------------|--------|
| 00h    | EXTEST          | BSR             | standard |
| 01h    | SAMPLE/PRELOAD  | BSR             | standard |
| 02h    | PROBE           | BSR             | standard |
| 03h    | INTEST          | BSR             | boundary cells drive the core |
| 04h    | EXTEST2         | BSR + ACDR      | detection on; detector update stages frozen |
| 05h    | SAMPLE/PRELOAD2 | BSR + ACDR      | loads limit A into both detectors |
| 06h    | PROBE2          | BSR + ACDR      | detection on; detector update stages frozen |
| 07h    | INTEST2         | BSR + ACDR      | as INTEST, detection on, update frozen |
| 08h    | SELCON          | configuration   | selects condition types and VCO source |
| FFh    | BYPASS (and every unused code) | bypass | standard |

PROBE2 = 06h, SAMPLE/PRELOAD2 = 05h, SELCON = 08h and BYPASS = FFh match the
instruction values of the reference operating sequence. The other opcodes are
free choices and easy to change in `rtl/cdd_pkg.sv`.

The freezing is the subtle part. Limit A has to reach the update stages, while
mask or limit B must stay in the C/S stages. So a set-up is two scans:

1. SAMPLE/PRELOAD2 scans limit A in, and Update-DR copies it into U.
2. EXTEST2, PROBE2 or INTEST2 scans mask/limit B in. These instructions hold
   back Update-DR from the two detector registers only. B stays in C/S, and A
   is not overwritten. The three DBMs of the pins still update.

Any later Capture-DR under these instructions overwrites C/S with the live
inputs. Pausing a scan without shifting the whole register therefore destroys
B. Always follow such a scan with a full one.

## VCO

Block FC (`fc_vco`) drives VCO high only when all three hold:

* the TAP controller is in Run-Test/Idle;
* EXTEST2, PROBE2 or INTEST2 is loaded;
* the signal selected by (VS1,VS0) is high.

| VS1 VS0 | VCO source  |
|---------|-------------|
| 00      | DVC         |
| 01      | AVC         |
| 10      | DVC OR AVC  |
| 11      | DVC AND AVC |

## A complete set-up

This is the case study the testbench runs, on a ±10 V node seen by two
12-bit converters.

Goal: raise VCO when the analog node is above about +6 V, **or** the mission
ADC word is below 011001101011 (about −2 V).

1. Load `SELCON` and shift `0110_1010`: digital `<A` (011), analog `>A`
   (010), OR (10).
2. Load `SAMPLE/PRELOAD2` and shift the 27-bit vector
   `{EN,S1,S0, 011001101011, 110011010101}`, right end first.
3. Load `PROBE2` and shift `{EN,S1,S0, 12×1, 12×1}`. No mask or limit B is
   needed for `<`/`>`.
4. Go to Run-Test/Idle. VCO now follows the condition continuously.

With `0110_1011` (AND) instead, VCO stays low as long as the ADC works. An
analog value cannot be above +6 V and, at the same time, convert to a word
below −2 V.

`ms_debug_top` also carries three immediate assertions, active outside
reset:

* VCO is never high unless the TAP is in Run-Test/Idle under a detection
  instruction;
* under those instructions, Update-DR never reaches the digital detector
  register;
* the same holds for the analog detector register.

## Timing and conventions

* All state is in the TCK domain.
* Capture and shift happen on the rising edge of TCK. The update stages, the
  instruction latch and TDO change on the falling edge (the IEEE 1149.1
  convention).
* `trst_n` resets everything asynchronously. Test-Logic-Reset returns the
  instruction register to BYPASS.
* Capture-IR loads `0000_0001`.
* The TAP state codes are the usual 4-bit ones: F = Test-Logic-Reset,
  C = Run-Test/Idle, 2 = Shift-DR, and so on.
* The condition detector registers are parameterised in width: `ND` and `NA`
  in the top, `N` in `cond_det_reg`. The default is 12, the width of the
  words used in the case study.

## Files

| file | contents |
|------|----------|
| `rtl/cdd_pkg.sv` | condition, result-code and TAP-state enums, opcodes, register controls |
| `rtl/cdr_cell.sv` | one-bit comparator: DBM storage plus block F |
| `rtl/cdr_fa.sv`, `rtl/cdr_fb.sv` | start code and final decode |
| `rtl/cond_det_reg.sv` | N-bit Condition Detector Register |
| `rtl/det_cfg_reg.sv` | Detection Configuration Register |
| `rtl/fc_vco.sv` | VCO selection and gating |
| `rtl/tap_ctrl.sv`, `rtl/instr_reg.sv`, `rtl/bypass_reg.sv`, `rtl/dbm_cell.sv` | 1149.1/1149.4 digital test logic |
| `rtl/bp_clk_stop.sv` | board flip-flop that stops the processor clock while VCO is high |
| `rtl/ms_debug_top.sv` | everything wired together as in the case study |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/adc_model.sv`, `tb/amux4_model.sv` | behavioural ADC and analog multiplexer, used only by the top-level testbench |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end test (default sizes, about a second of run time):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cdd_pkg.sv tb/tb_ms_debug_top.sv --top-module tb_ms_debug_top
./obj_dir/Vtb_ms_debug_top
```

Any other block works the same way with its own testbench.

`tb_ms_debug_top` drives the chip only through TCK/TMS/TDI. It covers:

* the bypass path and read-back of the configuration register;
* the SAMPLE/PRELOAD2 capture;
* limit A surviving the PROBE2 scan;
* VCO held low outside Run-Test/Idle and under SAMPLE/PRELOAD2;
* a ±10 V triangle wave (1 ms period) under all four VCO selections;
* the AND selection with a mission ADC whose MSB is stuck at 0, where VCO
  goes high and flags the broken converter;
* a range condition with a limit B and an equality with a mask;
* INTEST2 driving the core from the update stages;
* the processor clock stopping while VCO is high.

At every simulated microsecond it compares AVC, DVC and VCO with integer
comparisons of the converter words. It also checks the +6 V and −2 V
thresholds in volts. It counts how often each of these mechanisms occurs, and
counts a failure for any that never happens. `tb_cond_det_reg` checks all
eight conditions on a 6-bit register against integer arithmetic, over every
input word and 40 limit pairs.

## What is outside the RTL, and what is assumed

* **Analog parts are not modelled in RTL.** This covers the test ADC on AB2,
  the mission ADC, the analog multiplexer, the analog boundary modules
  (including the internal-node one that connects the multiplexer output to
  AB2) and the TBIC (test bus interface circuit). Their digital signals are
  ports of `ms_debug_top`:
  * `adc2_code`, `adc1_code`: the two converter words;
  * `mux_pins`/`mux_ctl`: the multiplexer's EN, S1, S0 at the pins and at the
    multiplexer;
  * `mission_din`: the word going to the digital core.

  The testbench joins them through ideal models: an N-bit converter with
  range [−10 V, +10 V), and the multiplexer output wired straight to AB2.
* **The boundary-scan register contains only the three digital-pin cells and
  the digital detector.** A full 1149.4 device would also have the analog
  boundary modules' control cells and the TBIC control register in it, and the
  scan vectors would grow accordingly.
* **Opcodes** other than 05h, 06h, 08h and FFh are assigned here.
* **The comparator rules** for all conditions except =A, the result codes,
  and FA/FB are this implementation's (see above).
* **The limit words of the case study** (011001101011 for −2 V,
  110011010101 for +6 V) are about 5 and 9 LSB above what an ideal ±10 V
  12-bit converter gives at those voltages (1638 and 3276). With the ideal
  model the thresholds land at about −1.98 V and +6.04 V.
* **The clock-stop flip-flop** toggles on the generator clock (D fed from
  Q̅), so the processor runs at half the generator frequency. VCO drives its
  asynchronous reset. Only "VCO high forces the clock low" is a requirement;
  the toggle is a choice.
* **Capture-DR of the configuration register** reloads the active
  configuration so that it can be read back. This is a choice.
* The cost estimate that goes with the design puts the detector at about
  119 two-input gates per digital register bit and 115 per analog register
  bit, plus the ADC.
