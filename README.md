# Built-in self-test for adders

An adder buried inside a larger block (here, the 48-bit three-port
adder/subtractor of an FPGA DSP slice) cannot be tested by an external tester
pin by pin, and its internal structure may not even be known. This design
tests such adders from a tiny on-chip test pattern generator (TPG): N+2
flip-flops and 2N XOR/XNOR gates produce, for an N-bit adder, a sequence of
2(N+2) operand/carry vectors that detects every single stuck-at fault in
ripple carry adders and in carry look-ahead (CLA) adders of several
structures, provided the CLA cells form their propagate signal with an OR
gate.

The RTL contains:

* the TPG itself (`bist_tpg`);
* four 48-bit adder structures it is meant for, built from the textbook CLA
  cell and 4-bit look-ahead carry unit (LCU);
* a model of a Virtex-4-style DSP slice whose adder is two CLA stages behind
  X/Y/Z multiplexers, and a sequencer (`dsp_bist_ctrl`) that delivers the TPG
  vectors to each stage through the only paths the slice offers;
* a top level, `adder_bist_top`, with both set-ups side by side.

The method follows the paper "On Built-In Self-Test for Adders", which
modifies an earlier twisted-ring-counter TPG and applies it to the Virtex-4
DSP adder. Where that description stops (reset, encodings, handshakes, order
of tests), the choices made here are listed under "Departures and choices".

## The test pattern generator

The generator is a twisted ring (Johnson) counter plus a little output logic.
Its state is an (N+1)-bit shift register `sreg[N:0]` and one more flip-flop
`ff`. On every enabled clock:

    sreg <= {sreg[N-1:0], ~ff}     // Q-bar of ff enters at bit 0
    ff   <= sreg[N]                // shift register output

For bit i of the adder (i = 0..N-1):

    A_i = XNOR(sreg[i], sreg[i+1]) XOR sreg[N]
    B_i = sreg[i+1]
    Ci  = ~ff                      // carry-in of the adder

From reset (all zeros) this gives, for N = 4 (columns A3..A0, B3..B0, Ci):

| # | A    | B    | Ci |
|---|------|------|----|
| 1 | 1111 | 0000 | 1 |
| 2 | 1110 | 0000 | 1 |
| 3 | 1101 | 0001 | 1 |
| 4 | 1011 | 0011 | 1 |
| 5 | 0111 | 0111 | 1 |
| 6 | 0000 | 1111 | 1 |
| 7 | 0000 | 1111 | 0 |
| 8 | 0001 | 1111 | 0 |
| 9 | 0010 | 1110 | 0 |
| 10 | 0100 | 1100 | 0 |
| 11 | 1000 | 1000 | 0 |
| 12 | 1111 | 0000 | 0 |

and then repeats. B is a Johnson count: ones fill in from the bottom, then
zeros do. A is set where neighbouring shift-register bits agree, inverted in
the second half of the period. The carry-in is 1 in the first half and 0 in
the second.

**Why the extra flip-flop.** The earlier form of this generator closes the
ring through an inverter instead of `ff`: an (N+1)-stage counter with period
2(N+1). It produces rows 1-5 and 7-11 only. Rows 6 and 12 exist only because
`ff` delays the inversion by one clock: for one cycle the carry-in keeps its
old value while A and B have already switched halves. Row 1 applies A = 1..1, B = 0..0 with carry-in 1, and row 7 applies
A = 0..0, B = 1..1 with carry-in 0. Rows 12 and 6 apply the same two operand
pairs with the opposite carry-in: every bit propagates, and the carry-in has
to travel the whole adder or must not appear at the end. Without them a few
faults stay undetected. The published fault simulation of 48-bit adders reports:

| 48-bit adder | gate delays | stuck-at faults | 2(N+1) vectors | 2(N+2) vectors |
|--------------|-------------|-----------------|----------------|----------------|
| ripple carry | 96 | 1296 | 99.9% | 100% |
| ripple CLA | 28 | 1392 | 99.9% | 100% |
| ripple LCU | 12 | 1542 | 99.9% | 100% |
| multi-stage LCU | 10 | 1506 | 99.9% | 100% |

`tb/tb_fault_coverage.sv` repeats this experiment on gate-level netlists of
the four adders. The netlists are built inside the testbench from the same
equations as the RTL, and the vectors are taken from the `bist_tpg` RTL. It
gives the same picture:

| 48-bit adder | stuck-at faults | 2(N+1) vectors | 2(N+2) vectors |
|--------------|-----------------|----------------|----------------|
| ripple carry | 1538 | 99.87% | 100% |
| ripple CLA | 2306 | 99.91% | 100% |
| ripple LCU | 2564 | 99.92% | 100% |
| multi-stage LCU | 2612 | 99.92% | 100% |
| multi-stage LCU, XOR-type propagate | 2420 | 93.60% | 93.64% |

The fault counts differ from the published ones because the netlist form
differs. Faults are stuck-at-0/1 on every net, plus every gate input whose
net fans out.

The method does not cover everything: with XOR-type propagate
(`PKIND = P_XOR`) some CLA faults stay undetected.

`bist_tpg` adds two ports to that structure. `ce` is a clock enable that
freezes the whole state, so a vector can be held for several cycles. `last`
flags the final vector of the period (`sreg` all zero, `ff` = 1), which the
DSP sequencer uses to end a stage.

## The adders

All CLA structures are built from two leaf modules:

* `cla_adder_cell`: one bit. With OR-type propagate (default, `P_OR`):
  `S = A^B^C, P = A|B, G = A&B`. With XOR-type propagate (`P_XOR`):
  `P = A^B, S = P^C, G = A&B`.
* `lcu4`: four-bit look-ahead carry unit. It computes `C1..C4` as two-level
  sums of products of `P0..P3, G0..G3, C0`, and the group signals
  `PG = P0P1P2P3` and `GG = G3 + G2P3 + G1P2P3 + G0P1P2P3`.

`cla4` is four cells and one LCU. The wide structures differ only in how
groups are joined:

| module | structure for 48 bits |
|--------|-----------------------|
| `ripple_carry_adder` | 48 full adders, carry rippled bit to bit |
| `ripple_cla_adder` | 12 `cla4`, each LCU's C4 feeding the next LCU's C0 |
| `ripple_lcu_adder` | 3 `cla16`, each second-level LCU's C4 feeding the next block |
| `multistage_lcu_adder` | 12 `cla4` + 3 second-level `lcu4` + 1 third-level `lcu4` |

`cla16` is the two-level block: four `cla4` report PG/GG to a second-level
LCU, which returns their carry-ins and the block carry-out. In the
multi-stage adder the third-level LCU has only three groups behind it; its
fourth input is tied to P = G = 0 and the carry-out is its C3. `cla_adder`
wraps all four structures behind one `ARCH` parameter.

## The DSP application

### The slice

`dsp_slice` models the part of a Virtex-4 DSP48 slice that surrounds the
adder:

    X mux: 0s | A*B | P | A:B        (OPMODE[1:0])
    Y mux: 0s | (A*B partner) | C    (OPMODE[3:2])
    Z mux: 0s | P | C                (OPMODE[6:4])
    P <= Z +/- (X + Y + CIN)         (SUBTRACT chooses -)

The 18x18 multiplier (`dsp_multiplier`) is a plain signed multiply. The
adder/subtractor (`dsp_adder2`) is two 48-bit CLA stages: the top stage adds
X, Y and CIN; its sum is XORed with SUBTRACT and added to Z by the bottom
stage, whose carry-in is SUBTRACT. That gives Z + (X+Y+CIN) or
Z - (X+Y+CIN) in two's complement. The stage structure is the multi-stage
LCU by default (`ARCH`).

### Getting 97-bit vectors into the adder

A test vector for one stage is 48 + 48 + 1 = 97 bits. The slice's only
48-bit inputs to the adder are the C port and the P register fed back, so
each vector takes two clocks. In the first clock (load), one operand goes
through the adder into P. In the second clock (apply), P and the C port
together deliver both operands:

| stage under test | cycle | X | Y | Z | carry bit on |
|------------------|-------|---|---|---|--------------|
| top adder | load | 0s | 0s | C = A | - |
| top adder | apply | P | C = B | 0s | CIN |
| bottom adder | load | 0s | C = A or ~A | 0s | - |
| bottom adder | apply | P | 0s | C = B | SUBTRACT |

Testing the bottom stage has one trap. In the apply cycle the top stage
passes P through unchanged, but the slice then XORs it with SUBTRACT before
the bottom stage sees it. So when the vector's carry bit (driven on SUBTRACT)
is 1, the sequencer loads the inverted operand `~A`. The bottom stage then
receives exactly A, B and carry-in Ci.

Either way the fault-free response is simply `A + B + Ci` (mod 2^48), for
both stages, and it appears in P in the clock after the apply cycle.

Does this indirect access still catch every fault? `tb_fault_coverage`
answers it for the whole adder/subtractor: both multi-stage LCU stages and the
SUBTRACT XORs between them, as one gate-level netlist. It runs the netlist
cycle by cycle through the schedule above, with P as the only observed output,
since the slice has no carry-out, so logic that only feeds a carry-out is
dropped. Of 5080 stuck-at faults on 838 gates, all are detected. A fault that
corrupts the load cycle is caught too, because the wrong P is read back in the
apply cycle.

### The sequencer

`dsp_bist_ctrl` holds a `bist_tpg` and runs it with `ce` high only in apply
cycles, so the generator advances once per two clocks. A one-cycle `start`
begins a run. The run covers all 100 vectors on the top stage, then all 100
on the bottom stage: 400 clocks for N = 48, or 8(N+2) in general. `busy`
covers the run; `done` stays high afterwards until the next `start`.

No response analyser is included. In the cycle after each apply, the
sequencer raises `resp_valid` and presents the vector (`resp_a`, `resp_b`,
`resp_ci`) and the stage (`resp_stage`). Whatever checks the slice can
compare P with `resp_a + resp_b + resp_ci`, or compare several slices
against each other. A concurrent assertion checks that the generator only
advances in apply cycles.

## Top level

`adder_bist_top #(N = 48)` holds both set-ups:

* **Direct access:** one `bist_tpg` drives all four 48-bit adder structures
  in parallel (`tpg_ce` enables it). The generator vector and every adder's
  sum and carry-out are outputs.
* **DSP:** `dsp_slice` plus `dsp_bist_ctrl`. `bist_mode = 1` hands OPMODE, C,
  CIN and SUBTRACT to the sequencer and holds A and B at 0.
  `bist_mode = 0` connects the external `dsp_*` ports for normal use.
  `bist_start` is honoured only in BIST mode.

All resets are synchronous and active high; the clock is a single `clk`
(rising edge).

## Files

| file | contents |
|------|----------|
| `rtl/adder_bist_pkg.sv` | propagate kind, adder structure, OPMODE types and the OPMODE constants of the adder-test schedule |
| `rtl/cla_adder_cell.sv`, `rtl/lcu4.sv`, `rtl/cla4.sv`, `rtl/cla16.sv` | CLA building blocks |
| `rtl/ripple_carry_adder.sv`, `rtl/ripple_cla_adder.sv`, `rtl/ripple_lcu_adder.sv`, `rtl/multistage_lcu_adder.sv` | the four adder structures |
| `rtl/cla_adder.sv` | structure selected by parameter |
| `rtl/bist_tpg.sv` | test pattern generator |
| `rtl/dsp_multiplier.sv`, `rtl/dsp_adder2.sv`, `rtl/dsp_slice.sv` | DSP slice model |
| `rtl/dsp_bist_ctrl.sv` | DSP adder test sequencer |
| `rtl/adder_bist_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fault_coverage.sv` | stuck-at fault simulation of the generator's vectors on gate-level models of the four adders and of the DSP adder/subtractor |

## Simulating

Every testbench prints one line `TB_RESULT checks=<n> failures=<m>` and
stops itself; each has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/adder_bist_pkg.sv tb/tb_adder_bist_top.sv --top-module tb_adder_bist_top
    ./obj_dir/Vtb_adder_bist_top

Replace the testbench name to run another one. `tb_fault_coverage` takes about
half a minute; the others finish in well under a second.

`tb_adder_bist_top` is the end-to-end test at the default size (N = 48). It
does the following:

* runs the direct TPG through two full periods and a hold, checking all four
  adders on every vector;
* uses the slice functionally (multiply-accumulate, subtract, A:B);
* makes a full BIST run, checking all 200 responses and, in every apply
  cycle, that the stage under test receives exactly the generator's
  (A, B, Ci);
* switches back to functional use, then makes a second BIST run.

It counts each mechanism and fails if any never happened: the two vectors
that need the extra flip-flop, hold, wrap-around, top- and bottom-stage
responses, subtract-mode (inverted-load) responses, mode switches and
completed runs.

## What is verified

* Each module's testbench compares it with an independent reference: integer
  arithmetic for the adders and the slice; the serial carry recurrence for
  `lcu4`. For `bist_tpg`, the reference is the 12-vector table above (N = 4)
  and a closed-form Johnson-count model (N = 48).
* `tb_dsp_bist_ctrl` checks the OPMODE of every cycle against the schedule
  above, the operand inversion, the run length (400 clocks) and each response,
  using a behavioural model of the datapath.
* Each testbench has been run against a deliberately broken copy of its
  module and caught it. For `bist_tpg` the broken copy is the older
  inverter-closed generator.
* `tb_fault_coverage` checks stuck-at coverage, as tabulated above: 100% for
  the four OR-propagate adders with the full sequence, and below 100%
  without the two added vectors, and 100% for the DSP adder/subtractor under
  the two-cycle schedule. The netlists it fault-simulates are
  testbench models, checked fault-free against the RTL adders. They are not a
  synthesized netlist of the RTL.

## Departures and choices

These are not fixed by the method and were chosen here:

* **OPMODE encoding.** The Virtex-4 convention is used: X 00/01/10/11 =
  0/product/P/A:B; Y 00/01/11 = 0/product partner/C; Z 000/010/011 = 0/P/C.
  Codes for inputs this model lacks (cascade input, shifted P) select 0s.
* **Product routing.** The product is sign-extended and placed whole on X;
  Y's product code adds 0. So OPMODE X = Y = 01 adds A*B once.
* **Registers.** A:B is zero-extended. Only the P register is modelled, not
  the slice's optional input and pipeline registers.
* **Adder structure.** The real slice's adder structure is undocumented. The
  default is the multi-stage LCU, and `ARCH` selects any of the four.
* **Operand routing.** Operand A goes through P and B through the C port.
  The top stage is tested first.
* **Reset.** Reset is synchronous and active high. The TPG resets to all
  zeros, which makes row 1 the first vector.
* **Added interfaces.** The clock enable gates the TPG's extra flip-flop as
  well as the shift register. The `last` flag, the `bist_mode` switch and the
  response-reporting ports are additions of this design.
* **Width limits.** The multi-stage adder supports widths that are a
  multiple of 4, up to 64 bits. `ripple_lcu_adder` needs a multiple of 16.
* **Not modelled.** A pass/fail response analyser, and the distribution of
  vectors to the many DSP slices of a device.
