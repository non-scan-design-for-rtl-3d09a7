# SPC two-pattern testable LWF data path (non-scan DFT)

A path delay fault is found by applying two input vectors in consecutive clock
cycles, V1 then V2, to the start of a combinational path, and capturing the
response one clock after V2. Scan can place any vector pair into the registers,
but it costs area and a long shift time for every test. This design uses no
scan. Instead it adds a few multiplexers and hold functions to a register-transfer
level data path. With them, every RTL path can receive a *single-port-change*
(SPC) two-pattern test straight from the primary inputs, and its response can
be shifted out to a primary output.

An RTL path runs from a PI or a register, through combinational elements only,
to a register or a PO. An SPC test changes only the port where the path under
test (the *on-path*) starts, between V1 and V2. Every other port of the
combinational block stays the same. This matters most for the other operand of
a two-input module on the path (the *off-path*), which must hold one value for
both cycles.

An SPC test still contains the classic single-input-change test. That test is
known to exist for every robustly or non-robustly testable gate-level path, so
restricting to SPC tests costs no coverage of those faults. What SPC saves is
hardware: the DFT only has to make one port change at a time, not every port of
the block independently.

The RTL here is the LWF benchmark data path, a 16-bit circuit with 2 inputs,
2 outputs, 5 registers and 19 RTL paths, with these DFT elements added. The
building blocks are kept generic so they can be reused on other data paths:
registers with and without hold, MUXes, and mask elements.

## The data path

```
            PI1                     PI2
             |                       |
   +---------+----------+    +-------+----------------------+
   |         |          |    |       |                      |
   |   m1 = m1_sel ? R1 : PI1        m3 = m3_sel ? R2 : PI2 |
   |   m2 = m2_sel ? R1 : m1         m4 = m4_sel ? R3 : m3  |
   |         |                       |                      |
   |         +------> Add1 <---------+                      |
   |                   |                                    |
   |                   +--> R5 --> PO1                      |
   |                   |                                    |
   |   m5 = m5_sel ? Mult1 : Add1      Mult1 = R1 * K       |
   |   R1 <= tmux_sel ? PI2 : m5   (DFT MUX, hold on R1)  <-+
   +-> R2 <= PI1                   (hold)
       R3 <= PI2                   (hold)
       R4 <= Add2 = R1 + R2        (hold)  --> PO2
```

| register | fed from          | hold function            | read by              |
|----------|-------------------|--------------------------|----------------------|
| R1       | m5, or PI2 in test | added by the DFT         | m1, m2, Add2, Mult1  |
| R2       | PI1               | yes (original)           | Add2, m3             |
| R3       | PI2               | yes (original)           | m4                   |
| R4       | Add2              | yes (original)           | PO2                  |
| R5       | Add1              | none: loads every clock  | PO1                  |

The 19 RTL paths are as follows:
- PI1-R2.
- PI1-m1-m2-Add1, ending at R5 or, through m5, at R1.
- PI2-R3.
- PI2-m3-m4-Add1, ending at R5 or R1.
- R1-m1-m2-Add1 and R1-m2-Add1, each ending at R5 or R1.
- R1-Add2-R4.
- R1-Mult1-m5-R1.
- R2-Add2-R4.
- R2-m3-m4-Add1, ending at R5 or R1.
- R3-m4-Add1, ending at R5 or R1.
- R4-PO2 and R5-PO1.

## What the DFT adds, and why

**The test MUX in front of R1 (`tmux_sel`).** R1 sits on a self-loop,
R1-m1-m2-Add1-m5-R1 (and R1-Mult1-m5-R1). There is no MUX between the adder and
R1 whose other input reaches a PI without first going around the loop.
Nothing from outside can therefore place two chosen vectors into R1 on
consecutive cycles, and a hold function cannot help. A MUX is inserted between
m5 and R1, and its second input is wired to PI2. This creates the control path
PI2-MUX-R1, with a sequential depth of 1.

**The hold function on R1 (`r1_ld`).** Take the path R2-Add2-R4. Its launch
vectors come over PI1-R2. The off-path value must sit in R1 for both test
cycles. The DFT loads that value into R1 once, over the test MUX, then holds it
while R2 receives V1 and V2. The hold is a feedback MUX in front of R1's
flip-flops, the same element as in R2, R3 and R4.

**Thru functions.** Tests and responses often have to pass an adder
unchanged. The other operand is then held at 0, which gives the adder a *thru
function*. In this data path a PI can always supply that 0:
- PI1 through m1 and m2 reaches Add1's left operand.
- PI2 through m3 and m4 reaches Add1's right operand.
- R1 or R2 can be loaded with 0 and held for Add2.

So no extra hardware is needed for the adders. For data paths where no such
*support path* exists, the top level can build in extra elements:
- `ADD_THRU_MASKS = 1` puts a mask element on each of the four adder operands.
  A mask element forces its line to a constant under a control bit.
- `MULT_THRU_BYPASS = 1` adds a MUX that bypasses Mult1. Mult1 has only one
  data input, so a constant cannot give it a thru function.

Both parameters default to 0, because LWF needs neither.

## Applying an SPC two-pattern test

A test on a path through a two-input module needs two control paths from the
PIs. C1 carries V1 and V2 to the on-path register. C2 carries the stable
off-path value. If C1 and C2 share a PI, the values can collide in time. A pair
works if and only if one of these holds. Here C1' and C2' are the parts after
the point where the two paths split.

1. C1 and C2 share nothing.
2. C1' and C2' differ in register depth by at least 2.
3. C1' contains at least two hold registers. V1 and V2 are parked there while
   the PI delivers the off-path value.
4. C2' contains a hold register. The off-path value is parked there, then V1
   and V2 follow.
5. C1' has a hold register and C2' is exactly one register deeper.

Every test in this design uses condition 1 or condition 4. The table below
gives the procedure for each path, as used in `tb/tb_lwf_spc_dft.sv`. Vectors
are V1 = a and V2 = b on the on-path, and c on the off-path. "Edge" means a
rising clock edge.

| path                          | launch                                 | off-path                               | captured | observed at |
|-------------------------------|----------------------------------------|----------------------------------------|----------|-------------|
| PI1-R2, PI2-R3                | a, b on the PI                         | none                                   | b        | PO1 over m3/m4 or m4, Add1 (+0 from PI1) |
| PI1/PI2-...-Add1-R5/R1        | a, b on the PI                         | other PI held at c (cond. 1)           | b + c    | PO1 directly, or from R1 over m2-Add1 |
| R1-(m1-)m2-Add1-R5/R1         | R1 loaded a, b over PI2-MUX-R1         | R2 = c from PI1 over m3 (cond. 1)      | b + c    | as above    |
| R1-Add2-R4                    | R1 loaded a, b over PI2-MUX-R1         | R2 = c from PI1 (cond. 1)              | b + c    | PO2         |
| R1-Mult1-m5-R1                | R1 loaded a, b over PI2-MUX-R1         | none (constant)                        | b * K    | PO1 over m2-Add1 |
| R2-Add2-R4                    | R2 loaded a, b from PI1                | R1 = c, **held** (cond. 4)             | b + c    | PO2         |
| R2-m3-m4-Add1-R5/R1           | R2 loaded a, b from PI1                | R1 = c over m2, **held** (cond. 4)     | b + c    | PO1         |
| R3-m4-Add1-R5/R1              | R3 loaded a, b from PI2                | PI1 held at c over m1/m2 (cond. 1)     | b + c    | PO1         |
| R4-PO2, R5-PO1                | a then b into R4 (R1 = 0) or R5 (PI2 = 0) | none                                | b        | PO2 / PO1   |

Timing of one register-launched test:
- **Edge 0.** The on-path register takes V1 and the off-path register takes c.
- **Edge 1.** The on-path register takes V2 and the off-path register holds.
- **Edge 2.** The ending register captures. At speed, this is the edge that
  detects a slow path.

The test then takes one more cycle to reach the PO if it was captured in R1 or
R2. A test launched from a PI is one cycle shorter.

Simulation here is at the register-transfer level. It checks that the right
values are launched, kept stable and captured, and that the SPC property holds
at the module operands. It does not model gate delays, so it cannot show a delay
fault being detected.

## Control word

`spc_dft_pkg::lwf_ctrl_t` is a packed struct of 15 control bits:
- `m1_sel` … `m5_sel` and `tmux_sel`.
- `r1_ld` … `r4_ld`.
- `mask_add1_a`, `mask_add1_b`, `mask_add2_a`, `mask_add2_b`.
- `mult_thru`.

Select 0 takes the first input listed in the diagram above, and select 1 takes
the second. A load enable of 1 loads the register, and 0 holds it. The mask and
bypass bits have no effect unless their parameter is set.
`spc_dft_pkg::LWF_CTRL_IDLE` is normal operation with every register loading.

The data path has no controller of its own, and all controls are primary
inputs. In a complete chip, a functional controller would drive them in normal
operation and a test sequencer in test mode. Neither is included.

## Files

| file | content |
|------|---------|
| `rtl/spc_dft_pkg.sv` | default width, control-word struct |
| `rtl/mux2.sv` | 2:1 MUX (data path MUXes, DFT MUX, bypass MUX, hold feedback) |
| `rtl/hold_reg.sv` | register, with (`HOLD=1`) or without hold function |
| `rtl/op_add.sv` | adder, `W`-bit result |
| `rtl/op_mult_const.sv` | multiplier by constant `K`, `W`-bit result |
| `rtl/mask_element.sv` | mask element forcing an operand to constant `C` |
| `rtl/lwf_spc_dft.sv` | top: LWF data path with DFT elements |
| `tb/lwf_model_pkg.sv` | cycle-level reference model used by the top-level testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_lwf_spc_dft_thru` |

Top-level parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `BW` | 16 | width of every data line (the benchmark is also published at 8) |
| `MULT_K` | 3 | Mult1 constant (the benchmark's coefficient is not published; chosen here) |
| `ADD_THRU_MASKS` | 0 | build mask elements on the adder operands |
| `MULT_THRU_BYPASS` | 0 | build the Mult1 bypass MUX |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends the run with a failure if the testbench hangs. Example, from the
project root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  --top-module tb_lwf_spc_dft rtl/spc_dft_pkg.sv tb/lwf_model_pkg.sv tb/tb_lwf_spc_dft.sv
./obj_dir/Vtb_lwf_spc_dft
```

The unit testbenches (`tb_mux2`, `tb_hold_reg`, `tb_op_add`, `tb_op_mult_const`,
`tb_mask_element`) build the same way without the model package.

- **`tb_lwf_spc_dft`** runs the top at its default parameters.
  - It applies the SPC test of all 19 paths 40 times, each time with fresh
    random vectors.
  - For each test it checks:
    - that the on-path operand changed while the off-path operand did not;
    - the captured value against the arithmetic;
    - the value reaching the PO.
  - It then runs 3000 cycles of random control words. Every register is
    compared with the reference model after every clock.
  - It counts each mechanism and fails if any never occurred:
    - holds of R1;
    - loads over the test MUX;
    - the Mult1 route into R1;
    - thru functions supplied by a PI;
    - condition-1 tests;
    - condition-4 tests.
  - It runs in well under a second.
- **`tb_lwf_spc_dft_thru`** builds the top at 8 bits with both thru options on.
  - It uses every mask element and the Mult1 bypass on known values.
  - It then runs random control words, including the mask and bypass bits,
    against the model.

Removing the hold function from R1 makes `tb_lwf_spc_dft` fail. This returns
the data path to its state before DFT, and the tests that keep the off-path
value in R1 can no longer be applied.

## Limits and departures

- **No CUP pruning.** A path can be *control-dependent untestable* in normal
  operation: the controller never launches a value at its start in one state
  and captures it at its end in the next. The method drops such paths from the
  test set. That needs the controller's state table, which is not available
  for LWF, so all 19 paths are treated as targets. Their tests are applied
  through the DFT control inputs.
- **Hold on R1 and Theorem 1.** R2-Add2-R4 is the example that motivates the
  hold on R1. Its control paths PI1-R2 and PI2-MUX-R1 start at different PIs,
  so on their face they already meet condition 1. The hold on R1 is built
  anyway, matching the published result for this circuit, and the testbench
  uses it (condition 4).
- **Guessed values.** The constant of Mult1, the reset (asynchronous,
  active-low, to 0) and the select polarities are this design's choices.
  Products and sums are cut to the line width, since all lines share one
  width.
- **Test application time is not reproduced.** The published cycle counts for
  LWF (38,913 cycles at 8 bits and 1,638,660 at 16 bits) depend on how many
  ATPG patterns each block needs, and those counts are not available. The
  per-test cycle counts above are what this data path needs for each pattern.
- **Paulin, RISC and MPEG.** The method was also evaluated on these data paths,
  but their structure is not published, so only LWF is built.
- **Mask and bypass options.** The LWF circuit needs neither option; they
  default to off.
