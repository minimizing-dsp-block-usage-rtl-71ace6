# Multi-pumped DSP block (mpDSP)

An FPGA DSP slice can be clocked about twice as fast as the logic of a large
design around it: roughly 470 MHz on a Virtex-6 slice, against 150–250 MHz
for the logic. The **mpDSP** uses that headroom to do two DSP operations per
system clock cycle on one slice. Its clock `clk2` runs at exactly twice the
system clock `clk1`. The slice handles the first operand set in the first
half of each system cycle and the second set in the second half. From the
surrounding logic, the block looks like two independent DSP units with a
fixed 3-cycle latency, each accepting a new operation every cycle.

Earlier multi-pumping schemes used only the multiplier of the slice, so every
addition had to be built in LUTs. Here the whole slice is multi-pumped: the
25-bit pre-adder, the 25 × 18 multiplier and the 48-bit ALU. Each of the two
operations is therefore

```
AD = D + A   |  D - A  |  A            (pre-adder, optional)
M  = AD * B                            (signed 25 x 18, always used)
O  = C + M   |  C - M  |  M - C  |  M  (ALU, optional)
```

with A 30 bits (its low 25 bits are used), B 18 bits, C 48 bits, D 25 bits
and O 48 bits. All values are two's complement and wrap at their widths.

## Block structure

```
            clk1 domain              |                 clk2 domain
                                     |
 i1 = (A1,B1,C1,D1) ──┐              |
                      ├─► mpdsp_in_mux ─► A,B,D ──────────────► dsp48e1_core ─► P ─► mpdsp_out_demux ─► o1, o2
 i2 = (A2,B2,C2,D2) ──┘      ▲       |   C ─► c_align (2 regs) ─►   (4 stages)          ▲
                             │       |                                                   │
 clk1 ─► clk1_follower ──────┴───────┴──────────── second_half ──────────────────────────┘
```

| module | role |
|---|---|
| `mpdsp` (top) | Wires the parts together and turns the `PRE_OP` / `ALU_OP` parameters into constant INMODE, OPMODE and ALUMODE words. |
| `clk1_follower` | Clk2-domain register that is 0 in the first half of every Clk1 cycle and 1 in the second. |
| `mpdsp_in_mux` | Picks `i1` or `i2` for the slice. It drives C or D to zero when the ALU or pre-adder is unused, so that no multiplexer is built for them. |
| `c_align` | Two 48-bit Clk2 registers that delay C so it reaches the ALU together with its product. |
| `dsp48e1_core` | Synthesizable equivalent of the DSP48E1 features used here: pre-adder, multiplier, X/Y/Z multiplexers and ALU, with four pipeline stages. |
| `mpdsp_out_demux` | Splits the double-rate result stream back into `o1` and `o2`. |
| `mpdsp_pkg` | Widths, the `operands_t` struct, the configuration enums and the control-word encodings. |

## Clocking and the Clk1 follower

This is the part of the design that needs the most care.

`clk2` must come from the same clock manager as `clk1`. It must run at exactly
twice the frequency of `clk1`, and every rising edge of `clk1` must coincide
with a rising edge of `clk2`. The block does not generate these clocks.

The operand multiplexers must switch at the middle of each system cycle.
Using `clk1` itself as the multiplexer select would feed a clock net into
data logic and risk hold-time violations. Instead, `clk1_follower` rebuilds
the phase as an ordinary `clk2` register:

* a flip-flop clocked by `clk1` toggles every cycle;
* a `clk2` register samples it;
* the XOR of the two is registered as `second_half`.

At a `clk2` edge that falls on a `clk1` edge, the sample was taken half a
cycle earlier and already equals the toggle, so `second_half` becomes 0. At
a mid-cycle edge the toggle has just changed, so `second_half` becomes 1.
The follower therefore re-aligns itself one `clk2` cycle after reset. Reset
sets the sample to the opposite of the toggle's reset value. This makes the
first mid-cycle edge after reset already read "second half". `mpdsp`
asserts that `second_half` alternates on every `clk2` cycle.

## Pipeline and timing

Let T be the `clk1` period. Operands launched by `clk1` registers at edge k
(time 0) move through the block as follows:

| clk2 edge | second_half before edge | what is captured |
|---|---|---|
| 0 (clk1 edge k) | – | `i1`, `i2` launched by clk1 logic |
| T/2 | 0 | slice stage 1 ← A1, B1, D1; `c_align` ← C1 |
| T | 1 | stage 1 ← set 2; stage 2 (AD, B2) ← set 1 |
| 3T/2 | 0 | stage 3 (M) ← set 1, with C1 in the slice's C register |
| 2T | 1 | stage 4 (P) ← result 1 |
| 5T/2 | 0 | P ← result 2; `o1` register ← result 1 |
| 3T (clk1 edge k+3) | 1 | clk1 logic samples `o1` = result 1 and `o2` = P = result 2 |

* **Latency:** 3 system cycles. Operands launched at edge k are sampled as
  results at edge k+3.
* **Throughput:** one pair of operations every system cycle, with no stalls.
  The block has no valid/ready handshake. Results for the operands
  launched at edge k are on the outputs at edge k+3.
* **C input:** the slice's four stages bring the product to the ALU three
  `clk2` cycles after A, B and D are captured. C has only one register
  inside the slice, so `c_align` adds two more. These two registers sit
  after the multiplexer, so they cost 2 × 48 flip-flops rather than 4 × 48.
  They are built only when the ALU is used.
* **`o2`** is the slice's P register itself, not a copy. P still holds
  result 2 when `clk1` samples it. Consumers must therefore sample `o1` and
  `o2` with `clk1` registers only.

Outside the slice, the block has 48 (`o1`) + 3 (follower) = 51 flip-flops,
plus 96 for C alignment when the ALU is used.

## Configurations

The configuration is fixed when the block is built, through two parameters
of type `mpdsp_pkg::pre_op_e` and `mpdsp_pkg::alu_op_e`:

| sub-blocks | `PRE_OP` | `ALU_OP` | function |
|---|---|---|---|
| multiplier only | `PRE_OFF` | `ALU_OFF` | `A*B` |
| pre-adder + multiplier | `PRE_ADD` / `PRE_SUB` | `ALU_OFF` | `(D±A)*B` |
| multiplier + ALU | `PRE_OFF` | `ALU_ADD` / `ALU_SUB` / `ALU_RSUB` | `C+A*B`, `C-A*B`, `A*B-C` |
| all three (default) | `PRE_ADD` | `ALU_ADD` | `C+(D+A)*B` |

`C_ALIGN_STAGES` (default 2) is the depth of the C delay. It should be
changed only together with the slice's pipeline.

The control-word encodings are those of the DSP48E1, built by functions in
`mpdsp_pkg`:

* INMODE: bit 2 enables D, bit 3 makes the pre-adder subtract.
* OPMODE: X = Y = M, and Z = C or 0.
* ALUMODE: `0000` for add, `0011` for C − M, and `0001` with carry-in 1 for
  M − C.

## The DSP slice model

`dsp48e1_core` is plain RTL. The design therefore simulates with any
simulator and synthesizes without vendor libraries. On a Xilinx device,
synthesis is expected to infer a DSP slice from it, or the module can be
replaced by a direct DSP48E1 instantiation with the same ports. It models:

* INMODE bits 1 to 3 (A gating, D enable, pre-adder subtract);
* X ∈ {0, M, P}, Y ∈ {0, M, all ones, C} and Z ∈ {0, P, C};
* the four arithmetic ALU modes;
* AREG = DREG = ADREG = MREG = CREG = PREG = 1 and BREG = 2.

It leaves out the features the mpDSP never uses: cascade ports, pattern
detection, SIMD, logic-unit ALU modes, the A:B path, clock enables and
separate resets. Assertions fire if a control code selects one of them.
Lint tools report `a[29:25]` as unused, because only the low 25 bits of A
feed the multiplier.

## Where this RTL makes its own choices

The following points are not fixed by the published description of the
technique and were chosen here:

* The operand format (two's complement) and the add/subtract options of
  each sub-block.
* The follower circuit, described under "Clocking and the Clk1 follower".
* Using P directly as `o2`. This, together with placing the C registers
  after the multiplexer, matches the 51- and 147-register counts reported
  for the block.
* One synchronous, active-high reset `rst`. It is driven from the `clk1`
  domain, held for at least one `clk1` cycle, and clears every register in
  both domains. Operations in flight during reset are lost.
* No P feedback (accumulation). With two interleaved operand streams it
  would mix their results.

The technique also covers a tool flow that does the following:

* builds a dataflow graph from an algorithm;
* splits it into DSP-slice configurations and logic add/sub nodes;
* schedules pairs of same-configuration nodes into the same cycle so they
  can share an mpDSP, breaking ties on the number of pipeline balancing
  registers;
* emits the datapath.

That flow is software and is not part of this RTL. The benchmark datapaths
it produced are not included either: they are filter and polynomial kernels
that use 3 to 10 mpDSPs each, and their dataflow graphs are not available.
Frequencies and LUT counts are FPGA implementation results. Nothing here
reproduces them. They also depend on the real slice rather than on the
model.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each testbench also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mpdsp` | Default top at full rate for 2000 system cycles with random operands, two fixed corner values and a mid-run reset. Each result is compared with a reference model exactly 3 cycles after its operands. It also counts how often each mechanism was exercised: both halves, a non-zero D through the pre-adder, a non-zero C through the ALU, negative results, back-to-back cycles and the first result after reset. |
| `tb_mpdsp_configs` | Seven configurations side by side: every sub-block combination plus the subtracting forms. |
| `tb_dsp48e1_core` | The slice against a cycle model across 14 control settings, including P feedback. |
| `tb_clk1_follower` | `second_half` equals the inverse of `clk1` after every `clk2` edge, including just after a reset. |
| `tb_mpdsp_in_mux`, `tb_c_align`, `tb_mpdsp_out_demux` | The remaining parts on their own. |

`mpdsp_tb_pkg` holds the reference arithmetic. The testbenches generate both
clocks from one process, which keeps their edges exactly aligned.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb rtl/mpdsp_pkg.sv tb/mpdsp_tb_pkg.sv tb/tb_mpdsp.sv \
  --top-module tb_mpdsp
./obj_dir/Vtb_mpdsp
```

To run another testbench, substitute its name. Testbenches that do not use
the reference package need only `rtl/mpdsp_pkg.sv` and their own file.
