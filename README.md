# FAMA: a carry-save DSP datapath with fused add-multiply-add units

DSP kernels are mostly chains of additions and multiplications, such as
`(x + y) * a + k`. A conventional datapath resolves every intermediate sum with
a carry-propagate adder before the next operation can use it, and that carry
chain sets the clock period. This design keeps every value in **carry-save (CS)
form**, a pair of two's complement numbers whose sum is the value, from the
moment it enters the datapath until it leaves. Additions become 4:2 compressor
rows with no carry chain. A multiplier that accepts a carry-save multiplicand
(through a carry-free signed-digit recoding) lets the chain continue through
multiplications too. Carries propagate in one place only: the CStoBin adder at
the output.

The computing element is the **Fused Add-Multiply-Add unit (FAMA)**:

    Z* = (X* ± Y*) × A ± K*        or        Z* = K* × A ± (X* ± Y*)

`X*`, `Y*`, `K*` and `Z*` are carry-save; `A` is a plain two's complement
number. A 4-bit configuration word selects the form and the signs. Several
FAMAs share a register bank of carry-save scratch registers through a crossbar.
A micro-programmed control unit plays a precomputed schedule: one
micro-instruction per cycle.

The RTL follows the published FAMA architecture's block structure, equations
and word length. The bit-level details that the architecture leaves open are
this design's own choices. These include the recoding rule, the widths, the
register bank, the instruction format and the handshakes. Each is marked
below and in the opening comment of its file.

## The FAMA unit (`rtl/fama.sv`)

```
 X*(c,s)  Y*(c,s)
     \      /
   [4:2 CS adder, ± by CL0] --> N*                K*(c,s)
         |                                           |
   [4-to-2 MUX, CL1: N* or K*] --> CS multiplier x A |
   [4-to-2 MUX, CL2: K* or N*] ----------------------+
         |                          |
   [4:2 CS adder, ± by CL3]  <------+   --> Z*(c,s)
```

The configuration register holds `CL3..CL0`. Its bit 0 is CL0.

| bit | name (`fama_cfg_t`) | 0 | 1 |
|-----|---------------------|---|---|
| CL0 | `sub_pre`  | N* = X* + Y* | N* = X* − Y* |
| CL1 | `mul_k`    | multiplicand N* | multiplicand K* |
| CL2 | `add_n`    | addend K* | addend N* |
| CL3 | `sub_post` | Z* = product + addend | Z* = product − addend |

All 16 words are legal, and the unit computes exactly what the table says.
Two words give the unit's defining equations: `CL2 CL1 = 00` gives
`N*×A ± K*`, and `CL2 CL1 = 11` gives `K*×A ± N*`. The five templates of the
operation library are reached through operand choice:

| template | shape | configuration | operands |
|---|---|---|---|
| T1 | (X±Y)·A ± K | CL2 CL1 = 00 | – |
| T2 | K·A ± (X±Y) | CL2 CL1 = 11 | – |
| T3 | (X±Y) ± K   | CL2 CL1 = 11 | A = 1 |
| T4 | (X±Y)·A     | CL2 CL1 = 00 | K* = 0 |
| T5 | K·A         | CL2 CL1 = 11 | X* = Y* = 0 |

The assignment of CL1 and CL2 to the two multiplexers, and the bit order, are
this design's reading. The architecture names the four lines but does not
say which line drives which multiplexer.

**Timing.** The configuration register (`fama_config_reg`) loads at a rising
edge when `cfg_load` is high. The arithmetic path from operands to `Z*` is
combinational.

**Widths.** The inputs are 16-bit rows. N* is kept at 18 bits and Z* at 34
bits, with every row sign-extended. Every one of the 16 functions is therefore
exact for all inputs: the value of Z* is `z_c + z_s` modulo 2^34, read as
signed.

### Subtracting in carry-save form (`cs_adder42`, `csa32`)

A 4:2 adder is two rows of full adders (3:2). To compute A* − B*, both rows of
B* are inverted, which yields −B* − 2. Each 3:2 level then puts a 1 into the
empty least significant bit of its carry row, which adds back the missing 2.
No carry ever propagates. The same adder with `sub` tied low is the building
block of the multiplier tree.

### The carry-save multiplier (`cs_multiplier`, `cs_sd_recoder`)

This is the least obvious part of the design. The multiplicand is carry-save,
and a normal multiplier would need its binary value first. The recoder instead
rewrites it directly as signed digits D_j ∈ {−1, 0, 1}. For each bit position
let h = c ⊕ s and g = c ∧ s. Then c + s = 2·(c ∨ s) − h, and regrouping the
terms by weight gives

    D_0 = −h_0
    D_j = (c_{j−1} ∨ s_{j−1}) − h_j          for 0 < j < N
    D_N = −g_{N−1}                           (two's complement sign weight)

Each digit depends on two bit positions only, so the recoding is a single
gate level with no carry. For an N-bit operand there are N+1 digits. Each
digit goes out in sign-magnitude form (`sgn`, `mag`).

Partial product j is `(A ⊕ sgn_j) · mag_j · 2^j`. A negative digit gives
the one's complement of A; the missing +1 sits in column j. These +1 bits sit
in different columns, so they are collected into one extra correction row.
For the 18-bit N* that makes 19 + 1 = 20 rows. A generated tree reduces them:
three levels of 4:2 adders (20 → 10 → 5 → 3) and one 3:2 level (3 → 2). The
product leaves the multiplier as two rows. The lower 4:2 adder of the FAMA
takes these two rows as its fixed inputs and the selected addend as its
configurable inputs.

The multiplier requires the value of its multiplicand to fit in NB-bit two's
complement. In the FAMA it always fits.

## The accelerator (`rtl/fama_accel.sv`)

```
              +--------------+        +-------------------+
 prog ------> | control_unit |------> | reg_bank (16 CS)  |
 start/done   +--------------+        +-------------------+
                 |  cfg words              |  all registers
                 v                         v
        +------------------ data_interconnect -----------------+
        |  X* Y* K* A            results Z* mod 2^16            |
        v                         ^                            v
   FAMA 0 .. FAMA NF-1 -----------+                 cs_to_bin (CStoBin)
                                                        |        |
 din --> register (as {word,0})              dout <-----+  register (as {word,0})
```

* **Register bank** (`reg_bank`): 16 registers, each a carry-save word of two
  16-bit rows. All registers are readable at once. There are NF+2 write ports
  (one per FAMA, the data port, CStoBin). Synchronous active-low reset clears
  them. If two ports write the same register in a cycle, an assertion fires.
* **Interconnect** (`data_interconnect`): a full crossbar. For each FAMA it
  selects the registers for X*, Y*, K* and A. It also forms the write ports.
* **CStoBin** (`cs_to_bin`): the only carry-propagate adder. It converts one
  register to binary, either for `dout` or to write back into the bank.
* **Control unit** (`control_unit`): a program memory of `PROG_DEPTH`
  micro-instructions and a two-state machine (idle / run).

### Number format in the bank

A register holds a value modulo 2^16: `(c + s) mod 2^16`. A FAMA result is
written back as the low 16 bits of each of its two rows, so kernels compute
wrapping 16-bit integer arithmetic. This result is exact modulo 2^16 because
addition, subtraction and multiplication all respect it. Keeping the *upper*
bits of each row separately would not be exact in carry-save form, so there is
no fixed-point rescaling on write-back. Full-precision results exist only on a
FAMA's own 34-bit outputs.

`A` must be a binary word: the FAMA takes the first row of the named register,
and an assertion checks that the second row is zero. Binary words come from
the data port or from the CStoBin write-back. Both store `{word, 0}`.

### Micro-instructions

A micro-instruction is the packed struct `{ctl_t ctl; fama_op_t [NF-1:0] op;}`,
116 bits for NF = 4. `op[NF-1]` sits right below `ctl`, and `op[0]` is in the
least significant bits. The fields are:

| field group | field | meaning |
|---|---|---|
| `ctl_t` | `last` | last instruction of the kernel |
| | `din_en`, `din_dst` | take a word from `din`, store it in `din_dst` |
| | `dout_en` | send CStoBin(`cb_src`) to `dout` |
| | `cb_we`, `cb_src`, `cb_dst` | store CStoBin(`cb_src`) in `cb_dst` |
| `fama_op_t` (one per FAMA) | `we`, `dst` | write Z* to `dst` |
| | `xs`, `ys`, `ks`, `as` | source registers of X*, Y*, K*, A |
| | `cfg` | configuration word |

Each instruction occupies the instruction register for one cycle. All reads
see the bank as it was at the start of that cycle, and all writes happen at
its end. A result can therefore be used by the very next instruction. The
next instruction's configuration words are loaded into the FAMAs' registers
at the same edge (`cfg_load`, `cfg_next`). An instruction with `din_en` waits
for `din_valid`, and one with `dout_en` waits for `dout_ready`. While it waits
nothing is written. A transfer happens when valid and ready are both high at
a rising edge. `done` pulses one cycle after the `last` instruction
completes. A run takes one cycle per instruction plus one per stall cycle.

Example: a two-tap product sum `y = h0·x0 + h1·x1`, with h0, h1 binary in r0,
r1, x0, x1 in r2, r3 and r15 = 0. It takes two instructions:

1. FAMA0: T4 (`cfg = 0000`), `xs = r2, ys = r15, ks = r15, as = r0`, writing r4.
2. FAMA0: T1 (`cfg = 0000`), `xs = r3, ys = r15, ks = r4, as = r1`, writing r5.
   Here r4 is still carry-save. `dout_en` with `cb_src = r5` can be issued in a
   third instruction.

The controller is generic: it runs any schedule written into its memory. An
off-line mapping step must produce that schedule. The step merges
add/subtract chains into templates, binds operations to FAMAs and allocates
registers. The step is not part of this RTL.

## Parameters

| parameter | default | where |
|---|---|---|
| `DATA_W` | 16 | `fama_pkg`; the architecture's word length |
| `NFAMA` / `NF` | 4 | `fama_pkg`, `fama_accel`; the number of units is a design-time choice |
| `NREG` | 16 | `fama_pkg`; own choice |
| `PROG_DEPTH` | 64 | `fama_accel`; own choice |
| `W` of `fama` | 16 | internal widths W+2 and 2W+2 follow from it |

The micro-instruction types in `fama_pkg` depend on `NREG`. Change register
count and word length in the package, and the unit count through `NF`.

## Departures from the source architecture and open points

* The reference RTL of the architecture uses a Modified Booth multiplier and
  separate negation multiplexers, with a carry-propagate adder at the unit's
  output. This design follows the architecture's description of the FAMA
  instead: signed digits in {−1, 0, 1}, sign selection inside the 4:2 adders,
  and a carry-save output.
* The width choices here are an 18-bit N* and a 34-bit Z* inside the unit,
  with modulo-2^16 write-back. The architecture's predecessor unit truncates
  the product to 17 bits and keeps its 16 most significant bits; that scheme
  is not reproduced.
* The CL1/CL2 assignment, the register bank size, the crossbar, the
  instruction format, the handshakes and all reset values are this design's
  choices.
* FAMAs do not chain into each other within a cycle. Every result passes
  through the register bank.
* No area, power or delay figures of the original are claimed for this RTL.

## Files

`rtl/`: `fama_pkg` (types), `csa32`, `cs_adder42`, `cs_mux`,
`cs_sd_recoder`, `cs_multiplier`, `fama_config_reg`, `fama`, `cs_to_bin`,
`reg_bank`, `data_interconnect`, `control_unit`, `fama_accel` (top).

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. They check:

* the adders, recoder and multiplier against integer arithmetic on random
  and extreme operands;
* `tb_fama`, all 16 configuration words with random operands, largest
  magnitudes and one fixed reference operand set, plus the five templates and
  configuration hold without load;
* `tb_control_unit`, the instruction sequence, stalls, `done` and the cycle
  count;
* `tb_fama_accel`, the top at its default size.

`tb_fama_accel` generates 30 random 48-instruction schedules and runs each
with randomly stalling ports. It compares every output word and the final
register contents with a modulo-2^16 reference model. It also counts the
mechanisms: each template, pre- and post-subtraction, input and output
stalls, carry-save results reused as operands, and CStoBin words used as A.
A mechanism that never occurs counts as a failure.

`tb_fama_fir` maps a real kernel by hand: a 4-tap FIR filter over 12 samples.
It uses four instructions per sample. The partial sums stay carry-save until
the output. The delay line is a ring of four registers, so the schedule needs
no copies. The test checks every output against direct convolution and checks
the cycle count. Its schedule-building code is a worked example of the
instruction format.

Simulate, for example:

```
verilator --binary --timing --assert --top-module tb_fama_accel \
  -y rtl -y tb +libext+.sv rtl/fama_pkg.sv tb/tb_fama_accel.sv
./obj_dir/Vtb_fama_accel
```

Every testbench finishes in seconds. Both Verilator's lint and the slang front
end of yosys accept every file in `rtl/`. The FAMA has been verified against
its arithmetic definition, not against timing or area of any technology.
