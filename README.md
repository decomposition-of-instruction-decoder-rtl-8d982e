# A decomposed instruction decoder for an ARM7TDMI-class control path

Programs use a small part of an instruction set most of the time. In typical
embedded code the three MOV forms alone make up roughly a fifth of all
executed instructions, and many instructions never run. A single
instruction decoder still switches as a whole on every instruction. This design
splits each decoder of the control path into two **coupled sub-decoders**:
one for the frequent instructions and one for the rest. Only one is on at a
time. The inputs of the other are frozen, so it does not toggle. A few gates
choose which half is on, freeze the idle half, and merge the two outputs. The
function is exactly that of the undecomposed decoder. Only the switching
activity, and with it the power, changes.

The RTL covers the control path only:

* an instruction register;
* the decomposed **instruction decoder**, which turns an ARM instruction into
  an 8-bit intermediate code;
* two decomposed **signal decoders**, which turn that code into the control
  signals of their pipeline stages;
* the registers that carry the code and the control signals down the
  pipeline.

The datapath these signals drive is not included.

## Decoding just in time: the intermediate code

Most of a RISC control word is only needed one or two stages after decode.
So the decode stage does not produce all the signals and pipe them along. It
identifies the instruction once, as a compact **intermediate code**. The
code travels down the pipeline in the *instruction state registers* (ISR).
Each stage that needs control signals decodes them from the code with its own
signal decoder. It stores them in *control-signal registers* (CSR) for the
stage after it.

In the ARM encoding the opcode fields sit in different places for different
instruction classes. Sixteen instruction bits are enough to tell every
supported type apart: `instr[27:20]` and `instr[11:4]`. These bits form the
**decode key**. The design supports 142 instruction types, so an 8-bit code
is enough:

| codes   | class | forms |
|---------|-------|-------|
| 0       | none  | bubble, or an opcode outside the 142 (BX, MRS/MSR, SWI, coprocessor, undefined) |
| 1–48    | data processing | 16 ALU ops (ARM opcode order AND…MVN) × {immediate, register shifted by immediate, register shifted by register}; code = 1 + 3·op + form |
| 49–54   | multiply | MUL, MLA, UMULL, UMLAL, SMULL, SMLAL |
| 55–78   | LDR word/byte | 55 + 3·(4·B + 2·R + U) + mode. R = register offset. mode: 0 = post-indexed, 1 = pre-indexed, 2 = pre-indexed with write-back |
| 79–84   | LDR halfword class | 79 + 3·I + mode (I = immediate offset) |
| 85–114  | STR | the same layout from 85 |
| 115–126 | LDM | 115 + 3·{P,U} + (0 plain, 1 write-back, 2 S bit) |
| 127–138 | STM | the same layout from 127 |
| 139–140 | SWP, SWPB | |
| 141–142 | B, BL | |

The class sizes (3 forms per ALU op, 6 for TST/TEQ together, 30 each for LDR
and STR, 12 each for LDM and STM, 2 for SWP, 1 each for B and BL) follow the
instruction-count profile the method was designed for. The split of a class
into its forms is this design's own choice. So is the numbering.

Some fields are not part of the type: the condition field, register numbers,
shift amounts, the S bit of ALU ops, and the U bit and the sign/size of
halfword transfers. The datapath takes them straight from the instruction
register, which is a port of the top. A post-indexed word/byte transfer with
W = 1 (the user-mode "T" form) decodes as the plain post-indexed type.

**Code 0 is reserved for "no instruction"**, and every decoder outputs an
all-zero word for it. The decomposition relies on this, as the next section
shows.

## Splitting a decoder in two

Each decomposed decoder (`instr_decoder`, `signal_decoder`) has the same four
parts:

```
               +--------------------+
input ----+--->| activate control   |--- control0, control1 (0 = on)
          |    +--------------------+         |            |
          |                                   v            v
          +----> input_gate (FORCE0) ---> sub-decoder 0 --+
          |                                               OR ---> output
          +----> input_gate (FORCE1) ---> sub-decoder 1 --+
```

1. **Activate control** decides which half handles the current input. Its two
   outputs are active-low: exactly one is 0, and that half is on.
2. **Input gates** sit in front of each sub-decoder. When its control is 1
   (off), the gates force the sub-decoder's inputs to a fixed pattern, FORCE.
   They use one gate per bit: an OR with the control where the FORCE bit is 1,
   and an AND with the inverted control where it is 0. For example, FORCE =
   `1101` gives the row OR-OR-AND-OR. While the half stays off, its inputs do
   not move, so nothing inside it switches.
3. **Sub-decoders.** Each one decodes only the inputs of its own group and
   outputs all zeros for everything else. FORCE is chosen from that
   "everything else". Each sub-decoder's output for its frozen pattern is
   therefore all zeros. Synthesis may treat every input outside the group as a
   don't care, which is what makes each half smaller than the whole.
4. **Output OR.** Since the idle half outputs zeros, a bitwise OR of the two
   outputs is the output of the active half.

Changing the two halves needs care: **a FORCE pattern must lie outside its
sub-decoder's group**. If it lies inside, the idle half outputs a real code,
and the OR corrupts the result. The fault this design's tests use to check
themselves is exactly this mistake.

### The instruction decoder: one partition bit

The instructions are split by a single instruction bit, `PART_BIT`. Group 0
holds the instructions with the bit at 0, group 1 those with it at 1. The
activate control is then just the bit and its inverse: `i_control0 = bit`,
`i_control1 = !bit`. The bit is chosen by summing the execution frequencies
of the instructions with each value of each opcode bit, and taking the bit
with the most uneven split.

In the reference example, bit 26 splits execution 90 %/10 % and bit 27 splits
it 80 %/20 %, so the default is `PART_BIT = 26`. Any bit of the decode key can
be used.

* FORCE for I-Decoder0 is the key with only the partition bit set.
* FORCE for I-Decoder1 is the all-zero key.

Each pattern lies in the other group.

`ctrl_pkg::select_part_bit` does the selection from a profile. For each bit
of the decode key, it takes the execution weight of the instructions that
have the bit at 1, plus the total weight. It returns the instruction bit
number with the most uneven split, ready to use as `PART_BIT`.
`tb_partition_example` builds a stream with the example's split and runs it
through two units side by side, one partitioned on bit 26 and one on bit 27.
It confirms three things:

* I-Decoder1 is on for about 10 % and about 20 % of the instructions.
* Both units decode identically.
* The function picks bit 26.

### The signal decoders: threshold, then dominance

For a signal decoder the groups are sets of intermediate codes. They are held
as a 256-bit mask, `GROUP1`, and the activate control looks the code up in
it. The two halves are frozen at code 0, which is outside both groups. The
mask is computed at elaboration by `ctrl_pkg::s_group1_mask` in two steps:

1. **Initial partition.** The instructions whose execution frequency is
   above a threshold go into group 0. `ctrl_pkg::threshold_group0` forms that
   set from a per-code profile. This design has no per-instruction profile
   built in, so the initial group is a parameter, `INIT_GROUP0`. Its default
   is the three MOV codes.
2. **Iterative improvement.** Instruction I1 *dominates* I2 when every
   output signal that is 1 for I1 is also 1 for I2. Each group-1 code that a
   group-0 code dominates moves into group 0. This repeats until nothing
   moves.

Dominance is tested on the output word of that stage's decoder, so the two
stages end up with different partitions. With the defaults:

| stage | group 0 (S-Decoder0) | group 1 (S-Decoder1) |
|-------|----------------------|----------------------|
| decode (makes decode and execute fields) | 6 codes: MOV, MVN | 136 codes |
| execute (makes memory/write-back fields) | 86 codes | 56 codes |

You can override `GROUP1` with a mask of your own, for example one derived
from a real instruction profile. The function does not change, only which
half is on.

## Pipeline and timing

`decomposed_control_unit` is the top. It accepts one instruction per cycle
and never stalls.

| cycle | what is available |
|-------|-------------------|
| t     | `instr`, `instr_valid` at the inputs |
| t+1   | `ir` holds the instruction. `id_code` and `id_ctrl` (decode-stage signals) are combinational from it |
| t+2   | `ex_code` (ISR) and `ex_ctrl` (CSR). The execute-stage signal decoder works on `ex_code` |
| t+3   | `mem_code` (ISR) and `mem_ctrl` (CSR) |

* **Bubbles.** A cycle with `instr_valid = 0` keeps `ir` unchanged, so the
  instruction decoder's inputs stay still. Code 0 then goes down the pipeline,
  and all its control signals are 0.
* **Reset.** `rst_n` is synchronous and active low. It clears every register
  to the no-instruction state.
* **Activity outputs.** `i_dec1_on`, `s_id_dec1_on` and `s_ex_dec1_on` show
  which half of each decoder is on. Use them for activity counts or power
  estimates.
* **Assertions.** Immediate assertions check that exactly one half of each
  pair is on.

### Control signals per stage (`ctrl_pkg`)

* `id_ctrl_t` (decode stage): the register-file reads Rn, Rm, Rs and Rd
  (store data or accumulator), and the immediate format (`imm_sel`: rotated
  8-bit, 12-bit offset, split 8-bit offset or 24-bit branch offset).
* `ex_ctrl_t` (execute stage):
  * ALU enable and ARM opcode;
  * operand-2 source;
  * test-only (compare ops);
  * multiplier enable, accumulate, long and signed;
  * address generation with up/down and pre-index;
  * branch and link.
* `mem_ctrl_t` (memory/write-back stage):
  * memory read and write;
  * size (word, byte or half);
  * block transfer and user bank (LDM/STM with S);
  * swap;
  * the write-backs of Rd, RdHi, the base register and LR.

This signal set, and the split into three stages, are this design's own.

## How far to trust it

* The decomposition follows the published method:
  * one-bit partition with an inverter as activate control;
  * input gates that freeze the idle half at a don't-care minterm, with the
    idle half outputting zeros;
  * output ORs;
  * the signal-decoder partition by frequency threshold followed by
    dominance moves.
* The decoding itself is this design's own: the choice of decode bits, the
  forms within each class, the code numbering, the control signals and the
  pipeline depth. It is checked against the ARM encoding by constructing
  instructions of every type. It is not checked against a real ARM7TDMI
  implementation.
* Not reproduced:
  * the benchmark runs;
  * the per-instruction profile behind the signal-decoder partition (its
    threshold was 1 % execution probability);
  * the area and power results (about 12 % more decoder area, about 27 % less
    decoder power and 16 % less control-unit power, measured on a 0.25 µm
    library).

  These need a real instruction profile and gate-level power analysis.
* Each sub-decoder is written as the full decoder restricted to its group.
  How much logic the split saves depends on how well synthesis uses the
  don't cares.

## Files

| file | contents |
|------|----------|
| `rtl/ctrl_pkg.sv` | decode key, reference decode, control words, partition functions |
| `rtl/i_activate_control.sv`, `rtl/s_activate_control.sv` | activate controls |
| `rtl/input_gate.sv`, `rtl/output_or.sv` | input freezing gates, output OR |
| `rtl/i_sub_decoder.sv`, `rtl/s_sub_decoder.sv` | sub-decoders |
| `rtl/instr_decoder.sv`, `rtl/signal_decoder.sv` | the two decomposed decoders |
| `rtl/decomposed_control_unit.sv` | top: instruction register, decoders, ISR, CSR |
| `tb/tb_gen_pkg.sv` | builds a random instruction of any given code from the ARM encoding |
| `tb/tb_ref_pkg.sv` | hand-written control words of eleven representative codes |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ctrl_pkg` |
| `tb/tb_partition_example.sv` | the partition-bit example run end to end on bits 26 and 27 |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To run the end-to-end test (20 000 cycles at the default
parameters, with bubbles and a reset in flight) with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_decomposed_control_unit \
  rtl/ctrl_pkg.sv tb/tb_gen_pkg.sv tb/tb_ref_pkg.sv tb/tb_decomposed_control_unit.sv \
  -y rtl +libext+.sv
./obj_dir/Vtb_decomposed_control_unit
```

The other testbenches build the same way: give the packages first and the
testbench last. These checks are made:

* `tb_instr_decoder` compares the decomposed instruction decoder with the
  undecomposed reference on all 65 536 decode keys.
* `tb_signal_decoder` does the same for every code of both signal decoders.
* `tb_ctrl_pkg` checks that the partition is closed under dominance.

The end-to-end test also counts how often each sub-decoder is on. At the
default partition bit, random instructions spread about 2:1 over I-Decoder0
and I-Decoder1.

To try another partition, change `PART_BIT` (any of `instr[27:20]` or
`instr[11:4]`) or `INIT_GROUP0` on `decomposed_control_unit`. The unit stays
functionally identical, and the tests above still apply.
