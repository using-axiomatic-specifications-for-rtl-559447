# A DLX integer subset processor built from an exception-labelled specification

This is a small single-cycle processor for a subset of the DLX RISC
instruction set. It was written from an axiomatic description of the machine.
That description defines every instruction as a state change of the triple
*(PC, register file, memory)* and attaches *labels* to results that are not
normal: `Overflow` on a bounded sum, `OutOfMemory` on a bad index,
`UNDEFINSTR` on an op-code with no instruction, `TBSL` ("to be specified
later") on an instruction left for a later refinement, and `ERRORINFETCH` on
a step that cannot complete. The hardware keeps those labels visible. Each
exception becomes a flag or a stop state, and its handler, where one exists,
becomes logic. The main one is that an overflowing unsigned sum is recovered
on Maxint, i.e. it saturates.

The processor executes eight instructions:

| instruction | encoding | effect |
|---|---|---|
| NOP  | R-type, func `000000` | pc ← pc + 1 |
| ADD  | R-type, func `100000` | rd ← rs1 + rs2, saturating at 2³²−1 |
| SLL  | R-type, func `000100` | rd ← rs1 << rs2 (0 once rs2 ≥ 32) |
| LW   | op `100011` | rd ← mem[rs1 + sext(imm16)] |
| SW   | op `101011` | mem[rs1 + sext(imm16)] ← rd |
| BNEZ | op `000101` | pc ← rs1 ≠ 0 ? pc + sext(imm16) : pc + 1 |
| J    | op `000010` | pc ← pc + sext(off26) |
| JR   | op `000011` | pc ← rs1 |

Field layout (the usual DLX one):

```
R-type  op[31:26] rs1[25:21] rs2[20:16] rd[15:11] func[10:0]   (func[5:0] decoded)
I-type  op[31:26] rs1[25:21] rd[20:16]  imm16[15:0]
J-type  op[31:26] off26[25:0]
```

All data is 32 bits wide. The PC and all memory indices count **words**, not
bytes, so the next instruction is at pc + 1. Branch and jump offsets are
relative to the branch itself, not to pc + 1.

## Structure

```
dlx_top
├── execution_unit      PC, exe step, error state
│   ├── instr_decoder   fields + label (OK / UNDEFINSTR / TBSL)
│   ├── natb_adder ×4   pc+1 and ADD (saturating); address and target (wrapping)
│   └── sll_shifter
├── gpr_file            32 × 32 bits, R0 = 0
└── ext_memory          MEM_SIZE words: program and data, OutOfMemory flags
```

`dlx_pkg` holds the widths, op-codes, and the `instr_e`, `label_e`, `err_e`
and `fields_t` types. There is one memory for instructions and data. Its
fetch and data read ports are combinational, and so are the register file's
read ports. A whole instruction therefore goes from the PC to the next rising
edge, and the processor completes **one instruction per clock cycle** while
`run` is high.

## The exception labels in hardware

This part differs most from a textbook DLX.

**Bounded naturals and `Overflow` (`natb_adder`).** The adder is a chain of
full adders, bit 0 first. Sum bit n is a⊕b⊕c. The carry out is
ab + c(a⊕b). The sum is labelled `Overflow` exactly when the top bit carries
out, computed as `(a[31] & b[31]) | (c31 & (a[31] | b[31]))`. With
`SATURATE = 1` the sum is then replaced by Maxint (all ones), the recovery
that the bounded-natural type defines. ADD and the pc + 1 increment use this
mode. An overflowing ADD is therefore not a trap: the result is
`32'hFFFF_FFFF` and `ovf` pulses for one cycle. Signed integers are left
unspecified, so the address sums (base + offset) and target sums (pc +
offset) use the same adder with `SATURATE = 0`, which wraps modulo 2³².

**`OutOfMemory` (`ext_memory`).** Each port compares its full 32-bit index
with `MEM_SIZE`. A negative address computed with a wrapping sum becomes a
huge unsigned index, so the same compare catches it. An out-of-range read
returns 0 and an out-of-range write is dropped.

**`UNDEFINSTR` and `TBSL` (`instr_decoder`).** The R-type function codes
`000001`, `000101` and `001000`–`001111` have no instruction and are labelled
`UNDEFINSTR`. The floating-point multiply MULTF (op `000001`, func `000010`)
is labelled `TBSL`. It stays that way because this processor has no
floating-point unit. Every other code outside the eight instructions is also
labelled `TBSL`.

**`ERRORINFETCH` (`execution_unit`).** Any of the following makes the current
step fail:

- a non-OK label;
- a PC at or past the end of memory;
- an LW or SW address outside memory.

None of the failing instruction is committed. `pc` keeps pointing at it,
`halted` rises, and `err` gives the cause (`ERR_UNDEFINSTR`, `ERR_TBSL`,
`ERR_FETCH_OOM`, `ERR_DATA_OOM`). The unit stays there until reset. There is
no trap vector: the labels say *that* a step fails, not what happens next.
Stopping is this design's choice. It also means a program can end simply by
executing an undefined op-code. Two assertions in `execution_unit` check the
rules: a store never reaches memory with an out-of-range address, and the
error state never changes without a reset.

## Departures and own choices

Where the specification is silent or self-contradictory, this design chooses
as follows:

- **Memory size.** `MEM_SIZE` defaults to 1024 words. The specification calls
  the memory 32-bit addressable but gives no size. Change the parameter on
  `dlx_top` to grow it.
- **JR and J op-codes.** JR uses `000011`, the binary code the specification
  prints. Its successor notation says 2, which disagrees. J takes `000010`,
  the usual DLX value, which is then free. (In standard DLX, `000011` is JAL
  and JR is `010010`. Do not expect standard DLX binaries to run unchanged.)
- **ADD is unsigned and saturating.** The low-level definition uses the
  bounded-natural sum. DLX's trapping signed ADD is not modelled.
- **SLL count.** The whole 32-bit value of rs2 is the shift count, so counts
  of 32 or more give 0. Standard DLX uses only the low 5 bits.
- **Word-indexed PC and offsets.** Branch targets are pc + offset.
  Standard DLX uses byte addresses and pc + 4 + offset.
- **Reset.** Synchronous and active low. It sets pc = 0, clears the error
  state and clears all registers. Memory is not reset.
- **Host port and `run`.** These exist for loading programs and reading
  results. They are not part of the processor's specified behaviour.

These parts are not built: the floating-point register file (FPR), the float
format and MULTF; the status, instruction, memory-data/address, interruption
and trap-value registers; and signed (RELB) arithmetic. No specified
instruction uses them, and their formats are not defined.

## Interface of `dlx_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `run` | in | 1 | execute one instruction per cycle while high |
| `h_addr`, `h_we`, `h_wdata` | in | 32, 1, 32 | host write into memory (word index) |
| `h_rdata`, `h_oom` | out | 32, 1 | host read data, index out of range |
| `dbg_reg_addr` / `dbg_reg_data` | in / out | 5 / 32 | observe a register |
| `pc` | out | 32 | program counter |
| `err`, `halted` | out | 3, 1 | stop cause (`dlx_pkg::err_e`), stopped |
| `retire`, `ovf`, `taken` | out | 1 each | instruction completed; ADD saturated; branch/jump taken |

To use it:

1. Hold `rst_n` low with `run` low.
2. Write the program and data through the host port, one word per cycle.
   Word 0 is the first instruction.
3. Release reset and raise `run`.
4. Wait for `halted`, or for as many cycles as the program needs.
5. Read results through `h_addr`/`h_rdata` and `dbg_reg_addr`/`dbg_reg_data`.

Host writes take priority over a store in the same cycle.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_natb_adder` | both adder modes against 33-bit integer sums, including Maxint + 1 |
| `tb_sll_shifter` | every count 0–40 and random counts against multiplication by 2^count |
| `tb_gpr_file` | reset to 0, random writes, R0 ignoring writes, all three read ports |
| `tb_ext_memory` | all ports, the boundary at `MEM_SIZE`, dropped out-of-range writes, host-write priority |
| `tb_instr_decoder` | all 64 × 64 op-code/function pairs against a written-out table, and field extraction |
| `tb_execution_unit` | 60 random programs on array models of memory and registers, cycle by cycle against an interpreter; all four stop causes |
| `tb_dlx_top` | the full processor at its default size (below) |

`tb_dlx_top` runs the default `dlx_top` (1024 words) with these programs:

- **A prefix-sum loop.** LW, ADD, SW, and BNEZ back to the loop start. The
  loop counter is a one-bit that SLL shifts out of the register; this is
  needed because the subset has no subtract and ADD saturates. The program
  then does a JR over dead code, an ADD into R0, and a J over more dead
  code, and ends on an undefined op-code. The testbench compares the
  results with sums it computes itself, once without and once with
  saturation. It also checks that the loop takes exactly 7N + 9
  instructions in 7N + 9 cycles plus one stop cycle.
- **One program per stop cause.** This includes a NOP sled that runs off the
  end of memory.
- **Random programs.** These are compared with the interpreter cycle by
  cycle, and the memory and registers are compared at the end.

The testbench also counts every instruction type, taken and not-taken
branches, overflows, writes to R0, each stop cause, and `run` held low. A
mechanism that never happens counts as a failure.

`tb/dlx_ref_pkg.sv` holds the instruction-level interpreter (`dlx_ref`),
instruction encoders and the random program generator the testbenches share.

To simulate with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dlx_top \
    -y rtl -y tb +libext+.sv rtl/dlx_pkg.sv tb/dlx_ref_pkg.sv tb/tb_dlx_top.sv
./obj_dir/Vtb_dlx_top
```

Replace `tb_dlx_top` with any other testbench name to run that one. All
testbenches finish in well under a second.
