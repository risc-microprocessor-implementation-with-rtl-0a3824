# A DLX integer datapath with area balanced against the instruction mix

Most RISC pipelines give every instruction the same single-cycle time. That
includes shifts, even though they are rare. In typical integer programs
about 35 % of executed instructions use the adder (add, subtract, compare,
address arithmetic) and only about 5 % are shifts. This design uses that
skew. The silicon a one-cycle barrel shifter would need goes instead to a
fast parallel-prefix adder, and shifts are done by a small linear shift
register that takes several cycles for long shifts. The adder sets the
machine cycle, so the cycle becomes much shorter. The extra shift cycles
raise the average cycles per instruction (CPI) only a little. The average
time per instruction (CPI × cycle time) therefore goes down.

The RTL is a five-stage pipelined DLX integer datapath. The adder and the
shifter are set by parameters, so the same source builds all three design
points of the original study:

| point | ALU and PC adders | shifter | cycle | CPI (published) | time/instr. | datapath area |
|---|---|---|---|---|---|---|
| 1 | 32-bit ripple carry | barrel, 1 cycle | 93 ns | 1.42 | 132 ns | 9.3·10⁶ λ² |
| **2 (default)** | **32-bit parallel prefix** | **linear** | **33 ns** | **1.87** | **61.7 ns** | 9.4·10⁶ λ² |
| 3 | four 8-bit parallel prefix, carry rippled between them | linear | 66 ns | 1.62 | 106.9 ns | 7.9·10⁶ λ² |

The cycle times and areas come from the original 2 µm CMOS layouts. RTL
cannot reproduce them. The published CPI figures assume a base CPI of 1.42,
5 % shifts, and a worst-case shift of 320 ns: that is 9 extra cycles at
33 ns and 4 extra cycles at 66 ns. In this RTL the cycle time only sets how
many shift steps fit in one machine cycle (see *Linear shifter timing*).

## Pipeline

```
 IF        RF                 ALU                     MEM               WB
 fetch  -> decode, read   -> bypass select,        -> data memory    -> register
 at PC     register file     ALU or shifter,          access,           write
           (write-through)   branch/jump resolve,     load alignment
                             PC+4 / target adders
```

Module hierarchy (one module per file in `rtl/`):

```
dlx_top
├── register_file      32 × 32 bit, 2 read / 1 write, r0 = 0, write-through
├── bypass_unit        operand source select: array, result reg., memory data reg.
├── instr_register     instruction copies for RF, ALU, MEM, each with a decoder
│   └── decoder        instruction word -> ctrl_t control struct
├── execute_unit
│   ├── alu            add/sub/compare on one adder, boolean_unit, pass-through
│   │   └── dlx_adder  -> ripple_carry_adder | pp_adder | pp_adder_cascade
│   └── barrel_shifter | linear_shifter
├── pc_unit            PC, PC+4 incrementer and displacement adder (same adder
│                      kind as the ALU), PC chain for RF and ALU stages
├── mem_data_io        big-endian byte lanes and enables, load extension
└── pipeline_control   stall, bubble, fetch and redirect decisions
```

`dlx_pkg` holds the shared types: the adder and shifter kinds, opcodes,
ALU and shift operations, and the `ctrl_t` decoded-control struct.

### What happens in each stage

* **IF.** `imem_addr` is the PC. The instruction memory must return
  `imem_rdata` in the same cycle. There is no instruction cache.
* **RF.** The instruction is decoded and both source registers are read.
  A register written by the WB stage in the same cycle is read with its new
  value (write-through). This is how the original pipeline behaves: it
  writes in the first half of the cycle and reads in the second half.
* **ALU.** Each operand is chosen from three sources by `bypass_unit`:
  * the register value read in RF;
  * the *result register*, which holds the output of the instruction now
    in MEM;
  * the *memory data register*, which holds the value the instruction in WB
    is writing.

  The nearer producer wins. A load in MEM has no value yet, so it is never
  a bypass source. The second operand is the immediate in I-type
  instructions. In the same stage the ALU or shifter runs, branch conditions
  are tested (`rs1 == 0`), and the PC unit forms PC+4 and PC+4+displacement.
* **MEM.** The ALU result is the data address. For a store, `dmem_be` and
  `dmem_wdata` carry the stored lanes. A load's word is returned the same
  cycle, aligned, and sign- or zero-extended.
* **WB.** The value is written to the register file and shown on
  `wb_we/wb_rd/wb_data`.

### Hazards and their cost

| event | cost | how |
|---|---|---|
| result of the previous two instructions needed | 0 | bypass from MEM or WB |
| load, then an instruction that reads the loaded register | 1 bubble | load interlock; the user waits in RF |
| branch or jump (BEQZ, BNEZ, J, JAL, JR, JALR) | 2 bubbles | fetch stops while the branch is in RF or ALU; there is no delay slot |
| linear shift by n | `max(1, ceil(n·STEP/CYCLE)) − 1` cycles | the shift stays in ALU; RF and IF are held, and MEM and WB drain |

Branches are resolved in the ALU stage. The pipeline does not predict
them. It simply fetches nothing after a control instruction until the
target is known. Each branch or jump therefore always costs two cycles,
taken or not. JAL and JALR write PC+4 of the jump itself to r31.

For a program that runs `E` instructions, the cycle in which the last
instruction leaves WB is exactly:

```
E + 4 + 2·(branches and jumps) + (load-use pairs) + Σ shift extra cycles
```

The end-to-end testbenches check this formula cycle for cycle.

## Linear shifter timing

`linear_shifter` is the unusual part of the design, and the part to read
first when changing timing.

The original circuit is a 32-stage shift register. A private ring
oscillator clocks it, much faster than the machine clock. A counter loads
the shift amount and counts down once per step. The oscillator runs while
the counter is non-zero (`go`). A shift by n therefore takes n fast steps,
whatever the machine clock is doing.

A free-running oscillator cannot be synthesised as logic. The RTL keeps
the behaviour and replaces the oscillator with a **time budget**:

* Every machine cycle adds `CYCLE_NS` of time to a credit.
* Each one-bit step costs `STEP_NS`. As many steps are done in a cycle as
  the credit allows.
* Leftover credit carries into the next cycle while the shift goes on. It
  is cleared when the shift ends.
* The steps of one cycle are unrolled as combinational logic:
  `ceil(CYCLE_NS / STEP_NS)` one-bit stages between two registers, which is
  4 with the defaults.

A shift by n therefore finishes in `max(1, ceil(n·STEP_NS / CYCLE_NS))`
machine cycles:

| CYCLE_NS | shift by 1–3 | by 4–6 | by 31 | extra cycles for 31 |
|---|---|---|---|---|
| 33 (default) | 1 | 2 | 10 | 9 |
| 66 | 1 (n ≤ 6) | 2 (n ≤ 13) | 5 | 4 |

`STEP_NS = 10` is derived, not measured. The original gives the shifter's
worst case as 320 ns for 32 stages, and 9 and 4 extra cycles at 33 ns and
66 ns. A 10 ns step reproduces both extra-cycle counts exactly. The original
text also says in one place that every shift by more than one takes
several cycles. That does not agree with its own 320 ns figure, so this
design follows the numbers. To get one cycle per bit instead, set
`SHIFT_STEP_NS = CYCLE_NS`.

The register only shifts towards bit 0. A left shift is done by reversing
the bits on the way in and on the way out. An arithmetic shift fills with
the sign bit, a logical shift with zero. Interface: pulse `start` with
`din`, `amount` and `op`. `done` is high in the cycle the result is valid on
`dout`. That cycle is the start cycle itself for short shifts. `go` is high
while a shift runs past its first cycle. An assertion checks that no new
shift is started while one is running.

## Adders

All three adders have the ports `a, b, cin → s, cout` and take the width
`N`. `dlx_adder` chooses one by the `KIND` parameter. The ALU and both PC
adders always use the same kind, as in the original design points.

* **`ripple_carry_adder`**: a chain of N full adders. It is small, and its
  delay grows linearly with N.
* **`pp_adder`**: a complete carry-lookahead tree. `N` must be a power of
  two. Leaf cells form per-bit generate `a·b` and propagate `a+b`. On the
  way up, each tree node merges the (G, P) pairs of its two halves. On the
  way down, each node passes its incoming carry to its lower half, and
  `G_low | P_low·c` to its upper half. The leaves form the sums from the
  carries. The delay is logarithmic in N. The tree is written as one
  `generate` level per tree level.
* **`pp_adder_cascade`**: `N/SECTION` parallel-prefix sections (4 × 8 bits
  by default). The carry ripples from one section to the next.

The `alu` subtracts as `a + ~b + 1`. The set-conditional compares (SEQ,
SNE, SLT, SGT, SLE, SGE and their unsigned forms) use the flags of that one
subtraction. Signed compares use the corrected sign (sign XOR overflow).
`boolean_unit` does AND, OR and XOR.

`barrel_shifter` is a logarithmic rotator. Rank i moves bit j to
`(j + 2^i) mod N` when bit i of the amount is set. The `amount` bits that
wrapped around are then replaced by zero or by the sign bit. Left shifts
use the same bit reversal as the linear shifter.

## Instruction subset and encoding

DLX formats (bit 31 on the left):

```
I-type  opcode[31:26] rs1[25:21] rd[20:16]  immediate[15:0]
R-type  000000        rs1[25:21] rs2[20:16] rd[15:11] shamt[10:6] func[5:0]
J-type  opcode[31:26] offset[25:0]
```

| class | instructions | opcode / func (hex) |
|---|---|---|
| register ALU | ADD ADDU SUB SUBU AND OR XOR | func 20–26 |
| register set | SEQ SNE SLT SGT SLE SGE | func 28–2D |
| unsigned set | SEQU SNEU SLTU SGTU SLEU SGEU | func 10–15 |
| register shift | SLL SRL SRA (amount = rs2[4:0]) | func 04, 06, 07 |
| immediate shift | SLLI SRLI SRAI (amount = bits 10:6) | func 00, 02, 03 |
| immediate ALU | ADDI ADDUI SUBI SUBUI ANDI ORI XORI LHI | op 08–0F |
| immediate set | SEQI … SGEI, SEQUI … SGEUI | op 18–1D, 30–35 |
| loads | LB LH LW LBU LHU | op 20, 21, 23, 24, 25 |
| stores | SB SH SW | op 28, 29, 2B |
| branches | BEQZ BNEZ (test rs1) | op 04, 05 |
| jumps | J JAL JR JALR | op 02, 03, 12, 13 |

Immediates are sign-extended, with these exceptions, which are
zero-extended: ADDUI, SUBUI, ANDI, ORI, XORI and the unsigned set
immediates. LHI puts the immediate in the upper half. Branch and J/JAL
offsets are added to the address of the next instruction (PC+4). Memory is
big endian: `dmem_be[3]` enables the byte at offset 0, which is bits 31:24
of the word. Accesses are assumed to be aligned. Address bits below the
access size are ignored.

Anything else decodes as an illegal instruction. It runs as a no-op and is
flagged on `ev_illegal`. This covers multiply and divide, floating point,
moves to and from special registers, TRAP and RFE.

## Top-level interface (`dlx_top`)

| parameter | default | meaning |
|---|---|---|
| `ADDER_KIND` | `ADDER_PPA` | `ADDER_RIPPLE`, `ADDER_PPA` or `ADDER_PPA8X4`, for the ALU and PC adders |
| `SHIFTER_KIND` | `SHIFTER_LINEAR` | `SHIFTER_BARREL` or `SHIFTER_LINEAR` |
| `CYCLE_NS` | 33 | machine cycle, used only for the linear-shift step budget |
| `SHIFT_STEP_NS` | 10 | time of one linear-shift step |
| `RESET_PC` | 0 | first fetch address |

Ports:

* Clock and reset: `clk` and `rst_n`. The reset is asynchronous and active
  low. It clears the register file, the PC and all pipeline valid bits.
* Instruction memory: `imem_addr` out, `imem_rdata` in, read in the same
  cycle.
* Data memory: `dmem_addr`, `dmem_wdata`, `dmem_be`, `dmem_we` and
  `dmem_re` out, and `dmem_rdata` in, read in the same cycle. The memory
  writes at the clock edge while `dmem_we` is high.
* Register write trace: `wb_we`, `wb_rd` and `wb_data`.
* Event pulses, one per cycle, for performance counting: `ev_retire`,
  `ev_shift_stall`, `ev_load_stall`, `ev_branch_stall`, `ev_bypass_result`,
  `ev_bypass_mdr` and `ev_overflow`. Signed overflow is only reported; it
  does not trap.
* `ev_illegal`: an unimplemented instruction is in RF.
* `shift_busy`: a linear shift is running past its first cycle.

## Verification

Each module in `rtl/` has a testbench `tb/tb_<module>.sv`. Each testbench
compares the module against values computed independently in the testbench.
It ends by printing `TB_RESULT checks=N failures=M`, and it has a watchdog.
The adders, ALU and shifters are checked on corner operands and random
operands. Both shifters are checked for all amounts. The linear shifter is
also checked for its cycle count at 33 ns and at 66 ns.

`tb/tb_dlx_pkg.sv` contains a small assembler, a random program generator
and an instruction-level reference model of the DLX subset. The model does
not share any code with the RTL.

* **`tb_dlx_top`** runs four generated programs on the default
  configuration. Each program has a fixed prologue that forces every
  hazard, followed by 400 random instructions. The testbench checks:
  * every register write and every store, in order;
  * the final data memory;
  * the exact cycle count from the formula above;
  * that every mechanism (long shift, load interlock, both bypass paths,
    branch stall, taken and untaken branches) happened at least once.
* **`tb_design_points`** runs the same programs on all three design points
  for three mixes:
  * general purpose, with about 5 % shifts;
  * network-style code, with almost no shifts and many branches and memory
    accesses;
  * the general mix with every shift by 31, the worst case the published
    CPI figures assume.

  It checks the results and the cycle counts of each point, and it checks
  that the time per instruction is ordered point 2 < point 3 < point 1. For
  the worst-case mix the linear-shifter points must take exactly 9 (33 ns)
  and 4 (66 ns) more cycles per shift than the barrel-shifter point. This
  is the published CPI arithmetic, CPI + f_shift × 9 and CPI + f_shift × 4.
  A typical run of the general mix measures CPI 1.38, 1.51 and 1.43, which
  gives about 128, 50 and 95 ns per instruction. The worst-case mix gives
  1.39, 1.74 and 1.55. The base CPI is lower than the published 1.42
  because the generated code has fewer stalls than real compiled code.

### Simulating with Verilator

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dlx_pkg.sv tb/tb_dlx_pkg.sv tb/tb_dlx_top.sv --top-module tb_dlx_top
./obj_dir/Vtb_dlx_top
```

Replace `tb_dlx_top` with any other testbench name. Unit testbenches
that do not use the program generator do not need `tb/tb_dlx_pkg.sv`. The
end-to-end run takes well under a minute.

## Departures and own choices

The following come from the original design:

* the five-stage pipeline;
* both bypass paths and write-through;
* the stall on every branch instead of branch-penalty hardware;
* stalling the whole front of the pipeline during a multi-cycle shift;
* the three adder structures and the barrel-shifter rotator;
* the counter-and-go control of the linear shifter;
* the same adder kind in the PC unit and the ALU;
* the opcode numbers.

These are choices of this design, where the original is silent or the
original is transistor-level:

* **Single-edge clocking.** The original runs on two non-overlapping
  clock phases. Here each stage is one rising-edge register stage. Bypass
  selection is done at the start of the ALU stage, not at the end of RF,
  with the same result.
* **Linear shifter timing.** The oscillator is replaced by the time budget
  described above, and `STEP_NS = 10` is derived.
* **Load interlock.** It costs one bubble, which the original does not
  describe.
* **Branches.** They resolve in ALU, at a cost of two bubbles, with no
  delay slot.
* **Encoding details.**
  * The immediate-shift amount is in bits 10:6.
  * The unsigned and logical immediates are zero-extended.
  * Jump offsets are relative to PC+4.
* **Reset.** The reset clears the register file.
* **Memories.** The instruction cache and its tag unit are not included.
  Instruction and data memory are outside the design, each with a
  same-cycle read.
* **Not included:**
  * the multiply/divide register and its instructions;
  * floating point;
  * traps, interrupts and overflow traps;
  * the trap vector input of the PC.
* **Circuit-level parts.** Bus drivers, pads and the 6-transistor register
  cell are ordinary logic here: multiplexers and flip-flops.

To change the design point, override `ADDER_KIND`, `SHIFTER_KIND` and
`CYCLE_NS` on `dlx_top`. Any combination is allowed, for example a ripple
adder with the linear shifter. The linear-shift logic adapts to the ratio
of cycle to step time. The adders accept other widths, but `pp_adder`
needs a power of two.
