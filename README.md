# Control path for a dataflow protocol processor

A network terminal that must receive at multi-gigabit rates cannot leave
packet decoding to its host CPU. In the architecture implemented here, a
general purpose microcontroller keeps all connection state (the slow path),
and a programmable protocol processor (PPP) decodes every packet at wire speed
as it streams, one 32-bit word per network clock, through a chain of
accelerators called *functional pages* (FPs). The FPs touch the data; the
control path only has to decide, cycle by cycle, which FPs run and whether the
packet is kept.

That control path, the C&C ("counter and controller"), is what this RTL
provides. Its hard part is *program flow selection*: after a header field is
extracted it has to be compared with several values (protocol types,
destination addresses) and the matching branch taken. In software this is a
case-statement compiled into load / subtract / conditional-branch sequences,
whose run time depends on the number of cases. Three C&C variants handle this:

| variant | module | clock | how case-statements run |
|---|---|---|---|
| synchronized C&C with branch unit | `sync_cc` | network clock | in one cycle, in a CAM branch unit, no penalty |
| pipelined C&C | `pipe_cc` (`USE_BU=0`) | several x network clock | sub + branch-if-zero sequences, 2-cycle branch penalty |
| pipelined C&C with branch unit | `pipe_cc` (`USE_BU=1`) | several x network clock | one instruction via a pipelined CAM branch unit |

Which to pick depends on the terminal: the synchronized one suits a restricted
protocol set (its CAM is on the critical path and must stay small); the
pipelined ones trade branch penalties for clock rate and can grow the branch
table for terminals with many protocols and addresses.

## Files

```
rtl/cc_pkg.sv         types and constants: instruction formats, opcodes, register map
rtl/branch_unit.sv    CAM branch unit (16 branches x 4 case entries by default)
rtl/sync_prog_mem.sv  program memory of the synchronized C&C (same-cycle read)
rtl/sync_cc.sv        synchronized C&C
rtl/pipe_prog_mem.sv  two-stage pipelined program memory
rtl/cc_regfile.sv     12 x 16-bit register file
rtl/cc_alu.sv         two-stage 16-bit ALU
rtl/pipe_cc.sv        five-stage pipelined C&C, optional branch unit
rtl/cc_sync_regs.sv   crossing from the pipelined C&C to the network rate
rtl/ppp_cc_top.sv     both C&Cs side by side (top)
tb/tb_<module>.sv     one self-checking testbench per module
```

## The branch unit

`branch_unit` is a hardwired case-statement. It holds `NUM_BR` branches, each
tagged with the program counter value of the instruction where a
case-statement sits, and `NUM_CASE` case entries per branch. A case entry is a
ternary CAM word (value and care mask) over a search key, together with

* the instruction that begins the selected program flow, and
* the address from which fetching continues after that instruction.

Every cycle, all entries are compared in parallel with `pc` and `key`. An entry
hits when its branch tag equals `pc` and `((key ^ value) & mask) == 0`. The
lowest-numbered matching case wins, then the lowest-numbered branch. On a hit
the unit's instruction *replaces* the one from program memory in the same
cycle, and the next pc is the entry's fetch address. On a miss the instruction
stored in program memory at that pc runs, so that instruction is the
`default:` of the case-statement. A taken conditional branch therefore costs
no extra cycle.

In both C&Cs the key is `{fp_flags, header}`: 8 FP result flags above the
header field the FPs extracted (32 bits in the synchronized C&C, 16 in the
pipelined one). Masks let an entry test a flag, a field or both. Four case
entries per branch means, for example, four destination addresses per check.

Entries are written through `cfg_br_*` (tag and valid bit of branch `cfg_br`)
and `cfg_case_*` (case `cfg_case` of branch `cfg_br`), one per cycle,
normally by the microcontroller. Reset clears every valid bit.

## Synchronized C&C (`sync_cc`)

The C&C runs on the network clock and executes exactly one instruction per
received word, so the program stays in lock-step with the data. Each FP sees
a word for a single cycle, so the FPs have to be started and stopped in
exactly the right cycle. The instruction is a horizontal control word
(`cc_pkg::sync_instr_t`):

| field | bits | meaning |
|---|---|---|
| `fp_start` | 8 | start these FPs this cycle |
| `fp_stop` | 8 | stop these FPs this cycle |
| `decision` | 2 | none / accept / discard the packet |
| `end_prog` | 1 | last instruction; the C&C goes idle |
| `jump`, `target` | 1 + 8 | unconditional jump |

Operation:

* `pkt_start` is asserted in the cycle before the first word. In the next
  cycle pc = 0 and instruction 0 runs while word 0 is on `hdr_data`.
* After that, pc *n* runs while word *n* is present.
* Outputs are combinational from the pc register, through the program memory
  and the CAM search, so they belong to the current cycle. This path
  (pc, then header compare, then branch decision) is the critical path of
  this variant.
* next pc = branch-unit fetch address on a hit, else `target` on a jump, else
  pc + 1.
* After `end_prog`, all outputs stay low until the next `pkt_start`.
  `pkt_start` also restarts a running program.

Example (used by `tb_sync_cc` and the top testbench): Ethernet / IPv4 /
UDP-TCP with a destination-address check.

```
pc 0   start FP0
pc 3   case ethertype (word 3): 0x0800 -> start FP1; 0x0806 -> accept, end;
       default (memory): discard, end
pc 6   case IP protocol (word 6): 17 -> start FP2; 6 -> start FP3; default discard
pc 7   jump 20
pc 20  case destination IP (word 8): A, B, C, or D if flag 0 -> stop FPs, accept
       default: stop FPs, discard
```

The decision for a packet appears in the cycle of word 3, 6 or 8, and the
testbenches check exactly these cycles.

## Pipelined C&C (`pipe_cc`)

The pipelined C&C is a small 16-bit processor that runs at a multiple of the
network clock. It has eleven instructions (encoding in `cc_pkg`:
`op[31:28] rd[27:24] rs1[23:20] rs2[19:16] imm[15:0]`):

| opcode | instruction | effect |
|---|---|---|
| 0 | `NOP` | none |
| 1 | `AND` | rd = rs1 & rs2 |
| 2 | `OR` | rd = rs1 \| rs2 |
| 3 | `NOT` | rd = ~rs1 |
| 4 | `ADD` | rd = rs1 + rs2 (16 bit) |
| 5 | `SUB` | rd = rs1 - rs2 (16 bit) |
| 6 | `LDI` | rd = imm |
| 7 | `MOV` | rd = rs1 |
| 8 | `JMP` | pc = imm |
| 9 | `BRNEQZ` | if rs1 != 0, pc = imm |
| 10 | `BREQZ` | if rs1 == 0, pc = imm |

The FPs are reached through the register map:

| register | on read | on write |
|---|---|---|
| r0..r11 | general purpose registers | general purpose registers |
| r12 | FP flags | one-cycle pulse on `fp_start` |
| r13 | header field | one-cycle pulse on `fp_stop` |
| r14 | 0 | decision: bit 1 = discard, bit 0 = accept |
| r15 | 0 | ignored |

The register file holds values that span packets, such as the running length
and checksum of a fragmented packet. A terminal that never accepts
fragments would not need it, but this RTL always includes it.

### Pipeline and hazards

```
IF1  pc -> program memory address register
IF2  program memory array read -> data register     (branch unit search if BU_REG)
ID   decode, register read, bypass, hazard check, jump/branch/case resolution
EX1  ALU stage 1: logic result, low 8 bits of add/sub and carry
EX2  ALU stage 2: high 8 bits; write back at the end of the cycle
```

* **Stall.** If an operand is written by the instruction immediately ahead
  (now in EX1), IF1..ID hold for one cycle and a bubble enters EX1.
* **Bypass.** If an operand is written by the instruction two ahead (now in
  EX2), it is taken straight from the ALU output.
* **Branches.** Jumps and branches resolve in ID. A taken one flushes IF1 and
  IF2, which costs two cycles. The two instructions after a taken branch are
  never executed.
* **Timing.** An instruction's effect on `fp_start`, `fp_stop` or `decision`
  appears three cycles after it leaves ID.

Status outputs (`pc_id`, `retire`, `stall`, `redirect`, `bypass`, `bu_taken`)
make this behaviour visible.

### With a branch unit (`USE_BU = 1`)

A `branch_unit` sits beside the pipeline, keyed by `{fp_flags, hdr}`. When the
instruction at a tagged pc reaches ID and an entry hits, that instruction is
replaced by the entry's, and fetching continues at the entry's address. A
whole case-statement thus costs one instruction plus the usual two-cycle
redirect.

With `BU_REG = 1` (default) the unit is pipelined: it is searched in IF2 with
that stage's pc and registered into ID. The CAM therefore stays off the decode
path, and the branch table can grow without lowering the clock. The price is
that flags and header must be valid one cycle before the case instruction
reaches ID. `BU_REG = 0` searches in ID instead.

The program memory has no reset, so load it while the C&C is held in reset;
the output register resets to a `NOP`. The branch table, in contrast, is
cleared by reset, so configure it after reset, before the program reaches a
case-statement.

### Synchronization registers (`cc_sync_regs`)

A pipelined C&C is clocked at a multiple of the network clock, while each FP
works on one network word per network cycle. The two clocks are assumed to
come from one source at an integer ratio. A strobe, `net_tick`, is high in the
last C&C cycle of each network cycle.

* **C&C to FPs.** Start and stop pulses issued during a network cycle are
  OR-ed, and the latest decision is kept. At the tick they move to the
  `net_*` outputs and stay there for exactly the next network cycle.
* **FPs to C&C.** Flags and header are sampled at the tick, so the program
  reads values that are stable for a whole network cycle.
* **Latency.** Each direction adds up to one network cycle. A program that
  waits for an FP to take a header must poll for the flag to drop, as the
  top testbench's program does.

## Top (`ppp_cc_top`)

The top instantiates `sync_cc` (`s_*` ports) and `pipe_cc` with
`USE_BU = PIPE_USE_BU = 1` (`p_*` ports) side by side. They share only clock
and reset. The FP side of `pipe_cc` goes through `cc_sync_regs`
(`p_net_tick`). So `p_fp_start`, `p_fp_stop` and `p_decision` change once per
network cycle, while the status outputs run at the C&C rate. In a product only
one variant would be built, chosen per terminal type, and the pipelined one
would get its own faster clock. The FPs, the packet interface and the microcontroller that loads
programs and branch tables are outside the top; their signals are ports.

## Performance context

The figures below are design targets, not properties of this RTL.

* At 10.9 ns per 32-bit word, the synchronized C&C with a 16 x 4 branch unit
  sustains about 2.9 Gbit/s (0.35 um standard cells).
* A two-stage 16-bit ALU at about 588 MHz, with the pipelined C&C at 4x the
  network clock, corresponds to 4.7 Gbit/s.
* At 8x, for a larger protocol set, it corresponds to about 2.3 Gbit/s.
* TCP or UDP over IPv4 over Ethernet, checking one destination address, needs
  about three pipelined instructions per network word.

The RTL fixes one instruction per word for `sync_cc` and at most one per cycle
for `pipe_cc`. Clock rates depend on the implementation.

## Where this RTL departs from, or adds to, the architecture

* **Own choices.** The architecture fixes the roles of the units, the 16 x 4
  branch unit, the 32-bit word, the 16-bit arithmetic, the list of
  instructions, the five stages, the pipelined program memory and the
  two-stage ALU. Everything else is this implementation's own choice:
  * instruction formats and encodings, and the register map;
  * number of FPs (8) and flag width (8);
  * memory sizes (256 and 1024 words) and 12 registers;
  * the ternary masks and priority rule of the CAM;
  * `pkt_start` / `end_prog`;
  * where branches resolve, and the stall and bypass rules.
* **Nop.** The eleven-instruction set is read as the ten listed operations
  plus `NOP`.
* **Clock crossing.** The crossing in `cc_sync_regs` assumes an integer
  clock ratio from one source. It has no asynchronous clock-domain crossing.
* **Program memories.** Both are plain register arrays; a full-custom
  pipelined memory would replace `pipe_prog_mem`.
* **Outside this RTL.** The FPs and the microcontroller are not included. The
  testbenches contain small models of them.

## Simulation

Each testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/cc_pkg.sv tb/tb_ppp_cc_top.sv --top-module tb_ppp_cc_top
./obj_dir/Vtb_ppp_cc_top
```

Replace the testbench name for any other module.

* `tb_branch_unit` checks random searches against a reference search.
* `tb_sync_cc` checks every output of 400 random frames in the exact cycle it
  must appear.
* `tb_pipe_cc` checks a directed program whose values and cycle numbers
  (stalls, bypasses, squashed instructions, loop timing) were worked out by
  hand. It also checks case-statement loops in the branch unit, with the
  search in ID.
* `tb_cc_sync_regs` checks the merging and holding at a ratio of 4.
* `tb_ppp_cc_top` runs the top at its default parameters. It sends 300 frames
  through the synchronized C&C and 200 headers through the pipelined C&C, with
  FP models. The pipelined C&C runs at 4x the network rate. It checks every decision and counts each mechanism (branch hit,
  default case, jump, FP start and stop, accept, discard, stall, bypass,
  redirect, pipelined case hit); each must occur.
