# HIT: a hidden instruction Trojan in a MIPS pipeline

This is RTL for a hardware backdoor hidden in a processor's instruction decoder. It is
written as a model for studying that kind of attack. The backdoor stays invisible under
normal use. It acts only when the processor decodes a fixed sequence of ordinary
instructions (the *boot sequence*) followed directly by one instruction with a reserved
opcode (the *illegal instruction*). Then it raises an interrupt that no architectural
document lists. That interrupt cannot be masked and runs its handler in privileged mode.
The handler's address, fixed in hardware, lies in the **user** part of the address space.
So any user who can place code at that address and run the trigger takes over the machine:
the handler can read and write the system zone, which the operating system keeps out of
reach of user tasks.

The Trojan is spread over several units of a five-stage front end in the style of
miniMIPS: PF (program fetch), EI (instruction extraction), DI (decode), EX, MEM, and a
coprocessor that handles exceptions. The register file, the ALU and the memories of that
core are not included. Their signals are ports of the top module `hit_minimips`, and the
testbench plays their part.

## The trigger: a boot sequence FSM and a multi-bit mask

The trigger logic sits beside the decoder in the DI stage. It has four units,
instantiated together in `hit_trojan`:

| unit | file | what it does |
|---|---|---|
| Inst | `rtl/hit_inst.sv` | `match[k]` = "the word in decode is boot instruction *k*", for all *k* at once |
| State | `rtl/hit_state.sv` | FSM init → state 1 → … → state N, plus a mask register |
| Illegal Inst | `rtl/hit_illegal_inst.sv` | word in decode has the reserved opcode (default 0x1D) |
| MASK | `rtl/hit_mask.sv` | hidden interrupt = illegal AND every mask bit |

**State machine.** State 0 is *init*, and states 1..N follow the boot sequence
(N = `BOOT_LEN` = 11). On each *valid* instruction in decode:

* in state k < N, the FSM moves to k+1 if the word is boot instruction k. Otherwise it
  returns to init. A mismatch always returns to init, even when the mismatching word is
  itself the first boot instruction.
* in state N, the FSM returns to init whatever the word is. The word decoded in state N
  is the one that can fire the Trojan, so each trigger fires once only.

**Nulls are invisible to the FSM.** A taken branch and an exception flush both turn
fetch slots into nulls (`valid = 0`). The FSM holds its state on a null. A branch can
therefore be part of the boot sequence. In the default sequence two elements are
branches, and the boot sequence survives the bubble their jumps leave behind.

**Why a mask instead of an enable bit.** The mask is an 8-bit register. It is reloaded on
every valid instruction and held on a null. In state N it holds all ones. In any other
state k it holds `~((k+1)*157) XOR salt`, where `salt` is the low 8 bits of the
instruction, and bit `(salt + k) mod 8` is forced to 0. That value is never all ones.
The MASK unit gates one copy of the illegal-instruction line with each mask bit and
requires every gated copy to be high, so only state N lets the illegal instruction
through. A single enable bit would stay at 0 for the chip's whole life and then switch
once. This mask instead changes on nearly every instruction, even while the FSM sits in
init. In the workload test it changes in about 87 % of cycles. Its switching activity
therefore looks like that of the rest of the decoder.

**Recognising boot instructions: decoder reuse.** The Inst unit can identify an
instruction in two ways. It can reuse the decoder's output: `mips_decoder` gives every
instruction its own identity code (`hit_pkg::inst_id_e`), and a 7-bit compare is enough.
Or it can use a comparator of its own on the opcode/function fields
(`hit_pkg::id_pattern`). Whichever costs less area should be used for each element. The
`REUSE` bit vector chooses per element. Both give the same result for every word, and
`hit_inst_tb` checks that.

**Default boot sequence** (`hit_pkg::BOOT_SEQ_DEF`, element 0 first):
SRAV, MTHI, BLTZAL, SLTIU, LWL, SWR, MTLO, XORI, BGEZAL, LHU, SRLV. The 11 instructions
are all different and rarely used, and two of them are branches. The model it follows
picks such a sequence by a Monte Carlo search. That search needs per-instruction
frequencies and areas, which are not included here. This particular sequence is
illustrative.

Without the boot sequence the illegal instruction is just a reserved encoding. The
decoder flags it, and it raises the ordinary reserved-instruction exception (ERINS) like
any other unknown word. When the Trojan fires, DI drops the ERINS flag for that
instruction and sets the HIT flag instead.

## The payload: a hidden privileged interrupt

The HIT flag travels with its instruction through the EX and MEM stage registers to
`coprocessor`. The coprocessor handles six causes, in priority order **HIT**, OVERF
(overflow), ERINS (reserved instruction), BREAK, SCALL (system call) and ITMAT (external
interrupt, the only maskable one). When it takes one, in the same cycle it:

* redirects the fetch to the handler address from its table. HIT goes to `HIT_VECTOR` =
  0x0008_0000 in the user zone. The others go to the system zone: 0x8000_0080, and
  0x8000_0200 for ITMAT.
* nulls every younger instruction (EI, EX and MEM registers);
* saves EPC, the cause, and the previous mode and interrupt enable;
* enters privileged mode with ITMAT masked, so that not even the OS timer can preempt
  the handler.

`pf_stage` computes the next PC as `int ? TN : (jmp ? JA : pc + 4)`. A coprocessor
redirect wins over a jump decided in the same cycle.

Timing of a trigger (one instruction per cycle, no stalls):

```
cycle   t        t+1      t+2                t+3
DI      illegal  -        -                  -
EX               illegal
MEM                       illegal: redirect
PC                                           HIT_VECTOR (handler fetched)
```

`zone_guard` checks data accesses. In user mode an address above `USER_ZONE_TOP`
(0x7FFF_FFFF) is refused (`dmem_fault`). In privileged mode everything is granted. The
hidden handler sits in the user zone but runs privileged, so its accesses to the system
zone are granted. ERET (0x42000018 pattern) at MEM returns to EPC and restores the saved
mode. EPC is the address after the excepting instruction for synchronous causes, and the
interrupted instruction for ITMAT.

After reset the core is privileged at 0xBFC0_0000, with EPC = 0 and the saved mode set
to "user, interrupts on". A first ERET therefore starts the user task at address 0.

## Top-level interface (`hit_minimips`)

| port | dir | meaning |
|---|---|---|
| `imem_addr` / `imem_rdata` | out / in | fetch; the word must be returned in the same cycle |
| `di_valid`, `di_pc`, `di_instr` | out | instruction now in decode, for the register file / branch unit |
| `di_jump`, `di_jump_addr` | in | the branch in decode is taken, and its target; ignored unless the word decodes as a branch |
| `ex_overflow` | in | the instruction in EX overflowed |
| `dmem_req`, `dmem_addr` → `dmem_grant`, `dmem_fault` | in → out | zone check of a data access, under the current mode |
| `it_mat` | in | external interrupt, level |
| `hit_state`, `hit_mask` | out | Trojan FSM state and mask (observation) |
| `exc_taken`, `exc_cause`, `priv`, `ie`, `epc`, `last_cause` | out | coprocessor status |

Reset (`rst_n`) is synchronous and active low. All parameters of the top have defaults,
and they are listed in `hit_pkg`: `BOOT_LEN` 11, `BOOT_SEQ`, `REUSE`, `MASK_W` 8,
`ILLEGAL_OPCODE` 6'h1D, and the addresses above.

## What comes from the HIT model and what is this design's own

Taken from the model: the boot-sequence FSM with a state and a mask per step, and its
return to init on a mismatch. Reading only valid instructions, so nulls after jumps are
skipped. The 11-instruction length and distinct instructions. The illegal instruction
recognised by its opcode alone. A multi-bit mask instead of an enable, one that flips
with the incoming instructions. Decoder reuse for
recognising instructions. The Int path DI → EX → MEM → coprocessor → PF. The interrupt
having priority over a jump in PF. A non-maskable, privileged hidden interrupt with a
hardware-held vector in the user zone. ERINS, not HIT, for the illegal instruction
without its boot sequence. The cause names.

This design's own choices: the concrete boot instructions and `REUSE` mix. The reserved
opcode 0x1D. The mask width and formula, and combining the gated copies with AND. Binary
state encoding. The decoder (MIPS-I integer set plus MFC0/MTC0/ERET). Branch resolution
in DI by an external unit, with one null per taken branch and no delay slot. A
single-cycle instruction memory. The flush rule. The cause priority, EPC rule, vectors,
reset state and one-level mode stack. ITMAT read as the external interrupt. The zone
boundary, and refusing an access on a fault line instead of raising an exception.

Not included: the register file, ALU, data memory and the rest of the host core. Also
not included: the design-time search that would choose an optimal boot sequence from
instruction statistics and area.

## Verification

Each unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog. `tb/tb_mips_pkg.sv` builds
instruction words from the MIPS-I encoding tables with random free fields. The
testbenches compare the RTL against that package, not against the RTL's own tables.

* `mips_decoder_tb`: every instruction with random fields, plus reserved opcodes,
  function codes, REGIMM and COP0 codes.
* `hit_inst_tb`: three copies (mixed, all-reuse, all-comparator) must give identical,
  correct match vectors.
* `hit_state_tb`: 60 000 random cycles against a reference FSM. Every state is reached.
  The mask is all ones only in state N, unchanged on nulls, and changing on most
  instructions in init.
* `hit_illegal_inst_tb`, `hit_mask_tb` (exhaustive), `zone_guard_tb`, `pf_stage_tb`
  (interrupt and jump together), `coprocessor_tb` (30 000 random cycles against a
  reference model, every cause taken).
* `hit_trojan_tb`: full sequence triggers, with and without scattered nulls. Partial,
  broken and late sequences do not. Random traffic is checked against a reference.
* `hit_minimips_tb`: the whole design at its default parameters. The user task runs
  12 105 random instructions with two Trojan illegal words, two other reserved words, two
  BREAKs, one SYSCALL, 11 overflowing ADDs, three external interrupts and random taken
  branches. It then runs a SYSCALL whose redirect meets a taken branch, the boot sequence
  with both of its branches taken over words that would break it, and the illegal word.
  The test checks the FSM state every cycle against a reference, and every decoded word
  against memory. It checks the mode against the zone of the decoded PC, and the zone
  guard against the mode. It checks the 3-cycle trigger-to-handler latency and the exact
  count of each cause: ITMAT 4, OVERF 11, ERINS 4, BREAK 2, SCALL 2, HIT 1. The random
  part must produce no hidden interrupt. The test also counts that each mechanism
  happened: sequence broken, null inside a sequence, illegal word without the sequence,
  interrupt against jump, ITMAT held off in the handler, user access refused, handler
  access granted.

* `hit_programs_tb`: the concealment experiment. Four random programs run back to back
  in user mode: compute-, jump-, memory- and control-intensive, 12 105 instructions in
  all. Four reserved words are inserted, two of them with the Trojan's opcode. The test
  expects no hidden interrupt and ERINS 4, OVERF 11, BREAK 2, SCALL 1. It prints how
  often each FSM state was entered.

* `hit_boot_lengths_tb`: the Trojan with boot sequences of 3, 6 and 9 instructions, side
  by side. The full sequence triggers. A sequence one instruction short does not, and
  neither does the illegal word alone.

In typical runs random code enters state 1 a few times and state 2 at most once or twice.
It never gets further. Only the directed sequence in `hit_minimips_tb` reaches state 11.

For each module, a copy with a deliberate bug (wrong priority, off-by-one zone boundary,
swapped function codes, OR instead of AND, and so on) makes its testbench fail.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/hit_pkg.sv tb/tb_mips_pkg.sv tb/hit_minimips_tb.sv \
    --top-module hit_minimips_tb -Mdir obj
./obj/Vhit_minimips_tb
```

Replace `hit_minimips_tb` with any other testbench name. The packages must come first.
`-y` finds each module in the file of the same name. The end-to-end run takes well under
a second.

## Changing it

* **Another boot sequence:** override `BOOT_LEN`, `BOOT_SEQ` (packed array of
  `inst_id_e`, element 0 in the low position) and `REUSE` on `hit_minimips`. Keep
  `BOOT_LEN + 1 < 2**MASK_W`, which an assertion checks.
* **Another trigger opcode:** `ILLEGAL_OPCODE`. Pick a code the decoder treats as
  reserved, otherwise the word is also an ordinary instruction.
* **Another memory map:** `HIT_VECTOR`, `EXC_VECTOR`, `ITMAT_VECTOR`, `RESET_PC`,
  `EPC_RESET`, `USER_ZONE_TOP`.
* **Connecting a real datapath:** drive `di_jump`/`di_jump_addr` from the branch
  comparison of the instruction in decode. Drive `ex_overflow` from the ALU for the
  instruction in EX, and route data accesses through `dmem_req`/`dmem_addr`, honouring
  `dmem_grant`.
