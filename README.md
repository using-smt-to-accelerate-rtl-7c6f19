# SVT: running every virtualization level in its own SMT context

Under nested virtualization a guest hypervisor (L1) runs its own VM (L2)
inside a VM, on a host hypervisor (L0). Every trap from L2 passes through L0,
gets reflected to L1, and L1's resume passes through L0 again. Each of those
hops is a full context switch: dozens of registers are saved to and reloaded
from memory, and the pipeline is flushed.

SVT (SMT-based virtualization) avoids the register traffic. It uses the
hardware thread contexts that an SMT core already has. Each virtualization
level stays resident in its own context: L0 in context 0, L1 in context 1,
L2 in context 2. Only one context ever runs at a time, so software still sees
a single thread. The three mechanisms are:

- **Switch by fetch selection.** A VM trap or VM resume only changes which
  context fetches (`SVt_current`). The state of the stopped context stays
  where it is.
- **Cross-context register access.** Two instructions, `ctxtld` and `ctxtst`,
  let a hypervisor read and write its guest's registers in place. They work
  because all contexts share one physical register file. A typical use is
  writing emulation results and advancing the guest's instruction pointer.
- **Virtualized context ids.** The target of `ctxtld`/`ctxtst` is named by a
  *level* (1 = my guest, 2 = my guest's guest), never by a hardware context
  number. A guest hypervisor can therefore be run nested without knowing it.

This repository holds synthesizable SystemVerilog for the per-core SVT
hardware: the micro-registers and switch rules, the level-to-context
resolver, per-context fetch, per-context rename maps and the shared
physical register file. There are also self-checking testbenches. The
architecture comes from Vilanova, Amit and Etsion, "Using SMT to Accelerate
Nested Virtualization". The RTL, its interface and every detail
that publication leaves open are this design's own.

## The state SVT adds

| name | where | meaning |
|---|---|---|
| `SVt_visor` | VMCS field, cached per core | context a VM trap switches to (the hypervisor) |
| `SVt_vm` | VMCS field, cached per core | context a VM resume switches to (the guest) |
| `SVt_nested` | VMCS field, cached per core | context of the guest's own guest, used only by cross-context accesses |
| `SVt_current` | micro-register | context that fetches and executes |
| `is_vm` | micro-register (exists already) | running inside a VM |
| `trap_mask` | cached per core (this design's addition) | per-register bits: a guest hypervisor's `ctxtst`/`ctxtld` of that register traps to the host |

A context field is a valid bit plus a 4-bit id (`svt_pkg::svt_ctx_t`). When
VMPTRLD loads a field whose id is `NUM_CTX` or larger, the field is stored
as invalid.

## Switch rules (`svt_ctx_ctrl`)

| operation of the running context | host hypervisor (`is_vm`=0) | inside a VM (`is_vm`=1) |
|---|---|---|
| VMPTRLD | copy the three fields (and `trap_mask`) into the core | VM trap |
| VM resume | `SVt_current <= SVt_vm`, `is_vm <= 1` (fault if `SVt_vm` invalid) | VM trap |
| trapping instruction (cpuid, I/O, ...) | executes normally | VM trap |
| `ctxtld`/`ctxtst` refused by the resolver | fault | VM trap |
| external interrupt | delivered normally | asynchronous VM trap |

A VM trap sets `SVt_current <= SVt_visor` and `is_vm <= 0`. Only the host
hypervisor ever loads fields or enters a VM directly. A guest hypervisor's
VMPTRLD and VM resume trap to L0, and L0 re-creates them with context ids it
has translated. This is what virtualizes the ids.

### A nested cpuid, step by step

Here L0 is in context 0, L1 in context 1 and L2 in context 2. The fields
are written as (visor, vm, nested), with `-` for invalid.

| step | running | event | fields after | switch |
|---|---|---|---|---|
| 1 | L0 | VMPTRLD vmcs01 = (0, 1, 2) | (0,1,2) | |
| 2 | L0 | `ctxtst lvl=1` fills L1's registers (goes to `SVt_vm` = 1) | | |
| 3 | L0 | VM resume | | 0 → 1 |
| 4 | L1 | `ctxtst lvl=1` fills L2's registers (a guest's level 1 goes to `SVt_nested` = 2). L1 believes L2 is in context 1 | | |
| 5 | L1 | VM resume of L2 → VM trap | | 1 → 0 |
| 6 | L0 | VMPTRLD vmcs02 = (0, 2, -), then VM resume | (0,2,-) | 0 → 2 |
| 7 | L2 | cpuid → VM trap | | 2 → 0 |
| 8 | L0 | VMPTRLD vmcs01, VM resume (reflects the trap to L1) | (0,1,2) | 0 → 1 |
| 9 | L1 | `ctxtld`/`ctxtst lvl=1` on L2's rax and RIP (emulates cpuid, advances RIP) | | |
| 10 | L1 | VM resume → VM trap; L0 loads vmcs02 and resumes | (0,2,-) | 1 → 0 → 2 |

No register is saved to or restored from memory anywhere in this sequence.
Each switch costs one fetch cycle in this design (see Timing).

## Cross-context access (`svt_xctx_resolve`)

| running | `lvl` | target |
|---|---|---|
| host hypervisor | 1 | `SVt_vm` |
| host hypervisor | 2 | `SVt_nested` |
| guest hypervisor | 1 | `SVt_nested` |
| any other combination, or the selected field invalid | | refused |

A refused access in a guest hypervisor is a VM trap (`EXIT_XCTX`). The host
hypervisor can then emulate deeper hierarchies, for example by redoing the
access with `lvl=2`. A refused access in the host hypervisor has no
hypervisor above it, so it raises `fault`. With `trap_mask[reg]` set, a
guest hypervisor's access to that register also traps. This lets the host
intercept chosen guest registers, the way VMCS bitmaps intercept other
accesses. The architecture allows for such an intercept but leaves its form
open; the mask is this design's form.

Register index `0..NUM_ARCH-1` names a general-purpose register. Index 31
names the context's instruction pointer. Other indexes raise `fault`.

## Fetch and squash (`svt_fetch_sel`)

Each context has its own PC, as an SMT thread does. Only `SVt_current`
fetches, in sequential `FETCH_BYTES` blocks; stalled contexts keep their
PCs. In the cycle of a switch:

- `flush` is raised and no fetch is issued.
- The stopped context's PC is set to its restart point. For a trap this is
  the trapping instruction, which the hypervisor advances with `ctxtst` to
  RIP. For a VM resume it is the instruction after it. For an interrupt it
  is `irq_pc`.
- From the next cycle the new context fetches from its own PC.

The flush is also a security property: nothing speculative of the old
context survives into the new one. That is why SVT does not reopen the
side channels that make operators disable SMT.

## Registers: rename maps and the shared file (`svt_rename_map`, `svt_prf`)

An SMT core indexes one physical register file through a rename map per
thread, and SVT reuses that. `ctxtld`/`ctxtst` simply steer the single
rename-map port to the *target* context instead of the running one. One
context runs at a time, so no extra ports are needed.

- Each write allocates the head of a free list shared by all contexts. The
  previous physical register goes back to the list.
- This design has no reorder buffer: a write is treated as retired on
  arrival and its old register is freed at once. The free list therefore
  stays full and works as a rotating buffer.
- At reset, register `r` of context `c` maps to physical `c*NUM_ARCH+r`.
- The file has one synchronous read port and one write port. A read returns
  data one cycle later, with write-first on the same entry. The file's
  contents are not reset.

## Top level `svt_core`: interface and timing

The out-of-order pipeline of the host core is not part of this RTL. It is
represented by an operation port. The pipeline presents SVT-relevant
operations one per cycle, in program order, each tagged with the context
that issued it (`svt_pkg::svt_op_t`).

| port | dir | meaning |
|---|---|---|
| `op_valid`, `op` | in | `kind` (`OP_RD`, `OP_WR`, `OP_CTXTLD`, `OP_CTXTST`, `OP_VMPTRLD`, `OP_VMRESUME`, `OP_VMTRAP`), `ctx`, `lvl`, `reg_idx`, `data`, `pc` (own PC for traps, next PC for VM resume), VMPTRLD fields and `trap_mask` |
| `op_squashed` | out | the op came from a context that is no longer running (fetched before a switch) and was dropped. This is a guard only: the pipeline must still discard its own in-flight ops on `flush`, because after a quick trap-and-resume the stale ops of a context could carry the running context's tag again |
| `irq`, `irq_pc` | in | external interrupt (level) for the core; restart PC of the interrupted context |
| `fetch_valid`, `fetch_ready`, `fetch_pc`, `fetch_ctx` | out/in/out/out | fetch request of the running context |
| `flush` | out | one-cycle squash on every context switch |
| `rd_valid`, `rd_data` | out | result of `OP_RD`/`OP_CTXTLD`, one cycle after the op |
| `exit_valid`, `exit_reason`, `exit_ctx` | out | a VM trap this cycle, its cause (`svt_exit_e`) and the trapping context, for the VMCS exit information |
| `fault` | out | exception to the running context: bad register index, refused access in the host, VM resume without a valid guest |
| `cur_ctx`, `is_vm`, `ctx_active` | out | `SVt_current`, `is_vm`, one-hot of the running context (usable to power-gate idle contexts) |

Timing:

- `flush`, `exit_*` and `fault` are combinational in the cycle of the op.
- `SVt_current`/`is_vm` change at the next edge, so a trap or resume takes
  one cycle.
- An op that switches context wins over an interrupt in the same cycle. The
  interrupt is a level and is taken in the next cycle if still in a VM.

| parameter | default | origin |
|---|---|---|
| `NUM_CTX` | 3 | the architecture's three-context example (L0, L1, L2) |
| `NUM_ARCH` | 16 | x86-64 general-purpose registers (this design's choice) |
| `NUM_PHYS` | 168 | integer register file of a Haswell-class core (this design's choice) |
| `FETCH_BYTES` | 16 | fetch block (this design's choice) |
| `SVT_XLEN` (package) | 64 | x86-64 |

## Where this design goes beyond the architecture, and what it leaves out

The publication specifies the state, the switch rules and the level rules.
This design chose the following:

- Encoding of "invalid" fields.
- Reset values.
- Fault versus trap for refused accesses in the host.
- VM resume with an invalid `SVt_vm` faults.
- A trap with an invalid `SVt_visor` goes to context 0.
- The register-intercept mask.
- Index 31 as the instruction pointer.
- The op interface.
- One-cycle switches.
- Immediate freeing of renamed registers.

Not in this RTL:

- The SMT pipeline itself: decode, execution, reorder buffer and the shared
  L1 data cache.
- The VMCS in memory, which the op port's VMPTRLD fields stand in for.
- The interrupt controller, whose routing of all SVT contexts to the core is
  assumed.
- Hypervisor software.
- The software-only prototype with its shared-memory command rings.

Two extensions are only sketched by the architecture and are not built:

- A per-context variant that mixes SVT and plain SMT contexts on one core.
- Bypassing intermediate levels on a trap.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_svt_xctx_resolve` | every `is_vm` × `lvl` × field-validity case, with random ids, registers and masks, against a case table |
| `tb_svt_ctx_ctrl` | the directed nested sequence above, then 3000 random ops against a model of the rules; each switch visible after one edge |
| `tb_svt_fetch_sel` | random fetch, switch and PC-write traffic against per-context PC model |
| `tb_svt_rename_map` | random renamed writes and lookups from all contexts; values land where expected, mappings stay disjoint, free list cycles many times |
| `tb_svt_prf` | random reads/writes including same-cycle bypass |
| `tb_svt_core` | full design at default parameters against a cycle-level reference model: the walk-through above plus 4000 random ops with interrupts; counts and requires every mechanism (resume, each trap cause, each fault, squash, host lvl 1/2, guest lvl 1, RIP access, one-cycle switch, free-list wrap) |
| `tb_svt_cpuid_bench` | 200 nested cpuid traps (including an extra L1 exit per handler, as nested handlers do): results correct each time, 6 switches per cpuid at exactly one lost fetch cycle each, all guest register traffic through `ctxtld`/`ctxtst` |

Run any of them with plain Verilator from the repository root, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/svt_pkg.sv tb/tb_svt_core.sv --top-module tb_svt_core -o sim
    obj_dir/sim +verilator+rand+reset+2

Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/svt_pkg.sv rtl/svt_core.sv`.
The remaining lint warnings are deliberate:

- Unused bits of the wide op struct in blocks that need only part of it.
- Upper bits of the 4-bit context id above `NUM_CTX`.
- `rst_n` used both as an asynchronous reset and in assertion
  `disable iff` clauses.

The benches check function and cycle counts of the hardware mechanisms. They
do not reproduce the publication's measured speedups. Those come from
full-system software runs and from a model built on them, not from
register-level simulation.
