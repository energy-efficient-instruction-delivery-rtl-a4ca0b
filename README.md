# SHRIMP instruction delivery from domain wall memory

Domain wall memory (DWM, also called racetrack memory) stores bits as
magnetic domains along thin nanotapes. Many domains share one access port,
which makes the memory dense and low in leakage. The cost is that a domain
has to be *shifted* under a port before it can be read, and every shift takes
a cycle and energy. Used as an instruction scratchpad, a plain (linear) layout
pays for this on every loop: after the last instruction of a loop body the
tape is far from the body's first instruction and has to be shifted all the
way back.

SHRIMP (shift-reducing instruction memory placement) pairs a compile-time
code layout with a little hardware so that loops stop paying for that return
trip. Each cluster of tapes has two access ports. The code of a cluster is
split into two halves; the first half is read through one port while the tape
moves one way, the second half is stored *reversed* and read through the other
port while the tape moves back. After the cluster has been read the tape is
where it started, and the loop's first instruction can be read at once.

This repository holds the hardware side of that scheme in SystemVerilog:
the fetch address logic that walks a cluster forwards and then backwards, the
shift control unit, the head status array that remembers where each cluster
was left, and a behavioural model of the DWM itself, wired together as one
instruction delivery subsystem for a 32-bit RISC-V core.

## Memory organisation

| quantity | default | parameter |
|---|---|---|
| capacity | 64 KiB (16384 instructions) | `MEM_BYTES` |
| effective domains per tape, d | 8 | `DOMAINS` |
| tapes per cluster | 32 (one instruction per domain row) | `TAPES` (model) |
| clusters (DBCs) | 2048 | `MEM_BYTES/(4*DOMAINS)` |
| overhead domains per tape | d/2 - 1 = 3 | implied |
| head position bits per cluster | ceil(log2(d/2)) = 2 | implied |
| head status array | 2048 x 2 = 4096 flip-flops in 8 banks | `HS_BANKS` |

A cluster (DWM block cluster, DBC) is 32 tapes that shift and are read
together, so one domain position across the cluster holds one instruction.
Each tape has a read-write port at effective domain 0 and a read-only port at
domain d/2. When the cluster has been shifted s positions away from its
initial position (0 <= s <= d/2-1), the first port sees domain s and the
second sees domain d/2+s. The d/2-1 overhead domains at one end of each tape
are what makes those shifts possible without pushing data off the tape.

A byte address splits as

```
 [ ... | cluster index | domain (log2 d bits) | 00 ]
                         ^ top domain bit: 0 = upper half, 1 = lower half
```

Every domain has a fixed port (static policy): the upper half
(domains 0..d/2-1) is read through the read-write port, the lower half
(domains d/2..d-1) through the read-only port, and in both cases the cluster
has to sit at position `domain mod d/2`. Clusters are left wherever the last
read put them (lazy policy), so their positions must be remembered; that is
the job of the head status array.

The supported tape lengths are 8, 16, 32 and 64 domains. At 64 KiB these give
head status arrays of 4096, 3072, 2048 and 1280 bits.

## The back-and-forth read order

This is the part that differs from an ordinary instruction memory. Within a
cluster, sequential code is stored in this order (d = 8 shown):

```
 domain:        0    1    2    3  |  4    5    6    7
 read order:    1st  2nd  3rd  4th|  8th  7th  6th  5th
 position s:    0    1    2    3  |  0    1    2    3
 port:          read-write        |  read-only
```

Reading it front to back shifts the cluster 0 -> 1 -> 2 -> 3 through the
upper half. The fifth instruction, domain 7, needs position 3 as well, so it
is read with no shift; the sixth to eighth take the cluster 2 -> 1 -> 0. The
cluster ends at its initial position, so a loop that fills the cluster jumps
back to domain 0 with no shift at all.

`shrimp_next_pc` turns this order into the fetch unit's "next sequential
address":

* upper half (address bit log2(d)+1 = 0): `pc + 4`;
* lower half (that bit = 1): `pc - 4`;
* last word of the upper half (domain d/2-1): continue at domain d-1 of the
  same cluster (the implicit split jump);
* last word of the lower half (domain d/2): continue at domain 0 of the next
  cluster (the implicit next-cluster jump).

Only the direction bit is needed for the first two cases; the two implicit
jumps are found from the domain bits. All sequential code, whether a loop body
placed in a cluster of its own or straight-line code packed linearly, follows
this one walk. Branch and jump targets are ordinary addresses; the code layout
is responsible for putting a target where the walk expects it.

A loop body shorter than a cluster is placed by the layout with its first
half ascending from domain 0, an unconditional *split jump* to the start of
its second half (placed so that it lines up with the read-only port at the
position the first half finished at), and a *fall-through jump* to the next
code at the end. Unused words are NOPs. The end-to-end testbench contains
one such loop and one loop that fills a cluster completely.

### What the code layout must respect

* A call's return address is computed by the core as call address + 4. That
  is only the next instruction in the read walk in an upper half, so calls
  must be placed in upper halves.
* A conditional branch whose target moved out of reach after placement must
  be rewritten as a branch around an unconditional jump.
* Code must not rely on falling through from one basic block into another
  across unused words; the layout inserts explicit jumps there.

## Shift control and timing

`dwm_shift_ctrl` sits between the fetch unit and the memory. For a pending
request it reads the cluster's position from the head status array and
compares it with the position the domain needs.

* Aligned: the request is granted in the same cycle, the memory is read
  through the domain's port, and the word arrives with `rvalid` one cycle
  later.
* Not aligned: the cluster is shifted one domain towards the needed
  position, and the new position is written back to the head status array.
  The request stays pending and is looked at again in the next cycle.

So an instruction that needs k shifts arrives k cycles later than an aligned
one: one cycle per shift. With an aligned memory and a core that is always
ready, the subsystem delivers one instruction per cycle.

The head status array is read combinationally on every request and written
at the clock edge, but only in cycles that shift: an aligned read leaves the
position as it was, so it is not rewritten.
It is organised in banks (by the top bits of the cluster index) and each bank
has its own write enable, exposed as `hs_bank_we_o`, meant for clock gating.
At reset every entry is 0, and the DWM model puts every cluster at its
initial position, so the two agree.

## Fetch unit

`shrimp_fetch` is a simple fetch stage with one request in flight. It keeps
the address to fetch, sends it to the shift controller, and hands the word to
the core with `instr_valid_o`. In the cycle the core takes an instruction
(`instr_ready_i`), the core says with `branch_i`/`branch_target_i` whether
control flow goes elsewhere; the next request leaves in that same cycle, to
the branch target or to the SHRIMP successor. If the core is not ready, the
word is held in a register and no new request is made.

## Files

| file | contents |
|---|---|
| `rtl/shrimp_pkg.sv` | shift direction and access port types |
| `rtl/shrimp_next_pc.sv` | next sequential address (increment / decrement / implicit jumps) |
| `rtl/shrimp_fetch.sv` | fetch address unit |
| `rtl/dwm_shift_ctrl.sv` | shift control unit |
| `rtl/head_status_array.sv` | banked per-cluster position store |
| `rtl/dwm_imem.sv` | behavioural model of the DWM |
| `rtl/shrimp_imem_top.sv` | the subsystem |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_shrimp_imem_top_d64` |

## Top-level interface (`shrimp_imem_top`)

| port | dir | meaning |
|---|---|---|
| `clk_i`, `rst_ni` | in | clock, asynchronous active-low reset |
| `fetch_en_i`, `boot_addr_i` | in | start fetching at `boot_addr_i` |
| `instr_valid_o`, `instr_rdata_o`, `instr_addr_o` | out | instruction for the core |
| `instr_ready_i` | in | core takes the instruction this cycle |
| `branch_i`, `branch_target_i` | in | redirect, valid in the cycle an instruction is taken |
| `load_we_i`, `load_addr_i`, `load_data_i` | in | write one word (word index) of the program image; use while `fetch_en_i` is low |
| `shift_o`, `shift_dir_o` | out | a cluster shifts this cycle, and which way |
| `shift_need_o` | out | shifts the pending fetch still needs |
| `shift_err_o` | out | sticky: a shift would have run past the overhead domains (never happens with correct bookkeeping) |
| `seq_lower_o`, `seq_split_o`, `seq_dbc_o` | out | the fetch took a decrementing step, the implicit split jump, or the implicit next-cluster jump |
| `hs_bank_we_o` | out | head status array bank write enables |

## How far to trust it, and where it is this implementation's own

Follows the SHRIMP description: two ports per tape (read-write at the first
effective domain, read-only at the midpoint), d/2-1 overhead domains, the
static port policy, the lazy shift policy with a head status array of
ceil(log2(d/2)) bits per cluster built from banked flip-flops, one cycle per
shift, a 64 KiB memory, 8 to 64 domains per tape, and the increment/decrement
choice made from one address bit.

Choices made here where the description is silent:

* The implicit hardware jumps at both ends of the read walk. The SHRIMP
  description calls for a hardware branch when sequential code leaves a
  fully filled cluster; the layout stores the lower half reversed for all
  code, so both ends of the walk are handled in hardware here.
* 32 tapes per cluster. This matches the head status array sizes given for
  the method (e.g. 4096 bits for 64 KiB at 8 domains, i.e. 2048 clusters).
* The request/grant/rvalid fetch bus, the fetch unit around the
  increment/decrement logic, the branch redirect timing, eight head status
  banks selected by the top index bits, and shifting one step per cycle with
  a write-back each step.
* Program loading. With a read-write port only at domain 0 and at most d/2-1
  shifts, the lower half of a tape cannot be reached for writing; how the
  program gets into the memory is not described. The model has a separate
  load port that writes words directly.
* `dwm_imem` is a behavioural model of a magnetic macro. It keeps the stored
  words and each cluster's real position, so any mistake in the
  bookkeeping shows up as a wrong instruction; it says nothing about the
  physics, energy or shift errors of a real tape.

Not included: the RISC-V core (the subsystem exposes the core's fetch
signals), and the compile-time placement pass that splits basic blocks,
reverses lower halves and inserts split and fall-through jumps and NOPs. The
testbenches place their own small programs by those rules.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/shrimp_pkg.sv \
  rtl/shrimp_next_pc.sv rtl/shrimp_fetch.sv rtl/dwm_shift_ctrl.sv \
  rtl/head_status_array.sv rtl/dwm_imem.sv rtl/shrimp_imem_top.sv \
  tb/tb_shrimp_imem_top.sv --top-module tb_shrimp_imem_top
./obj_dir/Vtb_shrimp_imem_top
```

Swap the testbench for any other in `tb/` (a unit testbench needs only the
package and its module).

What the testbenches check:

* `tb_shrimp_next_pc`: every address of many clusters, for d = 8 and 64,
  against the read walk.
* `tb_head_status_array`: reset to zero, random writes and reads against a
  reference array, one bank enable per write.
* `tb_dwm_imem`: random shifts and reads through both ports against a
  reference position per cluster; refused shifts past either end.
* `tb_dwm_shift_ctrl`: random requests against a reference head status
  array; exactly |needed - current| shift cycles in the right direction,
  then grant, the right port, and `rvalid` one cycle later.
* `tb_shrimp_fetch`: random grant delays, stalls and branches; every
  address, word, and arrival time.
* `tb_shrimp_imem_top` (defaults: 64 KiB, 8 domains) and
  `tb_shrimp_imem_top_d64` (64 domains): a SHRIMP-placed program with
  straight-line code, a split loop, a full-cluster loop, a far jump and a
  linear short loop, run by a small core model with random stalls. Every
  instruction's address, word and arrival cycle (1 + needed shifts) is
  checked, the shift total is compared with the reference, and the run fails
  if any mechanism never happened: up and down shifts, aligned fetches,
  decrementing steps, both implicit jumps, taken branches, stalls, writes to
  several head status banks. It also checks that the back-edge of the
  full-cluster loop needs no shift and the back-edge of the split loop needs
  exactly one.

At 8 domains the program takes 70 instructions and 54 shifts; at 64 domains,
322 instructions and 306 shifts.

To change the tape length, set `DOMAINS` (a power of two, 4 or more) on
`shrimp_imem_top`; the clusters, head position width and head status array
follow. `MEM_BYTES` must be a multiple of `4*DOMAINS*HS_BANKS`.
