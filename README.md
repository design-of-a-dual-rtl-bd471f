# Dual-warp, superscalar warp scheduler for a SIMT streaming multi-processor

A SIMT streaming multi-processor (SM) runs groups of threads, called warps, in
lock-step on its stream processors. Its front end has to decide, every cycle,
which warp gets to issue, and it has to keep feeding instructions to warps that
are ready. This RTL implements that front end for an SM with eight warps and
eight stream-processor lanes. It combines two forms of parallelism:

* **Dual-warp issue.** Warps are split by the parity of their number. An *odd*
  scheduler serves warps 1, 3, 5, 7 and an *even* scheduler serves warps 0, 2,
  4, 6. The two schedulers work independently, so one odd and one even warp
  issue in the same cycle.
* **Superscalar issue within a warp.** Each scheduler issues the next two
  instructions of its chosen warp together when they do not depend on each
  other through a register.

Two warps times two instructions gives up to **four instructions per cycle**, on
four output slots. Both the choice of warp and access to the shared
instruction cache are round-robin, so every active warp gets its turn and no
warp is starved.

```
                     instruction cache (outside this RTL)
                 AR: ARVALID ARREADY ARADDR CTXID      R: RVALID RADDR CTXID RDATA[127:0]
                                 |                                 |
                    +------------+---------------------------------+-----------+
                    |  ifetch_arbiter   8 requests -> 1 channel, round-robin   |
                    |                   responses -> even port / odd port      |
                    +------------------------------------------------------------+
                         |  request/accept per warp        | response, per parity
   +---------------------+---------------------------------+------------------------+
   |  ws_sub_module x 8 (one per warp)                                              |
   |    active, thread mask, SP PC[0..7], line buffer RDATA[0..3], Inst[0]/Inst[1]  |
   |    ws_scoreboard: Write Dependency[0..31], Read Dependency[0..31]              |
   +-----------------+---------------------------------------------+----------------+
        odd warps 1,3,5,7                                even warps 0,2,4,6
   +-----------------+------------------+      +-------------------+----------------+
   | ws_group_scheduler (odd)           |      | ws_group_scheduler (even)          |
   +--------+------------------+--------+      +--------+------------------+--------+
        issue[0]           issue[1]                 issue[2]           issue[3]
     (Instruction_0)    (Instruction_1)          (Instruction_2)    (Instruction_3)
```

The top module is `dual_warp_scheduler`.

## The life of a warp

1. **Activation.** The host writes a warp's number, thread mask and start PC
   (`cfg_valid`, `cfg_warp`, `cfg_tmask`, `cfg_pc`), one warp per cycle. The
   sub module of that warp becomes active. Its dependence tables and its line
   buffer are emptied, and every lane's PC is set to the start PC.
2. **Fetch.** An active warp whose PC is not in its line buffer asks for the
   16-byte line holding the PC. It keeps asking until the arbiter takes the
   request. It then waits for the response tagged with its own warp number.
3. **Issue.** With the line in the buffer, the sub module offers the
   instruction at the PC (`Inst[0]`) and the one after it (`Inst[1]`). Its
   scoreboard says whether `Inst[0]` may issue (`can0`) and whether `Inst[1]`
   may issue with it (`can1`). The warp's group scheduler picks one warp per
   cycle and grants one or both instructions.
4. **Advance.** A granted warp moves its PC on by one or two instructions, or
   to a jump target. When the PC leaves the line, step 2 repeats.
5. **Exit.** Issuing an exit instruction makes the warp inactive. Once the SM
   has released all of its registers, the host may activate it again.

## Dependence test (ws_scoreboard)

This is the part that makes superscalar issue safe, and it is the easiest part
to misuse from outside, so the full rules are given here.

Each warp has two tables with one entry per architectural register (32):

| table            | entry   | raised when                                            | lowered when                                   |
|------------------|---------|--------------------------------------------------------|------------------------------------------------|
| Write Dependency | 1 bit   | an instruction that writes the register issues         | the SM reports the write-back (`wr_rel`)       |
| Read Dependency  | 3-bit count | an issued instruction has the register as a source (once per source operand) | the SM reports that operand read (`rd_rel`, once per operand) |

`Inst[0]` may issue when:

* none of its sources has a pending write (no read-after-write);
* its destination has no pending write (no write-after-write);
* its destination has no pending reads (no write-after-read);
* each source's read counter has room for two more reads.

`Inst[1]` may issue in the same cycle when it passes the same test with room
for four more reads, and it is also independent of `Inst[0]`:

* it does not read `Inst[0]`'s destination;
* it does not write `Inst[0]`'s destination;
* it does not write a source of `Inst[0]`.

Also, neither instruction may be a jump or an exit, and `Inst[1]` must be in
the same 128-bit line as `Inst[0]`.

Read dependences are tracked because the SM reads operands some time after
issue. A later instruction must not overwrite a register before an earlier one
has read it. The tables are updated at the clock edge after a grant. Releases
take effect at the edge after they are presented. The SM must release exactly
what was reserved. For every source operand of every issued instruction it
sends one `rd_rel` entry `{warp, register}`. For every destination it sends one
`wr_rel` entry. An assertion flags a write-back for a register with no pending
write.

## Round-robin, twice

**Fetch arbitration (`ifetch_arbiter`).** All eight sub modules may want an
instruction line at once, but the cache has a single request channel. The
request after the last one served has the highest priority. Sub modules that
are not asking are skipped. While the cache holds `ARREADY` low, the chosen
request is held unchanged, and an assertion checks this. `CTXID` carries the
warp number on the request, and the cache returns it on the response. The
response channel has no ready signal, so it is always accepted. It is passed,
in the same cycle, to one of two response ports, chosen by the parity of
`CTXID`. Each sub module of that parity group looks for its own number. Because
these ports only route signals, most of the arbiter's output bits are wired
straight from its inputs.

**Issue (`ws_group_scheduler`).** Each group scheduler keeps its own pointer and
picks the first member after the last issued warp that can issue this cycle.
Here is an example with sixteen warps, of which 0, 3, 7, 10, 12 and 14 are
inactive:

| cycle | odd scheduler issues | even scheduler issues |
|-------|----------------------|-----------------------|
| T0    | warp 1               | warp 2                |
| T1    | warp 5 (3 skipped)   | warp 4                |
| T2    | warp 9 (7 skipped)   | warp 6                |
| T3    | warp 11              | warp 8                |

Each group goes round its own members. That is why warp 8 waits until T3 even
though warp 9 issues in T2. A warp is skipped when it cannot issue for any
reason: it is inactive, it is waiting for its line, or it has a dependence
stall. `tb_ws_group_scheduler` replays this example cycle by cycle.

## Interfaces and timing of `dual_warp_scheduler`

| group   | ports | notes |
|---------|-------|-------|
| host    | `cfg_valid`, `cfg_warp[3:0]`, `cfg_tmask[NUM_SP-1:0]`, `cfg_pc[31:0]`, `warp_active[NUM_WARPS-1:0]` | one warp per cycle; activate a warp only while it is inactive and every instruction it issued has been released, because activation empties its dependence tables |
| I-cache request | `ic_arvalid`, `ic_arready`, `ic_araddr[31:0]`, `ic_arctxid[3:0]` | valid/ready; the address is 16-byte aligned; `CTXID` is the warp number |
| I-cache response | `ic_rvalid`, `ic_raddr`, `ic_rctxid`, `ic_rdata[127:0]` | `RDATA[31:0]` is the instruction at the lowest address; no back-pressure |
| SM issue condition | `sm_ready[g]`, `sm_dual_ready[g]` (g = 0 odd, 1 even) | the SM can take one, or two, instructions from that scheduler this cycle |
| issue | `issue[0..3]` (`issue_t`: valid, warp, pc, inst, tmask) | `issue[0]`, `issue[1]` come from the odd scheduler and `issue[2]`, `issue[3]` from the even one; slot 1/3 only together with slot 0/2 of the same warp, at pc+4 |
| dependence result | `dep_ok[g]` | registered with the slots: the issued warp's second instruction passed the dependence test; high with only slot 0/2 valid when `sm_dual_ready` held the pair back |
| SM releases | `rd_rel[NRD]`, `wr_rel[NWR]` (`rel_t`: valid, warp, register) | see the dependence test above |

Reset (`rst_n`) is asynchronous and active low, and leaves every warp inactive.

Latency, with a cache that answers at once:

* a warp is active at the clock edge that ends its `cfg_valid` cycle, and it
  raises its first fetch request in the cycle that follows that edge;
* the line is usable the cycle after the response;
* the issue decision is combinational from registered state, and the issue
  slots are registered, so an instruction appears on `issue[]` one cycle after
  the cycle in which it was chosen.

A warp that issues two instructions, or one that is not the last of its line,
can issue again in the next cycle. Each scheduler therefore sustains two
instructions per cycle while a ready warp exists. Both together sustain four.

Shared types and constants are in the package `ws_pkg`. `issue_t`, `rel_t` and
`resp_t` are packed structs.

## Instruction format

The scheduler only needs to know which registers an instruction reads and
writes, and whether it changes control flow. The 32-bit format in `ws_pkg` is
this design's own:

| bits    | field |
|---------|-------|
| [31:28] | opcode: 0 nop, 1 ALU `rd,rs1,rs2`, 2 ALU-immediate `rd,rs1`, 3 load `rd,rs1`, 4 store `rs1,rs2`, 5 jump, 6 exit |
| [27:23] | rd |
| [22:18] | rs1 |
| [17:13] | rs2 |
| [12:0]  | immediate |

A jump uses bits [27:0] as the target word address. The target byte address is
`{bits[27:0], 2'b00}`. If the SM uses another encoding, change
`ws_pkg::decode`.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `NUM_WARPS` | 8 (four odd, four even) | `dual_warp_scheduler`; up to 16 (`WID_W` = 4) |
| `NUM_SP` | 8 lanes, the thread-mask width and the number of SP PC entries | `dual_warp_scheduler`, `ws_sub_module` |
| `NRD`, `NWR` | 8 and 4: two operand reads and one write-back per issue slot | release port counts |
| `NUM_REGS` | 32 dependence-table entries | `ws_pkg` |
| `LINE_W` | 128-bit instruction line, four instructions | `ws_pkg` |
| `RCNT_W` | 3-bit read-dependence counters | `ws_pkg` |

## What follows the reference design, and what is this design's own

These follow the scheduler this RTL implements:

* eight warps, split into four odd and four even;
* one sub module per warp, holding write and read dependence tables of 32
  entries, eight lane PCs, a pre-fetch controller with a four-instruction line
  buffer, and a mux for two instructions;
* a single request channel to the instruction cache, with the signal names
  above and a 128-bit read word;
* round-robin fetch arbitration;
* odd and even warp schedulers, each picking round-robin and issuing up to two
  independent instructions;
* four instruction outputs.

These are this design's choices, made where the reference design gives no
detail:

* **Instruction format, host interface and SM release interface.** These are
  all defined here.
* **Lane PCs.** All lanes in the thread mask follow one PC, and the PC of the
  lowest active lane is the warp's PC. There is no handling of branch
  divergence.
* **Control flow.** Only unconditional jumps are resolved, at issue. Warps end
  with an exit instruction. Conditional branches would need a resolution path
  from the SM, which is not defined.
* **Line buffer.** It holds one line and is refilled on a miss. It does not
  fetch ahead.
* **Read dependences.** They are counters, not single bits, so several
  in-flight readers of one register are tracked.
* **Dual-issue decision.** The SM's dispatch logic, which decides on dual
  issue, receives each scheduler's dependence result on `dep_ok` and answers
  through the `sm_dual_ready` inputs. Because the decision is needed in the
  cycle of the grant, the answer is given in advance, as a condition.
* **Arbiter responses.** The arbiter's two response ports are split by warp
  parity.

Outside this RTL, and represented only by ports, are the SM itself, the
instruction cache and the host:

* the SM's stream processors, register files, operand fetch, ALUs, write-back,
  load/store units and data caches;
* the instruction cache;
* the host.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5, from the
folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ws_pkg.sv \
    tb/tb_dual_warp_scheduler.sv --top-module tb_dual_warp_scheduler -Mdir obj
./obj/Vtb_dual_warp_scheduler
```

Replace the testbench name to run another.

| testbench | what it shows |
|-----------|---------------|
| `tb_dual_warp_scheduler` | The whole scheduler at its default size. Eight warps run generated programs against a model cache with random latency and back-pressure, and a model SM with random issue conditions and releases. Every issued instruction is checked: its program order, its slot, its thread mask, that it has no hazard, and that a pair issued together is independent. Each warp's instruction count is checked at the end. It also counts dual issue, four-in-a-cycle issue, dependence stalls, pair splits, fetch contention, cache back-pressure, SM-not-ready cycles, round-robin skips, jumps, exits and a late activation. |
| `tb_fig3_round_robin` | The sixteen-warp round-robin example through the whole scheduler (built with `NUM_WARPS` = 16): after every active warp has its line, the first four issue cycles must be 1/2, 5/4, 9/6 and 11/8, and inactive warps must never issue. |
| `tb_ws_sub_module` | One warp against a cycle-by-cycle model of its PC, line buffer and tables. Checks fetch requests, the instruction mux, `can0`/`can1`, jumps within and across lines, and exit. |
| `tb_ws_scoreboard` | Named hazard cases, then random pairs against a reference count model. |
| `tb_ws_group_scheduler` | The sixteen-warp round-robin example, then random readiness against a round-robin model. |
| `tb_ifetch_arbiter` | Round-robin order, holding a request under back-pressure, every request served once, and response routing. |

Known lint warnings:

* unused bits of helper variables;
* the scoreboard tables are left unconnected inside `ws_sub_module`; the
  scoreboard testbench uses them;
* `rst_n` is used both as the asynchronous reset and in the assertions'
  `disable iff`.
