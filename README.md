# TriBank register file

A physical register in an out-of-order core spends most of its life doing
nothing. It is allocated at rename long before its producer writes it, it is
read by its consumers during a short burst, and then it sits idle until a later
writer of the same logical register commits and frees it. A monolithic file has
to be large enough for all of those idle values *and* have enough ports for the
busy ones, and the combination makes it slow.

The TriBank file splits the storage by phase of life:

| bank | role | size (default) | ports (default, IW = 8) |
|------|------|----------------|-------------------------|
| **RF2** | rename bank: destinations are allocated here, results are written here | 128 | IW read, IW write, IW transfer-out |
| **RF3** | retention bank: values that have been written wait here until released | 128 | IW read, IW transfer-in |
| **RF1** | operand bank: small, fully associative, the only bank the functional units read | 16 | 2·IW read, IW write |

RF2 and RF3 are *direct mapped*: the value in RF2 register *p* can only move to
RF3 register *p*. As soon as a value has been written and RF3 register *p* is
free, the value moves over, and RF2 register *p* is free for the next rename at
once. This releases RF2 registers much earlier than a conventional file would. So
RF2 needs few ports and a moderate size, and rename still has as many registers
to hand out as a monolithic file. RF1 receives a copy of a value only when an
instruction that needs it wakes up, so RF1 can be small and heavily ported, and
the bypass network stays that of a single-cycle file.

The RTL implements the register file subsystem: the three banks, the transfer
logic, the bank-selection logic, the rename and committed maps with their bank
flags, and release and recovery. The core around it (fetch, issue queue, reorder
buffer, functional units, bypass network) is not part of it. The testbenches
model that core.

## Life of one value

Take an instruction *I* that writes logical register r6 and is given RF2
register 5.

1. **Rename (cycle 0).** `rf2_bank` hands out the lowest-numbered free
   registers, up to IW per cycle. `rename_map` records r6 → (5, flag = RF2). The
   `bank_sel_table` records that RF2 register 5 now belongs to instruction id
   *I*.
2. **Writeback.** *I*'s result is written into RF2[5] and the register's
   *written* bit is set.
3. **Transfer.** From the next cycle, register 5 can move if RF3[5] is free.
   `xfer_ctrl` grants up to IW eligible registers per cycle, starting from a
   rotating pointer. In the granted cycle RF2[5] is read on a transfer bus and
   written into RF3[5] at the clock edge. RF3[5] becomes busy and RF2[5] is
   freed. Every map entry that names (5, RF2) has its flag set to RF3. The
   bank-select entry for 5 is set to "highest id, select = RF3".
4. **Copy into RF1.** When a consumer's operands are ready in the wakeup logic,
   the core presents a copy request (`fq_*`) with the register, the flag it got
   at rename and its own id. The bank-select logic picks RF2 or RF3. Both banks
   are read, and RDLAT cycles later the value enters RF1 under the tag
   {bank, 5}. A request for an RF2 value that has not been written yet is not
   launched (`fq_launch` = 0). That happens when wakeup runs ahead of the
   register write, and the consumer then takes the value from the bypass.
5. **Read and consume.** The consumer reads RF1 (`rd_*`, combinational) and,
   when it executes, marks the operand consumed (`cs_*`). This also happens when
   the operand came off the bypass instead.
6. **Release.** When a later writer of r6 commits, the committed map's entry for
   r6 still names (5, flag). The register is freed in the bank the flag names.
   Usually that is RF3. If the value never got to move because RF3[5] was
   occupied the whole time, it is freed from RF2. Any RF1 copy of it is dropped.

## One register number, two live values

Because RF2[5] is freed as soon as its value moves, RF2[5] can be renamed again
(say for r4) while the older value of r6 still lives in RF3[5]. Consumers of
both values say "register 5", and each must get its own value:

```
r6 <- ...        ; r6 -> 5 in RF2, producer id 100
... <- r6        ;   (value moves to RF3[5] before this reads it)
r4 <- r2         ; r4 -> 5 in RF2 again, producer id 105
... <- r6        ; id 106, flag RF3: must read RF3[5]
... <- r4        ; id 107, flag RF2: must read RF2[5]
```

The rename flag alone is not enough: the second instruction (id 101) was
renamed before the transfer and holds flag RF2. The bank select table keeps,
per physical register, the id of the instruction that owns RF2[p] and a select
bit:

* a transfer (or any other release of RF2[p]) sets the id to "highest" and the
  select bit to RF3;
* a new rename of RF2[p] sets the id to the new producer and keeps the select
  bit.

A consumer with id *c* reads the select bit if *c* is older than the stored id,
and its own rename flag otherwise. In the example, id 101 is older than "highest"
and reads RF3 although its flag says RF2. Id 106 and id 107 are newer than 105
and follow their flags. The lookup runs in parallel with the reads of both
banks, so it adds only a final 2:1 mux.

Ids are `IDW` bits (16 by default) and wrap around. They compare as a signed
difference, which is valid while the two ids are fewer than 2^(IDW-1) apart.
An RF2 mapping can stay unmoved for a long time, so once its owner commits, the
table stops comparing for that register and consumers simply follow their flags.
This is safe because no older instruction can still be in flight.

At commit, the same table tells whether RF2[p] still belongs to the committing
instruction (`ow_owned`). That decides whether the committed map records the
new value as in RF2 or already in RF3.

## RF1: copies, tags and replacement

RF1 entries hold a tag {bank, register}, the data, a *consumed* flag and a
place in a recency order, kept as an NENT×NENT matrix. Values are placed as
follows:

1. into a free entry;
2. otherwise over a consumed entry, the one consumed longest ago first (least
   recently consumed);
3. otherwise, as a last resort, over the least recently used entry, even though
   its value has not been consumed yet (`fill_evict` = 1).

The last resort is this design's addition. If only consumed entries could be
replaced, RF1 could fill up with values whose consumers are each still waiting
for their other operand, and the machine would stop. A displaced value is never
lost: it is still in RF2 or RF3, and the consumer's read misses (`rd_hit` = 0),
so the core asks for a copy again.

Consumption marks come from executed instructions. Marking on read instead
would leave bypassed values unmarked forever. A copy request for a value that is
already present refreshes the entry and clears its consumed flag, because there
is a new consumer. A flush marks every entry consumed, since the squashed
consumers will never do it.

Tags follow the value: when RF2[p] moves to RF3, RF1 entries and in-flight
copies tagged {RF2, p} become {RF3, p}. A copy whose register is released is
dropped, both in RF1 and in the copy pipeline. This means RF1 never holds a
stale copy of a re-used register number.

## Release and recovery

* **Commit** (up to IW per cycle, in program order): the committed map installs
  the new mapping and releases the one it replaces, in the bank named by its
  flag.
* **Flush**: the design recovers from a misprediction by squashing *all*
  uncommitted instructions. The speculative map is restored from the committed
  map. Every RF2 and RF3 register the committed map does not use is released,
  along with its RF1 copies. The core must not present a rename or a commit in
  the flush cycle, and must not write back squashed results afterwards.
  Per-branch checkpoints are not implemented.

## Interface of `tribank_rf`

All groups may be active in the same cycle. "Comb." means the output answers
the inputs of the same cycle.

| group | direction | meaning |
|-------|-----------|---------|
| `rn_valid, rn_dst_valid, rn_lsrc[2], rn_ldst, rn_id` | in | rename group of IW slots, in program order |
| `rn_ready` | out, comb. | group is renamed this cycle (enough free RF2 registers, no flush); otherwise none of it is |
| `rn_pdst, rn_psrc[2], rn_sflag[2]` | out, comb. | new RF2 register; physical sources and their bank flags (same-group dependences resolved) |
| `wb_valid, wb_preg, wb_data` | in | IW result writes into RF2 |
| `fq_valid, fq_preg, fq_flag, fq_id` | in | IW copy requests (operand ready in wakeup) |
| `fq_launch` | out, comb. | request launched |
| `fill_ok, fill_evict` | out | RDLAT cycles after launch: value placed in RF1; it displaced an unconsumed value |
| `rd_preg, rd_flag, rd_id` | in | 2·IW operand reads |
| `rd_hit, rd_data, rd_bank` | out, comb. | RF1 result and the bank of the operand |
| `cs_valid, cs_bank, cs_preg` | in | 2·IW consumed operands (pass back `rd_bank`) |
| `cm_valid, cm_ldst, cm_pdst, cm_id` | in | IW commits of instructions with a destination |
| `flush` | in | squash every uncommitted instruction |
| `xf_valid, xf_preg` | out, comb. | transfers RF2 → RF3 this cycle |
| `rf2_free_cnt, rf1_valid` | out | status |

Clock `clk` and asynchronous active-low reset `rst_n`. After reset, logical
register *i* maps to RF2 register *i*, holding zero. All other registers are
free, and RF1 is empty.

## Parameters

Defaults are in `tribank_pkg` and are the main configuration: 8-wide, RF1 of 16
entries, RF2 and RF3 of 128 registers each with two-cycle reads (`RDLAT` = 2),
and 8 transfer buses.

| parameter | default | meaning |
|-----------|---------|---------|
| `IW` | 8 | issue/commit width; RF1 gets 2·IW read and IW write ports, RF2/RF3 IW ports each, IW transfer buses |
| `NPHYS` | 128 | registers in RF2 and in RF3 (a power of two) |
| `NRF1` | 16 | RF1 entries |
| `RDLAT` | 2 | RF2/RF3 read latency of a copy into RF1 |
| `NLOG` | 32 | logical registers (own choice: an Alpha-style integer file) |
| `XLEN` | 64 | data width (own choice) |
| `IDW` | 16 | instruction id width (own choice) |

The smaller variant with 64 + 64 registers and single-cycle banks is
`NPHYS = 64, RDLAT = 1`. A 4-wide machine is `IW = 4`. A core with separate
integer and floating-point files uses two instances.

## Files

| file | contents |
|------|----------|
| `rtl/tribank_pkg.sv` | defaults, bank encoding, wrap-around id compare |
| `rtl/tribank_rf.sv` | top: wiring, release masks, copy pipeline with retag/kill |
| `rtl/rf2_bank.sv` | RF2 storage, allocated/written bits, allocator |
| `rtl/rf3_bank.sv` | RF3 storage, busy bits |
| `rtl/rf_array.sv` | multi-ported storage with pipelined and same-cycle reads (used by RF2/RF3) |
| `rtl/rf1_assoc.sv` | RF1: associative read, placement, LRC order, retag/invalidate |
| `rtl/xfer_ctrl.sv` | transfer selection |
| `rtl/bank_sel_table.sv` | bank select table and ownership lookup |
| `rtl/rename_map.sv` | speculative and committed maps with flags, commit release, flush |

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tribank_pkg.sv \
    tb/tb_tribank_rf.sv --top-module tb_tribank_rf -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

* `tb_tribank_rf`: the end-to-end test, at a deliberately cramped size (2-wide,
  8 + 8 registers, RF1 of 4, window of 12) so that every mechanism occurs. A
  small core model renames a random instruction stream. It requests copies when
  operands are ready, sometimes in the very cycle the producer writes back. It
  reads operands from RF1 after the copy latency (a miss sends it back to
  request again), then writes back and commits in order, with a flush every 211
  cycles. Every operand value is compared with what a sequential machine would
  read. Every copy must reach RF1 exactly RDLAT cycles after it was
  launched. The test also requires that each of these happens at least once:
  transfers; RF3 reads that override a stale RF2 flag; reads of an older value
  in RF3 while the same register number holds a newer mapping in RF2; held-back
  early requests; RF1 misses; forced RF1 replacements; rename stalls; flushes;
  and commit releases from both RF2 and RF3.
* `tb_tribank_rf_full`: the same test at the default size, with a 64-entry
  window and 20 000 instructions. It takes under a second. A rename stall cannot
  happen at this size and is not required.
* `tb_tribank_rf_workloads`: the same core model, packaged as the parameterized
  module `tb/tribank_core_model.sv`, run side by side against three other
  configurations. These are 64 + 64 registers with single-cycle banks at 8 and
  at 4 wide, and the default banks at 4 wide. With 64 registers per bank, 64
  in-flight plus 32 committed values exceed RF2, so those two runs must show
  rename stalls. At 4 wide, 16 RF1 entries never all hold unconsumed values,
  so a forced replacement is not required there. Build it with `-y tb` added
  to the command above.
* `tb_rf1_assoc`, `tb_rf2_bank`, `tb_rf3_bank`, `tb_xfer_ctrl`,
  `tb_bank_sel_table`, `tb_rename_map`: block tests, against shadow models or
  hand-worked sequences. The bank-select test replays the example above,
  including ids that wrap.

The testbench clock has a long half period (50 time units) because the core
model settles its port groups with successive `#1` steps inside a cycle.

## Where this design makes its own choices

The bank organisation, direct mapping, transfer conditions, copy on wakeup,
LRC replacement with consumption marked at execute, the bank select table and
release at commit are the documented scheme. The following are this design's
own:

* one-cycle transfer over a bus (combinational RF2 read, RF3 write at the edge);
* lowest-free allocation, rotating transfer priority, reset state;
* the written check on copy requests, and the {bank, register} RF1 tags with
  retagging and invalidation;
* the last-resort replacement of an unconsumed RF1 entry, refresh on a repeated
  copy, and all RF1 entries marked consumed on a flush;
* the "highest id" kept as a separate bit, and the comparison switched off once
  the owner commits;
* release from RF2 at commit when the old value never moved;
* full-flush recovery through a committed map instead of per-branch
  checkpoints;
* data width, logical register count and id width.

Known limits: RF1 reads are combinational associative searches, RF2/RF3 are
flip-flop arrays with many ports, and no timing closure has been attempted.
Nothing here reproduces the access-time figures quoted for these organisations.
The core model in the testbenches is deliberately simple: in-order commit,
random latencies, no memory instructions.

Parameter rules: `NPHYS` must be a power of two, and `NRF1` at least `IW`,
since all IW copies of a cycle must find a place. Instructions that are in
flight together must have ids fewer than 2^(IDW-1) apart. An instruction with
two operands to copy uses two of the IW copy ports. A core that wakes up more
than IW/2 such instructions per cycle must spread their requests over more
cycles.
