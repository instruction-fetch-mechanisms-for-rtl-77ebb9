# Silo-cache instruction fetch for a VLIW with a compressed encoding

A VLIW machine issues one *MultiOp* per cycle: a group of operations (*Ops*), at most one per
functional unit. A compressed encoding stores no NOPs, so a MultiOp is 1 to 8 consecutive 64-bit
Ops in memory. A header bit marks the first Op and a tail bit marks the last. This keeps code
small, and the code size stays the same when a program is rescheduled for another machine width.
It makes instruction fetch harder in two ways. The fetch unit must know the length of the current
MultiOp to find the next one. It must also send each Op to the right functional unit, because an
Op's position in the MultiOp no longer says where it goes.

This RTL implements an instruction fetch unit for an 8-issue machine (TINKER-8) around a **silo
cache**. The instruction cache is split into eight *silos*, one per functional-unit slot. Each
silo entry holds a single Op, and every entry has its **own tag and length field**. When a
MultiOp is brought in from memory, a *miss-path expander* routes each Op to the silo of its unit,
so a hit needs no routing. All Ops of one MultiOp are stored at the same index and carry the same
tag and length. NextPC is therefore just PC + 8 × length, with no scan for the tail bit. A
MultiOp that leaves some silos empty at an index lets another MultiOp use those silos at the same
index. So several MultiOps can coexist at one address across the silos, without the NOP waste of
a cache that stores whole uncompressed MultiOps.

A *flexible silo* variant (parameter `SHARE`) merges the silos of two Op types into one shared
silo. Ops sit in the shared silo in compressed order, and a small *hit-path expander* stage routes
them to their units. This costs one extra cycle of branch penalty. In exchange, a program that
never uses one of the two types does not leave half of that storage idle.

## Ops, MultiOps and functional-unit slots

An Op is 64 bits (`tinker_pkg::op_t`), from bit 63 down:

| field | bits | meaning |
|---|---|---|
| H | 1 | header: first Op of its MultiOp |
| T | 1 | tail: last Op of its MultiOp |
| SP | 1 | passed through |
| PAUSE | 5 | passed through to the execution pipeline |
| FUT | 2 | FUType: 0 integer/predicate, 1 floating point, 2 memory, 3 branch |
| operation encoding | 47 | opcode, sources, destination, ... (`int_add_enc_t` shows the integer add layout) |
| PRED | 7 | predicate |

A silo stores only 60 bits of each Op (`silo_op_t`). It drops H, T and FUT, which are no longer
needed once the Op sits in its unit's silo. A flexible silo also keeps FUT, because its hit-path
expander needs it.

The eight FU slots, which are also the eight silos, are:

| slot | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| unit | IALU | IALU | PRED | FPADD | FPMUL | LD | ST | BR |
| FUType | I | I | I | F | F | M | M | B |

The k-th Op of FUType t in a MultiOp goes to the k-th slot of type t. A legal MultiOp therefore
has at most 3 integer, 2 FP, 2 memory and 1 branch Op.

## How an address finds its silo entry

Addressing is *offset-reduced*. A normal cache would use the low address bits as an offset into a
block of 8 Ops. Two short MultiOps in one 64-byte block would then share a tag and index, so they
would conflict and could not be told apart. Here the Op address itself supplies the index. With
the default 16 KB, direct-mapped cache (256 entries per silo):

```
 31                      11 10        3 2   0
+--------------------------+-----------+-----+
|        tag (21 bits)     | index (8) | 000 |
+--------------------------+-----------+-----+
```

Every silo is read at the same index. An entry belongs to the fetched MultiOp when three things
hold: its Op-valid bit is set, its length-valid bit is set, and its tag matches. The fetch hits
when any entry belongs to it. The length field holds the Op count minus one (3 bits). Together
with the length-valid bit it makes a 4-bit field per entry.

With `ASSOC` ways, each silo is set-associative on its own, with its own tag compares and its own
true-LRU state (an age counter per way). The total size stays the same: `SETS = CACHE_BYTES / 8 /
8 / ASSOC`.

## Fetch pipeline and timing

```
 F1  block fetch: read all silos at index(PC); compare all tags; select the Ops;
     NextPC = PC + 8*(len+1) is the fetch address of the next cycle
 F2  issue: one Op per FU slot  (rigid silo cache)
 F3  hit-path expander           (only when SHARE names two or more FUTypes)
```

* On hits, one MultiOp is fetched and issued per cycle. The first issue comes one cycle after F1
  (rigid) or two cycles after (flexible).
* **Branches.** A compiler-directed branch is resolved outside the fetch unit. The execution
  pipeline raises `redirect_valid` with `redirect_pc` for one cycle. In that cycle F1 fetches the
  target, and every MultiOp already fetched is killed (`issue_valid` is low that cycle). If the
  target hits, it issues 1 cycle after the redirect in the rigid cache and 2 cycles after in the
  flexible cache. That cycle, or those two, is the branch misprediction penalty.
* **Misses.** A miss in F1 stops the fetch, and the `miss_repair` block fetches the MultiOp from
  memory. The memory interface is pipelined, takes one request per cycle and answers 3 cycles
  later. The length of the missing MultiOp is unknown, so requests go out back to back until the
  Op with the tail bit returns. The few requests already in flight are then drained and dropped.
  For an L-Op MultiOp, repair takes min(8, L+3) + 4 cycles. The two-stage `miss_expander` then
  routes the Ops to their silos and computes the length. In the cycle its result appears, every
  silo that receives an Op is written. F1 retries the next cycle and hits. From the F1 miss to
  the issue of the MultiOp this adds up to min(8, L+3) + 8 cycles, one more with the hit-path
  expander. The end-to-end testbenches check this figure.
* A redirect that arrives during a miss is held. Fetch resumes at the redirect target once the
  fill is done, and the fill itself is still completed.

## Fills and partly displaced MultiOps

This is the subtle part of the design. Each silo replaces its entries on its own, so a fill can
overwrite some Ops of an older MultiOp while its other Ops stay resident. Those survivors must not
hit again. In the fill cycle, each silo chooses a way in the fill set. It prefers a way that
already holds the new tag, then an empty way, then the LRU way. When the chosen way held a valid
Op with another tag, the silo reports that *victim tag*. All victim tags are broadcast to all
silos. At the same clock edge, every entry in the fill set that carries one of those tags loses
its length-valid bit. The next fetch of the damaged MultiOp sees a tag match with an invalid
length, so it misses and is refetched whole. Silos that get no Op from the fill keep whatever
they hold. This is how two MultiOps come to share one index.

## Flexible silo

`SHARE` is a 4-bit set of FUType codes (bit 0 I, 1 F, 2 M, 3 B). With two bits set, for example
`4'b0011` for (I F)(M)(B), the silos of those types become one flexible silo with the same total
number of entries: slots 0–4 for I+F. The miss-path expander packs the shared-type Ops into that
silo's columns in MultiOp order and stores their FUT. On a hit, `hit_expander` counts the Ops of
each type in column order and sends the k-th Op of type t to the k-th FU slot of type t, so
the functional units see exactly what the rigid cache would give them. All six pairings (int&fp,
int&mem, int&br, fp&mem, fp&br, mem&br) work and are tested. A flexible silo also accepts
MultiOps that the rigid cache cannot hold, such as four integer Ops and one FP Op.

## Modules

| file | role |
|---|---|
| `rtl/tinker_pkg.sv` | Op format, FUType codes, FU slot table, helpers |
| `rtl/silo.sv` | one silo: arrays, LRU, way choice, victim report, length-valid invalidation |
| `rtl/hit_logic.sv` | tag compare over all silos and ways, Op select, length, NextPC |
| `rtl/miss_repair.sv` | Op-by-Op refill from memory, tail detection, over-fetch drain |
| `rtl/miss_expander.sv` | two-stage Op-to-silo routing and length computation |
| `rtl/hit_expander.sv` | flexible-silo Op-to-FU routing, one registered stage with flush |
| `rtl/silo_ifetch.sv` | top: eight silos, F1/F2(/F3) pipeline, miss control, redirect handling |

Parameters of the top:

| parameter | default | meaning |
|---|---|---|
| `CACHE_BYTES` | 16384 | Op storage over all silos (8 bytes per Op); 32768 is the other size of interest |
| `ASSOC` | 1 | ways per silo, 1 to 16; at least two sets are required |
| `SHARE` | `4'b0000` | FUTypes sharing one flexible silo; 0 gives the rigid silo cache |

Top-level ports: `clk` and `rst_n` (asynchronous reset, active low, which clears every valid
bit); `reset_pc`; `redirect_valid`/`redirect_pc`; the memory pair `mem_req_valid`/`mem_req_addr`
and `mem_resp_valid`/`mem_resp_op`, with in-order responses and no back-pressure;
`issue_valid`, `issue_pc`, `issue_len` (Op count minus one), `fu_valid[8]` and `fu_op[8]`. The
`ev_*` pulses (hit, miss, fill, displacement, squash, malformed MultiOp) are for monitoring.

Storage: every 60-bit Op costs an extra 25 bits: a tag (20 bits at 32 KB), a 3-bit length,
a length-valid bit and a valid bit. At `CACHE_BYTES = 32768` that gives 4096 × 85 bits =
42.5 KB. A conventional direct-mapped 32 KB cache with 64-byte blocks needs about 33.1 KB
including its tags. The silo cache therefore holds about 9.4 KB (28 %) more state, which matches
the roughly 10 KB (30 %) extra storage expected for this organisation.

Default size after coarse synthesis: 172 Kbit of silo memory, about 5.9 k flip-flops and about
5.5 k word-level cells.

## Design choices and departures

These points are choices made in this RTL, not taken from the published description:

* Eight silos, one per FU slot, grouped by FUType. A picture of the organisation with one silo
  per FUType is read as this grouping.
* Tag compare, Op select and NextPC share the first stage. The length that is added to the PC
  has to be chosen by a tag match, because MultiOps can coexist at one index.
* Silo reads are asynchronous, so that the block fetch and NextPC fit in one cycle. A
  synchronous SRAM would need NextPC prediction or an extra stage.
* The victim preference (same tag, then empty, then LRU), the in-order Op-to-slot rule, the FUT
  codes and the bit position of each field are this design's own.
* The miss-repair handshake, the drain of over-fetched responses and the redirect interface are
  this design's own.
* The hit-path expander routes by the FUT stored in the flexible silo. The miss-path expander
  reads FUT from the incoming Op.
* A malformed MultiOp is only reported on `ev_err`. Such a MultiOp has no header, no tail within
  8 Ops, or more Ops of one type than there are silos. A MultiOp that was placed incompletely
  would make the internal hit assertion fail.
* The PAUSE and SP fields are passed to the units unchanged.

Not built:

* The baseline organisations the silo cache was measured against: the uncompressed cache, the
  banked cache and its sub-blocked variant.
* The functional units.
* The next memory level. A behavioural model is `tb/mem_model.sv`.

## Simulation

Each testbench checks itself, prints `TB_RESULT checks=N failures=M` and has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tinker_pkg.sv tb/tb_silo_ifetch.sv --top-module tb_silo_ifetch -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_silo` | random touches, fills and invalidations against a last-use-time LRU reference |
| `tb_hit_logic` | hit, per-silo select, length, NextPC with planted MultiOps among decoy entries |
| `tb_miss_repair` | refilled Ops, count, start-to-done latency, header/tail error cases |
| `tb_miss_expander` | rigid and (I F) placement, length, two-cycle latency, overflow |
| `tb_hit_expander` | (I F) routing to FU slots, one-cycle latency, flush |
| `tb_silo_ifetch` | end to end: 512-byte direct-mapped rigid, 2-way rigid and 2-way (I F) caches |
| `tb_silo_configs` | end to end: the six flexible pairings (1 KB, 2-way) and 4- and 16-way rigid (2 KB) |
| `tb_silo_ifetch_full` | end to end at the default 16 KB size: 600 MultiOps, 30000 issues |

The end-to-end harness (`tb/ifetch_harness.sv`) generates a random program of legal MultiOps. It
acts as the execution pipeline and checks every issued MultiOp's address, length and per-slot
Ops. It follows taken branches with a redirect one cycle after issue: loops run three times in
four, and forward branches are taken or not at random. It checks the 1- or 2-cycle branch
penalty and the miss-to-issue latency. It also counts each mechanism and fails if one never occurred: hit, miss, fill,
displacement, a miss caused by a cleared length-valid bit, coexisting MultiOps, squash, a
redirect held during a miss, back-to-back issue, LRU replacement and flexible routing.
