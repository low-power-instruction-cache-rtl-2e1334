# Low-power two-way instruction cache

An instruction cache spends most of its power in its SRAMs. A conventional
two-way set-associative cache reads both tag memories and both data memories
on every fetch, although at most one way holds the instruction. This design
is an 8 KB, two-way, 16-byte-block instruction cache that reads only the
memories a fetch actually needs. It still answers a hit in one clock cycle.
It does this with four techniques:

1. **Two-phased access.** The tags are read and compared in the first half
   of the clock cycle. The data memory is read in the second half, and only
   in the way that matched.
2. **Pre-tag checking.** The first half reads and compares only the three
   lowest tag bits (the *pre-tag*). The remaining 17 tag bits (the *other
   tag*) and the data are then read only in ways whose pre-tag matched. The
   full compare confirms the hit.
3. **Tag skipping with `seq`.** The processor says when a fetch is the
   previous address + 4. If such a fetch stays in the block that hit last
   time, no tag memory is read at all. The cache reuses the last hit and
   enables one data memory.
4. **Memory sub-banking** (optional). Each memory is split into sub-banks,
   and only the sub-bank holding the word is enabled.

Misses are refilled from main memory over an AHB-Lite bus, one block per
miss.

The default configuration uses the first three techniques and no
sub-banking. Setting `TAG_SUB=4` and `DATA_SUB=8` adds the fourth. Sub-banking
is worth its decoder and multiplexer only in larger caches: 32 KB and up,
with the memory compiler the design was evaluated with.

## Address fields

For the default 8 KB, 2-way, 16-byte-block cache:

```
 31                15 14    12 11          4 3      0
+--------------------+--------+-------------+--------+
|     OTAG <17>      |PTAG <3>|  INDEX <8>  |OFFSET<4>|
+--------------------+--------+-------------+--------+
```

- INDEX selects one of 256 sets.
- OFFSET[3:2] selects the word in the block.
- PTAG is the low end of the tag. Code is local, so the blocks held in a set
  usually differ in their lowest tag bits. Three bits almost always decide
  which way, if any, can hit.
- OTAG is the rest of the tag.

All widths are computed in `lpic_pkg` from `CACHE_BYTES`, `BLOCK_BYTES` and
`PTAG_W`. For example, 32 KB gives a 10-bit index and a 15-bit other tag.

## One access, two half-cycles

Each way has three memories: a pre-tag memory (256x3), an other-tag memory
(256x17) and a data memory (1024x32). The pre-tag memories work on the rising
clock edge. The other-tag and data memories work on the falling edge.

```
            request cycle      access cycle
clk       __/~~~~~~\______/~~~~~~~~\_________/~~~~
                          ^ rise          ^ fall        ^ rise
cpu_req/addr  ==< A >=====|               |             |
pre-tag read              X (both ways)   |             |
PTAG compare               ---> cen0/cen1 |             |
other-tag + data read                     X (only ways with cen set)
OTAG compare, AND-OR                       ---> hit, rsp_data
rsp_valid                 ________/~~~~~~~~~~~~~~~~~~~~~\___
next request taken                                      ^ (if hit)
```

- A way's chip-enable line `cenN` is its valid bit ANDed with its pre-tag
  match.
- The data of the way whose other tag also matches is gated through an AND
  and merged by an OR into `rsp_data`.
- The pre-tag read plus compare has to fit in half a cycle. The other-tag
  read, data read, compare and output have to fit in the other half. This is
  the critical timing of the design.

Per look-up with `m` pre-tag matches, the memories enabled are
(pre-tag, other-tag, data) = (2, m, m). This gives four cases:

| case  | pre-tag matches | outcome | memories (P, O, D) |
|-------|-----------------|---------|--------------------|
| BC I  | one             | hit     | (2, 1, 1)          |
| BC II | none            | miss    | (2, 0, 0)          |
| WC I  | both            | hit or miss | (2, 2, 2)      |
| WC II | one             | miss    | (2, 1, 1)          |

The two worse cases are rare in real code (a few percent of fetches). A
conventional two-way cache is always (2, 2, 2). A skipped access (below) is
(0, 0, 1).

## Tag skipping and the block boundary detector

A sequential fetch lands in the same block as the previous fetch unless it
crosses a block boundary. For a +4 step, crossing the boundary is exactly a
change of the lowest block-address bit, A[4] for 16-byte blocks (A[5] for
32-byte blocks).

`bbd_detector` keeps that bit of the last accepted fetch in a flip-flop. It
XORs that with the current bit and ANDs the result with `seq`:

```
bbd = seq & (pc[OW] ^ pc_r[OW])      // sequential fetch entered a new block
skip = seq & !bbd & (previous access completed with a hit or a refill)
```

On a skip, `lpic_ctrl` does four things:

- It does not enable the pre-tag memories at the request edge.
- It does not enable the other-tag memories.
- It enables the data memory of the way that served the previous fetch.
- It reports a hit.

A completed refill counts as a hit in the refilled way. A sequential fetch
after a miss is therefore skipped as well.

The previous access may still be in its own access cycle when the next
fetch is taken. In that case the skip uses that access's live hit result.

## Misses and refill

When an access misses, several things happen:

1. `cpu_ready` drops in the access cycle.
2. The control unit picks a victim: an invalid way if there is one,
   otherwise the way named by the set's LRU bit.
3. It asks `ahb_burst_master` to fetch the block.
4. The master issues a wrapping burst (WRAP4, or WRAP8 for 32-byte blocks)
   that starts at the missed word, so the critical word arrives first.
5. Each returned word is written into the victim's data memory in the cycle
   after it arrives.
6. The last word is written together with the pre-tag and other tag. The
   valid bit is set and the LRU bit updated.
7. In that same cycle the missed word is returned on `rsp_data` with
   `rsp_hit=0`.
8. The next request is taken one cycle later.

With a memory that answers the first word 10 cycles after its address phase
and then one word per cycle, the response comes 3 + 10 + 4 = 17 cycles after
the request for 16-byte blocks (21 for 32-byte blocks). A hit takes 1 cycle.

The valid-bit table (2 x 256 bits) and the LRU-bit table (256 bits) are
flip-flops in the control unit. Reset clears them.

## Sub-banking

`subbank_sram` splits a memory into `NSUB` sub-banks:

- A decoder on the top log2(NSUB) address bits enables one sub-bank. These
  bits are the most significant index bits, the SUB field.
- The other address bits address the word inside the sub-bank.
- An NSUB-to-1 multiplexer, steered by the registered SUB field, selects the
  output.

`TAG_SUB` applies to the pre-tag and other-tag memories and `DATA_SUB` to the
data memories of every way. With 4 and 8, only 1/4 of each tag memory and 1/8
of each data memory is active per access.

## Modules

```
lpic_top                      cache + refill master (top)
├── lpic_ctrl                 control unit: handshake, valid/LRU tables, skip, miss FSM
│   └── bbd_detector          block boundary detector (XOR, AND, flip-flop)
├── lpic_array                memories of both ways, pre-tag / other-tag compare, AND-OR output
│   └── subbank_sram  (x6)    pre-tag, other-tag, data memory of each way
│       └── sram_sp           single-port SRAM macro, rising- or falling-edge
└── ahb_burst_master          AHB-Lite master for block refills
lpic_pkg                      widths, act_t, AHB encodings
```

### Parameters of `lpic_top`

| parameter     | default | meaning |
|---------------|---------|---------|
| `CACHE_BYTES` | 8192    | capacity (2 ways) |
| `BLOCK_BYTES` | 16      | block size; 4 or 8 words tested |
| `PTAG_W`      | 3       | pre-tag width |
| `TAG_SUB`     | 1       | sub-banks per tag memory (4 in the sub-banked variant) |
| `DATA_SUB`    | 1       | sub-banks per data memory (8 in the sub-banked variant) |

Associativity is fixed at two: one LRU bit per set and a two-way AND-OR.

### Ports of `lpic_top`

| port | dir | meaning |
|------|-----|---------|
| `cpu_req`, `cpu_addr[31:0]`, `cpu_seq` | in | fetch request; `cpu_seq` = address is previous + 4 |
| `cpu_ready` | out | request taken at this rising edge (combinational; low in the access cycle of a miss and during a refill) |
| `rsp_valid`, `rsp_data[31:0]`, `rsp_hit` | out | instruction word; one cycle after the request on a hit |
| `haddr`, `htrans`, `hburst`, `hsize`, `hwrite`, `hprot` | out | AHB-Lite master (read-only, word bursts, opcode fetch) |
| `hready`, `hrdata`, `hresp` | in | AHB-Lite slave response (OKAY expected) |
| `act` (`act_t`) | out | memories enabled this cycle: `ptag`, `otag`, `data`, one bit per way |
| `ev_miss`, `ev_skip` | out | this access cycle missed / was served by tag skipping |

`act` exists for power accounting. Summing its bits over the access cycles
gives the average number of pre-tag, other-tag and data memory accesses per
fetch. Multiplying those by the per-access power of each macro gives the
cache power estimate.

Drive the fetch inputs after the rising edge, and sample `cpu_ready` and the
response before the next one. The falling-edge memories make `cpu_ready` and
`rsp_*` settle in the second half of the cycle.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lpic_pkg.sv tb/tb_mem_pkg.sv tb/tb_lpic_top.sv --top-module tb_lpic_top
./obj_dir/Vtb_lpic_top
```

Other modules are found through `-Irtl -Itb` by file name. The unit
testbenches need only `rtl/lpic_pkg.sv` and `tb/tb_mem_pkg.sv` listed.

| testbench | what it checks |
|-----------|----------------|
| `tb_sram_sp` | SRAM model on both edges: data, read timing, output held when disabled |
| `tb_subbank_sram` | 1024x32 in 8 and 256x17 in 4 sub-banks: data, one sub-bank enabled per access, none when idle |
| `tb_bbd_detector` | `bbd` against a model over random fetch streams |
| `tb_lpic_array` | default array: pre-tag match lines, hits, data, memory enables for all four pre-tag cases and for skips |
| `tb_lpic_ctrl` | control unit + array with an irregular refill beat stream: refill address, victim, tag write, skips, responses |
| `tb_ahb_burst_master` | 4- and 8-beat bursts against a memory with wait states: AHB protocol, wrap order, data, first-word latency |
| `tb_lpic_top` | four caches end to end (8 KB/16 B, 8 KB/16 B sub-banked, 8 KB/32 B, 32 KB/16 B sub-banked) |
| `tb_lpic_full` | default cache, no parameters changed, 20000 fetches; prints memory accesses per fetch |

The end-to-end tests use `lpic_harness`, which has three parts:

- a processor model producing sequential runs and branches into a loop
  region, into a few conflicting sets, and to random addresses;
- `ahb_mem_model`, a main memory whose word at each address is a hash of the
  address (`tb_mem_pkg`), with a 10-cycle first access;
- a reference model of the cache.

Every fetch is checked for:

- the returned word;
- the hit flag;
- latency: 1 cycle on a hit, 17 (or 21) cycles on a miss;
- the memories enabled in its access cycle;
- the skip and miss events;
- `cpu_ready`;
- the first address of each refill burst.

A test also fails if any of these never happens: a hit, a miss, a skip, a
skip refused at a block boundary, each of BC I, BC II, WC I and WC II, a
stall, a burst starting mid-block, an LRU replacement.

On the synthetic fetch stream of `tb_lpic_full` (about 80% hits, half of
all fetches skipped), the default cache averages about 0.95 pre-tag,
0.45 other-tag and 0.98 data memory accesses per fetch. A conventional
two-way cache would make 2, 2 and 2. These figures describe that stream
only; they are not a power measurement.

## What is this implementation's own

The architecture follows the original design:

- the field split and memory sizes;
- rising-edge tag and falling-edge data memories;
- the pre-tag check gating the other-tag and data memories;
- the AND-OR output;
- the XOR/AND/flip-flop boundary detector on `seq` and A[4];
- the valid-bit and LRU-bit tables in the controller;
- 4/8 sub-banks on the index MSBs;
- AHB refill from a memory with a 10-cycle first word.

These choices are this implementation's:

- **Processor handshake.** `cpu_req`/`cpu_ready`, with the response in the
  cycle after the request.
- **Refill.** A wrapping burst from the missed word. The missed word is
  returned only after the whole block is written, with one extra cycle spent
  writing the last word and the tags, so there is no early restart.
- **Victim choice.** An invalid way first.
- **Detector enable.** The boundary detector's flip-flop loads only on
  accepted fetches.
- **Skip after refill.** A refilled block counts as the previous hit.
- **Activity outputs.** `act`, `ev_miss` and `ev_skip`.
- **SRAM model.** A plain array with its output register reset to zero.

Limitations:

- The cache is read-only. There is no invalidate or flush input; reset is
  the only way to empty it.
- AHB error responses are not handled. An assertion reports them.
- Associativity is fixed at two.
- The macros' power and area are not modelled. The cache's power follows
  from `act` and per-macro figures for the target memory compiler.
- The sub-banked memories register their output select. The data path
  therefore gains a multiplexer after the falling edge, which a real
  sub-banked memory would also need.
