# Hybrid BDRT + HBDX multi-ported memory (2W4R / 3W4R)

FPGA block RAMs have two ports. Processors with wide issue, vector units and
shared-memory multiprocessors often need more: here, **two (or three) writes and
four reads to any addresses, every clock cycle, with no stalls**. Replicating
the whole memory for every read port, or keeping a "live value table", costs a
lot of RAM or logic. This design gets the extra ports from two cheaper tricks:

* **Extra reads by XOR parity (BDX / HBDX).** The memory is cut into four banks
  plus one XOR bank holding the XOR of the four banks at every row. When two
  reads want the same bank, one gets the bank and the other rebuilds its word
  as the XOR of the other three banks and the XOR bank at the same row. Applied
  twice, hierarchically, this turns two-port RAMs into a one-write, four-read
  (1W4R) memory.
* **Extra writes by remapping (BDRT).** There are a few more physical banks
  than logical ones (the *bank buffers*). When two writes want the same bank in
  one cycle, the second is sent to a free slot of the same row in another bank,
  and a small *remap table* remembers where each word now lives. Every physical
  bank therefore sees at most one write per cycle, and each of them is a 1W4R
  memory.

All RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with parameters whose
defaults give the main configuration: 2W4R, 16K words of 32 bits.

## Structure

```
mpm_nwmr                  2W4R memory (NW=3: 3W4R)
├── remap_table           word -> physical bank, per row (registers)
├── hash_write_ctrl       gives each write of the cycle its own physical bank
└── hbdx_mem  x (ND+NBB)  4 memory banks + 2 bank buffers, 4096 words each, 1W4R
    └── bdx_mem  x 5      4 sub-memories + 1 XOR sub-memory, 1024 words, 1W2R / 4R mode
        └── tdp_ram x 5   4 banks + 1 XOR bank, 256 words, two ports
```

At the defaults this is 6 x 5 x 5 = 150 two-port RAMs of 256 x 32 bits
(38,400 words stored for 16,384 logical words, a factor of 2.34) and a remap
table of 16,384 x 3 bits of registers. Address bits are always split from the
bottom: the two lowest bits pick the memory bank, the next two the HBDX
sub-memory, the next two the BDX bank, the rest is the row inside a RAM.

Reads are combinational inside the memory hierarchy and return the contents
from before the current cycle's writes (read-old-data). Writes land on the
clock edge. Only the top registers its outputs.

## Reads: BDX, the 1W2R and 4R modes

`bdx_mem` has four data banks and an XOR bank, each a two-port RAM, and four
read slots R0..R3. Port B of every RAM serves the read pair (R0, R1). Port A
serves either the write (**1W2R mode**, `we=1`) or the pair (R2, R3) (**4R
mode**, `we=0`).

Inside a pair the rule is simple: the first read goes straight to its bank. The
second goes straight to its bank too if that is another bank; if both fall into
the same bank, the second one reads the *other* three banks and the XOR bank at
its row, on the same port, and XORs the four words. Either way each RAM port is
used once per pair, whatever the addresses.

In 1W2R mode port A does the write: the written bank stores the word, the three
other banks read their word at the written row (the *read update*, Ru), and the
XOR bank stores `Ru ^ word`. That keeps the invariant
`XOR bank[row] == bank0[row] ^ bank1[row] ^ bank2[row] ^ bank3[row]` without a
read-modify-write of the XOR bank. R2 and R3 are not available in this mode.

`recon[i]` reports which reads were rebuilt.

## Reads: HBDX, one write and four reads

`hbdx_mem` applies the same idea one level up: four `bdx_mem` sub-memories and
a fifth `bdx_mem` as the XOR sub-memory. Each sub-memory offers four read slots
in 4R mode, or two read slots plus the write in 1W2R mode. The difficulty is
fitting one write, its read update and four arbitrary reads into those slots.

In a write cycle:

* the written sub-memory runs in 1W2R mode and stores the word (2 read slots left);
* each other sub-memory spends its last slot reading the written row (Ru)
  (3 slots left);
* the XOR sub-memory runs in 1W2R mode and stores `Ru ^ word` (2 slots left).

Reads are then taken in port order. A read goes directly to its sub-memory while
it has a free slot; otherwise it is rebuilt from the same row of all other
sub-memories and the XOR sub-memory, one slot from each. At most two reads ever
need rebuilding (more than two reads in the written sub-memory, or more than
three in another one), and the counts never exceed the slots: the worst case,
write and all four reads in one sub-memory, gives R0 and R1 directly and R2, R3
and Ru from three XOR trees. A cycle without a write has four slots everywhere
and needs no rebuilding. An assertion checks that allocation never overflows.

## Writes: remap table, bank buffers and the hash write controller

The 16K logical words are spread over ND = 4 **memory banks** (address bits
[1:0]), 4096 rows each. NBB **bank buffers** of the same shape are added,
giving ND+NBB physical banks, numbered 0..ND-1 (memory banks) and ND.. (bank
buffers). A word never changes row; it may change physical bank. At every row,
the ND words occupy ND distinct physical banks, so NBB slots of the row are free
("null" entries).

`remap_table` stores, for each row and logical bank, the physical bank of the
word, and answers three questions combinationally: where each read must look
(the read multiplexer select), where each written word currently is, and which
physical banks are free at the written row. After reset every word is in its
own memory bank.

`hash_write_ctrl` places the writes of a cycle, in port order:

1. a write whose address is also written by a higher port this cycle is dropped
   (the higher port wins);
2. a write keeps its current physical bank if no earlier write took it;
3. otherwise it goes to the lowest-numbered free bank at its row not yet taken,
   and the remap table entry is rewritten; the old slot becomes free.

Write *i* has its own bank plus at least NW-1 free banks to choose from and at
most *i* of them are taken, so with NBB >= NW-1 a place always exists.

Example (the 2W1R configuration, two memory banks, one bank buffer with id 2):
writes to memory bank 0 row 0 and memory bank 0 row 1 in the same cycle. The
first keeps bank 0. The second finds bank 0 taken, goes to the bank buffer at
row 1, and the remap entry (bank 0, row 1) becomes 2. Bank 0 row 1 is now a
null entry.

## The top: `mpm_nwmr`

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 32 | word width |
| `DEPTH` | 16384 | words; multiple of 64 |
| `NW` | 2 | write ports (3 gives 3W4R) |
| `NR` | 4 | read ports, at most 4 |
| `ND` | 4 | memory banks |
| `NBB` | `NW` | bank buffers, at least `NW-1` |

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (remap table and output registers) |
| `wen[NW]`, `waddr[NW]`, `wdata[NW]` | in | write ports |
| `ren[NR]`, `raddr[NR]` | in | read ports |
| `rdata[NR]`, `rvalid[NR]` | out | read data, registered: valid one clock after the request |
| `stat_redirect[NW]` | out | the write was moved to another bank (previous cycle) |
| `stat_dropped[NW]` | out | the write was superseded by a higher port (previous cycle) |
| `stat_hbdx_recon[NR]` | out | the read was rebuilt by XOR in its HBDX bank (previous cycle) |
| `stat_bdx_recon` | out | some BDX sub-memory rebuilt a read (previous cycle) |
| `stat_wfail` | out | a write found no bank; never expected, also asserted |

Timing: every cycle accepts NW writes and NR reads. A read returns, one clock
later, the word as it was before the writes of its own cycle. A write is visible
to reads from the next cycle on. Memory contents start at zero (block RAM
initial value); reset does not clear them.

Each physical bank receives all read addresses and serves read *i* on its slot
*i* when the remap table sends read *i* there; the output multiplexer for read
*i* picks that bank's slot *i*.

## Where this departs from the published scheme

The structure (four-bank BDX with XOR bank, 1W2R and 4R modes, HBDX built from
them, remap table, bank buffers, hash write control, remap-driven output
multiplexers) follows the BDRT + HBDX multi-ported memory. The following are
this implementation's own choices or readings:

* **Latency.** The published 2W4R and 3W4R designs report a read latency of 2.5
  clock cycles with synchronous block RAM reads and do not describe their
  pipeline. Here the RAMs read combinationally so that the read update and XOR
  rebuilds finish inside one cycle, and the top adds one output register:
  latency 1 clock. On an FPGA the RAMs would map to distributed (LUT) RAM, or a
  pipeline with XOR-bank bypassing would have to be added to use block RAM.
* **Bank buffers.** The general rule needs NW-1 bank buffers, but the 2W4R and
  3W4R designs are described with two and three; `NBB` defaults to `NW` and can
  be set to `NW-1`.
* **Bank type.** Every physical bank must take four reads that may all hit it,
  so every bank is a full HBDX 1W4R memory.
* **Not specified, chosen here:** low-address-bit interleaving at every level;
  the pair rule in BDX and the slot order in HBDX; the greedy port-order
  placement and "higher port wins" for same-address writes; read-old-data on a
  read-write collision; zero initial contents; the identity remap at reset.
* Frequency, area and block RAM counts of the published results are not
  reproduced; they depend on the FPGA mapping.

## Verification

Each module has a self-checking testbench in `tb/` that compares against a
reference array or an independent model, prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_tdp_ram` | both ports, read-old-data, zero start |
| `tb_bdx_mem` | 1W2R and 4R modes, rebuilt reads in both (counted), the write-plus-two-reads-in-one-bank case |
| `tb_hbdx_mem` | random 1W4R traffic crowded onto one sub-memory; HBDX rebuilds, BDX rebuilds and the all-in-one-sub-memory worst case are counted |
| `tb_bdx_mem_16k`, `tb_hbdx_mem_16k` | the same two memories at their full 16K-word default size, with a complete read-back |
| `tb_remap_table` | identity at reset, random moves, all lookups and free masks |
| `tb_hash_write_ctrl` | 3-write configuration: dropping, distinct banks, exact placement |
| `tb_mpm_nwmr` | full-size 2W4R (all defaults): directed bank-buffer move, 20,000 cycles of 2 writes + 4 reads with crowded addresses, full read-back; checks the one-clock latency and counts moves, drops, HBDX and BDX rebuilds and read-write collisions |
| `tb_mpm_3w4r` | the same at 3W4R, 16K words |
| `tb_mpm_2w1r` | 2W1R with two memory banks and one bank buffer |

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert rtl/mpm_pkg.sv rtl/tdp_ram.sv rtl/bdx_mem.sv \
  rtl/hbdx_mem.sv rtl/remap_table.sv rtl/hash_write_ctrl.sv rtl/mpm_nwmr.sv \
  tb/tb_mpm_nwmr.sv --top-module tb_mpm_nwmr -o sim
./obj_dir/sim
```

The full-size 2W4R test builds in about ten seconds and runs in under one.
