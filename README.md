# Flexible multi-bank memory controller for HLS accelerators

An accelerator built from high-level-synthesised processes usually wants more
memory ports than the technology offers. A consumer whose inner loop is
unrolled four times wants four reads per cycle from one array, while SRAM
compilers and FPGA block RAMs provide at most two ports per macro. The usual
fix is to split the array over several banks. That normally means rewriting
every process so that it addresses the right bank, and then synthesising and
verifying it again.

This RTL keeps the processes unchanged. Each process still issues **logical
addresses** into its data structure, over as many simple memory interfaces as
its schedule needs. A controller between the processes and the banks turns
each logical address into a **bank and a physical word** at run time. It also
steers write data to the bank and routes read data back to the interface that
asked for it. Because each interface carries its own address layout, one set of
banks can hold different data structures at different times. It can also show
different organisations of the same banks to different processes.

The design follows the memory controller described in *System-Level Memory
Optimization for High-Level Synthesis of Component-Based SoCs*. Every point
where this RTL chooses something the paper does not specify is marked below.

## Interfaces and banks

Every process interface is a plain SRAM-like port:

| signal | write interface | read interface | meaning |
|---|---|---|---|
| CE | yes | yes | request this cycle; the address is valid |
| WE | yes | – | the request is a write (write interfaces only) |
| A  | yes | yes | logical address, as wide as the data structure needs |
| D  | yes | – | write data |
| Q  | – | yes | read data, one cycle after the request |

Each physical bank (`dp_sram`) is a synchronous RAM with two independent
read/write ports. The controller always uses **port 0 for writes and port 1 for
reads**. Each bank therefore accepts one write and one read per cycle, whatever
the processes are doing. All banks behind one controller have the same size.

## Address translation

The central idea is the decomposition of a logical address. A data
structure's layout (`memctrl_pkg::layout_t`) has these fields:

| field | meaning |
|---|---|
| `m` | parallel banks. Consecutive elements go to different banks (cyclic partitioning). This gives `m` accesses per cycle. |
| `n` | serial repetitions of each parallel bank. Together they act as one deeper bank (block partitioning). This adds capacity. |
| `blk` | words per serial block. Normally this is the bank depth. |
| `d` | elements merged into one bank word (data merging). |
| `dup` | full copies of the `m*n` banks (data duplication). |
| `base` | first bank of the layout. For duplication it selects the copy a reader uses. |

For a logical address `A` the controller computes:

```
slice = A mod d                 element inside a merged word
word  = A / d
par   = word mod m              parallel bank   (low address bits)
row   = word / m
ser   = largest k < n with row >= k*blk     serial block
phys  = row - ser*blk           word address inside the bank
tag   = ser*m + par
bank  = base + copy*m*n + tag
```

`m` and `d` must be powers of two, so those steps are bit slices. The serial
block is found by comparing against multiples of `blk`, not by slicing. This
allows bank depths that are not powers of two, such as 1280.

Examples (four banks of 1280 words):

| layout | A | par | ser | bank | word |
|---|---|---|---|---|---|
| 4 parallel × 1 serial | 5 | 1 | 0 | 1 | 1 |
| 2 parallel × 2 serial | 2563 = 0xA03 | 1 | 1 | 3 | (2563>>1) − 1280 = 1 |
| 2-element merge, 2 parallel | 5 | 0 | 0 | 0 | 1, upper half |

The same four banks therefore hold a 5120-element array read four at a time.
At another time they hold a different 5120-element array that is read two at a
time, with each pair of banks chained into one 2560-word bank.

Merged writes come from `wr_merge`. It takes `d` narrow write interfaces that
write one aligned group of consecutive addresses in the same cycle. It packs
them into one word: element `k` of the group goes to bits `[k*W +: W]`. Reads
of a merged layout use the `log2(d)` low address bits to pick that slice.

Duplication gives parallel reads where the access pattern rules out
partitioning. Every write goes to all copies, and each read interface reads
its own copy.

## Controller datapath (`memctrl`)

* **ATU, one per bank port** (`atu`). The ATU decodes the address of every
  interface that can reach its bank, under that interface's layout. It grants
  the port to the interface whose CE is high and whose tag equals the bank's
  tag. It then drives the bank's CE, WE and physical address, and outputs the
  index of the granted interface. Interfaces whose layout never touches the
  bank are removed at elaboration.
* **Write-data multiplexer, one per bank.** It drives port 0's data from the
  granted write interface.
* **Read return, one per read interface** (`rd_return`). The bank answers one
  cycle after the request. By then the interface may already be addressing
  another bank. So at request time the unit stores the number of the serving
  bank and the slice in a shift register (`RD_LAT` deep). At the end of the
  shift register it selects that bank's port-1 output and the slice. It flags
  the cycle with `rd_valid`.

Timing: the request path is combinational, so a request reaches the bank pins
in its own cycle. Writes take effect at that clock edge. Read data is valid one
cycle later, which is the bank latency. The controller adds no wait states.

### The rule the processes must keep

The controller does **not** serialise collisions. Two interfaces must never
address the same bank port in the same cycle. The layouts are chosen so that
this cannot happen: `m` parallel reads of consecutive elements always land in
`m` different banks. If a collision happens anyway, the lowest-numbered
interface wins and `wr_conflict`/`rd_conflict` goes high. An assertion in the
ATU stops a simulation at that point. Serialising collisions would need
processes that can stall, and it is not built here.

## The two example memory systems (`memsys_top`)

`memsys_top` holds three independent `mem_subsystem` instances. Each instance
is a controller plus its banks. The processes that drive them are outside this
RTL, so their interfaces are the ports of `memsys_top`.

1. **Producer/consumer ping-pong buffer (`pc_*`).** 5120 × 32-bit elements (10
   rows × 512) in four 1280 × 32 banks. The producer P writes one element per
   cycle into one half. At the same time the consumer C reads the other half
   four elements per cycle (`pc_rd[0..3]`), using the cyclic 4 × 1 layout.
   A second structure (`pc_wr[1]`, `pc_rd[4..5]`) reuses the same banks as
   2 × 2. It belongs to a pair of processes that never run together with P and
   C. Its size (5120) and its interface counts (one write, two reads) are
   choices made here.
2. **Debayer array a (`a_*`).** 12288 × 16-bit elements. The writing process
   produces two consecutive elements per cycle. They are merged into one
   8192 × 32 bank; 6144 of its words are used. `A_RD_PORTS` (default 1) sets
   how many elements the reader gets per cycle. Each extra read port adds one
   duplicated bank. The paper evaluates 1, 2 and 3.
3. **Debayer array b (`b_*`).** 3 × 12264 × 16-bit elements in six 8192 × 16
   banks. One process writes one element of each of the three rows per cycle.
   The next process reads two consecutive elements per cycle. The paper only
   says that the rows are distributed over the six banks. The mapping here is
   this design's choice:
   * Row `k` runs cyclically over banks `2k` and `2k+1`.
   * In layout terms that is 2 parallel × 3 serial with `blk` = 6132.
   * The logical address of element `j` of row `k` is `k*12264 + j`.

   With this mapping the three writes and the two reads never collide.

The paper gives the size of b in two ways: three rows of 12264, or twice that.
Six 8192-word banks only hold the former, so that is what is built.

## Where this departs from, or adds to, the paper

Added or chosen here:

* Bank read latency of 1 cycle, with read-before-write when both ports touch
  one word.
* Asynchronous active-low reset of the tag pipeline. Memory contents are not
  reset.
* The `rd_valid`, `*_conflict` and `a_wr_malformed` outputs.
* Lane placement by address in `wr_merge`. The lanes may arrive in any order,
  but they must form one aligned group.
* Bank numbering from 0 inside each subsystem.
* Narrow read data is right-aligned in the DW-wide port.

Left out:

* Serialisation of colliding requests.
* Parallel-bank counts that are not powers of two.
* More than 64 serial blocks.
* More elaborate partitioning schemes (for example stencil patterns).
* The design-time flow that chooses the layouts: compatibility graph, clique
  partitioning and bank sizing. It is software, and its result appears here
  only as parameters.
* The accelerator processes themselves, and the memory system of the second
  benchmark accelerator (Change Detection), whose port needs and bank mapping
  are not given.

## Files

| file | content |
|---|---|
| `rtl/memctrl_pkg.sv` | `layout_t`, `mk_layout`, `decode`, `bank_tag` |
| `rtl/dp_sram.sv` | two-port synchronous bank |
| `rtl/atu.sv` | address translation unit of one bank port |
| `rtl/rd_return.sv` | tag buffer and read-data selection of one read interface |
| `rtl/wr_merge.sv` | merge of `d` narrow writes into one word |
| `rtl/memctrl.sv` | the controller |
| `rtl/mem_subsystem.sv` | controller plus banks |
| `rtl/memsys_top.sv` | the example memory systems |

Default sizes of `memsys_top`:
* Memory bits: 4×1280×32 + 8192×32 + 6×8192×16 = 1,212,416.
* Besides the memories there are about 650 word-level cells and 28 flip-flops.

## Simulation

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/memctrl_pkg.sv tb/tb_memsys_top.sv --top-module tb_memsys_top
./obj_dir/Vtb_memsys_top
```

| testbench | what it exercises |
|---|---|
| `tb_dp_sram` | Random traffic on both ports against a reference array. Also checks the 1-cycle latency, Q holding while idle, and read-before-write. |
| `tb_atu` | Four ATUs with three layouts (cyclic, 2×2, merged). Checks the bank enable and word against plain arithmetic, the worked examples above, and the conflict flag. |
| `tb_rd_return` | Random bank outputs. Checks that the buffered tag picks the right bank and half-word `RD_LAT` (here 2) cycles later. |
| `tb_wr_merge` | Both lane orders. Checks the address and packing, and flags malformed groups. |
| `tb_memctrl` | The four-bank buffer with a behavioural bank model. Checks bank pins for both layouts, four parallel reads, and a write overlapping the reads. |
| `tb_mem_subsystem` | Array b. Checks three parallel row writes, paired reads, and random mixed traffic. |
| `tb_pc_two_bank` | The same buffer on two 2560-word banks. Checks that addresses 0..3 map to (0,0),(1,0),(0,1),(1,1), and runs a ping-pong with two reads per cycle. |
| `tb_memsys_top` | End to end with `A_RD_PORTS=3`. Runs the ping-pong exchange, the reuse of the banks as 2×2, merged writes, duplicated reads and b's distribution, all concurrently. Counts each mechanism and fails if one never occurs. Checks the transfer cycle counts against the access rates: 640 cycles per 2560-element chunk at four reads per cycle, and 12264 cycles to fill array b. |
| `tb_memsys_top_full` | The same at the default parameters (one read port on a). |

All of them run in a few seconds at the full sizes above.
