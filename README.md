# Virtual-memory address translation for FPGA hardware threads

An FPGA accelerator that sits on a cache-coherent port of an ARM SoC (the
ACP port of a Zynq, for instance) can share data with software threads
directly, but only in physical addresses. The software it cooperates with
lives in a Linux process and sees virtual memory: an array that is
contiguous for the program is scattered over 4 kB physical pages. Handing
the accelerator such an array normally means copying it into a specially
allocated, physically contiguous buffer, or giving the accelerator an MMU
whose TLB misses are served by interrupts (thousands of cycles each) or by
walking the kernel's page tables (several dependent memory reads).

This RTL takes a third route. Before the hardware thread is started, the
driver knows exactly which arrays the thread will touch. For each of them it
builds a **shadow page table**: a flat list holding, for page 0, 1, 2, ... of
the array, the physical address of that page, and it pins those pages in
memory for the duration of the run. A translation is then a single indexed
lookup:

    index    = page(V) - page(array_base)          page(x) = x >> 12
    entry    = shadow_table[index]                 32-bit word
    physical = { entry[31:12], V[11:0] }

No interrupt is ever raised and no OS data structure is walked. Each shared
array gets its own translation unit, and each unit can keep its table in one
of three places, trading on-chip memory for latency.

## The three translation modes

| mode | where the table lives | cost per translation | on-chip memory |
|---|---|---|---|
| `DRAM_TLB` | external memory | one extra single-word memory read | none |
| `LOCAL_TLB` | block RAM, copied in at start | 1 cycle | 4 bytes per page of the array |
| `CACHE_TLB` | external memory, cached on chip | 1 cycle on a hit, one memory read on a miss | one 1k x 32 block RAM |

**DRAM_TLB** (`rtl/at_dram_tlb.sv`) reads the table entry through the same
memory port the data goes through. It costs nothing in area, but every
translated access becomes two dependent memory accesses. With the ~30-cycle
latency of a coherent port this doubles the latency of scalar accesses; for
long bursts the one lookup per page hardly matters.

**LOCAL_TLB** (`rtl/at_local_tlb.sv`) copies the whole table into a block RAM
of `ENTRIES` words when `start` pulses, using burst reads that stop at 4 kB
boundaries of the table. `ready` stays low until the copy is done, and any
request from the accelerator waits. After that a lookup is one synchronous
RAM read, one per cycle, and the unit never touches memory again. Its cost
grows with the array: a 16 MB array needs 4097 entries (16 kB of RAM). The
default `ENTRIES = 8192` covers arrays up to 32 MB. Larger arrays wrap their
index and translate wrongly, so they must use another mode.

**CACHE_TLB** (`rtl/at_cache_tlb.sv`) is the middle ground. It is a
direct-mapped cache of `LINES = 1024` table entries. A line is 30 bits (the
10-bit tag, i.e. the upper bits of the table index, and the 20-bit physical
page number), so the whole cache is one 1k x 32 block RAM. Valid bits are
flip-flops cleared on `start`. A request reads its line in the cycle it is
accepted and compares the tag in the next cycle. A hit answers right away.
A miss reads the single entry from the external table, writes it into the
line and answers when it arrives. `hit` and `miss` pulses report which path
was taken. Since there is one lookup per page touched, a working set of up
to 1024 pages (4 MB) hits after its first touch.

All three units share one interface. `start` samples `cfg_table_base`
(the physical address of the table), `cfg_array_vbase` (the virtual address
of the array) and, for LOCAL_TLB, `cfg_npages`. A translation is a
`tr_valid`/`tr_ready` handshake carrying the virtual address. `tr_done`
then pulses for one cycle with `tr_paddr`. `t_*` is a read-only burst
master for the table.

Latencies from acceptance to `tr_done`, with a memory whose first read beat
arrives L+1 cycles after it accepts the command:

| mode | latency |
|---|---|
| DRAM_TLB | L + 2 |
| LOCAL_TLB | 1 (pipelined, one per cycle) |
| CACHE_TLB hit | 1 |
| CACHE_TLB miss | L + 3 |

There is no bound check in any mode. An address outside the array reads
some other table word (DRAM/CACHE) or a wrapped RAM slot (LOCAL), and the
access goes wherever that word points. Software must only hand over arrays
that stay allocated and pinned for the whole run.

## Bursts that cross pages

Bursts are what make a coherent port fast, but a burst that is contiguous in
virtual memory is not contiguous in physical memory once it crosses a page.
`rtl/page_splitter.sv` therefore cuts every request of the accelerator into
chunks. Each chunk starts at the current address and ends at the end of its
page or of the request, whichever comes first. A burst of B bytes becomes
at most ceil(B/4096)+1 chunks, and each chunk needs one translation. The
splitter emits one chunk per cycle if the consumer keeps up, and `ch_last`
marks the final chunk.

## One port per array: `vm_port`

`rtl/vm_port.sv` is the access path of one shared array. It holds a
page_splitter and the translation unit chosen by its `MODE` parameter, and
it handles chunks strictly one at a time:

1. take the next chunk and start its translation;
2. when `tr_done` arrives, issue the physical burst `{paddr, len, we}` on the data master;
3. stream write data from `acc_wdata` (with `wlast` generated from a beat count) and wait for the write response, or pass read beats to `acc_rdata`;
4. retire the chunk; after the last chunk, pulse `acc_done`.

The port offers the accelerator a virtual burst request (`acc_req_*`, length
in 32-bit words, 1 for a scalar access), a write-data stream with
valid/ready, a read-data stream with valid only (the accelerator must take
every beat), and a completion pulse. It has two memory masters: `t_*` for
the table and `d_*` for the data. Event pulses `ev_xlate`, `ev_break`,
`ev_hit` and `ev_miss` count translations, page breaks inside a request and
cache outcomes.

Translation and transfer do not overlap, so a DRAM_TLB port pays the lookup
latency in full before every chunk. This is the simple sequential behaviour
of a page-splitting copy loop. It is the obvious place to add pipelining if
needed.

## The memory side

Every master speaks the same burst protocol, defined in `rtl/vm_pkg.sv`. It
is a reduced AXI:

- the command `mem_cmd_t` holds `addr` (byte address, word aligned), `len` (1..1024 words) and `we`, and is passed with `cmd_valid`/`cmd_ready`;
- write beats go on `wvalid`/`wready`/`wdata`/`wlast`, and the burst ends with a one-cycle `bvalid`;
- read beats come on `rvalid`/`rdata`/`rlast`, with no ready signal;
- a burst never crosses a 4 kB page.

`rtl/mem_arbiter.sv` puts all 2 x N_ARRAYS masters onto the single coherent
port. It grants whole transactions in round-robin order, starting after the
last winner, and keeps the winner as owner until its last read beat or its
write response. So there is one transaction in flight and responses need no
ID. `conflict` is high while some master waits behind the owner. Adapting
the shell to a real AXI/ACP port means a small bridge from this protocol:
split bursts to the port's maximum length and add IDs if outstanding
transactions are wanted.

## Top level: `vm_hw_thread`

`rtl/vm_hw_thread.sv` instantiates `N_ARRAYS` vm_ports (default 3), the
arbiter and a `perf_counter`. In the arbiter, port i's table master is
input 2i and its data master is input 2i+1. The mode of each array is
`MODES[i]`. The default gives one array to each mode (array 0 DRAM_TLB,
array 1 LOCAL_TLB, array 2 CACHE_TLB), which suits the three matrices of a
matrix product and places every unit in the design. In practice the mode is
chosen per array from its access pattern:

- burst-heavy kernels, such as a blocked matrix product or a tiled stencil, lose almost nothing with DRAM_TLB;
- kernels with scattered scalar accesses, such as an FFT whose passes stride through memory, gain from LOCAL_TLB or, at a fraction of its memory, CACHE_TLB.

The accelerator itself is not part of this RTL. It connects to the
`acc_*` arrays of the top.

A run goes like this:

1. Software writes the shadow tables and puts their addresses and the array bases on `cfg_*`.
2. `start` pulses.
3. `ready` rises once every LOCAL_TLB port has copied its table.
4. The accelerator works through `acc_*`.
5. The accelerator raises `acc_finish`.

`perf_counter` counts the cycles from `start` to `acc_finish` and holds the
count on `cycles`. In a system these would sit behind the accelerator's
control registers. Here they are plain ports.

Sizes at the defaults, as reported by a coarse synthesis:

- the top has about 610 word-level cells and 1.7k flip-flops, most of them the 1024 cache valid bits;
- its memories total 288 kbit: the 8192 x 32 LOCAL_TLB table and the 1024 x 30 cache.

## Sizing against the target workloads

These are all 32-bit element arrays unless noted:

- **2048 x 2048 matrix product.** 16 MB per matrix, which is 4097 pages at most. This fits LOCAL_TLB (8192 entries), and CACHE_TLB holds a quarter of the pages at a time.
- **2000 x 2000 stencil.** 16 MB, 3908 pages at most. Fits LOCAL_TLB.
- **Pease FFT of 256K and 2M points.** Assuming 8-byte complex points, the arrays are 2 MB and 16 MB (513 and 4097 pages at most). Both fit LOCAL_TLB. The smaller one fits entirely in the cache.
- **256 x 256 x 256 3-D array.** 64 MB, 16384 pages. This needs DRAM_TLB or CACHE_TLB, or a larger `ENTRIES`.

## Files

| file | contents |
|---|---|
| `rtl/vm_pkg.sv` | widths, page constants, `mem_cmd_t`, `at_mode_e` |
| `rtl/page_splitter.sv` | intra-page chunking of virtual bursts |
| `rtl/at_dram_tlb.sv`, `rtl/at_local_tlb.sv`, `rtl/at_cache_tlb.sv` | the three translation units |
| `rtl/vm_port.sv` | per-array access path |
| `rtl/mem_arbiter.sv` | round-robin sharing of the memory port |
| `rtl/perf_counter.sv` | run-latency counter |
| `rtl/vm_hw_thread.sv` | top level |
| `tb/acp_mem_model.sv` | behavioural coherent-port memory: fixed latency (default 30 cycles, about 300 ns at 100 MHz), random back-pressure, sparse contents, burst-rule checking |
| `tb/tb_*.sv` | one self-checking testbench per module, plus workloads |
| `tb/vm_port_harness.sv`, `tb/pease_harness.sv`, `tb/matmul_harness.sv` | helpers instantiated by `tb_vm_port`, `tb_workload_pease` and `tb_workload_matmul` |

## Verification

Every testbench checks the outputs against values it computes itself,
prints `TB_RESULT checks=N failures=M` and stops with a watchdog if the
design hangs:

- **tb_page_splitter**: random requests under random back-pressure. It checks chunk addresses, lengths and `ch_last`, the ceil(B/4096)+1 bound, and one chunk per cycle.
- **tb_at_dram_tlb**: random translations. It checks the results, exactly one table read each, and the L+2 latency.
- **tb_at_local_tlb**: a table that starts near a page end. It checks the preload burst count and word count, and that `ready` comes only after the copy. Then every page is translated back to back, checking one-cycle latency and no memory traffic. A second run checks that the table is reloaded.
- **tb_at_cache_tlb**: a reference direct-mapped cache predicts every hit and miss. It checks the latencies (1 and L+3) and table reads on misses only. A second run checks the flush on start.
- **tb_vm_port**: all three modes side by side, with random reads and writes of 1..2500 words over a scattered 12-page array. It checks data against a reference copy and against physical memory, and the page-break counts. The cache is reduced to 4 lines here so that conflict misses occur.
- **tb_mem_arbiter**: four masters with random traffic. It checks data integrity, response steering, round-robin order and the conflict flag.
- **tb_perf_counter**: exact cycle counts of random-length runs.
- **tb_vm_hw_thread**: end to end at the default parameters. A 48 x 48 matrix product C = A x B runs through the three ports over scattered pages. The result is checked through the shell and in physical memory. It also checks that each mechanism occurred:
  - a stall on the LOCAL_TLB preload;
  - page breaks on all ports;
  - DRAM lookups;
  - cache hits, and exactly one miss per page;
  - arbitration conflicts;
  - an exact cycle count from the counter.
- **tb_workload_pease**: an 11-stage, 2048-point constant-geometry transform with scalar accesses only, once per mode. It checks the result, that DRAM_TLB is at least 1.5 times slower than LOCAL_TLB, and that CACHE_TLB stays within 5 % of LOCAL_TLB. A typical run measures 3.11 M, 1.71 M and 1.71 M cycles.

- **tb_workload_matmul**: a blocked 64 x 64 matrix product, in every mode and with tiles of 16 and 32 (six runs side by side). The accelerator's compute time is modelled as one multiply-accumulate per cycle. Each run checks its product. The test also checks that DRAM_TLB costs less than 25 % over LOCAL_TLB with 16 x 16 tiles and less than 10 % with 32 x 32 tiles, and that CACHE_TLB stays within 2 % of LOCAL_TLB. A typical run measures 18.7 % and 6.5 %: for compute-bound, burst-based kernels the cheapest mode is nearly free, and the cost drops further as the tiles grow.
- **tb_workload_stencil**: a tiled five-point stencil on a 100 x 100 grid, run at the default parameters. There are two time steps, and the run is repeated with tiles of 14 and 49. Each tile is read with its halo as row bursts and written back as row bursts. The final grid is checked through the shell and in physical memory.

The full matrix, stencil and FFT sizes of the target workloads are not simulated. The
testbenches scale the problem sizes down, not the hardware.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/vm_pkg.sv tb/tb_vm_hw_thread.sv --top-module tb_vm_hw_thread
    ./obj_dir/Vtb_vm_hw_thread

Replace the testbench name for any other test. Each takes seconds. The
simulations rely on every flop being reset, so they behave the same with
random initial values.

## Where this RTL makes its own choices

The translation scheme itself follows the published design:

- per-array flat shadow tables with one physical page address per page;
- the three modes;
- a 1-cycle on-chip lookup;
- a 1k-entry, one-block-RAM cache;
- page splitting of bursts;
- a run-latency counter.

These are decisions of this implementation:

- the burst protocol and its single-outstanding-transaction arbiter;
- the round-robin policy;
- direct mapping with one entry per cache line and fetch on miss (other replacement policies are possible);
- the LOCAL_TLB depth of 8192;
- non-overlapped translation and transfer in `vm_port`;
- read data without back-pressure;
- configuration through ports;
- asynchronous active-low reset;
- the default mode mix at the top.

The shell does not cover:

- arrays of row pointers (`T **`), which would need a two-level shadow map;
- bound checking;
- the kernel driver that builds and pins the tables.
