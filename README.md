# Sequential way-access two-way cache (low-power L1)

A conventional two-way set-associative cache reads the tag array and the data
array of *both* ways on every access, compares both tags, and uses the hit
signals to select the data word. Half of that array activity is wasted on
every hit. The hit signals also drive a 32-bit-wide multiplexer, which loads
them heavily and puts the multiplexer on the critical path.

This cache reads **one way per cycle**. Way 0 is probed first, tag and data
together, and way 1 is probed in the next cycle only if way 0 missed. A hit in
way 0 costs one cycle and half the array activity of a conventional cache. The
controller state fixes the probed way before any tag is compared, so the
output multiplexer is steered by the state (`probe_way`), not by a hit signal.

That only pays off if most hits land in way 0. Two placement rules make sure
they do:

* **Priority replacement.** On a miss, the new line always goes into way 0.
  The line that was in way 0 moves to way 1, and the line in way 1 is evicted.
* **Promotion.** On a hit in way 1, the two lines of the set swap places, so
  the line just used is in way 0 for its next access.

Together these keep the most recently used line of every set in way 0. In a
two-way cache, way 1 then always holds the least recently used line, so no LRU
state or LRU logic is needed.

The RTL implements this organisation at its main size: 32 KB, 16-byte lines of
four 32-bit words, 1024 sets, 32-bit byte addresses. The organisation follows
the thesis *Sequential Way-Access Set-Associative Cache Architecture for Low
Power* ("Seq+Pri+Pmt" there). The interfaces, the write policy, the reset
sequence and the exact miss sequence are this implementation's own choices.
They are listed under [Design choices](#design-choices-and-departures).

## Structure

```
               +------------------ seq_cache ------------------+
 CPU req  ---> |  seq_cache_ctrl (FSM, line buffer, request reg) | ---> main memory
 CPU resp <--- |     |  tag_ce/we/addr        data_ce/we/addr    | <--- (16-byte lines)
               |     v                         v                 |
               |  tag_array 0  tag_array 1   data_array 0  data_array 1
               |     |            |             |             |
               |  tag_comparator x2           output mux (select = probe_way)
               +-------------------------------------------------+
```

| file | contents |
|---|---|
| `rtl/seq_cache_pkg.sv` | word, line and byte-enable types; address-field widths; controller state enum |
| `rtl/seq_cache.sv` | top level: two ways of tag array, data array and comparator, the output multiplexer and the controller |
| `rtl/seq_cache_ctrl.sv` | the controller: probe sequence, promotion swap, replacement, write-back, refill |
| `rtl/tag_array.sv` | tag memory of one way, `{valid, dirty, tag}` per set; single-port, registered read; valid bits cleared after reset |
| `rtl/data_array.sv` | data memory of one way, one 32-bit word per access, byte-enabled writes; single-port, registered read; optionally split into memory cells |
| `rtl/tag_comparator.sv` | per-way hit signal: `valid && stored tag == request tag` |

Address split at the default size:

| bits | field |
|---|---|
| `[1:0]` | byte in word (ignored; stores use byte enables) |
| `[3:2]` | word in line |
| `[13:4]` | set index (1024 sets) |
| `[31:14]` | tag (18 bits) |

The data arrays are addressed by `{index, word}`. One access moves one word, so
a whole line takes four accesses. The arrays behave like single-port
memory-compiler SRAMs: an access enabled in cycle *t* shows its read data in
cycle *t+1*, and that data is held until the next read. Replace
`tag_array`/`data_array` with real macros for a physical implementation.

A way's data array of up to 32 KB is one memory cell. Above that, as in the
thesis's 128 KB cache, each way is built from 16 KB cells, because one large
cell would be too slow. The top address bits pick the cell and only that cell
is enabled, so splitting the array adds no activity. `act_data` is the OR of
the cell enables. `seq_cache` picks the cell size from `CACHE_BYTES`, and
`data_array` takes it as `CELL_WORDS`.

## Access timing and array activity

This is the core of the design. Latency counts cycles from the cycle in which
the request is accepted (`cpu_req_valid && cpu_req_ready`) to the cycle with
`cpu_resp_valid`. "Busy" counts cycles from acceptance until `cpu_req_ready`
is high again. RL and WL are the main-memory read and write transfer times,
counted from the request cycle to the cycle in which it completes.

| case | latency | busy | tag activations | data activations |
|---|---|---|---|---|
| load hit in way 0 | 1 | 1 (next request accepted in the response cycle) | 1 | 1 |
| store hit in way 0 | 1 | 2 | 1 (+1 to set dirty if the line was clean) | 2 |
| hit in way 1 (promotion) | 2 | 11 | 4 | 18 |
| miss, empty set | 2 + RL + 4 | latency + 1 | 3 | 6 |
| miss, way 0 holds a line | 2 + 5 + RL + 4 | latency + 1 | 4 | 14 |
| ... and the way-1 victim is dirty | add 5 + WL | | | add 4 |

Cycle by cycle:

1. **Accept.** The incoming index drives way 0's tag and data arrays, and only
   those two arrays.
2. **PROBE0.** The way-0 tag comparator decides.
   * Load hit: the way-0 word goes out and a new request may be accepted in the
     same cycle. Loads that hit way 0 therefore stream at one per cycle.
   * Store hit: the word is written with its byte enables. The tag is rewritten
     only if the dirty bit must be set. The data array is written only after the
     tag has matched, so a store hit answers in one cycle but holds off the next
     request for one cycle.
   * Miss: way 1's arrays are read, and only those two.
3. **PROBE1.** The way-1 comparator decides.
   * Hit: the way-1 word goes out, and both tags are rewritten exchanged in this
     cycle. The data words are then exchanged in 8 cycles. Each word is read
     from both arrays, then both are written back crossed over. That is 8 reads
     and 8 writes, one word per array per cycle, since each array has a single
     port. A store that hit in way 1 is merged during the exchange.
   * Miss: way 1 holds the victim.
4. **Miss handling**, in this order:
   1. If the victim is valid and dirty, read its four words into the line
      buffer (5 cycles) and write the line back.
   2. If way 0 holds a line, copy it into way 1 and write its tag to way 1
      (5 cycles). Reading way 0 and writing way 1 overlap, because they are
      different arrays.
   3. Read the requested line from memory.
   4. Write the line into way 0 with a new tag (4 cycles). A store miss merges
      its data into the line first. The response comes in the last of these
      cycles.

With the long-latency memory (RL = 16, WL = 18), a miss costs 22, 27 or 50
cycles.

## Interfaces

CPU side (all signals sampled on the rising edge of `clk`):

* `cpu_req_valid`, `cpu_req_ready`, `cpu_req_write`, `cpu_req_addr[31:0]`,
  `cpu_req_wdata[31:0]` and `cpu_req_be[3:0]`. Hold the request until it is
  accepted.
* `cpu_resp_valid` and `cpu_resp_rdata[31:0]`. Exactly one response pulse
  answers each accepted request, in order. A store's response only signals
  completion.

Main-memory side, one 16-byte line per transfer:

* `mem_req_valid`, `mem_req_ready`, `mem_req_write` and `mem_req_addr[27:0]`
  (the line address). `mem_req_wdata[127:0]` holds word 0 in bits `[31:0]`.
  The request is held until `mem_req_ready`. An assertion checks this.
* `mem_resp_valid` ends the transfer. For a read, `mem_resp_rdata[127:0]`
  must be valid in that cycle.

Monitor outputs:

* `act_tag[1:0]` and `act_data[1:0]` show which arrays are enabled in each
  cycle. Summing them gives the array-activity figures that dominate this
  cache's power.
* `probe_way` is the output multiplexer select.

Reset: `rst_n` is active low and synchronous. After it is released, each tag
array clears one set per cycle (1024 cycles at the default size), and
`cpu_req_ready` stays low until the clear is done.

## Parameters

`seq_cache` has three parameters:

* `CACHE_BYTES` (default 32768): total capacity, a power of two, at least 64.
  The thesis evaluates 2 KB to 128 KB. At 128 KB each way's data array
  becomes four 16 KB cells.
* `LINE_BYTES` (default 16): fixed by the package. Any other value stops
  elaboration with an error.
* `ADDR_W` (default 32): byte-address width.

The associativity is fixed at two. The no-LRU argument and the single swap
partner both depend on it.

## Design choices and departures

Where this RTL follows the thesis:

* One way probed per cycle, way 0 first.
* The multiplexer is steered by the probed way.
* Refills go to way 0, and the old way-0 line moves to the evicted way.
* A way-1 hit is promoted by swapping the two lines.
* There is no LRU unit.
* 16-byte lines of 32-bit words, and a 32 KB main size.
* The cost of a swap (8 + 8 data and 4 tag accesses).

Choices made here, which the thesis leaves open:

* **Write policy.** Write-back and write-allocate, with a dirty bit per line.
  Stores use byte enables.
* **Store-hit timing.** The data word is written in the cycle the tag matched.
  The cache then accepts nothing for one cycle.
* **Miss order.** Write-back, then move, then refill, each done in turn. There
  is no critical-word-first. A faster variant could overlap the line move with
  the write-back transfer.
* **Handshakes, reset clearing and monitor outputs.** These are all specific
  to this implementation.

Not modelled:

* Circuit timing and power. The thesis's conclusions about cycle time and
  hit-signal fanout are physical effects. The RTL reproduces the structure
  they come from (a mux select that does not depend on a hit), not the numbers.
* The comparison organisations (conventional parallel two-way cache,
  sequential access without or with only one of the placement rules).
* Associativity above two. The thesis describes the scheme for n ways, where a
  miss costs n - 1 extra probe cycles and an LRU unit is again needed to
  choose the victim. It evaluates only two ways, and so does this RTL.
* Store hits at one per cycle. The thesis's cycle counts suggest that stores
  hitting way 0 cost no more than loads. Here each such store blocks one extra
  cycle, because the single-port data array cannot take the store and the next
  probe in the same cycle. A store buffer would remove this.

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Testbench helpers are in `tb/`:

* `seq_cache_tb_pkg.sv` gives the initial memory contents as a formula of the
  address.
* `main_memory_model.sv` is a behavioural main memory with sparse storage and
  parameterised read and write latency. The defaults are 16 and 18 cycles.
  The short-latency memory uses 6 and 8 cycles.

| testbench | what it checks |
|---|---|
| `tb_tag_array` | reset clear length, read timing and hold, random writes/reads |
| `tb_data_array` | byte-enabled writes, read timing and hold, random traffic; a second array split into four cells must return the same data and enable only the addressed cell |
| `tb_tag_comparator` | hit = valid and equal tags, single-bit tag differences |
| `tb_seq_cache_ctrl` | directed cases on the short-latency memory: the frequent-block sequence A A A B A A A (one swap brings A back to way 0), line move on a miss, promotion, dirty write-back address and data, exact latencies and per-way array activations |
| `tb_seq_cache` | 20,000 random loads and stores on a 512-byte cache. A reference model predicts the data, the hit way, the latency, the cycle `cpu_req_ready` returns (checked every cycle), the mux select, the total array activations and the memory transfers. It also counts every mechanism: way-0 load and store hits, promotions, misses into empty sets, moves, write-backs, store misses, back-to-back acceptance |
| `tb_seq_cache_full` | the same checks with the cache at its default 32 KB and 200,000 requests |
| `tb_seq_cache_stall` | the `tb_seq_cache` checks with a main memory that holds off each request for 0 to 5 cycles. Hits keep exact latencies, misses must not be faster than without stalls, and `cpu_req_ready` must return one cycle after a miss is answered |
| `tb_size_sweep` | the 50x50 matrix kernel on caches of 2 KB to 128 KB, each with the long and the short memory, all run in parallel through the `matrix_runner` helper. Checks the results, that the outcome counts match the memory reads, that each way enables at most one data memory cell per cycle (four 16 KB cells per way at 128 KB), and that misses never grow with size |
| `tb_workloads` | three evaluated kernels at full size on the default cache, with the testbench acting as the processor: 50x50 matrix multiply, 1024-point fixed-point FFT, quicksort of 65,536 integers. Results are checked against a plain computation |

Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
  --top-module tb_seq_cache \
  rtl/seq_cache_pkg.sv tb/seq_cache_tb_pkg.sv tb/main_memory_model.sv \
  tb/tb_seq_cache.sv -o sim && ./obj_dir/sim
```

Put the two packages first. `-y rtl` lets Verilator find the other modules by
their file names. For the array and comparator testbenches, the packages can
be left out.

Each run takes a few seconds. `tb_workloads` and `tb_size_sweep` take about
ten. For `tb_size_sweep`, add `-y tb` so that `matrix_runner` is found.

Array activity measured by `tb_workloads` on the 32 KB cache with the
long-latency memory. "Conventional" is the 2 activations per probe a parallel
two-way cache would make, for tags and for data, before refills:

| kernel | accesses | way-0 hits | way-1 hits | misses | tag act. | data act. | cycles | conventional tag act. |
|---|---|---|---|---|---|---|---|---|
| Matrix 50x50 | 252,500 | 243,237 | 2,222 | 7,041 | 280,291 | 396,538 | 792,689 | 505,000 |
| FFT 1024 | 51,200 | 51,200 | 0 | 0 | 51,200 | 71,680 | 102,400 | 102,400 |
| Sort 65,536 | 2,078,581 | 1,970,418 | 20,132 | 88,031 | 2,464,840 | 4,295,018 | 8,049,384 | 4,157,162 |

These access streams come from the kernels as written in the testbench. They
are not traces of a compiled program, so they are not directly comparable with
processor traces. They do show the expected behaviour: 94 to 100 % of accesses
hit way 0, and tag-array activity falls by 41 to 50 % compared with probing
both ways. Data-array activity falls less, because every swap and move
costs 8 to 16 word accesses. The JPEG encoder and decoder and Whetstone
workloads were not simulated.

The matrix kernel across cache sizes, from `tb_size_sweep`. A parallel
two-way cache would make 505,000 tag activations for the 252,500 accesses of
this kernel at every size. The three matrices start at multiples of 64 KB, so
their elements share set indices. That keeps the sizes from 32 KB up at the
same conflict-miss count.

| size | way-0 hits | way-1 hits | misses | tag act. | data act. | cycles (16/18) | cycles (6/8) |
|---|---|---|---|---|---|---|---|
| 2 KB | 158,565 | 49,040 | 44,895 | 534,307 | 1,680,338 | 2,174,059 | 1,698,839 |
| 4 KB | 176,865 | 34,469 | 41,166 | 479,407 | 1,384,666 | 1,948,910 | 1,509,700 |
| 8 KB | 186,072 | 39,860 | 26,568 | 451,786 | 1,287,563 | 1,623,769 | 1,327,979 |
| 16 KB | 209,786 | 34,083 | 8,631 | 380,644 | 958,061 | 1,116,270 | 995,130 |
| 32-128 KB | 243,237 | 2,222 | 7,041 | 280,291 | 396,538 | 792,689 | 685,489 |

Small caches thrash, and every way-1 hit and every miss then costs a swap or a
move. At 2 KB the sequential cache's tag activity exceeds the 505,000 probe
activations of a parallel cache, and its data activity is more than three
times that. The organisation pays off
once most of the working set stays resident.
