# Cool-Mem: a data memory system with compiler-directed, tag-less cache access

A conventional set-associative L1 data cache spends most of its energy on work that is
redundant for typical programs: every load and store translates its address in a TLB,
reads all tags of a set, compares them, and reads all ways of the data array, only to
keep one word. Most consecutive accesses of a loop touch the same cache line again, so
the same tag matches and the same way is selected over and over.

Cool-Mem removes that redundancy in two ways:

* **Tag-less access.** Once it is known which way of the cache holds a line, the data
  array is read or written in that one way, with no tag lookup. The knowledge comes
  from two small structures: the *hotline registers*, which the compiler names in
  load/store instructions, and the *tag-cache*, a small CAM that remembers recently
  used line mappings. The conventional associative lookup is only the last resort.
* **Translation moved down.** The L1 is virtually indexed and virtually tagged, and
  every structure that can grant an access (hotline register, tag-cache entry, cache
  line) carries the address space identifier (ASID) of its owner. Protection is checked
  on every path without a TLB, so translation is only needed further down: before the
  L2 (*v-r* organisation) or only before main memory (*v-v* organisation).

This repository holds synthesizable SystemVerilog for the data side of such a system:
the L1 data cache with its three access paths, the unified L2, and a translation
buffer that can sit in either place, together with self-checking testbenches.

## Access paths of the L1

Every memory instruction supplies a base register, an immediate offset and the ASID
of the running process. A *static* instruction additionally carries a 5-bit hotline
index (`hlidx`); a *dynamic* one does not. The effective address is split into tag,
set index and line offset; tag and index together ("TagIndex") identify one line.

| step | path | what is compared | on success | latency |
|------|------|------------------|------------|---------|
| 1 | hotline register `hlidx` (static accesses only) | stored TagIndex and ASID against the access | data array read/written in the stored way | 2 cycles |
| 2 | tag-cache, 32 entries, searched in parallel | TagIndex and ASID of every entry | same, in the way of the hit entry | 3 cycles |
| 3 | associative lookup | the four tags and ASIDs of the set | conventional hit | 4 cycles |
| 4 | miss | | dirty victim written back, line fetched, step 3 repeated | 4 + refill |

Latency is counted from the cycle the request is accepted to the cycle the response
is valid. Dynamic accesses pass the hotline cycle idle, so every path has one fixed
latency.

What is written back into the small structures is what makes the scheme work:

* A static access that misses its hotline register but finds the line through the
  tag-cache or the associative lookup rewrites that hotline register with the line's
  TagIndex, way and ASID. The compiler's guess is therefore speculative: a wrong guess
  costs a cycle, never correctness.
* Every associative hit inserts the mapping into the tag-cache, replacing the least
  recently used entry; a tag-cache hit makes its entry most recently used. Because the
  tag-cache keeps mappings that a hotline register has just dropped, an access
  pattern that alternates between two lines through one hotline register (typical of
  an indirect `a[b[i]]` access) misses the hotline every time but hits the tag-cache
  every time.
* When a refill replaces a valid line, every hotline register and every tag-cache
  entry naming that line is invalidated by an associative search. Neither structure can
  therefore point at a way that now holds another line.

A TagIndex match under a different ASID is a *protection fault*: it is reported with
the response (`resp_prot_fault`) and the match is not used. The access continues down
the paths and is finally served from the line belonging to its own address space.

### The compiler side

The hardware expects a compiler pass to pick `hlidx` for each load and store: accesses
likely to hit the same line (the same array at nearby constant index offsets, fields of
one structure close to each other, neighbouring scalars) share a register. An access
closer than half a line to the last access mapped to some register reuses that register.
Otherwise the least recently assigned register is taken. A conservative variant leaves
pointer-based and indirect array accesses dynamic. The pass is software and not part
of this RTL; `tb/coolmem_kernels_tb.sv` applies its assignments by hand to three small
kernels.

## Organisations below the L1

`coolmem_top` has a parameter `ORG`:

* `ORG_VV` (default): the L2 is also virtual, and its lines are tagged with the ASID
  too. The translation buffer (MTLB) sits between the L2 and main memory and translates
  only L2 misses and L2 write-backs.
* `ORG_VR`: the L2 is physical, and the translation buffer (STLB) sits between the L1
  and the L2. Every L2 access, L1 write-backs included, is translated.

The translation buffer (`xlate_tlb`) is fully associative with 64 entries. An entry
holds an ASID, a virtual page and a physical page, so several address spaces share it
and a context switch needs no flush. A hit costs one cycle. A miss asks an external
page-table walker through the `walk_*` port and refills the entry named by a round-robin
pointer.

## Sizes and timing

| item | value |
|------|-------|
| L1 data cache | 64 KB, 4-way, 64-byte lines (256 sets), write-back, write-allocate |
| L2 unified cache | 512 KB, 4-way, 128-byte lines (1024 sets), 20-cycle hit |
| hotline registers | 32 (5-bit `hlidx`) |
| tag-cache | 32 entries, true LRU |
| translation buffer | 64 entries, fully associative |
| ASID | 7 bits |
| data word | 64 bits |
| virtual / physical address | 43 / 44 bits, 8 KB pages |

All sizes live in `rtl/coolmem_pkg.sv`. The memory geometry, register counts, ASID
width and latencies are those of the evaluated system. The word width, the address
widths, the page size and the 16-bit displacement follow an Alpha-style machine and are
choices of this implementation.

## Interfaces

* **Load/store port** (`req_*`, `resp_*`): valid/ready request, with one access in
  flight at a time. The next request can be accepted in the cycle the response is
  valid.
  Responses have no back-pressure. `resp_path` tells which path served the access
  (`path_e` in the package): hotline, tag-cache, associative, or miss.
* **Main-memory port** (`mem_*`): one whole 128-byte L2 line per request, with a
  physical line address. Reads and writes are both acknowledged by `mem_resp_valid`.
* **Walker port** (`walk_*`): a one-cycle request with virtual page and ASID. The
  response returns the physical page and a fault flag. A fault is pulsed on `tlb_fault`
  and the request proceeds with the returned page; what the system does with the
  fault is outside this design.
* **Event pulses** `tlb_hit`, `tlb_miss`, `l2_hit`, `l2_miss`: for counting. A
  lookup repeated after a refill pulses `*_hit` again.

## Files

| file | contents |
|------|----------|
| `rtl/coolmem_pkg.sv` | sizes, `line_map_t` (hotline/tag-cache entry), `org_e`, `path_e` |
| `rtl/eff_addr.sv` | effective address and field split |
| `rtl/hotline_regs.sv` | hotline register file with check, update, invalidation |
| `rtl/tag_cache.sv` | CAM tag-cache with LRU |
| `rtl/l1_arrays.sv` | L1 data/tag/ASID/status arrays, tag-less and associative access |
| `rtl/coolmem_l1.sv` | L1 controller sequencing the paths, refill and write-back |
| `rtl/xlate_tlb.sv` | translation buffer (STLB or MTLB) |
| `rtl/l2_cache.sv` | L2 cache, virtual+ASID or physical |
| `rtl/coolmem_top.sv` | the memory system, `ORG` selects v-v or v-r |
| `tb/*_tb.sv` | one self-checking testbench per module, plus the system tests below |
| `tb/mem_model.sv`, `tb/ptw_model.sv`, `tb/tb_pkg.sv` | behavioural main memory (200 cycles + 2 per word), page-table walker (20 cycles), shared test functions |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends; a watchdog ends it
with a failure if it hangs. The testbenches also pass when every flip-flop and memory
starts at a random value (built with `--x-initial unique`, run with
`+verilator+rand+reset+2`). Event counters and models
ignore the cycles before the first reset edge. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module coolmem_top_tb \
  rtl/coolmem_pkg.sv tb/tb_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/mem_model.sv tb/ptw_model.sv tb/coolmem_top_tb.sv
./obj_dir/Vcoolmem_top_tb
```

Packages come first; the unit testbenches need only the package, `tb/tb_pkg.sv` where
they import it, and the modules they instantiate.

* `coolmem_top_tb`: the whole system at full size in the v-v organisation. Every
  load is checked against a reference memory and every L1 path against its latency;
  the L2 hit latency is checked too. It forces each mechanism at least once and fails if
  one never happens: hotline, tag-cache and associative hits, L1 misses and write-backs,
  L2 hits, misses and write-backs, translation hits and misses, a protection fault and
  a walker fault. It runs in a few seconds.
* `coolmem_top_vr_tb`: the same in the v-r organisation.
* `coolmem_kernels_tb`: an affine loop `a[i] = a[i+1] + a[i+100] + a[i+103]` (about
  three quarters of its accesses hit a hotline), an alternating indirect access (every
  access after the first two is caught by the tag-cache), and a linked-list walk with
  dynamic pointer accesses. It prints the share of each path.
* Unit testbenches compare each module with a reference model written independently
  in the testbench, with random traffic after directed cases.

## How far to trust it, and where it departs from the original scheme

* **Single-ported L1.** The evaluated processor has a dual-ported L1 data cache.
  Only one port is built here, because how two ports would share the hotline registers
  and the tag-cache is not specified.
* **Blocking caches.** The L1, the L2 and the translation buffer each handle one request
  at a time. There are no miss queues and no write buffers.
* **Hotline check after address generation.** The check compares against the computed
  effective address. A faster carry-free comparator could start it before the
  address add; that circuit is not given and not built. The cycle count (2 cycles for a
  hotline hit) is met anyway.
* **Replacement and write policy are choices of this implementation:** round robin
  in the caches and the translation buffer, write-back and write-allocate, whole-word
  stores without byte enables, and no inclusion between L1 and L2.
* **Only the data side is built.** The instruction cache and ITLB, the processor, the
  page-table walker and main memory are outside this RTL (the last two have
  behavioural models in `tb/`). The TLB-less v-v variant, where L2 misses trap to
  software, is not built.
* **Synonyms.** The same physical page mapped at two virtual addresses would live
  twice in the virtual caches. No hardware handles this; the system software must
  avoid such aliases (for example, by mapping shared pages at the same virtual
  address in every process).
* The L2 reports `LATENCY` cycles for hits only when `LATENCY >= 3`.
* Sizes other than the defaults (hotline count, tag-cache size, line size,
  associativity) are set by constants in `coolmem_pkg`. Only the defaults are tested.
  Leaf modules such as `tag_cache` take their entry count as a parameter.
* Synthesis: the caches are plain arrays with one write per cycle per array. They map
  to memories in synthesis, but a generic flow takes long on the full-size L2.
