// coolmem_pkg: sizes, field widths and shared types of the Cool-Mem data
// memory system.
//
// The sizes follow the evaluated baseline: 64 KB 4-way L1 data cache with
// 64-byte lines, 512 KB 4-way unified L2 with 128-byte lines, 32 hotline
// registers (so a 5-bit hotline index in static loads and stores), a
// 32-entry tag-cache, 64-entry fully associative translation buffers and
// 7-bit address space identifiers (ASIDs). The 64-bit data word, the 43-bit
// implemented virtual address, the 44-bit physical address and the 8 KB page
// follow an Alpha 21264 style memory system and are choices of this design.
package coolmem_pkg;

  // ---- machine word and addresses --------------------------------------
  localparam int unsigned XLEN       = 64;  // register / data word width
  localparam int unsigned VA_BITS    = 43;  // implemented virtual address bits
  localparam int unsigned PA_BITS    = 44;  // physical address bits
  localparam int unsigned PAGE_BITS  = 13;  // 8 KB pages
  localparam int unsigned ASID_BITS  = 7;   // address space identifier
  localparam int unsigned VPN_BITS   = VA_BITS - PAGE_BITS;
  localparam int unsigned PPN_BITS   = PA_BITS - PAGE_BITS;

  // ---- L1 data cache: 64 KB, 4-way, 64-byte lines ----------------------
  localparam int unsigned L1_WAYS       = 4;
  localparam int unsigned L1_LINE_BYTES = 64;
  localparam int unsigned L1_SETS       = 65536 / (L1_WAYS * L1_LINE_BYTES); // 256
  localparam int unsigned L1_OFF_BITS   = $clog2(L1_LINE_BYTES);            // 6
  localparam int unsigned L1_IDX_BITS   = $clog2(L1_SETS);                  // 8
  localparam int unsigned L1_TAG_BITS   = VA_BITS - L1_IDX_BITS - L1_OFF_BITS;
  localparam int unsigned L1_TI_BITS    = L1_TAG_BITS + L1_IDX_BITS;        // TagIndex
  localparam int unsigned WAY_BITS      = $clog2(L1_WAYS);
  localparam int unsigned L1_LINE_BITS  = L1_LINE_BYTES * 8;
  localparam int unsigned L1_WORDS      = L1_LINE_BITS / XLEN;              // 8

  // ---- L2 unified cache: 512 KB, 4-way, 128-byte lines ------------------
  localparam int unsigned L2_WAYS       = 4;
  localparam int unsigned L2_LINE_BYTES = 128;
  localparam int unsigned L2_SIZE_BYTES = 512 * 1024;
  localparam int unsigned L2_LINE_BITS  = L2_LINE_BYTES * 8;
  localparam int unsigned L2_LATENCY    = 20;   // cycles on a hit

  // ---- compiler-visible and dynamic structures --------------------------
  localparam int unsigned N_HOTLINES    = 32;
  localparam int unsigned HLIDX_BITS    = $clog2(N_HOTLINES);
  localparam int unsigned N_TAGCACHE    = 32;
  localparam int unsigned N_TLB         = 64;
  localparam int unsigned TLB_MISS_CYC  = 20;   // translation miss penalty

  typedef logic [VA_BITS-1:0]   vaddr_t;
  typedef logic [ASID_BITS-1:0] asid_t;
  typedef logic [L1_TI_BITS-1:0] tagidx_t;
  typedef logic [WAY_BITS-1:0]  way_t;

  // One hotline register or one tag-cache entry: the two hold the same
  // fields (a line's TagIndex, the way that holds it and its ASID).
  typedef struct packed {
    logic    valid;
    asid_t   asid;
    way_t    way;
    tagidx_t tagidx;
  } line_map_t;

  // Organisation of the hierarchy below L1 (where address translation sits).
  typedef enum logic {
    ORG_VR = 1'b0,  // virtual L1, physical L2, STLB between L1 and L2
    ORG_VV = 1'b1   // virtual L1, virtual L2, MTLB between L2 and memory
  } org_e;

  // Which access path satisfied an L1 access.
  typedef enum logic [1:0] {
    PATH_HOTLINE  = 2'd0,  // static speculation correct: tag-less access
    PATH_TAGCACHE = 2'd1,  // tag-cache hit: tag-less access
    PATH_ASSOC    = 2'd2,  // conventional associative lookup hit
    PATH_MISS     = 2'd3   // L1 miss, line fetched from L2 first
  } path_e;

endpackage
