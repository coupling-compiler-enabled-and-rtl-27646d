// tag_cache: the CAM-based Tag-Cache, a small fully associative cache of
// cache-line mappings that backs up the hotline registers.
//
// Each entry holds the same fields as a hotline register: TagIndex, way and
// ASID. The lookup searches all entries in parallel for the access's
// TagIndex under the current ASID; a hit gives the way, and the cache is then
// accessed directly without a tag lookup. A TagIndex match under another
// ASID raises a protection fault and is treated as a miss. The controller
// asserts touch_en together with a hit to mark that entry most recently
// used, and ins_en after an associative lookup has found the line, to place
// the mapping in the least recently used entry (an invalid entry is taken
// first; an entry that already holds the mapping is refreshed in place).
// inv_en removes every entry naming a line that leaves the cache.
//
// Replacement is true LRU kept as per-entry ages (0 = most recent): touching
// an entry ages every entry younger than it by one. Lookup is combinational;
// touch, insert and invalidate act on the next rising clock edge, and the
// controller uses at most one of touch and insert per cycle (insert wins).
// Reset clears all entries and sets the ages to 0..N-1.
module tag_cache
  import coolmem_pkg::*;
#(
  parameter int unsigned N = N_TAGCACHE
) (
  input  logic    clk,
  input  logic    rst_n,
  // lookup (step 4)
  input  tagidx_t tagidx,
  input  asid_t   asid,
  output logic    hit,
  output way_t    hit_way,
  output logic    prot_fault,
  input  logic    touch_en,
  // insert after a tag-cache miss resolved by the associative lookup
  input  logic    ins_en,
  input  tagidx_t ins_tagidx,
  input  way_t    ins_way,
  input  asid_t   ins_asid,
  // associative invalidation of a line leaving the cache
  input  logic    inv_en,
  input  tagidx_t inv_tagidx,
  input  asid_t   inv_asid
);
  localparam int unsigned IW = $clog2(N);
  typedef logic [IW-1:0] idx_t;

  line_map_t ent [N];
  idx_t      age [N];

  idx_t hit_idx;
  idx_t ins_idx;
  idx_t touch_idx;
  logic do_touch;

  // parallel search
  always_comb begin
    hit        = 1'b0;
    prot_fault = 1'b0;
    hit_idx    = '0;
    hit_way    = '0;
    for (int i = 0; i < N; i++) begin
      if (ent[i].valid && ent[i].tagidx == tagidx) begin
        if (ent[i].asid == asid) begin
          hit     = 1'b1;
          hit_idx = idx_t'(i);
          hit_way = ent[i].way;
        end else begin
          prot_fault = 1'b1;
        end
      end
    end
  end

  // victim choice for an insert: an entry already holding the mapping, else
  // an invalid entry, else the oldest one
  always_comb begin
    logic found_same, found_free;
    found_same = 1'b0;
    found_free = 1'b0;
    ins_idx    = '0;
    for (int i = 0; i < N; i++)
      if (age[i] == idx_t'(N - 1)) ins_idx = idx_t'(i);
    for (int i = 0; i < N; i++)
      if (!ent[i].valid && !found_free) begin
        found_free = 1'b1;
        ins_idx    = idx_t'(i);
      end
    for (int i = 0; i < N; i++)
      if (ent[i].valid && ent[i].tagidx == ins_tagidx && ent[i].asid == ins_asid
          && !found_same) begin
        found_same = 1'b1;
        ins_idx    = idx_t'(i);
      end
  end

  assign do_touch  = ins_en || (touch_en && hit);
  assign touch_idx = ins_en ? ins_idx : hit_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        ent[i] <= '0;
        age[i] <= idx_t'(i);
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (do_touch) begin
          if (idx_t'(i) == touch_idx) age[i] <= '0;
          else if (age[i] < age[touch_idx]) age[i] <= age[i] + 1'b1;
        end
        if (ins_en && idx_t'(i) == ins_idx)
          ent[i] <= '{valid: 1'b1, asid: ins_asid, way: ins_way, tagidx: ins_tagidx};
        else if (inv_en && ent[i].valid && ent[i].tagidx == inv_tagidx
                 && ent[i].asid == inv_asid)
          ent[i].valid <= 1'b0;
      end
    end
  end
endmodule
