// hotline_regs: the compiler-managed hotline register file of the L1 data
// cache.
//
// A static ("hotlined") load or store carries a 5-bit hotline index chosen by
// the compiler. The addressed register holds the mapping of the cache line
// the compiler expects the access to touch: its TagIndex, the way it lives in
// and the ASID it belongs to. The check compares the stored TagIndex with the
// access's tag and index and the stored ASID with the current ASID: when both
// match (and the entry is valid) the cache is read or written directly in
// that way with no tag lookup. A TagIndex match under a different ASID is
// reported as a protection fault and counts as a miss, so the access goes on
// to the other paths. After a miss the controller writes the register with
// the line's actual mapping. All registers are also searched associatively
// by TagIndex so that a line leaving the cache invalidates every register
// that points to it.
//
// Timing: lookup is combinational from hlidx/tagidx/asid; update and
// invalidation take effect on the next rising clock edge. If an update and
// an invalidation hit the same register in one cycle the update wins.
// Reset clears all valid bits.
module hotline_regs
  import coolmem_pkg::*;
#(
  parameter int unsigned N = N_HOTLINES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // check (steps 1 and 2)
  input  logic [$clog2(N)-1:0] hlidx,
  input  tagidx_t              tagidx,
  input  asid_t                asid,
  output logic                 hit,
  output way_t                 hit_way,
  output logic                 prot_fault,
  // update after a miss
  input  logic                 upd_en,
  input  logic [$clog2(N)-1:0] upd_idx,
  input  tagidx_t              upd_tagidx,
  input  way_t                 upd_way,
  input  asid_t                upd_asid,
  // associative invalidation of a line leaving the cache
  input  logic                 inv_en,
  input  tagidx_t              inv_tagidx,
  input  asid_t                inv_asid
);
  line_map_t regs [N];

  always_comb begin
    line_map_t e;
    e          = regs[hlidx];
    hit        = e.valid && (e.tagidx == tagidx) && (e.asid == asid);
    prot_fault = e.valid && (e.tagidx == tagidx) && (e.asid != asid);
    hit_way    = e.way;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (upd_en && upd_idx == i[$clog2(N)-1:0]) begin
          regs[i] <= '{valid: 1'b1, asid: upd_asid, way: upd_way, tagidx: upd_tagidx};
        end else if (inv_en && regs[i].valid && regs[i].tagidx == inv_tagidx
                     && regs[i].asid == inv_asid) begin
          regs[i].valid <= 1'b0;
        end
      end
    end
  end
endmodule
