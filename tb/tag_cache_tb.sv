// tag_cache_tb: checks the tag-cache against a reference that keeps the
// entries plus a recency list (most recent first). Directed part: the
// alternating two-line pattern of a hotline that keeps missing (both lines
// stay in the tag-cache), an ASID mismatch, invalidation, and LRU eviction
// after 33 distinct inserts. Random part: mixed lookups, touches, inserts
// and invalidations over a small address range so that hits, refreshes and
// evictions are all frequent.
module tag_cache_tb;
  import coolmem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tagidx_t tagidx, ins_tagidx, inv_tagidx;
  asid_t asid, ins_asid, inv_asid;
  way_t hit_way, ins_way;
  logic hit, prot_fault, touch_en, ins_en, inv_en;

  tag_cache dut (.clk, .rst_n, .tagidx, .asid, .hit, .hit_way, .prot_fault, .touch_en,
    .ins_en, .ins_tagidx, .ins_way, .ins_asid, .inv_en, .inv_tagidx, .inv_asid);

  line_map_t ref_e [32];
  int order [$];      // recency list of entry numbers, most recent first

  function automatic int find(input tagidx_t t, input asid_t a);
    for (int k = 0; k < 32; k++)
      if (ref_e[k].valid && ref_e[k].tagidx == t && ref_e[k].asid == a) return k;
    return -1;
  endfunction

  function automatic void make_mru(input int k);
    foreach (order[j]) if (order[j] == k) begin order.delete(j); break; end
    order.push_front(k);
  endfunction

  task automatic lookup(input tagidx_t t, input asid_t a);
    int k;
    logic ef;
    tagidx = t; asid = a;
    #1;
    k = find(t, a);
    ef = 1'b0;
    for (int j = 0; j < 32; j++)
      if (ref_e[j].valid && ref_e[j].tagidx == t && ref_e[j].asid != a) ef = 1'b1;
    checks++;
    if (hit !== (k >= 0) || prot_fault !== ef || (k >= 0 && hit_way !== ref_e[k].way)) begin
      failures++;
      $display("FAIL lookup t=%h a=%0d hit=%b exp=%b fault=%b/%b", t, a, hit, k >= 0, prot_fault, ef);
    end
  endtask

  // one clock with optional touch (of the current lookup), insert, invalidate
  task automatic step(input logic te, input logic ie, input tagidx_t it, input way_t iw,
                      input asid_t ia, input logic ve, input tagidx_t vt, input asid_t va);
    int k, victim;
    touch_en = te; ins_en = ie; ins_tagidx = it; ins_way = iw; ins_asid = ia;
    inv_en = ve; inv_tagidx = vt; inv_asid = va;
    @(posedge clk);
    if (ie) begin
      victim = find(it, ia);
      if (victim < 0) for (int j = 0; j < 32; j++) if (!ref_e[j].valid) begin victim = j; break; end
      if (victim < 0) victim = order[$];
      make_mru(victim);
    end else if (te) begin
      k = find(tagidx, asid);
      if (k >= 0) make_mru(k);
    end
    for (int j = 0; j < 32; j++) begin
      if (ie && j == victim) ref_e[j] = '{1'b1, ia, iw, it};
      else if (ve && ref_e[j].valid && ref_e[j].tagidx == vt && ref_e[j].asid == va)
        ref_e[j].valid = 1'b0;
    end
    #1;
    touch_en = 0; ins_en = 0; inv_en = 0;
  endtask

  initial begin
    for (int k = 0; k < 32; k++) begin ref_e[k] = '0; order.push_back(k); end
    touch_en = 0; ins_en = 0; inv_en = 0; tagidx = 0; asid = 0;
    ins_tagidx = 0; ins_way = 0; ins_asid = 0; inv_tagidx = 0; inv_asid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // alternating c2/c3 pattern: both mappings are kept
    lookup(37'hC2, 7'd4); step(0, 1, 37'hC2, 2'd1, 7'd4, 0, '0, '0);
    lookup(37'hC3, 7'd4); step(0, 1, 37'hC3, 2'd3, 7'd4, 0, '0, '0);
    for (int r = 0; r < 4; r++) begin
      lookup(37'hC2, 7'd4); step(1, 0, '0, '0, '0, 0, '0, '0);
      lookup(37'hC3, 7'd4); step(1, 0, '0, '0, '0, 0, '0, '0);
    end
    lookup(37'hC2, 7'd5);                                   // other ASID: fault
    step(0, 0, '0, '0, '0, 1, 37'hC2, 7'd4);
    lookup(37'hC2, 7'd4);                                   // invalidated
    // fill with 33 distinct lines: the oldest one is evicted
    for (int n = 0; n < 33; n++) begin
      lookup(tagidx_t'(37'h100 + n), 7'd1);
      step(0, 1, tagidx_t'(37'h100 + n), way_t'(n), 7'd1, 0, '0, '0);
    end
    lookup(37'h100, 7'd1);
    lookup(37'h120, 7'd1);
    for (int n = 0; n < 4000; n++) begin
      tagidx_t t;
      asid_t a;
      t = tagidx_t'($urandom_range(0, 47)); a = asid_t'($urandom_range(0, 1));
      lookup(t, a);
      step($urandom_range(0, 1) == 1, !hit && $urandom_range(0, 1) == 1, t, way_t'($urandom), a,
           $urandom_range(0, 7) == 0, tagidx_t'($urandom_range(0, 47)), asid_t'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
