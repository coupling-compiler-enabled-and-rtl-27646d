// coolmem_top_vr_tb: the same end-to-end test as coolmem_top_tb, run on the
// virtual-physical organisation (ORG_VR): the translation buffer (STLB) sits
// between the L1 and a physically indexed and tagged L2, so every L2 access,
// including L1 write-backs, is translated. The checks, the directed steps
// and the list of mechanisms that must occur are those of coolmem_top_tb;
// the L2 hit latency is not checked here because the STLB cycles lie
// between the L1 request and the L2.
module coolmem_top_vr_tb;
  import coolmem_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_static, req_we;
  logic [4:0] req_hlidx;
  logic [63:0] req_base, req_wdata, resp_rdata;
  logic [15:0] req_disp;
  asid_t req_asid, walk_asid;
  logic resp_valid, resp_prot_fault;
  path_e resp_path;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [36:0] mem_req_line_addr;
  logic [1023:0] mem_req_wline, mem_resp_line;
  logic walk_req_valid, walk_resp_valid, walk_fault;
  logic [VPN_BITS-1:0] walk_vpn;
  logic [PPN_BITS-1:0] walk_ppn;
  logic tlb_hit, tlb_miss, tlb_fault, l2_hit, l2_miss;
  int n_reads, n_writes, n_walks;

  coolmem_top #(.ORG(ORG_VR)) dut (.clk, .rst_n, .req_valid, .req_ready, .req_static, .req_hlidx, .req_we,
    .req_base, .req_disp, .req_asid, .req_wdata, .resp_valid, .resp_rdata, .resp_path,
    .resp_prot_fault, .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_line_addr,
    .mem_req_wline, .mem_resp_valid, .mem_resp_line, .walk_req_valid, .walk_vpn, .walk_asid,
    .walk_resp_valid, .walk_ppn, .walk_fault, .tlb_hit, .tlb_miss, .tlb_fault, .l2_hit, .l2_miss);

  mem_model #(.LINE_BITS(1024), .KEY_BITS(37)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid),
    .req_ready(mem_req_ready), .req_we(mem_req_we), .req_key(mem_req_line_addr),
    .req_wline(mem_req_wline), .resp_valid(mem_resp_valid), .resp_line(mem_resp_line),
    .n_reads, .n_writes);

  ptw_model u_ptw (.clk, .rst_n, .walk_req_valid, .walk_vpn, .walk_asid, .walk_resp_valid, .walk_ppn,
    .walk_fault, .n_walks);

  // ---- event counters -----------------------------------------------------
  int n_path [4];
  int n_prot = 0, n_tlb_hit = 0, n_tlb_miss = 0, n_tlb_fault = 0, n_l2_hit = 0, n_l2_miss = 0;
  int n_l1_wb = 0, n_l2_lat_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if (tlb_hit) n_tlb_hit++;
    if (tlb_miss) n_tlb_miss++;
    if (tlb_fault) n_tlb_fault++;
    if (l2_hit) n_l2_hit++;
    if (l2_miss) n_l2_miss++;
    if (dut.u_l1.nxt_req_valid && dut.u_l1.nxt_req_ready && dut.u_l1.nxt_req_we) n_l1_wb++;
  end

  // L2 hit latency: from an accepted L1-to-L2 request to its response
  int l2_t = -1;
  logic l2_was_hit = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_l1.nxt_req_valid && dut.u_l1.nxt_req_ready) begin l2_t = 0; l2_was_hit = 0; end
    else if (l2_t >= 0) l2_t++;
    if (l2_hit && l2_t == 0) l2_was_hit = 1;
    if (dut.u_l1.nxt_resp_valid && l2_t >= 0) begin
      if (l2_was_hit && l2_t != L2_LATENCY - 1) n_l2_lat_bad++;
      l2_t = -1;
    end
  end

  // ---- reference memory -----------------------------------------------------
  logic [63:0] refm [logic [46:0]];

  function automatic logic [63:0] ref_read(input asid_t a, input logic [42:0] va);
    logic [46:0] k;
    logic [36:0] pline;
    k = {a, va[42:3]};
    if (refm.exists(k)) return refm[k];
    pline = {ptw_ppn(va[42:13], a), va[12:7]};
    return init_word(64'(pline), int'(va[6:3]));
  endfunction

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  path_e p;
  logic  f;

  task automatic access(input logic st, input logic [4:0] hl, input logic we,
                        input logic [42:0] va, input asid_t a, input logic [63:0] wd);
    logic [15:0] d;
    int lat;
    logic [63:0] exp;
    d = 16'($urandom_range(0, 64)) - 16'd32;
    @(negedge clk);
    req_valid = 1; req_static = st; req_hlidx = hl; req_we = we;
    req_base = 64'(va) - {{48{d[15]}}, d}; req_disp = d; req_asid = a; req_wdata = wd;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!resp_valid);
    p = resp_path; f = resp_prot_fault;
    n_path[p]++;
    if (f) n_prot++;
    exp = ref_read(a, va);
    if (we) refm[{a, va[42:3]}] = wd;
    else chk($sformatf("load va=%h asid=%0d got=%h exp=%h", va, a, resp_rdata, exp),
             resp_rdata === exp);
    case (p)
      PATH_HOTLINE:  chk($sformatf("hotline latency %0d", lat), lat == 2);
      PATH_TAGCACHE: chk($sformatf("tag-cache latency %0d", lat), lat == 3);
      PATH_ASSOC:    chk($sformatf("assoc latency %0d", lat), lat == 4);
      default:       chk($sformatf("miss latency %0d", lat), lat >= 4 + L2_LATENCY);
    endcase
  endtask

  localparam logic [42:0] X = 43'h0_0010_0000;

  initial begin
    req_valid = 0; req_static = 0; req_hlidx = 0; req_we = 0; req_base = 0;
    req_disp = 0; req_asid = 0; req_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a static stream through one hotline register
    access(1, 5'd0, 0, X, 7'd1, 0);       chk("cold L1 miss", p == PATH_MISS);
    access(1, 5'd0, 0, X + 8, 7'd1, 0);   chk("hotline hit", p == PATH_HOTLINE);
    access(1, 5'd0, 1, X + 16, 7'd1, 64'h1111); chk("hotline store", p == PATH_HOTLINE);
    access(0, 5'd0, 0, X + 16, 7'd1, 0);  chk("dynamic: tag-cache hit", p == PATH_TAGCACHE);
    access(0, 5'd0, 0, X + 64, 7'd1, 0);  chk("other half of the L2 line: L1 miss", p == PATH_MISS);
    // forget X in the tag-cache, then find it associatively
    for (int i = 2; i <= 34; i++) access(0, 5'd0, 0, X + 43'(i * 64), 7'd1, 0);
    access(0, 5'd0, 0, X + 24, 7'd1, 0);  chk("associative hit", p == PATH_ASSOC);
    // protection: same address in another space
    access(1, 5'd0, 0, X + 8, 7'd2, 0);   chk("protection fault", f && p == PATH_MISS);
    // six dirty lines in one L1 set and one L2 set: L1 and L2 write-backs
    for (int i = 0; i < 6; i++) access(0, 5'd0, 1, 43'h40_0000 + 43'(i << 17), 7'd1, 64'(i + 100));
    for (int i = 0; i < 6; i++) access(1, 5'(i + 1), 0, 43'h40_0000 + 43'(i << 17), 7'd1, 0);
    // an address space the walker refuses
    access(0, 5'd0, 0, X, 7'h7F, 0);
    // random phase
    for (int n = 0; n < 1500; n++) begin
      logic [42:0] va;
      va = 43'h80_0000 | (43'($urandom_range(0, 7)) << 17) | (43'($urandom_range(0, 3)) << 6)
           | (43'($urandom_range(0, 7)) << 3);
      access($urandom_range(0, 1) == 1, 5'($urandom_range(8, 15)), $urandom_range(0, 2) == 0,
             va, asid_t'($urandom_range(1, 3)), {$urandom, $urandom});
    end
    // every mechanism must have happened
    chk("hotline hits",        n_path[PATH_HOTLINE] > 0);
    chk("tag-cache hits",      n_path[PATH_TAGCACHE] > 0);
    chk("associative hits",    n_path[PATH_ASSOC] > 0);
    chk("L1 misses",           n_path[PATH_MISS] > 0);
    chk("protection faults",   n_prot > 0);
    chk("L1 write-backs",      n_l1_wb > 0);
    chk("L2 hits",             n_l2_hit > 0);
    chk("L2 misses",           n_l2_miss > 0);
    chk("L2 write-backs",      n_writes > 0);
    chk("TLB hits",            n_tlb_hit > 0);
    chk("TLB misses",          n_tlb_miss > 0 && n_walks == n_tlb_miss);
    chk("walker faults",       n_tlb_fault > 0);
    $display("L1 paths: hotline=%0d tag-cache=%0d assoc=%0d miss=%0d  prot faults=%0d",
             n_path[0], n_path[1], n_path[2], n_path[3], n_prot);
    $display("L1 write-backs=%0d  L2 hits=%0d misses=%0d  TLB hits=%0d misses=%0d faults=%0d",
             n_l1_wb, n_l2_hit, n_l2_miss, n_tlb_hit, n_tlb_miss, n_tlb_fault);
    $display("memory reads=%0d writes=%0d", n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
