// coolmem_l1_tb: checks the L1 data cache with its three access paths
// against a word-level reference memory. The level below is a behavioural
// memory (mem_model) keyed by ASID and line address with a short latency.
// Directed part: a cold miss, a hotline hit (2 cycles), a tag-cache hit
// (3 cycles), an associative hit after the tag-cache has forgotten a line
// (4 cycles), the alternating two-line pattern where the hotline keeps
// missing and the tag-cache catches every access, an ASID mismatch that must
// report a protection fault, and a hotline register that must not hit once
// its line has been evicted. Random part: loads and stores, static and
// dynamic, two address spaces, on a footprint that forces dirty evictions.
// Every load is checked for data, every response for the latency of its path.
module coolmem_l1_tb;
  import coolmem_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  int n_path [4];
  int n_fault = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_static, req_we;
  logic [4:0] req_hlidx;
  logic [63:0] req_base, req_wdata, resp_rdata;
  logic [15:0] req_disp;
  asid_t req_asid;
  logic resp_valid, resp_prot_fault;
  path_e resp_path;
  logic nreq_valid, nreq_ready, nreq_we, nresp_valid;
  logic [36:0] nreq_addr;
  asid_t nreq_asid;
  logic [511:0] nreq_wline, nresp_line;
  int n_reads, n_writes;

  coolmem_l1 dut (.clk, .rst_n, .req_valid, .req_ready, .req_static, .req_hlidx, .req_we,
    .req_base, .req_disp, .req_asid, .req_wdata, .resp_valid, .resp_rdata, .resp_path,
    .resp_prot_fault, .nxt_req_valid(nreq_valid), .nxt_req_ready(nreq_ready),
    .nxt_req_we(nreq_we), .nxt_req_line_addr(nreq_addr), .nxt_req_asid(nreq_asid),
    .nxt_req_wline(nreq_wline), .nxt_resp_valid(nresp_valid), .nxt_resp_line(nresp_line));

  mem_model #(.LINE_BITS(512), .KEY_BITS(44), .LAT_BASE(6), .CYC_PER_WORD(0)) u_mem (
    .clk, .rst_n, .req_valid(nreq_valid), .req_ready(nreq_ready), .req_we(nreq_we),
    .req_key({nreq_asid, nreq_addr}), .req_wline(nreq_wline), .resp_valid(nresp_valid),
    .resp_line(nresp_line), .n_reads, .n_writes);

  // reference memory, one 64-bit word per {asid, word address}
  logic [63:0] refm [logic [46:0]];

  function automatic logic [63:0] ref_read(input asid_t a, input logic [42:0] va);
    logic [46:0] k;
    k = {a, va[42:3]};
    if (refm.exists(k)) return refm[k];
    return init_word(64'({a, va[42:6]}), int'(va[5:3]));
  endfunction

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic access(input logic st, input logic [4:0] hl, input logic we,
                        input logic [42:0] va, input asid_t a, input logic [63:0] wd,
                        output path_e p, output logic f);
    logic [15:0] d;
    int lat;
    logic [63:0] exp;
    d = 16'($urandom_range(0, 64)) - 16'd32;
    // drive and sample at the falling edge, away from the rising edge
    @(negedge clk);
    req_valid = 1; req_static = st; req_hlidx = hl; req_we = we;
    req_base = 64'(va) - {{48{d[15]}}, d}; req_disp = d; req_asid = a; req_wdata = wd;
    while (!req_ready) @(negedge clk);
    @(posedge clk);              // request accepted at this edge
    #1 req_valid = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!resp_valid);
    p = resp_path; f = resp_prot_fault;
    n_path[p]++;
    if (f) n_fault++;
    exp = ref_read(a, va);
    if (we) refm[{a, va[42:3]}] = wd;
    else chk($sformatf("load data va=%h asid=%0d got=%h exp=%h", va, a, resp_rdata, exp),
             resp_rdata === exp);
    case (p)
      PATH_HOTLINE:  chk($sformatf("hotline latency %0d", lat), lat == 2);
      PATH_TAGCACHE: chk($sformatf("tag-cache latency %0d", lat), lat == 3);
      PATH_ASSOC:    chk($sformatf("assoc latency %0d", lat), lat == 4);
      default:       chk($sformatf("miss latency %0d", lat), lat > 4);
    endcase
  endtask

  path_e p;
  logic f;
  localparam logic [42:0] A = 43'h100_0000;

  initial begin
    req_valid = 0; req_static = 0; req_hlidx = 0; req_we = 0; req_base = 0;
    req_disp = 0; req_asid = 0; req_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // cold miss, then hotline hit, then tag-cache hit
    access(1, 5'd1, 0, A, 7'd1, 0, p, f);       chk("cold miss", p == PATH_MISS);
    access(1, 5'd1, 0, A + 8, 7'd1, 0, p, f);   chk("hotline hit", p == PATH_HOTLINE);
    access(0, 5'd0, 0, A + 16, 7'd1, 0, p, f);  chk("tag-cache hit", p == PATH_TAGCACHE);
    access(1, 5'd1, 1, A + 24, 7'd1, 64'hABCD, p, f); chk("hotline store", p == PATH_HOTLINE);
    access(1, 5'd1, 0, A + 24, 7'd1, 0, p, f);  chk("hotline reload", p == PATH_HOTLINE);
    // push A out of the tag-cache with 32 other lines (different sets)
    for (int i = 1; i <= 32; i++) access(0, 5'd0, 0, A + 43'(i * 64), 7'd1, 0, p, f);
    access(0, 5'd0, 0, A, 7'd1, 0, p, f);       chk("associative hit", p == PATH_ASSOC);
    // alternating pattern through one hotline register
    access(1, 5'd2, 0, A + 43'h4000_0000, 7'd1, 0, p, f);
    access(1, 5'd2, 0, A + 43'h4000_1000, 7'd1, 0, p, f);
    for (int r = 0; r < 4; r++) begin
      access(1, 5'd2, 0, A + 43'h4000_0000, 7'd1, 0, p, f); chk("c2 via tag-cache", p == PATH_TAGCACHE);
      access(1, 5'd2, 0, A + 43'h4000_1000, 7'd1, 0, p, f); chk("c3 via tag-cache", p == PATH_TAGCACHE);
    end
    // same address, other address space: protection fault, served as a miss
    access(1, 5'd1, 0, A + 8, 7'd2, 0, p, f);
    chk("protection fault", f == 1'b1 && p == PATH_MISS);
    // hotline register of an evicted line must not hit
    access(1, 5'd3, 1, 43'h20_0040, 7'd1, 64'h5555, p, f);
    for (int i = 1; i <= 4; i++) access(0, 5'd0, 1, 43'h20_0040 + 43'(i << 14), 7'd1, 64'(i), p, f);
    access(1, 5'd3, 0, 43'h20_0040, 7'd1, 0, p, f);
    chk("evicted line not a hotline hit", p == PATH_MISS);
    // random traffic: 8 sets x 6 tags x 2 spaces, forcing dirty evictions
    for (int n = 0; n < 4000; n++) begin
      logic [42:0] va;
      va = (43'($urandom_range(0, 5)) << 14) | (43'($urandom_range(0, 7)) << 6)
           | (43'($urandom_range(0, 7)) << 3) | 43'h300_0000;
      access($urandom_range(0, 1) == 1, 5'($urandom_range(4, 11)), $urandom_range(0, 2) == 0,
             va, asid_t'($urandom_range(1, 2)), {$urandom, $urandom}, p, f);
    end
    chk("write-backs happened", n_writes > 0);
    for (int i = 0; i < 4; i++) chk($sformatf("path %0d used", i), n_path[i] > 0);
    $display("paths: hotline=%0d tag-cache=%0d assoc=%0d miss=%0d faults=%0d writebacks=%0d",
             n_path[0], n_path[1], n_path[2], n_path[3], n_fault, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
