// coolmem_kernels_tb: runs the small program kernels the design is built
// around through the full memory system (default v-v organisation, full
// size), with the hotline indices a hotline-assigning compiler would give:
//  * affine loop  a[i] = a[i+1] + a[i+100] + a[i+103], i = 0..99, 8-byte
//    elements; a[i] and a[i+1] share hotline register 1, a[i+100] and
//    a[i+103] share register 2 (they lie within half a line of each other);
//  * irregular a[b[i]] whose index alternates between two far-apart lines,
//    mapped optimistically through one hotline register: after the first
//    two misses every access misses the hotline and must hit the tag-cache;
//  * a linked-list walk p->val = a[i]; p = p->next with pointer accesses left
//    dynamic (not hotlined), as a conservative compiler would.
// Loads are checked against the reference memory and the final array is
// read back and compared with the loop computed here. The share of each L1
// path is printed per kernel, and the tag-cache must catch every access of
// the irregular kernel after warm-up.
module coolmem_kernels_tb;
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

  coolmem_top dut (.clk, .rst_n, .req_valid, .req_ready, .req_static, .req_hlidx, .req_we,
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

  int n_path [4];
  int n_prot = 0;

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
    last_data = resp_rdata;
  endtask


  int c0 [4];
  logic [63:0] last_data;
  logic [63:0] sw [int];     // software copy of the array for the affine loop

  function automatic void snap();
    for (int k = 0; k < 4; k++) c0[k] = n_path[k];
  endfunction

  function automatic void report(input string name);
    int t;
    t = 0;
    for (int k = 0; k < 4; k++) t += n_path[k] - c0[k];
    $display("%s: %0d accesses  hotline=%0d tag-cache=%0d assoc=%0d miss=%0d", name, t,
             n_path[0] - c0[0], n_path[1] - c0[1], n_path[2] - c0[2], n_path[3] - c0[3]);
  endfunction

  localparam logic [42:0] A  = 43'h0_0200_0000;   // array a
  localparam logic [42:0] L  = 43'h0_0300_0000;   // list nodes
  localparam logic [42:0] B1 = 43'h0_0400_0000;
  localparam logic [42:0] B2 = 43'h0_0400_8000;

  initial begin
    logic [63:0] s, v;
    req_valid = 0; req_static = 0; req_hlidx = 0; req_we = 0; req_base = 0;
    req_disp = 0; req_asid = 0; req_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- affine loop ---------------------------------------------------------
    for (int k = 0; k < 203; k++) sw[k] = ref_read(7'd1, A + 43'(k * 8));
    snap();
    for (int i = 0; i < 100; i++) begin
      access(1, 5'd1, 0, A + 43'((i + 1) * 8), 7'd1, 0);   s = last_data;
      access(1, 5'd2, 0, A + 43'((i + 100) * 8), 7'd1, 0); s += last_data;
      access(1, 5'd2, 0, A + 43'((i + 103) * 8), 7'd1, 0); s += last_data;
      access(1, 5'd1, 1, A + 43'(i * 8), 7'd1, s);
      sw[i] = sw[i + 1] + sw[i + 100] + sw[i + 103];
    end
    report("affine loop (Fig. 5a)");
    chk("affine loop: at least 70% hotline hits", (n_path[0] - c0[0]) >= 280);
    for (int i = 0; i < 100; i++) begin
      access(0, 5'd0, 0, A + 43'(i * 8), 7'd1, 0);
      chk($sformatf("a[%0d] after the loop", i), last_data === sw[i]);
    end

    // ---- irregular a[b[i]] alternating between two lines ----------------------
    snap();
    for (int i = 0; i < 40; i++)
      access(1, 5'd3, 0, ((i % 2) == 0 ? B1 : B2) + 43'((i / 2 % 8) * 8), 7'd1, 0);
    report("irregular a[b[i]] (Fig. 4)");
    chk("tag-cache catches the alternating pattern", (n_path[1] - c0[1]) == 38);

    // ---- linked list, pointer accesses dynamic --------------------------------
    for (int k = 0; k < 20; k++)   // node k at L + k*4160: next pointer at +8
      access(0, 5'd0, 1, L + 43'(k * 4160) + 8, 7'd1, 64'(L + 43'((k + 1) * 4160)));
    snap();
    v = 64'(L);
    for (int i = 0; i < 20; i++) begin
      access(1, 5'd4, 0, A + 43'(i * 8), 7'd1, 0);           // a[i], hotlined
      access(0, 5'd0, 1, 43'(v), 7'd1, last_data);            // p->val, dynamic
      access(0, 5'd0, 0, 43'(v) + 8, 7'd1, 0);                // p = p->next, dynamic
      chk("next pointer", last_data == v + 4160);
      v = last_data;
    end
    report("linked list (Fig. 6b)");

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
