// xlate_tlb_tb: checks the translation buffer placed in front of a
// behavioural memory, with the page-table walker model answering after 20
// cycles. For every request the physical line address seen downstream is
// compared with the walker's mapping, the line returned upstream with the
// memory's contents, and hit/miss with a reference of the 64 entries and
// their round-robin refill. Timing: a hit reaches the downstream port two
// cycles after acceptance, a miss no earlier than 20 cycles later. Requests
// of two address spaces to the same page must not share an entry, and
// ASID 127 makes the walker report a fault.
module xlate_tlb_tb;
  import coolmem_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_fault = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_we, in_resp_valid;
  logic [36:0] in_line_addr;
  asid_t in_asid;
  logic [511:0] in_wline, in_resp_line, out_wline, out_resp_line;
  logic out_valid, out_ready, out_we, out_resp_valid;
  logic [37:0] out_line_addr;
  logic walk_req_valid, walk_resp_valid, walk_fault;
  logic [VPN_BITS-1:0] walk_vpn;
  asid_t walk_asid;
  logic [PPN_BITS-1:0] walk_ppn;
  logic hit_pulse, miss_pulse, fault;
  int n_reads, n_writes, n_walks;

  xlate_tlb dut (.clk, .rst_n, .in_valid, .in_ready, .in_we, .in_line_addr, .in_asid, .in_wline,
    .in_resp_valid, .in_resp_line, .out_valid, .out_ready, .out_we, .out_line_addr, .out_wline,
    .out_resp_valid, .out_resp_line, .walk_req_valid, .walk_vpn, .walk_asid, .walk_resp_valid,
    .walk_ppn, .walk_fault, .hit_pulse, .miss_pulse, .fault);

  ptw_model u_ptw (.clk, .rst_n, .walk_req_valid, .walk_vpn, .walk_asid, .walk_resp_valid, .walk_ppn,
    .walk_fault, .n_walks);

  mem_model #(.LINE_BITS(512), .KEY_BITS(38), .LAT_BASE(3), .CYC_PER_WORD(0)) u_mem (
    .clk, .rst_n, .req_valid(out_valid), .req_ready(out_ready), .req_we(out_we), .req_key(out_line_addr),
    .req_wline(out_wline), .resp_valid(out_resp_valid), .resp_line(out_resp_line),
    .n_reads, .n_writes);

  // reference translation buffer
  logic [VPN_BITS-1:0] rv [64];
  asid_t               ra [64];
  logic                rvld [64];
  int                  rrr = 0;
  logic [511:0]        written [logic [37:0]];

  always @(posedge clk) if (rst_n) begin
    if (hit_pulse) n_hit++;
    if (miss_pulse) n_miss++;
    if (fault) n_fault++;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic xfer(input logic we, input logic [36:0] la, input asid_t a);
    logic [VPN_BITS-1:0] vpn;
    logic [37:0] pla;
    logic hit;
    int t_out;
    logic [511:0] exp, wl;
    vpn = la[36 -: VPN_BITS];
    hit = 0;
    for (int i = 0; i < 64; i++) if (rvld[i] && rv[i] == vpn && ra[i] == a) hit = 1;
    if (!hit) begin rv[rrr] = vpn; ra[rrr] = a; rvld[rrr] = 1; rrr = (rrr + 1) % 64; end
    pla = {ptw_ppn(vpn, a), la[6:0]};
    wl = {16{$urandom}};
    @(negedge clk);
    in_valid = 1; in_we = we; in_line_addr = la; in_asid = a; in_wline = wl;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 0;
    t_out = 0;
    do begin @(negedge clk); t_out++; end while (!out_valid);
    chk("physical line address", out_line_addr === pla);
    chk("write data passed", !we || out_wline === wl);
    if (hit) chk($sformatf("hit timing %0d", t_out), t_out == 2);
    else     chk($sformatf("miss timing %0d", t_out), t_out >= 2 + TLB_MISS_CYC);
    do @(negedge clk); while (!in_resp_valid);
    if (we) written[pla] = wl;
    else begin
      if (written.exists(pla)) exp = written[pla];
      else for (int w = 0; w < 8; w++) exp[w*64 +: 64] = init_word(64'(pla), w);
      chk("read line", in_resp_line === exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) rvld[i] = 0;
    in_valid = 0; in_we = 0; in_line_addr = 0; in_asid = 0; in_wline = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    xfer(0, 37'h12345, 7'd3);           // miss
    xfer(1, 37'h12346, 7'd3);           // same page: hit
    xfer(0, 37'h12346, 7'd3);           // reads back the written line
    xfer(0, 37'h12345, 7'd4);           // same page, other space: miss
    xfer(0, 37'h12345, 7'h7F);          // walker fault
    chk("fault reported", n_fault == 1);
    for (int n = 0; n < 600; n++)
      xfer($urandom_range(0, 3) == 0, {30'($urandom_range(0, 90)), 7'($urandom)},
           asid_t'($urandom_range(0, 1)));
    chk("hits and misses seen", n_hit > 0 && n_miss > 64);
    chk("walks equal misses", n_walks == n_miss);
    $display("hits=%0d misses=%0d walks=%0d faults=%0d", n_hit, n_miss, n_walks, n_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
