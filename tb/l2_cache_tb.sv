// l2_cache_tb: checks the L2 cache (virtual, ASID-tagged form) against a
// reference memory and a reference copy of its tags. The size is reduced to
// 8 KB (16 sets) so that random traffic keeps evicting dirty lines; the
// latency stays at the default 20 cycles. Reads of L1-line halves are
// checked for data, writes (L1 write-backs) are read back later, hit/miss is
// compared with the reference tags and round-robin replacement, and a hit
// must answer exactly 20 cycles after acceptance. The memory below is
// behavioural and keyed by {ASID, line address}, so the same address in two
// address spaces names two different lines.
module l2_cache_tb;
  import coolmem_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_we, resp_valid;
  logic [36:0] req_line_addr;
  asid_t req_asid, mem_req_asid;
  logic [511:0] req_wline, resp_line;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [35:0] mem_req_line_addr;
  logic [1023:0] mem_req_wline, mem_resp_line;
  logic hit_pulse, miss_pulse;
  int n_reads, n_writes;

  l2_cache #(.SIZE_BYTES(8192)) dut (.clk, .rst_n, .req_valid, .req_ready, .req_we,
    .req_line_addr, .req_asid, .req_wline, .resp_valid, .resp_line, .mem_req_valid,
    .mem_req_ready, .mem_req_we, .mem_req_line_addr, .mem_req_asid, .mem_req_wline,
    .mem_resp_valid, .mem_resp_line, .hit_pulse, .miss_pulse);

  mem_model #(.LINE_BITS(1024), .KEY_BITS(43), .LAT_BASE(10), .CYC_PER_WORD(0)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_key({mem_req_asid, mem_req_line_addr}), .req_wline(mem_req_wline),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line), .n_reads, .n_writes);

  logic [511:0] written [logic [43:0]];
  // reference tags: 16 sets x 4 ways
  logic [43:0] rtag [16][4];   // {asid, L2 line address}
  logic        rvld [16][4];
  int          rrp  [16];

  always @(posedge clk) if (rst_n) begin
    if (hit_pulse) n_hit++;
    if (miss_pulse) n_miss++;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic xfer(input logic we, input logic [36:0] la, input asid_t a);
    int s, lat, v;
    logic hit;
    logic [43:0] key;
    logic [511:0] wl, exp;
    s = int'(la[4:1]);
    key = {a, la[36:1]};
    hit = 0;
    for (int w = 0; w < 4; w++) if (rvld[s][w] && rtag[s][w] == key) hit = 1;
    if (!hit) begin
      v = -1;
      for (int w = 0; w < 4; w++) if (!rvld[s][w] && v < 0) v = w;
      if (v < 0) v = rrp[s];
      if (v == rrp[s]) rrp[s] = (rrp[s] + 1) % 4;
      rtag[s][v] = key; rvld[s][v] = 1;
    end
    wl = {16{$urandom}};
    @(negedge clk);
    req_valid = 1; req_we = we; req_line_addr = la; req_asid = a; req_wline = wl;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!resp_valid);
    if (hit) chk($sformatf("hit latency %0d", lat), lat == L2_LATENCY);
    else     chk($sformatf("miss latency %0d", lat), lat > L2_LATENCY);
    if (we) written[{a, la}] = wl;
    else begin
      if (written.exists({a, la})) exp = written[{a, la}];
      else for (int w = 0; w < 8; w++) exp[w*64 +: 64] = init_word(64'({a, la[36:1]}), int'(la[0]) * 8 + w);
      chk($sformatf("read line %h", la), resp_line === exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 16; s++) begin
      rrp[s] = 0;
      for (int w = 0; w < 4; w++) rvld[s][w] = 0;
    end
    req_valid = 0; req_we = 0; req_line_addr = 0; req_asid = 0; req_wline = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    xfer(0, 37'h400, 7'd1);      // miss
    xfer(0, 37'h401, 7'd1);      // other half of the same line: hit
    xfer(1, 37'h400, 7'd1);      // write-back from L1: hit
    xfer(0, 37'h400, 7'd2);      // same address, other space: miss
    xfer(0, 37'h400, 7'd1);      // the written data
    for (int n = 0; n < 1500; n++)
      xfer($urandom_range(0, 2) == 0, 37'($urandom_range(0, 255)), asid_t'($urandom_range(1, 2)));
    chk("dirty lines written back", n_writes > 0);
    chk("hits and misses", n_hit > 0 && n_miss > 0);
    $display("hits=%0d misses=%0d mem reads=%0d mem writes=%0d", n_hit, n_miss, n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
