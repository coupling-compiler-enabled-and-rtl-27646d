// l1_arrays_tb: checks the L1 arrays against a reference copy of tags,
// ASIDs, status bits and data. Random refills into a few sets exercise
// victim choice (invalid way first, then round robin) and dirty write-back
// information; random associative lookups check hit, way and protection
// fault; random tag-less word reads and writes in the hit way check data.
module l1_arrays_tb;
  import coolmem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] index;
  logic [L1_TAG_BITS-1:0] lk_tag, vic_tag, fill_tag;
  asid_t lk_asid, vic_asid, fill_asid;
  logic lk_hit, lk_prot_fault, acc_we, vic_valid, vic_dirty, fill_en;
  way_t lk_way, acc_way, vic_way;
  logic [2:0] acc_word;
  logic [63:0] acc_wdata, acc_rdata;
  logic [511:0] vic_line, fill_line;

  l1_arrays dut (.clk, .rst_n, .index, .lk_tag, .lk_asid, .lk_hit, .lk_way, .lk_prot_fault,
    .acc_way, .acc_word, .acc_we, .acc_wdata, .acc_rdata, .vic_way, .vic_valid, .vic_dirty,
    .vic_tag, .vic_asid, .vic_line, .fill_en, .fill_tag, .fill_asid, .fill_line);

  typedef struct {
    logic valid, dirty;
    logic [L1_TAG_BITS-1:0] tag;
    asid_t asid;
    logic [511:0] data;
  } line_t;
  line_t m [4][4];     // [set][way], sets 0..3 only
  int    rrp [4];

  function automatic int ref_victim(input int s);
    for (int w = 0; w < 4; w++) if (!m[s][w].valid) return w;
    return rrp[s];
  endfunction

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      rrp[s] = 0;
      for (int w = 0; w < 4; w++) m[s][w] = '{0, 0, '0, '0, '0};
    end
    index = 0; lk_tag = 0; lk_asid = 0; acc_way = 0; acc_word = 0; acc_we = 0;
    acc_wdata = 0; fill_en = 0; fill_tag = 0; fill_asid = 0; fill_line = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int n = 0; n < 3000; n++) begin
      int s, v, hw;
      logic [L1_TAG_BITS-1:0] t;
      asid_t a;
      s = $urandom_range(0, 3);
      t = L1_TAG_BITS'($urandom_range(0, 9));
      a = asid_t'($urandom_range(0, 1));
      index = 8'(s); lk_tag = t; lk_asid = a;
      #1;
      // reference lookup
      hw = -1;
      begin
        logic ef;
        ef = 0;
        for (int w = 0; w < 4; w++)
          if (m[s][w].valid && m[s][w].tag == t) begin
            if (m[s][w].asid == a) hw = w; else ef = 1;
          end
        chk("lookup hit", lk_hit === (hw >= 0));
        chk("prot fault", lk_prot_fault === ef);
        if (hw >= 0) chk("hit way", lk_way === way_t'(hw));
      end
      v = ref_victim(s);
      chk("victim way", vic_way === way_t'(v));
      chk("victim valid/dirty", vic_valid === m[s][v].valid && vic_dirty === (m[s][v].valid && m[s][v].dirty) ||
                                 !m[s][v].valid && vic_valid === 1'b0);
      if (m[s][v].valid) chk("victim data", vic_tag === m[s][v].tag && vic_asid === m[s][v].asid
                                             && vic_line === m[s][v].data);
      if (hw < 0) begin
        // refill
        fill_en = 1; fill_tag = t; fill_asid = a;
        fill_line = {16{$urandom}};
        @(posedge clk);
        m[s][v] = '{1, 0, t, a, fill_line};
        if (v == rrp[s]) rrp[s] = (rrp[s] + 1) % 4;
        #1 fill_en = 0;
      end else begin
        // tag-less word access in the hit way
        acc_way = way_t'(hw); acc_word = 3'($urandom);
        #1;
        chk("read word", acc_rdata === m[s][hw].data[acc_word*64 +: 64]);
        if ($urandom_range(0, 1) == 1) begin
          acc_we = 1; acc_wdata = {$urandom, $urandom};
          @(posedge clk);
          m[s][hw].data[acc_word*64 +: 64] = acc_wdata;
          m[s][hw].dirty = 1;
          #1 acc_we = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
