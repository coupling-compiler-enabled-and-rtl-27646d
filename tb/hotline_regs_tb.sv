// hotline_regs_tb: drives random updates, invalidations and checks into the
// hotline register file and compares hit, way and protection fault with a
// reference copy of the registers kept in the testbench. Directed cases first
// cover a hit, a miss on another line, an ASID mismatch (protection fault) and
// an invalidation of a line mapped through two registers.
module hotline_regs_tb;
  import coolmem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] hlidx, upd_idx;
  tagidx_t tagidx, upd_tagidx, inv_tagidx;
  asid_t asid, upd_asid, inv_asid;
  way_t upd_way, hit_way;
  logic hit, prot_fault, upd_en, inv_en;

  hotline_regs dut (.clk, .rst_n, .hlidx, .tagidx, .asid, .hit, .hit_way, .prot_fault,
    .upd_en, .upd_idx, .upd_tagidx, .upd_way, .upd_asid, .inv_en, .inv_tagidx, .inv_asid);

  line_map_t ref_r [32];

  task automatic check(input logic [4:0] i, input tagidx_t ti, input asid_t a);
    logic eh, ef;
    hlidx = i; tagidx = ti; asid = a;
    #1;
    eh = ref_r[i].valid && ref_r[i].tagidx == ti && ref_r[i].asid == a;
    ef = ref_r[i].valid && ref_r[i].tagidx == ti && ref_r[i].asid != a;
    checks++;
    if (hit !== eh || prot_fault !== ef || (eh && hit_way !== ref_r[i].way)) begin
      failures++;
      $display("FAIL idx=%0d hit=%b/%b fault=%b/%b way=%0d/%0d", i, hit, eh, prot_fault, ef,
               hit_way, ref_r[i].way);
    end
  endtask

  task automatic cycle(input logic ue, input logic [4:0] ui, input tagidx_t ut, input way_t uw,
                       input asid_t ua, input logic ie, input tagidx_t it, input asid_t ia);
    upd_en = ue; upd_idx = ui; upd_tagidx = ut; upd_way = uw; upd_asid = ua;
    inv_en = ie; inv_tagidx = it; inv_asid = ia;
    @(posedge clk);
    for (int k = 0; k < 32; k++) begin
      if (ue && ui == k[4:0]) ref_r[k] = '{1'b1, ua, uw, ut};
      else if (ie && ref_r[k].valid && ref_r[k].tagidx == it && ref_r[k].asid == ia)
        ref_r[k].valid = 1'b0;
    end
    #1;
    upd_en = 0; inv_en = 0;
  endtask

  initial begin
    for (int k = 0; k < 32; k++) ref_r[k] = '0;
    upd_en = 0; inv_en = 0; hlidx = 0; tagidx = 0; asid = 0;
    upd_idx = 0; upd_tagidx = 0; upd_way = 0; upd_asid = 0; inv_tagidx = 0; inv_asid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(3, 37'h5, 7'd1);                            // empty: miss
    cycle(1, 3, 37'h5, 2'd2, 7'd1, 0, '0, '0);
    check(3, 37'h5, 7'd1);                            // hit way 2
    check(3, 37'h6, 7'd1);                            // other line: miss
    check(3, 37'h5, 7'd2);                            // other ASID: fault
    cycle(1, 9, 37'h5, 2'd2, 7'd1, 0, '0, '0);
    cycle(0, 0, '0, '0, '0, 1, 37'h5, 7'd1);          // line leaves: both cleared
    check(3, 37'h5, 7'd1);
    check(9, 37'h5, 7'd1);
    for (int n = 0; n < 3000; n++) begin
      logic [4:0] i;
      tagidx_t t;
      asid_t a;
      i = 5'($urandom); t = tagidx_t'($urandom_range(0, 15)); a = asid_t'($urandom_range(0, 2));
      check(i, t, a);
      cycle($urandom_range(0, 1) == 1, 5'($urandom), tagidx_t'($urandom_range(0, 15)),
            way_t'($urandom), asid_t'($urandom_range(0, 2)),
            $urandom_range(0, 3) == 0, tagidx_t'($urandom_range(0, 15)),
            asid_t'($urandom_range(0, 2)));
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
