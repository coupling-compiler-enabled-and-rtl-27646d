// coolmem_l1: the Cool-Mem L1 data cache with its three access paths.
//
// Every load or store carries a base register value, an immediate offset and
// the current ASID. A static access also carries a hotline index chosen by
// the compiler; a dynamic access carries none. The controller tries, in order:
//   1. hotline check (static accesses only): the named hotline register is
//      compared with the access's TagIndex and ASID. On a hit the cache is
//      accessed directly in the stored way, without tag lookup.
//   2. tag-cache: on a hotline miss, and for every dynamic access, the
//      CAM-based tag-cache is searched. A hit again gives a direct access.
//   3. associative lookup: all tags of the set are compared (with ASID), as in
//      a conventional cache. A hit fills the tag-cache and, for a static
//      access, the hotline register.
// An associative miss fetches the line from the level below over a line-wide
// request/response port, first writing back the victim if it is dirty, and
// then repeats step 3. A line leaving the cache is removed from the hotline
// registers and the tag-cache by associative invalidation, so a hit on
// either can never name a stale way.
//
// Timing, counted from the cycle a request is accepted (req_valid and
// req_ready) to the cycle resp_valid is high: hotline hit 2 cycles, tag-cache
// hit 3 cycles, associative hit 4 cycles; a miss adds the refill time. These
// are the latencies of the evaluated design. One access is in flight at a
// time; a new request is accepted in the cycle the response is given.
// There is no back-pressure on responses. Each response reports the path
// that served it and whether any path saw a protection fault (a matching
// TagIndex under another ASID); such a match is treated as a miss. Stores
// write one whole 64-bit word (no byte enables); the cache is write-back and
// write-allocate. Blocking operation, whole-word stores, write-back policy,
// the refill port and the round-robin replacement are this design's choices.
module coolmem_l1
  import coolmem_pkg::*;
#(
  parameter int unsigned DISP_BITS = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_static,   // hotlined load/store
  input  logic [HLIDX_BITS-1:0] req_hlidx,
  input  logic                  req_we,
  input  logic [XLEN-1:0]       req_base,
  input  logic [DISP_BITS-1:0]  req_disp,
  input  asid_t                 req_asid,
  input  logic [XLEN-1:0]       req_wdata,
  output logic                  resp_valid,
  output logic [XLEN-1:0]       resp_rdata,
  output path_e                 resp_path,
  output logic                  resp_prot_fault,
  // level below: one line per request, virtual line address and ASID
  output logic                  nxt_req_valid,
  input  logic                  nxt_req_ready,
  output logic                  nxt_req_we,      // 1: write back a dirty line
  output logic [VA_BITS-L1_OFF_BITS-1:0] nxt_req_line_addr,
  output asid_t                 nxt_req_asid,
  output logic [L1_LINE_BITS-1:0] nxt_req_wline,
  input  logic                  nxt_resp_valid,  // read data, or write-back done
  input  logic [L1_LINE_BITS-1:0] nxt_resp_line
);
  typedef enum logic [2:0] {
    S_IDLE, S_HL, S_TC, S_AS, S_WB, S_WB_WAIT, S_FILL, S_FILL_WAIT
  } state_e;

  state_e state;

  // latched request
  logic                  r_static, r_we;
  logic [HLIDX_BITS-1:0] r_hlidx;
  logic [XLEN-1:0]       r_base, r_wdata;
  logic [DISP_BITS-1:0]  r_disp;
  asid_t                 r_asid;
  logic                  r_missed, r_fault;

  // address fields

  logic [L1_TAG_BITS-1:0] tag;
  logic [L1_IDX_BITS-1:0] index;
  logic [L1_OFF_BITS-1:0] offset;
  tagidx_t                tagidx;

  eff_addr #(.DISP_BITS(DISP_BITS)) u_ea (
    .base(r_base), .disp(r_disp), .va(), .tag(tag), .index(index),
    .offset(offset), .tagidx(tagidx)
  );

  // hotline registers
  logic hl_hit, hl_fault, hl_upd;
  way_t hl_way;
  // tag-cache
  logic tc_hit, tc_fault, tc_touch, tc_ins;
  way_t tc_way;
  // arrays
  logic lk_hit, lk_fault;
  way_t lk_way, acc_way;
  logic acc_we;
  logic [XLEN-1:0] acc_rdata;
  logic vic_valid, vic_dirty;
  logic [L1_TAG_BITS-1:0] vic_tag;
  asid_t vic_asid;
  logic [L1_LINE_BITS-1:0] vic_line;
  logic fill_en;
  way_t upd_way;

  // a line is leaving the cache when a valid victim is overwritten by a refill
  logic    inv_en;
  tagidx_t inv_tagidx;
  assign inv_en     = fill_en && vic_valid;
  assign inv_tagidx = {vic_tag, index};

  hotline_regs u_hl (
    .clk, .rst_n,
    .hlidx(r_hlidx), .tagidx(tagidx), .asid(r_asid),
    .hit(hl_hit), .hit_way(hl_way), .prot_fault(hl_fault),
    .upd_en(hl_upd), .upd_idx(r_hlidx), .upd_tagidx(tagidx), .upd_way(upd_way),
    .upd_asid(r_asid),
    .inv_en(inv_en), .inv_tagidx(inv_tagidx), .inv_asid(vic_asid)
  );

  tag_cache u_tc (
    .clk, .rst_n,
    .tagidx(tagidx), .asid(r_asid),
    .hit(tc_hit), .hit_way(tc_way), .prot_fault(tc_fault), .touch_en(tc_touch),
    .ins_en(tc_ins), .ins_tagidx(tagidx), .ins_way(lk_way), .ins_asid(r_asid),
    .inv_en(inv_en), .inv_tagidx(inv_tagidx), .inv_asid(vic_asid)
  );

  l1_arrays u_arr (
    .clk, .rst_n, .index(index),
    .lk_tag(tag), .lk_asid(r_asid), .lk_hit(lk_hit), .lk_way(lk_way),
    .lk_prot_fault(lk_fault),
    .acc_way(acc_way), .acc_word(offset[L1_OFF_BITS-1 -: $clog2(L1_WORDS)]),
    .acc_we(acc_we), .acc_wdata(r_wdata), .acc_rdata(acc_rdata),
    .vic_way(), .vic_valid(vic_valid), .vic_dirty(vic_dirty),
    .vic_tag(vic_tag), .vic_asid(vic_asid), .vic_line(vic_line),
    .fill_en(fill_en), .fill_tag(tag), .fill_asid(r_asid), .fill_line(nxt_resp_line)
  );

  // which path serves the access in this cycle
  logic serve_hl, serve_tc, serve_as;
  always_comb begin
    serve_hl = (state == S_HL) && r_static && hl_hit;
    serve_tc = (state == S_TC) && tc_hit;
    serve_as = (state == S_AS) && lk_hit;
    acc_way  = serve_hl ? hl_way : (serve_tc ? tc_way : lk_way);
    acc_we   = r_we && (serve_hl || serve_tc || serve_as);
    upd_way  = serve_tc ? tc_way : lk_way;
    hl_upd   = r_static && (serve_tc || serve_as);
    tc_touch = serve_tc;
    tc_ins   = serve_as;
    fill_en  = (state == S_FILL_WAIT) && nxt_resp_valid;
  end

  assign req_ready = (state == S_IDLE);

  // level-below requests
  always_comb begin
    nxt_req_valid     = (state == S_WB) || (state == S_FILL);
    nxt_req_we        = (state == S_WB);
    nxt_req_line_addr = (state == S_WB) ? {vic_tag, index} : {tag, index};
    nxt_req_asid      = (state == S_WB) ? vic_asid : r_asid;
    nxt_req_wline     = vic_line;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      resp_valid      <= 1'b0;
      resp_rdata      <= '0;
      resp_path       <= PATH_HOTLINE;
      resp_prot_fault <= 1'b0;
      r_static <= 1'b0; r_we <= 1'b0; r_hlidx <= '0; r_base <= '0;
      r_wdata  <= '0;   r_disp <= '0; r_asid <= '0;
      r_missed <= 1'b0; r_fault <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          r_static <= req_static; r_we <= req_we; r_hlidx <= req_hlidx;
          r_base   <= req_base;   r_disp <= req_disp; r_asid <= req_asid;
          r_wdata  <= req_wdata;  r_missed <= 1'b0;   r_fault <= 1'b0;
          state    <= S_HL;
        end
        S_HL: begin
          r_fault <= r_static && hl_fault;
          state   <= serve_hl ? S_IDLE : S_TC;
        end
        S_TC: begin
          r_fault <= r_fault || tc_fault;
          state   <= serve_tc ? S_IDLE : S_AS;
        end
        S_AS: begin
          r_fault <= r_fault || (!r_missed && lk_fault);
          if (serve_as)                  state <= S_IDLE;
          else if (vic_valid && vic_dirty) state <= S_WB;
          else                           state <= S_FILL;
          if (!serve_as) r_missed <= 1'b1;
        end
        S_WB:        if (nxt_req_ready)  state <= S_WB_WAIT;
        S_WB_WAIT:   if (nxt_resp_valid) state <= S_FILL;
        S_FILL:      if (nxt_req_ready)  state <= S_FILL_WAIT;
        S_FILL_WAIT: if (nxt_resp_valid) state <= S_AS;
        default:     state <= S_IDLE;
      endcase

      if (serve_hl || serve_tc || serve_as) begin
        resp_valid      <= 1'b1;
        resp_rdata      <= acc_rdata;
        resp_path       <= r_missed ? PATH_MISS
                         : serve_hl ? PATH_HOTLINE
                         : serve_tc ? PATH_TAGCACHE : PATH_ASSOC;
        resp_prot_fault <= r_fault || (serve_as && !r_missed && lk_fault)
                         || (serve_tc && tc_fault);
      end
    end
  end

  // handshake rules
  a_one_path: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({serve_hl, serve_tc, serve_as}));
  a_no_req_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |-> state == S_IDLE);
endmodule
