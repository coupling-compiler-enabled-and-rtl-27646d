// coolmem_top: the Cool-Mem data memory system from the load/store unit down
// to the main-memory port.
//
// The L1 data cache is virtually indexed and virtually tagged and offers the
// compiler-directed hotline path, the tag-cache path and the conventional
// associative lookup (see coolmem_l1). Protection is checked through the ASID
// held in every hotline register, tag-cache entry and cache line, so the L1
// needs no TLB. Address translation is moved further down, and the parameter
// ORG picks where:
//   ORG_VV (default): virtual L2 tagged with ASIDs; an MTLB between the L2 and
//          main memory translates only L2 misses and write-backs.
//   ORG_VR: physical L2; an STLB between L1 and L2 translates every L2 access.
// In both, translation misses go to an external page-table walker (walk_*),
// and the main-memory port carries whole L2 lines (128 bytes) with physical
// line addresses.
//
// Timing follows the parts: 2/3/4 cycles for hotline/tag-cache/associative
// L1 hits, 20 cycles per L2 hit, one added cycle per translation-buffer hit,
// and whatever the walker and main memory take. The status outputs pulse
// once per event and let a system count translation and L2 behaviour.
module coolmem_top
  import coolmem_pkg::*;
#(
  parameter org_e        ORG       = ORG_VV,
  parameter int unsigned DISP_BITS = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // load/store unit
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_static,
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
  // main memory, physical, whole L2 lines
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [PA_BITS-$clog2(L2_LINE_BYTES)-1:0] mem_req_line_addr,
  output logic [L2_LINE_BITS-1:0] mem_req_wline,
  input  logic                  mem_resp_valid,
  input  logic [L2_LINE_BITS-1:0] mem_resp_line,
  // page-table walker of the translation buffer
  output logic                  walk_req_valid,
  output logic [VPN_BITS-1:0]   walk_vpn,
  output asid_t                 walk_asid,
  input  logic                  walk_resp_valid,
  input  logic [PPN_BITS-1:0]   walk_ppn,
  input  logic                  walk_fault,
  // event pulses
  output logic                  tlb_hit,
  output logic                  tlb_miss,
  output logic                  tlb_fault,
  output logic                  l2_hit,
  output logic                  l2_miss
);
  localparam int unsigned L2OFF = $clog2(L2_LINE_BYTES);

  // L1 to the level below (virtual line address)
  logic                            n_req_valid, n_req_ready, n_req_we;
  logic [VA_BITS-L1_OFF_BITS-1:0]  n_req_line_addr;
  asid_t                           n_req_asid;
  logic [L1_LINE_BITS-1:0]         n_req_wline;
  logic                            n_resp_valid;
  logic [L1_LINE_BITS-1:0]         n_resp_line;

  coolmem_l1 #(.DISP_BITS(DISP_BITS)) u_l1 (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_static, .req_hlidx, .req_we, .req_base,
    .req_disp, .req_asid, .req_wdata,
    .resp_valid, .resp_rdata, .resp_path, .resp_prot_fault,
    .nxt_req_valid(n_req_valid), .nxt_req_ready(n_req_ready), .nxt_req_we(n_req_we),
    .nxt_req_line_addr(n_req_line_addr), .nxt_req_asid(n_req_asid),
    .nxt_req_wline(n_req_wline), .nxt_resp_valid(n_resp_valid),
    .nxt_resp_line(n_resp_line)
  );

  if (ORG == ORG_VV) begin : g_vv
    // virtual L2, MTLB in front of memory
    logic                         m_req_valid, m_req_ready, m_req_we, m_resp_valid;
    logic [VA_BITS-L2OFF-1:0]     m_req_line_addr;
    asid_t                        m_req_asid;
    logic [L2_LINE_BITS-1:0]      m_req_wline, m_resp_line;

    l2_cache #(.ADDR_BITS(VA_BITS), .USE_ASID(1'b1)) u_l2 (
      .clk, .rst_n,
      .req_valid(n_req_valid), .req_ready(n_req_ready), .req_we(n_req_we),
      .req_line_addr(n_req_line_addr), .req_asid(n_req_asid), .req_wline(n_req_wline),
      .resp_valid(n_resp_valid), .resp_line(n_resp_line),
      .mem_req_valid(m_req_valid), .mem_req_ready(m_req_ready), .mem_req_we(m_req_we),
      .mem_req_line_addr(m_req_line_addr), .mem_req_asid(m_req_asid),
      .mem_req_wline(m_req_wline), .mem_resp_valid(m_resp_valid),
      .mem_resp_line(m_resp_line),
      .hit_pulse(l2_hit), .miss_pulse(l2_miss)
    );

    xlate_tlb #(.LINE_BITS(L2_LINE_BITS), .OFF_BITS(L2OFF)) u_mtlb (
      .clk, .rst_n,
      .in_valid(m_req_valid), .in_ready(m_req_ready), .in_we(m_req_we),
      .in_line_addr(m_req_line_addr), .in_asid(m_req_asid), .in_wline(m_req_wline),
      .in_resp_valid(m_resp_valid), .in_resp_line(m_resp_line),
      .out_valid(mem_req_valid), .out_ready(mem_req_ready), .out_we(mem_req_we),
      .out_line_addr(mem_req_line_addr), .out_wline(mem_req_wline),
      .out_resp_valid(mem_resp_valid), .out_resp_line(mem_resp_line),
      .walk_req_valid, .walk_vpn, .walk_asid, .walk_resp_valid, .walk_ppn, .walk_fault,
      .hit_pulse(tlb_hit), .miss_pulse(tlb_miss), .fault(tlb_fault)
    );
  end else begin : g_vr
    // STLB between L1 and a physical L2
    logic                               p_req_valid, p_req_ready, p_req_we, p_resp_valid;
    logic [PA_BITS-L1_OFF_BITS-1:0]     p_req_line_addr;
    logic [L1_LINE_BITS-1:0]            p_req_wline, p_resp_line;
    asid_t                              unused_asid;

    xlate_tlb #(.LINE_BITS(L1_LINE_BITS), .OFF_BITS(L1_OFF_BITS)) u_stlb (
      .clk, .rst_n,
      .in_valid(n_req_valid), .in_ready(n_req_ready), .in_we(n_req_we),
      .in_line_addr(n_req_line_addr), .in_asid(n_req_asid), .in_wline(n_req_wline),
      .in_resp_valid(n_resp_valid), .in_resp_line(n_resp_line),
      .out_valid(p_req_valid), .out_ready(p_req_ready), .out_we(p_req_we),
      .out_line_addr(p_req_line_addr), .out_wline(p_req_wline),
      .out_resp_valid(p_resp_valid), .out_resp_line(p_resp_line),
      .walk_req_valid, .walk_vpn, .walk_asid, .walk_resp_valid, .walk_ppn, .walk_fault,
      .hit_pulse(tlb_hit), .miss_pulse(tlb_miss), .fault(tlb_fault)
    );

    l2_cache #(.ADDR_BITS(PA_BITS), .USE_ASID(1'b0)) u_l2 (
      .clk, .rst_n,
      .req_valid(p_req_valid), .req_ready(p_req_ready), .req_we(p_req_we),
      .req_line_addr(p_req_line_addr), .req_asid('0), .req_wline(p_req_wline),
      .resp_valid(p_resp_valid), .resp_line(p_resp_line),
      .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_line_addr,
      .mem_req_asid(unused_asid), .mem_req_wline, .mem_resp_valid, .mem_resp_line,
      .hit_pulse(l2_hit), .miss_pulse(l2_miss)
    );
  end
endmodule
