// xlate_tlb: fully associative, ASID-tagged translation buffer that sits on
// a line-request path and turns the virtual line address of each request
// into a physical one.
//
// Cool-Mem moves address translation below the first-level cache. The same
// unit serves both placements: as STLB between a virtual L1 and a physical
// L2 (translating every L2 access), and as MTLB between a virtual L2 and main
// memory (translating every L2 miss and write-back). Each entry holds a valid
// bit, the ASID, the virtual page number and the physical page number; a hit
// needs both the page number and the ASID to match, so entries of several
// address spaces live side by side and a context switch needs no flush.
//
// A request is accepted (in_valid/in_ready), looked up in the next cycle and,
// on a hit, passed downstream with the physical address (one added cycle).
// On a miss the unit asks the page-table walker (walk_req_*) for the mapping,
// writes it into the entry named by a round-robin pointer and looks up again.
// The downstream response is passed back unchanged, and only then is a new
// request accepted. If the walker reports a fault, fault is pulsed for one
// cycle and the request still goes downstream with the page number the walker
// returned; handling the fault is left to the system. Reset invalidates all
// entries. Round-robin refill and the fault handling are this design's
// choices.
module xlate_tlb
  import coolmem_pkg::*;
#(
  parameter int unsigned ENTRIES   = N_TLB,
  parameter int unsigned LINE_BITS = L1_LINE_BITS,
  parameter int unsigned OFF_BITS  = L1_OFF_BITS   // log2 of the line size
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // upstream (virtual)
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic                        in_we,
  input  logic [VA_BITS-OFF_BITS-1:0] in_line_addr,
  input  asid_t                       in_asid,
  input  logic [LINE_BITS-1:0]        in_wline,
  output logic                        in_resp_valid,
  output logic [LINE_BITS-1:0]        in_resp_line,
  // downstream (physical)
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic                        out_we,
  output logic [PA_BITS-OFF_BITS-1:0] out_line_addr,
  output logic [LINE_BITS-1:0]        out_wline,
  input  logic                        out_resp_valid,
  input  logic [LINE_BITS-1:0]        out_resp_line,
  // page-table walker
  output logic                        walk_req_valid,
  output logic [VPN_BITS-1:0]         walk_vpn,
  output asid_t                       walk_asid,
  input  logic                        walk_resp_valid,
  input  logic [PPN_BITS-1:0]         walk_ppn,
  input  logic                        walk_fault,
  // status
  output logic                        hit_pulse,   // a lookup hit
  output logic                        miss_pulse,  // a lookup missed
  output logic                        fault
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned PO = PAGE_BITS - OFF_BITS;  // line bits inside a page

  typedef struct packed {
    logic                valid;
    asid_t               asid;
    logic [VPN_BITS-1:0] vpn;
    logic [PPN_BITS-1:0] ppn;
  } tlb_entry_t;

  typedef enum logic [2:0] {T_IDLE, T_LOOK, T_WALK, T_WALK_WAIT, T_OUT, T_RESP} tstate_e;

  tlb_entry_t          ent [ENTRIES];
  logic [IW-1:0]       rr;
  tstate_e             state;
  logic                r_we;
  logic [VA_BITS-OFF_BITS-1:0] r_addr;
  asid_t               r_asid;
  logic [LINE_BITS-1:0] r_wline;
  logic [PPN_BITS-1:0] r_ppn;

  logic [VPN_BITS-1:0] vpn;
  logic                lk_hit;
  logic [PPN_BITS-1:0] lk_ppn;

  assign vpn = r_addr[VA_BITS-OFF_BITS-1 -: VPN_BITS];

  always_comb begin
    lk_hit = 1'b0;
    lk_ppn = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (ent[i].valid && ent[i].vpn == vpn && ent[i].asid == r_asid) begin
        lk_hit = 1'b1;
        lk_ppn = ent[i].ppn;
      end
  end

  assign in_ready       = (state == T_IDLE);
  assign out_valid      = (state == T_OUT);
  assign out_we         = r_we;
  assign out_line_addr  = {r_ppn, r_addr[PO-1:0]};
  assign out_wline      = r_wline;
  assign in_resp_valid  = (state == T_RESP) && out_resp_valid;
  assign in_resp_line   = out_resp_line;
  assign walk_req_valid = (state == T_WALK);
  assign walk_vpn       = vpn;
  assign walk_asid      = r_asid;
  assign hit_pulse      = (state == T_LOOK) && lk_hit;
  assign miss_pulse     = (state == T_LOOK) && !lk_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      rr      <= '0;
      r_we    <= 1'b0;
      r_addr  <= '0;
      r_asid  <= '0;
      r_wline <= '0;
      r_ppn   <= '0;
      fault   <= 1'b0;
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
    end else begin
      fault <= 1'b0;
      unique case (state)
        T_IDLE: if (in_valid) begin
          r_we <= in_we; r_addr <= in_line_addr; r_asid <= in_asid; r_wline <= in_wline;
          state <= T_LOOK;
        end
        T_LOOK: if (lk_hit) begin
          r_ppn <= lk_ppn;
          state <= T_OUT;
        end else begin
          state <= T_WALK;
        end
        T_WALK: state <= T_WALK_WAIT;
        T_WALK_WAIT: if (walk_resp_valid) begin
          ent[rr] <= '{valid: 1'b1, asid: r_asid, vpn: vpn, ppn: walk_ppn};
          rr      <= rr + 1'b1;
          fault   <= walk_fault;
          state   <= T_LOOK;
        end
        T_OUT:  if (out_ready)      state <= T_RESP;
        T_RESP: if (out_resp_valid) state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  a_walk_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    walk_resp_valid |-> state inside {T_WALK, T_WALK_WAIT});
endmodule
