// l2_cache: unified second-level cache serving L1 line requests.
//
// 512 KB, 4-way set associative, 128-byte lines, write-back and
// write-allocate. Its requests come from the L1 in L1-line units (64 bytes):
// a read returns one half of an L2 line, a write (an L1 write-back) replaces
// one half and marks the line dirty. In the virtual-virtual organisation the
// L2 is indexed and tagged with virtual addresses and every line also holds
// the ASID of its address space (USE_ASID = 1), so it can be accessed
// without translation; in the virtual-physical organisation it sees physical
// addresses and the ASID is not used (USE_ASID = 0).
//
// Timing: a request is accepted when req_ready is high; on a hit resp_valid
// rises LATENCY cycles after acceptance (20 in the evaluated system). A
// miss writes back a dirty victim and fetches the line over the memory port
// (line-wide request/response, address in L2-line units, ASID passed along so
// a translation buffer below can use it), then the lookup is repeated and
// the latency count starts again. One request is handled at a time. Victim
// choice (an invalid way first, else a per-set round-robin pointer), the
// blocking operation and the write policy are this design's choices.
// Reset clears valid and dirty bits.
module l2_cache
  import coolmem_pkg::*;
#(
  parameter int unsigned ADDR_BITS  = VA_BITS,       // byte address width seen
  parameter bit          USE_ASID   = 1'b1,
  parameter int unsigned SIZE_BYTES = L2_SIZE_BYTES,
  parameter int unsigned LATENCY    = L2_LATENCY
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // upstream, in L1-line units
  input  logic                            req_valid,
  output logic                            req_ready,
  input  logic                            req_we,
  input  logic [ADDR_BITS-L1_OFF_BITS-1:0] req_line_addr,
  input  asid_t                           req_asid,
  input  logic [L1_LINE_BITS-1:0]         req_wline,
  output logic                            resp_valid,
  output logic [L1_LINE_BITS-1:0]         resp_line,
  // memory side, in L2-line units
  output logic                            mem_req_valid,
  input  logic                            mem_req_ready,
  output logic                            mem_req_we,
  output logic [ADDR_BITS-$clog2(L2_LINE_BYTES)-1:0] mem_req_line_addr,
  output asid_t                           mem_req_asid,
  output logic [L2_LINE_BITS-1:0]         mem_req_wline,
  input  logic                            mem_resp_valid,
  input  logic [L2_LINE_BITS-1:0]         mem_resp_line,
  // status
  output logic                            hit_pulse,
  output logic                            miss_pulse
);
  localparam int unsigned OFF   = $clog2(L2_LINE_BYTES);            // 7
  localparam int unsigned SETS  = SIZE_BYTES / (L2_WAYS * L2_LINE_BYTES);
  localparam int unsigned IDX   = $clog2(SETS);
  localparam int unsigned TAGB  = ADDR_BITS - IDX - OFF;
  localparam int unsigned HALFB = OFF - L1_OFF_BITS;                // 1
  localparam int unsigned CW    = $clog2(LATENCY + 1);

  typedef enum logic [2:0] {L_IDLE, L_LOOK, L_WAIT, L_WB, L_WB_WAIT, L_FILL, L_FILL_WAIT} lstate_e;

  logic [L2_LINE_BITS-1:0] data  [L2_WAYS][SETS];
  logic [TAGB-1:0]         tags  [L2_WAYS][SETS];
  asid_t                   asids [L2_WAYS][SETS];
  logic [L2_WAYS-1:0]      valid [SETS];
  logic [L2_WAYS-1:0]      dirty [SETS];
  way_t                    rr    [SETS];

  lstate_e state;
  logic    r_we;
  logic [ADDR_BITS-L1_OFF_BITS-1:0] r_addr;
  asid_t   r_asid;
  logic [L1_LINE_BITS-1:0] r_wline;
  logic [CW-1:0] cnt;

  logic [IDX-1:0]   index;
  logic [TAGB-1:0]  tag;
  logic [HALFB-1:0] half;
  asid_t            asid_m;
  assign half   = r_addr[HALFB-1:0];
  assign index  = r_addr[HALFB +: IDX];
  assign tag    = r_addr[HALFB+IDX +: TAGB];
  assign asid_m = USE_ASID ? r_asid : '0;

  logic lk_hit;
  way_t lk_way, vic_way;
  always_comb begin
    logic found;
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < L2_WAYS; w++)
      if (valid[index][w] && tags[w][index] == tag && asids[w][index] == asid_m) begin
        lk_hit = 1'b1;
        lk_way = way_t'(w);
      end
    found   = 1'b0;
    vic_way = rr[index];
    for (int w = 0; w < L2_WAYS; w++)
      if (!valid[index][w] && !found) begin
        found   = 1'b1;
        vic_way = way_t'(w);
      end
  end

  logic vic_dirty;
  assign vic_dirty = valid[index][vic_way] && dirty[index][vic_way];

  assign req_ready         = (state == L_IDLE);
  assign mem_req_valid     = (state == L_WB) || (state == L_FILL);
  assign mem_req_we        = (state == L_WB);
  assign mem_req_line_addr = (state == L_WB) ? {tags[vic_way][index], index} : {tag, index};
  assign mem_req_asid      = (state == L_WB) ? asids[vic_way][index] : asid_m;
  assign mem_req_wline     = data[vic_way][index];
  assign hit_pulse         = (state == L_LOOK) && lk_hit;
  assign miss_pulse        = (state == L_LOOK) && !lk_hit;

  logic do_access, do_fill;
  assign do_access = (state == L_LOOK) && lk_hit;
  assign do_fill   = (state == L_FILL_WAIT) && mem_resp_valid;

  always_ff @(posedge clk) begin
    if (do_fill) begin
      data[vic_way][index]  <= mem_resp_line;
      tags[vic_way][index]  <= tag;
      asids[vic_way][index] <= asid_m;
    end else if (do_access && r_we) begin
      data[lk_way][index][half*L1_LINE_BITS +: L1_LINE_BITS] <= r_wline;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= L_IDLE;
      cnt        <= '0;
      r_we       <= 1'b0;
      r_addr     <= '0;
      r_asid     <= '0;
      r_wline    <= '0;
      resp_valid <= 1'b0;
      resp_line  <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
        rr[s]    <= '0;
      end
    end else begin
      resp_valid <= 1'b0;
      if (do_fill) begin
        valid[index][vic_way] <= 1'b1;
        dirty[index][vic_way] <= 1'b0;
        if (vic_way == rr[index]) rr[index] <= rr[index] + 1'b1;
      end else if (do_access && r_we) begin
        dirty[index][lk_way] <= 1'b1;
      end
      unique case (state)
        L_IDLE: if (req_valid) begin
          r_we <= req_we; r_addr <= req_line_addr; r_asid <= req_asid; r_wline <= req_wline;
          cnt   <= CW'(1);
          state <= L_LOOK;
        end
        L_LOOK: begin
          if (lk_hit) begin
            resp_line <= data[lk_way][index][half*L1_LINE_BITS +: L1_LINE_BITS];
            state     <= L_WAIT;
          end else begin
            state <= vic_dirty ? L_WB : L_FILL;
          end
          cnt <= cnt + 1'b1;
        end
        L_WAIT: begin
          // resp_valid is registered: raise it so that it is high in cycle LATENCY
          if (cnt >= CW'(LATENCY - 1)) begin
            resp_valid <= 1'b1;
            state      <= L_IDLE;
          end
          cnt <= cnt + 1'b1;
        end
        L_WB:        if (mem_req_ready)  state <= L_WB_WAIT;
        L_WB_WAIT:   if (mem_resp_valid) state <= L_FILL;
        L_FILL:      if (mem_req_ready)  state <= L_FILL_WAIT;
        L_FILL_WAIT: if (mem_resp_valid) begin
          cnt   <= CW'(1);
          state <= L_LOOK;
        end
        default: state <= L_IDLE;
      endcase
    end
  end
endmodule
