// l1_arrays: storage of the virtually indexed, virtually tagged L1 data
// cache: per way a data array, a tag array, an ASID array and status bits
// (valid, dirty).
//
// Two kinds of access are offered, matching the two kinds of cache access of
// the design:
//  * tag-less (direct) access: the caller names the way (taken from a
//    hotline register or the tag-cache), and one 64-bit word of the line at
//    {way, index} is read or written. No tag or ASID array is consulted.
//  * associative lookup: the tag and ASID of the access are compared with
//    all ways of the set at once. Hit requires valid, equal tag and equal
//    ASID; an equal tag under another ASID raises prot_fault (a miss).
// The caller reads the word of the hit way through the same word port.
// For refills the arrays give the victim line of a set (an invalid way
// first, else a per-set round-robin pointer) with its tag, ASID, dirty bit
// and data, and accept a whole new line. A store marks the line dirty; the
// line's dirty data is written back by the controller when it is replaced.
//
// Reads are combinational; writes act on the next rising clock edge. Reset
// clears valid and dirty bits and the round-robin pointers; data, tags and
// ASIDs are not reset. The round-robin replacement is this design's choice.
module l1_arrays
  import coolmem_pkg::*;
#(
  parameter int unsigned SETS = L1_SETS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(SETS)-1:0] index,
  // associative lookup
  input  logic [L1_TAG_BITS-1:0] lk_tag,
  input  asid_t                  lk_asid,
  output logic                   lk_hit,
  output way_t                   lk_way,
  output logic                   lk_prot_fault,
  // word access in a named way (tag-less access, or the hit way)
  input  way_t                   acc_way,
  input  logic [$clog2(L1_WORDS)-1:0] acc_word,
  input  logic                   acc_we,
  input  logic [XLEN-1:0]        acc_wdata,
  output logic [XLEN-1:0]        acc_rdata,
  // victim of the set at index
  output way_t                   vic_way,
  output logic                   vic_valid,
  output logic                   vic_dirty,
  output logic [L1_TAG_BITS-1:0] vic_tag,
  output asid_t                  vic_asid,
  output logic [L1_LINE_BITS-1:0] vic_line,
  // line refill into {vic_way, index}
  input  logic                   fill_en,
  input  logic [L1_TAG_BITS-1:0] fill_tag,
  input  asid_t                  fill_asid,
  input  logic [L1_LINE_BITS-1:0] fill_line
);

  logic [L1_LINE_BITS-1:0] data  [L1_WAYS][SETS];
  logic [L1_TAG_BITS-1:0]  tags  [L1_WAYS][SETS];
  asid_t                   asids [L1_WAYS][SETS];
  logic [L1_WAYS-1:0]      valid [SETS];
  logic [L1_WAYS-1:0]      dirty [SETS];
  way_t                    rr    [SETS];

  always_comb begin
    lk_hit        = 1'b0;
    lk_way        = '0;
    lk_prot_fault = 1'b0;
    for (int w = 0; w < L1_WAYS; w++) begin
      if (valid[index][w] && tags[w][index] == lk_tag) begin
        if (asids[w][index] == lk_asid) begin
          lk_hit = 1'b1;
          lk_way = way_t'(w);
        end else begin
          lk_prot_fault = 1'b1;
        end
      end
    end
  end

  assign acc_rdata = data[acc_way][index][acc_word*XLEN +: XLEN];

  always_comb begin
    logic found;
    found   = 1'b0;
    vic_way = rr[index];
    for (int w = 0; w < L1_WAYS; w++)
      if (!valid[index][w] && !found) begin
        found   = 1'b1;
        vic_way = way_t'(w);
      end
    vic_valid = valid[index][vic_way];
    vic_dirty = dirty[index][vic_way];
    vic_tag   = tags[vic_way][index];
    vic_asid  = asids[vic_way][index];
    vic_line  = data[vic_way][index];
  end

  // data, tag and ASID arrays (no reset)
  always_ff @(posedge clk) begin
    if (fill_en) begin
      data[vic_way][index]  <= fill_line;
      tags[vic_way][index]  <= fill_tag;
      asids[vic_way][index] <= fill_asid;
    end else if (acc_we) begin
      data[acc_way][index][acc_word*XLEN +: XLEN] <= acc_wdata;
    end
  end

  // status bits and replacement pointers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
        rr[s]    <= '0;
      end
    end else if (fill_en) begin
      valid[index][vic_way] <= 1'b1;
      dirty[index][vic_way] <= 1'b0;
      if (vic_way == rr[index]) rr[index] <= rr[index] + 1'b1;
    end else if (acc_we) begin
      dirty[index][acc_way] <= 1'b1;
    end
  end
endmodule
