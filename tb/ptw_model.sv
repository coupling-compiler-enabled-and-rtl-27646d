// ptw_model: behavioural model of the page-table walker behind a
// translation buffer. Not synthesizable. A one-cycle walk request is answered
// LAT cycles later (20, the translation-miss penalty of the evaluated
// system) with tb_pkg::ptw_ppn of the page and tb_pkg::ptw_fault. Requests
// seen while rst_n is low are ignored.
module ptw_model
  import coolmem_pkg::*;
  import tb_pkg::*;
#(
  parameter int unsigned LAT = TLB_MISS_CYC
) (
  input  logic                clk,
  input  logic                rst_n,   // requests are ignored while low
  input  logic                walk_req_valid,
  input  logic [VPN_BITS-1:0] walk_vpn,
  input  asid_t               walk_asid,
  output logic                walk_resp_valid,
  output logic [PPN_BITS-1:0] walk_ppn,
  output logic                walk_fault,
  output int                  n_walks
);
  initial begin
    walk_resp_valid = 1'b0;
    walk_ppn        = '0;
    walk_fault      = 1'b0;
    n_walks         = 0;
  end

  always @(posedge clk) begin
    walk_resp_valid <= 1'b0;
    if (rst_n && walk_req_valid) begin
      logic [VPN_BITS-1:0] v;
      asid_t a;
      v = walk_vpn; a = walk_asid;
      n_walks++;
      fork begin
        repeat (LAT - 1) @(posedge clk);
        walk_ppn        <= ptw_ppn(v, a);
        walk_fault      <= ptw_fault(v, a);
        walk_resp_valid <= 1'b1;
      end join_none
    end
  end
endmodule
