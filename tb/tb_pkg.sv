// tb_pkg: functions shared by the testbenches and their behavioural models,
// so that a model and the checker that predicts its output agree:
//   init_word  - contents of a never-written memory word, a hash of its
//                address key and word number;
//   ptw_ppn    - the physical page the page-table walker model returns for a
//                virtual page in an address space (a fixed scramble);
//   ptw_fault  - whether the walker model reports that mapping as a fault.
package tb_pkg;
  import coolmem_pkg::*;

  function automatic logic [63:0] init_word(input logic [63:0] key, input int unsigned w);
    logic [63:0] x;
    x = key * 64'h9E37_79B9_7F4A_7C15 + 64'(w) * 64'hC2B2_AE3D_27D4_EB4F;
    return x ^ (x >> 29);
  endfunction

  function automatic logic [PPN_BITS-1:0] ptw_ppn(input logic [VPN_BITS-1:0] vpn, input asid_t asid);
    return PPN_BITS'(vpn) ^ (PPN_BITS'(asid) << 20) ^ PPN_BITS'(31'h1234);
  endfunction

  function automatic logic ptw_fault(input logic [VPN_BITS-1:0] vpn, input asid_t asid);
    return asid == 7'h7F;
  endfunction
endpackage
