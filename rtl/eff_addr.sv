// eff_addr: effective address calculation of a load or store, and the split
// of the virtual address into the fields the L1 data cache uses.
//
// A memory instruction names a base register and an immediate offset; the
// address is base + sign-extended offset. Of the 64-bit result the low
// VA_BITS are the implemented virtual address (the bits above only sign-extend
// it and are not used). The virtual address is cut into line offset, set index
// and tag; tag and index together ("TagIndex") name one cache line and are
// what the hotline registers and the tag-cache compare against.
//
// Purely combinational. The 16-bit displacement and the 43-bit implemented
// virtual address are choices of this design (Alpha style); the field split
// follows from the L1 geometry in coolmem_pkg.
module eff_addr
  import coolmem_pkg::*;
#(
  parameter int unsigned DISP_BITS = 16
) (
  input  logic [XLEN-1:0]        base,     // base register value
  input  logic [DISP_BITS-1:0]   disp,     // immediate offset from the instruction
  output vaddr_t                 va,       // implemented virtual address
  output logic [L1_TAG_BITS-1:0] tag,
  output logic [L1_IDX_BITS-1:0] index,
  output logic [L1_OFF_BITS-1:0] offset,
  output tagidx_t                tagidx     // {tag, index}
);
  logic [XLEN-1:0] sum;

  always_comb begin
    sum    = base + XLEN'(signed'(disp));
    va     = sum[VA_BITS-1:0];
    offset = va[L1_OFF_BITS-1:0];
    index  = va[L1_OFF_BITS +: L1_IDX_BITS];
    tag    = va[VA_BITS-1 -: L1_TAG_BITS];
    tagidx = {tag, index};
  end
endmodule
