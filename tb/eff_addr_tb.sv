// eff_addr_tb: checks the effective address sum and the tag/index/offset
// split against values computed here with plain arithmetic, for directed
// corner cases (negative displacement, carry into the tag) and random inputs.
module eff_addr_tb;
  import coolmem_pkg::*;
  int checks = 0, failures = 0;
  logic [XLEN-1:0] base;
  logic [15:0]     disp;
  vaddr_t          va;
  logic [L1_TAG_BITS-1:0] tag;
  logic [L1_IDX_BITS-1:0] index;
  logic [L1_OFF_BITS-1:0] offset;
  tagidx_t         tagidx;

  eff_addr dut (.base, .disp, .va, .tag, .index, .offset, .tagidx);

  task automatic check_one(input logic [63:0] b, input logic [15:0] d);
    longint unsigned s;
    base = b; disp = d;
    #1;
    s = b + {{48{d[15]}}, d};
    checks++;
    if (va !== s[42:0] || offset !== s[5:0] || index !== s[13:6] ||
        tag !== s[42:14] || tagidx !== s[42:6]) begin
      failures++;
      $display("FAIL base=%h disp=%h va=%h tag=%h idx=%h off=%h", b, d, va, tag, index, offset);
    end
  endtask

  initial begin
    check_one(64'h1000, 16'h0004);
    check_one(64'h1000, 16'hFFFC);          // -4
    check_one(64'h3FFF, 16'h0001);          // carry from offset into index
    check_one(64'h0000_0000_0000_3FC0, 16'h0040); // carry into tag
    check_one(64'hFFFF_FFFF_FFFF_FFFF, 16'h0001); // wraps to zero
    for (int i = 0; i < 2000; i++) check_one({$urandom, $urandom}, 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
