// mem_model: behavioural model of the memory below a cache (main memory, or
// a stand-in for the next cache level) with a line-wide request/response
// port. Not synthesizable. A request is accepted when req_ready is high, and req_ready stays low
// until the response; after
// LAT_BASE + CYC_PER_WORD * (words per line) cycles resp_valid is high for
// one cycle, carrying the line for a read and acting as the acknowledge for
// a write. Contents are kept per line key in an associative array; a line
// never written reads as tb_pkg::init_word of its key. The default latency
// is that of the evaluated main memory: 200 cycles plus 2 cycles per word.
// Requests seen while rst_n is low are ignored, since the design's state is
// arbitrary until its first reset edge.
module mem_model
  import tb_pkg::*;
#(
  parameter int unsigned LINE_BITS    = 1024,
  parameter int unsigned KEY_BITS     = 37,
  parameter int unsigned LAT_BASE     = 200,
  parameter int unsigned CYC_PER_WORD = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,     // requests are ignored while low
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  logic [KEY_BITS-1:0]  req_key,
  input  logic [LINE_BITS-1:0] req_wline,
  output logic                 resp_valid,
  output logic [LINE_BITS-1:0] resp_line,
  output int                   n_reads,
  output int                   n_writes
);
  localparam int unsigned WORDS = LINE_BITS / 64;
  localparam int unsigned LAT   = LAT_BASE + CYC_PER_WORD * WORDS;

  logic [LINE_BITS-1:0] store [logic [KEY_BITS-1:0]];

  function automatic logic [LINE_BITS-1:0] read_line(input logic [KEY_BITS-1:0] k);
    logic [LINE_BITS-1:0] l;
    if (store.exists(k)) return store[k];
    for (int w = 0; w < WORDS; w++) l[w*64 +: 64] = init_word(64'(k), w);
    return l;
  endfunction

  initial begin
    req_ready  = 1'b1;
    resp_valid = 1'b0;
    resp_line  = '0;
    n_reads    = 0;
    n_writes   = 0;
  end

  always @(posedge clk) begin
    resp_valid <= 1'b0;
    if (rst_n && req_ready && req_valid) begin
      logic [LINE_BITS-1:0] l;
      logic we;
      logic [KEY_BITS-1:0] k;
      we = req_we; k = req_key; l = req_wline;
      req_ready <= 1'b0;
      if (we) begin store[k] = l; n_writes++; end
      else n_reads++;
      fork begin
        repeat (LAT - 1) @(posedge clk);
        resp_line  <= read_line(k);
        resp_valid <= 1'b1;
        req_ready  <= 1'b1;
      end join_none
    end
  end
endmodule
