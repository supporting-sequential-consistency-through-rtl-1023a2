// shared_cache_bank: storage of one bank of the single shared cache.
//
// All cores share one cache that is split into banks placed on separate mesh
// nodes; a word address belongs to bank (word address mod bank count) at
// index (word address div bank count). The bank executes the requests that
// its ordering point releases, one per cycle, in exactly that order: a store
// writes the word, a load returns it. The result is registered: a request in
// cycle t gives resp_v and resp_rdata in cycle t+1 (for a store resp_rdata is
// the stored word). The bank holds WORDS words and every access hits: the
// document's workloads are said to stay in the shared cache apart from
// compulsory misses, and it does not describe the miss path to the memory
// controllers, so tags, replacement and refills are not modelled here. The
// size is this design's choice. Contents reset to zero.
module shared_cache_bank
  import scnoc_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      req_v,
  input  logic                      req_we,
  input  logic [$clog2(WORDS)-1:0]  req_idx,
  input  logic [DATA_W-1:0]         req_wdata,
  output logic                      resp_v,
  output logic [DATA_W-1:0]         resp_rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (req_v && req_we) mem[req_idx] <= req_wdata;
  end

  // the word array is cleared once at start; the design relies on it reading
  // as zero before it is first written
  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_v     <= 1'b0;
      resp_rdata <= '0;
    end else begin
      resp_v     <= req_v;
      resp_rdata <= req_we ? req_wdata : mem[req_idx];
    end
  end

endmodule
