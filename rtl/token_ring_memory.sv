// token_ring_memory: the shared cache banks, their ordering points and the
// token ring that links them.
//
// NB ordering points (ordering_ni), each in front of a shared_cache_bank, are
// connected in a ring: stage b passes its tokens to stage (b+1) mod NB one
// cycle later. Stage 0 holds every token after reset. The ring carries only
// tokens (per-core expected ReqIDs and the critical-section owner), never the
// requests themselves, which arrive through each stage's own router port.
// Each stage's router port is brought out; in the many-core top they attach
// to the local ports of the bank nodes of the mesh.
//
// The ring of ordering points at the memory nodes follows the document's
// token-ring figure; the ring order (bank index order) is this design's.
module token_ring_memory
  import scnoc_pkg::*;
#(
  parameter int unsigned NC    = NCORE,
  parameter int unsigned NB    = NBANK,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned WORDS = 1024
) (
  input  logic           clk,
  input  logic           rst_n,
  input  flit_t          from_rtr     [NB],
  output logic [NB-1:0]  from_rtr_rdy,
  output flit_t          to_rtr       [NB],
  input  logic [NB-1:0]  to_rtr_rdy,
  output logic [NB-1:0]  ev_service,
  output logic [NB-1:0]  ev_wait,
  output logic [NB-1:0]  ev_cs_block,
  output logic [NB-1:0]  ev_hold
);

  localparam int unsigned IW = $clog2(WORDS);

  logic [NC-1:0]      tv  [NB];
  logic [RID_W-1:0]   tid [NB][NC];
  logic [NB-1:0]      cv, cov;
  logic [CORE_W-1:0]  co  [NB];
  logic [NC-1:0]      held [NB];

  for (genvar b = 0; b < NB; b++) begin : g_stage
    localparam int unsigned PREV = (b + NB - 1) % NB;

    logic           bq_v, bq_we, br_v;
    logic [IW-1:0]  bq_idx;
    logic [DATA_W-1:0] bq_wd, br_rd;

    ordering_ni #(
      .NODE (bank_node(b)), .NC (NC), .NBANK_P (NB), .DEPTH (DEPTH),
      .WORDS (WORDS), .INIT_TOKENS (b == 0)
    ) u_onI (
      .clk, .rst_n,
      .from_rtr (from_rtr[b]), .from_rtr_rdy (from_rtr_rdy[b]),
      .to_rtr (to_rtr[b]), .to_rtr_rdy (to_rtr_rdy[b]),
      .tok_in_v (tv[PREV]), .tok_in_id (tid[PREV]),
      .cs_in_v (cv[PREV]), .cs_in_own_v (cov[PREV]), .cs_in_own (co[PREV]),
      .tok_out_v (tv[b]), .tok_out_id (tid[b]),
      .cs_out_v (cv[b]), .cs_out_own_v (cov[b]), .cs_out_own (co[b]),
      .bank_req_v (bq_v), .bank_req_we (bq_we), .bank_req_idx (bq_idx),
      .bank_req_wdata (bq_wd), .bank_resp_v (br_v), .bank_resp_rdata (br_rd),
      .ev_service (ev_service[b]), .ev_wait (ev_wait[b]),
      .ev_cs_block (ev_cs_block[b]), .ev_hold (ev_hold[b]),
      .tok_held (held[b])
    );

    shared_cache_bank #(.WORDS (WORDS)) u_bank (
      .clk, .rst_n,
      .req_v (bq_v), .req_we (bq_we), .req_idx (bq_idx), .req_wdata (bq_wd),
      .resp_v (br_v), .resp_rdata (br_rd)
    );
  end

  // Every core token and the critical-section token exist exactly once:
  // either held in a stage or travelling between two stages.
  for (genvar c = 0; c < NC; c++) begin : g_chk
    always_ff @(posedge clk) begin
      if (rst_n) begin
        automatic int n = 0;
        for (int b = 0; b < NB; b++) begin
          n += int'(tv[b][c]);
          n += int'(held[b][c]);
        end
        assert (n == 1) else $error("token of core %0d exists %0d times", c, n);
      end
    end
  end

endmodule
