// ordering_ni: network interface of a shared cache bank, the ordering point.
//
// Requests reach the bank on circuits in any order and are kept in a
// reorder array indexed by (CoreID, ReqID). What a bank may service is
// governed by tokens that circulate on a ring through all ordering points,
// one stage per cycle:
//   * one token per core, carrying the ReqID that core must have serviced
//     next anywhere in the system. Only the ordering point holding core c's
//     token may service a request of c, and only the one with that ReqID;
//     servicing it advances the ReqID by one. Every core's requests are thus
//     performed in program order over all banks, while different cores
//     proceed in parallel at different banks.
//   * one critical-section token, naming the core whose critical section is
//     under way. A request marked cs also needs this token, and needs it to be
//     free or owned by its own core; servicing it claims the token, and the
//     request marked cs_last (the lock release) frees it. Critical sections of
//     different cores are therefore performed whole, one after another.
// An ordering point keeps a core token while that core's expected request is
// present (also while it waits for the critical-section token) and keeps the
// critical-section token while it services cs requests; all other tokens move
// on to the next stage. At reset every token is at the ordering point with
// INIT_TOKENS = 1 and every expected ReqID is zero.
//
// Per cycle at most one request is handed to the bank (round robin among the
// eligible cores), and only when the response queue has room. The bank
// answers one cycle later; the answer (load data or store acknowledgement) is
// queued and sent to the core as a packet.
//
// Ordering by (CoreID, ReqID) with a reorder array and a token ring follows
// the document, as does the extra ordering of critical sections; one token per
// core plus a critical-section token, the holding rules and all sizes are
// this design's reading of it.
module ordering_ni
  import scnoc_pkg::*;
#(
  parameter int unsigned NODE        = 5,
  parameter int unsigned NC          = NCORE,
  parameter int unsigned NBANK_P     = NBANK,
  parameter int unsigned DEPTH       = 4,
  parameter int unsigned WORDS       = 1024,
  parameter int unsigned RESP_D      = 4,
  parameter bit          INIT_TOKENS = 1'b0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // router local port
  input  flit_t                     from_rtr,
  output logic                      from_rtr_rdy,
  output flit_t                     to_rtr,
  input  logic                      to_rtr_rdy,
  // token ring, from the previous stage and to the next
  input  logic [NC-1:0]             tok_in_v,
  input  logic [RID_W-1:0]          tok_in_id [NC],
  input  logic                      cs_in_v,
  input  logic                      cs_in_own_v,
  input  logic [CORE_W-1:0]         cs_in_own,
  output logic [NC-1:0]             tok_out_v,
  output logic [RID_W-1:0]          tok_out_id [NC],
  output logic                      cs_out_v,
  output logic                      cs_out_own_v,
  output logic [CORE_W-1:0]         cs_out_own,
  // bank port
  output logic                      bank_req_v,
  output logic                      bank_req_we,
  output logic [$clog2(WORDS)-1:0]  bank_req_idx,
  output logic [DATA_W-1:0]         bank_req_wdata,
  input  logic                      bank_resp_v,
  input  logic [DATA_W-1:0]         bank_resp_rdata,
  // events
  output logic                      ev_service,   // a request handed to the bank
  output logic                      ev_wait,      // a stored request waits for its turn
  output logic                      ev_cs_block,  // a cs request waits for another core's section
  output logic                      ev_hold,      // a token is held here
  output logic [NC-1:0]             tok_held      // core tokens held at this stage
);

  localparam int unsigned IW = $clog2(WORDS);
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1;

  // ------------------------------------------------------------ token state
  logic [NC-1:0]       hold_v;
  logic [RID_W-1:0]    hold_id [NC];
  logic                cs_hold, cs_hold_own_v;
  logic [CORE_W-1:0]   cs_hold_own;

  logic [NC-1:0]       have_v;
  logic [RID_W-1:0]    have_id [NC];
  logic                cs_have, own_v;
  logic [CORE_W-1:0]   own;

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      have_v[c]  = hold_v[c] || tok_in_v[c];
      have_id[c] = hold_v[c] ? hold_id[c] : tok_in_id[c];
    end
    cs_have = cs_hold || cs_in_v;
    own_v   = cs_hold ? cs_hold_own_v : cs_in_own_v;
    own     = cs_hold ? cs_hold_own   : cs_in_own;
  end

  // ---------------------------------------------------------- reorder array
  logic [NC-1:0]  hit, clr;
  flit_t          ent [NC];
  logic [$clog2(NC*DEPTH+1)-1:0] occ;
  logic           coll;
  logic           rx_req;

  assign from_rtr_rdy = 1'b1;
  assign rx_req = from_rtr.vld && from_rtr.kind == K_REQ;

  reorder_array #(.NC(NC), .DEPTH(DEPTH)) u_roa (
    .clk, .rst_n,
    .wr_v (rx_req), .wr_flit (from_rtr),
    .q_rid (have_id), .hit, .ent, .clr,
    .occupancy (occ), .collision (coll)
  );

  // ------------------------------------------------------ service selection
  logic [NC-1:0]  present, elig, cs_blk;
  logic           can_issue, svc;
  logic [CW-1:0]  pick, rr;
  logic           pend_v;        // request at the bank this cycle
  flit_t          pend;
  logic           rq_push, rq_pop, rq_ne;
  flit_t          rq_in, rq_head;
  logic [$clog2(RESP_D+1)-1:0] rq_cnt;

  assign can_issue = int'(rq_cnt) + (pend_v ? 1 : 0) + 1 <= RESP_D;

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      present[c] = have_v[c] && hit[c];
      cs_blk[c]  = present[c] && ent[c].cs &&
                   (!cs_have || (own_v && own != CORE_W'(c)));
      elig[c]    = present[c] && !cs_blk[c];
    end
    svc  = 1'b0;
    pick = '0;
    if (can_issue) begin
      for (int k = 0; k < NC; k++) begin
        automatic int c = (int'(rr) + k) % NC;
        if (!svc && elig[c]) begin
          svc  = 1'b1;
          pick = CW'(c);
        end
      end
    end
    clr = '0;
    if (svc) clr[pick] = 1'b1;
  end

  assign bank_req_v     = svc;
  assign bank_req_we    = ent[pick].we;
  assign bank_req_idx   = IW'(int'(ent[pick].addr[ADDR_W-1:2]) / NBANK_P);
  assign bank_req_wdata = ent[pick].data;

  // tokens that stay here next cycle
  logic [NC-1:0] keep;
  logic          keep_cs, svc_cs;
  assign svc_cs = svc && ent[pick].cs;
  always_comb begin
    keep = present;            // expected request is here (served or waiting)
    if (svc) keep[pick] = 1'b1;
    keep_cs = cs_have && (svc_cs || |(elig & ~clr & cs_flags()));
  end

  function automatic logic [NC-1:0] cs_flags();
    logic [NC-1:0] f;
    for (int c = 0; c < NC; c++) f[c] = ent[c].cs;
    return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_v        <= {NC{INIT_TOKENS}};
      cs_hold       <= INIT_TOKENS;
      cs_hold_own_v <= 1'b0;
      cs_hold_own   <= '0;
      tok_out_v     <= '0;
      cs_out_v      <= 1'b0;
      cs_out_own_v  <= 1'b0;
      cs_out_own    <= '0;
      rr            <= '0;
      for (int c = 0; c < NC; c++) begin
        hold_id[c]    <= '0;
        tok_out_id[c] <= '0;
      end
    end else begin
      for (int c = 0; c < NC; c++) begin
        hold_v[c]     <= have_v[c] && keep[c];
        hold_id[c]    <= (svc && pick == CW'(c)) ? have_id[c] + 1'b1 : have_id[c];
        tok_out_v[c]  <= have_v[c] && !keep[c];
        tok_out_id[c] <= have_id[c];
      end
      cs_hold       <= keep_cs;
      cs_out_v      <= cs_have && !keep_cs;
      cs_hold_own_v <= svc_cs ? !ent[pick].cs_last : own_v;
      cs_hold_own   <= svc_cs ? CORE_W'(pick) : own;
      cs_out_own_v  <= svc_cs ? !ent[pick].cs_last : own_v;
      cs_out_own    <= svc_cs ? CORE_W'(pick) : own;
      if (svc) rr <= (pick == CW'(NC - 1)) ? '0 : pick + 1'b1;
    end
  end

  // ----------------------------------------------- bank result and response
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v <= 1'b0;
      pend   <= FLIT_NONE;
    end else begin
      pend_v <= svc;
      pend   <= ent[pick];
    end
  end

  always_comb begin
    rq_in      = pend;
    rq_in.vld  = 1'b1;
    rq_in.circ = 1'b0;
    rq_in.kind = K_RESP;
    rq_in.src  = NODE_W'(NODE);
    rq_in.dst  = core_node(int'(pend.core));
    rq_in.data = bank_resp_rdata;
  end
  assign rq_push = pend_v && bank_resp_v;
  assign rq_pop  = rq_ne && to_rtr_rdy;

  flit_fifo #(.DEPTH(RESP_D)) u_rq (
    .clk, .rst_n,
    .push (rq_push), .in_flit (rq_in),
    .pop (rq_pop), .head (rq_head), .not_empty (rq_ne), .count (rq_cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) to_rtr <= FLIT_NONE;
    else        to_rtr <= rq_pop ? rq_head : FLIT_NONE;
  end

  assign ev_service  = svc;
  assign ev_wait     = int'(occ) > (svc ? 1 : 0);
  assign ev_cs_block = |cs_blk;
  assign ev_hold     = |(have_v & keep);
  assign tok_held    = hold_v;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(from_rtr.vld && from_rtr.kind != K_REQ))
        else $error("ordering_ni %0d: unexpected packet kind", NODE);
      assert (!coll) else $error("ordering_ni %0d: reorder array collision", NODE);
      assert (!(pend_v && !bank_resp_v)) else $error("ordering_ni %0d: bank did not answer", NODE);
    end
  end

endmodule
