// hybrid_router: 5-port mesh router that switches circuits by time-division
// slot tables and packets by dimension-ordered (XY) routing on the same links.
//
// Circuit switching. A flit marked circ that arrives at input p while the
// global slot counter reads s is switched to the output reserved for (p, s)
// in the slot table and leaves through the output register in the same cycle,
// so it spends exactly one cycle per hop and reaches the next router in slot
// s+1. Circuit flits are never buffered and always win their output.
//
// Packet switching. Other flits enter a FIFO per input, are routed X first
// then Y, and compete for outputs that no circuit flit uses in that cycle, by
// round robin per output. A packet leaves only when the downstream input has
// room (out_rdy); in_rdy tells the upstream neighbour that at least two
// entries are free, which covers the one flit that can be in flight.
//
// Circuit setup, handled in the head of an input FIFO:
//   SETUP (src, dst, slot s, hops h): if input p is free in slot s and the XY
//     output o is unused by all inputs in slot s, (p, s) -> o is reserved
//     when the message is granted and it moves on with slot s+1, h+1. At the
//     destination (o = local) it turns into an ACK back to the source.
//     Otherwise it turns into a NACK back to the source carrying h, the number
//     of routers that did reserve.
//   TEAR (slot s, hops h): frees (p, s), follows the freed output with slot
//     s+1 and h-1, and is absorbed when h reaches 0 or at the destination.
// Converting setups into ACK/NACK inside the router, the NACK and the single
// flit per message are this design's choices; slot tables, setup messages
// carrying source, destination and slot ID, acknowledgements and teardown
// messages follow the document.
//
// Port order: 0 local, 1 north (y-1), 2 east (x+1), 3 south (y+1), 4 west.
module hybrid_router
  import scnoc_pkg::*;
#(
  parameter int unsigned X      = 0,
  parameter int unsigned Y      = 0,
  parameter int unsigned NX     = MESH_X,
  parameter int unsigned NY     = MESH_Y,
  parameter int unsigned SLOTS  = 50,
  parameter int unsigned FIFO_D = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [SLOT_W-1:0]  cur_slot,
  input  flit_t              in_flit  [NPORT],
  output logic [NPORT-1:0]   in_rdy,
  output flit_t              out_flit [NPORT],
  input  logic [NPORT-1:0]   out_rdy,
  // events, one pulse per occurrence, for statistics and tests
  output logic [NPORT-1:0]   ev_circ,      // circuit flit switched at input p
  output logic [NPORT-1:0]   ev_reserve,   // slot reserved for input p
  output logic [NPORT-1:0]   ev_nack,      // setup refused at input p
  output logic [NPORT-1:0]   ev_free       // slot freed by teardown at input p
);

  localparam logic [NODE_W-1:0] HERE = NODE_W'(Y * NX + X);

  function automatic port_t route_xy(input logic [NODE_W-1:0] d);
    int unsigned dx, dy;
    dx = int'(d) % NX;
    dy = int'(d) / NX;
    if (dx > X)      return port_t'(P_E);
    else if (dx < X) return port_t'(P_W);
    else if (dy > Y) return port_t'(P_S);
    else if (dy < Y) return port_t'(P_N);
    else             return port_t'(P_LOC);
  endfunction

  function automatic logic [SLOT_W-1:0] slot_next(input logic [SLOT_W-1:0] s);
    return (s == SLOT_W'(SLOTS - 1)) ? '0 : s + 1'b1;
  endfunction

  // ---------------------------------------------------------------- slot table
  logic [NPORT-1:0]    cir_v;
  port_t               cir_o      [NPORT];
  logic [SLOT_W-1:0]   chk_slot   [NPORT];
  port_t               chk_out    [NPORT];
  logic [NPORT-1:0]    chk_in_free, chk_out_free;
  port_t               chk_o      [NPORT];
  logic [NPORT-1:0]    res_v, free_v;
  logic [SLOT_W-1:0]   res_slot   [NPORT];
  port_t               res_out    [NPORT];
  logic [SLOT_W-1:0]   free_slot  [NPORT];

  slot_table #(.SLOTS(SLOTS), .NP(NPORT)) u_tbl (
    .clk, .rst_n, .cur_slot,
    .cir_v, .cir_o,
    .chk_slot, .chk_out, .chk_in_free, .chk_out_free, .chk_o,
    .res_v, .res_slot, .res_out,
    .free_v, .free_slot
  );

  // ------------------------------------------------------------ input buffers
  flit_t                        head  [NPORT];
  logic [NPORT-1:0]             hv;
  logic [NPORT-1:0]             pop;
  logic [$clog2(FIFO_D+1)-1:0]  cnt   [NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    flit_fifo #(.DEPTH(FIFO_D)) u_fifo (
      .clk, .rst_n,
      .push      (in_flit[p].vld && !in_flit[p].circ),
      .in_flit   (in_flit[p]),
      .pop       (pop[p]),
      .head      (head[p]),
      .not_empty (hv[p]),
      .count     (cnt[p])
    );
    assign in_rdy[p] = (int'(cnt[p]) + 2 <= FIFO_D);
  end

  // ------------------------------------------------- per-head routing decision
  flit_t             nxt    [NPORT];   // the flit as it will leave
  port_t             want_o [NPORT];   // output it needs
  logic [NPORT-1:0]  want;             // needs an output
  logic [NPORT-1:0]  sink;             // absorbed here without an output
  logic [NPORT-1:0]  is_res;           // reserves a slot when granted
  logic [NPORT-1:0]  is_nack;
  logic [NPORT-1:0]  is_tear;

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      chk_slot[p] = head[p].slot;
      chk_out[p]  = route_xy(head[p].dst);
    end
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      nxt[p]      = head[p];
      want_o[p]   = route_xy(head[p].dst);
      want[p]     = hv[p];
      sink[p]     = 1'b0;
      is_res[p]   = 1'b0;
      is_nack[p]  = 1'b0;
      is_tear[p]  = 1'b0;
      if (hv[p] && head[p].kind == K_SETUP) begin
        if (chk_in_free[p] && chk_out_free[p]) begin
          is_res[p]    = 1'b1;
          nxt[p].hops  = head[p].hops + 1'b1;
          if (chk_out[p] == port_t'(P_LOC)) begin
            nxt[p].kind = K_ACK;
            nxt[p].src  = HERE;
            nxt[p].dst  = head[p].src;
            want_o[p]   = route_xy(head[p].src);
          end else begin
            nxt[p].slot = slot_next(head[p].slot);
          end
        end else begin
          is_nack[p]  = 1'b1;
          nxt[p].kind = K_NACK;
          nxt[p].src  = HERE;
          nxt[p].dst  = head[p].src;
          want_o[p]   = route_xy(head[p].src);
        end
      end else if (hv[p] && head[p].kind == K_TEAR) begin
        is_tear[p]  = 1'b1;
        nxt[p].slot = slot_next(head[p].slot);
        nxt[p].hops = head[p].hops - 1'b1;
        want_o[p]   = chk_o[p];
        if (head[p].hops <= 1 || chk_o[p] == port_t'(P_LOC)) begin
          sink[p] = 1'b1;
          want[p] = 1'b0;
        end
      end
    end
  end

  // -------------------------------------------------------- circuit switching
  logic [NPORT-1:0]  circ_use;   // output taken by a circuit flit this cycle
  flit_t             circ_flit [NPORT];
  logic [NPORT-1:0]  circ_in;

  always_comb begin
    circ_use = '0;
    circ_in  = '0;
    for (int o = 0; o < NPORT; o++) circ_flit[o] = FLIT_NONE;
    for (int p = 0; p < NPORT; p++) begin
      if (in_flit[p].vld && in_flit[p].circ && cir_v[p]) begin
        circ_in[p]            = 1'b1;
        circ_use[cir_o[p]]    = 1'b1;
        circ_flit[cir_o[p]]   = in_flit[p];
      end
    end
  end

  // ------------------------------------------ packet arbitration, round robin
  logic [2:0]        rr    [NPORT];
  logic [NPORT-1:0]  grant_in;
  logic [2:0]        grant_src [NPORT];
  logic [NPORT-1:0]  grant_out;

  always_comb begin
    grant_in  = '0;
    grant_out = '0;
    for (int o = 0; o < NPORT; o++) begin
      grant_src[o] = '0;
      if (!circ_use[o] && out_rdy[o]) begin
        for (int k = 0; k < NPORT; k++) begin
          automatic int p = (int'(rr[o]) + k) % NPORT;
          if (!grant_out[o] && want[p] && want_o[p] == port_t'(o)) begin
            grant_out[o] = 1'b1;
            grant_src[o] = 3'(p);
            grant_in[p]  = 1'b1;
          end
        end
      end
    end
    for (int p = 0; p < NPORT; p++) begin
      pop[p]       = grant_in[p] || (hv[p] && sink[p]);
      res_v[p]     = grant_in[p] && is_res[p];
      res_slot[p]  = head[p].slot;
      res_out[p]   = chk_out[p];
      free_v[p]    = pop[p] && is_tear[p];
      free_slot[p] = head[p].slot;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORT; o++) begin
        out_flit[o] <= FLIT_NONE;
        rr[o]       <= '0;
      end
    end else begin
      for (int o = 0; o < NPORT; o++) begin
        if (circ_use[o])       out_flit[o] <= circ_flit[o];
        else if (grant_out[o]) out_flit[o] <= nxt[grant_src[o]];
        else                   out_flit[o] <= FLIT_NONE;
        if (grant_out[o])
          rr[o] <= (grant_src[o] == 3'(NPORT - 1)) ? '0 : grant_src[o] + 1'b1;
      end
    end
  end

  assign ev_circ    = circ_in;
  assign ev_reserve = res_v;
  assign ev_nack    = grant_in & is_nack;
  assign ev_free    = free_v;

  // A circuit flit must find a reservation, and two circuits never meet.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NPORT; p++) begin
        assert (!(in_flit[p].vld && in_flit[p].circ && !cir_v[p]))
          else $error("router (%0d,%0d): circuit flit on input %0d without reservation", X, Y, p);
        for (int q = p + 1; q < NPORT; q++)
          assert (!(circ_in[p] && circ_in[q] && cir_o[p] == cir_o[q]))
            else $error("router (%0d,%0d): circuit collision", X, Y);
      end
    end
  end

endmodule
