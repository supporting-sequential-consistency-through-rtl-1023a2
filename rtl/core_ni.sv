// core_ni: network interface between an in-order core and the mesh.
//
// Every memory request the core issues is stamped with the core's CoreID and
// a ReqID, a per-core counter that starts at zero and grows by one per
// request, and is queued in a small load-store queue. Requests leave the queue
// in program order and travel to the shared cache bank that owns their
// address on a circuit: a path reserved in the routers' slot tables, entered
// only in the circuit's own slot, on which every hop takes one cycle.
//
// Circuits are opened on demand, or ahead of time through the setup_* port
// (used to overlap path setup with waiting for a lock). Opening a circuit to
// bank b sends a SETUP packet for start slot slot0[b]. An ACK marks the
// circuit open; it is never torn down afterwards. A NACK means a router on the
// way had the slot taken: the routers already reserved are released with a
// TEAR packet and setup is retried one slot later. One setup is outstanding at
// a time, so ACK and NACK always refer to it.
//
// At most WIN requests may be outstanding (sent and not yet answered). WIN
// equals the per-core depth of the reorder arrays at the banks, so requests
// of one core never collide in those arrays. Responses (load data, store
// acknowledgements) come back as packets and appear on resp_* for one cycle.
//
// Timing: a request accepted in cycle t can be on the wire at t+2 at the
// earliest, when its circuit is open and its slot comes up. The request
// format (CoreID, ReqID, critical-section marks) follows the document; the
// queue depth, window, start-slot choice and retry rule are this design's.
module core_ni
  import scnoc_pkg::*;
#(
  parameter int unsigned CORE_ID = 0,
  parameter int unsigned NODE    = 0,
  parameter int unsigned NBANK_P = NBANK,
  parameter int unsigned SLOTS   = 50,
  parameter int unsigned WIN     = 4,
  parameter int unsigned LSQ_D   = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [SLOT_W-1:0]  cur_slot,
  // core request port
  input  logic               req_valid,
  output logic               req_ready,
  input  logic               req_we,
  input  logic [ADDR_W-1:0]  req_addr,
  input  logic [DATA_W-1:0]  req_data,
  input  logic               req_cs,
  input  logic               req_cs_last,
  output logic [RID_W-1:0]   req_rid,      // ReqID given to the request accepted now
  // early circuit setup
  input  logic               setup_valid,
  input  logic [3:0]         setup_bank,
  // responses
  output logic               resp_valid,
  output logic [RID_W-1:0]   resp_rid,
  output logic               resp_we,
  output logic [DATA_W-1:0]  resp_data,
  // router local port
  output flit_t              to_rtr,
  input  logic               to_rtr_rdy,
  input  flit_t              from_rtr,
  output logic               from_rtr_rdy,
  // status and events
  output logic [NBANK_P-1:0] circ_open,
  output logic [$clog2(WIN+1)-1:0] outstanding,
  output logic               ev_setup,     // SETUP sent
  output logic               ev_nack,      // NACK received
  output logic               ev_tear,      // TEAR sent
  output logic               ev_win_stall  // head request held by the window
);

  localparam int unsigned BW = (NBANK_P > 1) ? $clog2(NBANK_P) : 1;

  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_OPEN} cst_e;

  function automatic logic [SLOT_W-1:0] slot_next(input logic [SLOT_W-1:0] s);
    return (s == SLOT_W'(SLOTS - 1)) ? '0 : s + 1'b1;
  endfunction

  function automatic logic [BW-1:0] node_to_bank(input logic [NODE_W-1:0] n);
    logic [BW-1:0] r;
    r = '0;
    for (int b = 0; b < NBANK_P; b++)
      if (bank_node(b) == n) r = BW'(b);
    return r;
  endfunction

  // ------------------------------------------------------- load-store queue
  logic [RID_W-1:0]             rid_ctr;
  flit_t                        lsq_in, lsq_head;
  logic                         lsq_push, lsq_pop, lsq_nempty;
  logic [$clog2(LSQ_D+1)-1:0]   lsq_cnt;

  assign req_ready = (int'(lsq_cnt) < LSQ_D);
  assign lsq_push  = req_valid && req_ready;
  assign req_rid   = rid_ctr;

  always_comb begin
    lsq_in         = FLIT_NONE;
    lsq_in.vld     = 1'b1;
    lsq_in.circ    = 1'b1;
    lsq_in.kind    = K_REQ;
    lsq_in.src     = NODE_W'(NODE);
    lsq_in.dst     = bank_node(addr_bank(req_addr, NBANK_P));
    lsq_in.core    = CORE_W'(CORE_ID);
    lsq_in.rid     = rid_ctr;
    lsq_in.cs      = req_cs;
    lsq_in.cs_last = req_cs_last;
    lsq_in.we      = req_we;
    lsq_in.addr    = req_addr;
    lsq_in.data    = req_data;
  end

  flit_fifo #(.DEPTH(LSQ_D)) u_lsq (
    .clk, .rst_n,
    .push (lsq_push), .in_flit (lsq_in),
    .pop  (lsq_pop),  .head (lsq_head), .not_empty (lsq_nempty), .count (lsq_cnt)
  );

  // ---------------------------------------------------------- circuit state
  cst_e               cst   [NBANK_P];
  logic [SLOT_W-1:0]  slot0 [NBANK_P];
  logic [NBANK_P-1:0] need;            // setup wanted
  logic               busy;            // a setup is outstanding
  logic [BW-1:0]      busy_b;
  logic               tear_pend;
  logic [SLOT_W-1:0]  tear_slot;
  logic [HOP_W-1:0]   tear_hops;

  logic [BW-1:0] head_b;
  assign head_b = BW'(addr_bank(lsq_head.addr, NBANK_P));

  for (genvar b = 0; b < NBANK_P; b++) begin : g_open
    assign circ_open[b] = (cst[b] == C_OPEN);
  end

  // ---------------------------------------------------------- send decision
  logic          send_req, send_tear, send_setup;
  logic [BW-1:0] setup_b;
  logic          setup_any;

  always_comb begin
    setup_any = 1'b0;
    setup_b   = '0;
    for (int b = NBANK_P - 1; b >= 0; b--)
      if (need[b] && cst[b] == C_IDLE) begin
        setup_any = 1'b1;
        setup_b   = BW'(b);
      end
  end

  assign send_req   = lsq_nempty && cst[head_b] == C_OPEN && int'(outstanding) < WIN
                      && slot_next(cur_slot) == slot0[head_b];
  assign send_tear  = !send_req && to_rtr_rdy && tear_pend;
  assign send_setup = !send_req && !send_tear && to_rtr_rdy && !busy && setup_any;
  assign lsq_pop    = send_req;
  assign ev_win_stall = lsq_nempty && cst[head_b] == C_OPEN && int'(outstanding) >= WIN;
  assign ev_setup   = send_setup;
  assign ev_tear    = send_tear;

  // --------------------------------------------------------------- receive
  logic rx_resp, rx_ack, rx_nack;
  assign from_rtr_rdy = 1'b1;
  assign rx_resp = from_rtr.vld && from_rtr.kind == K_RESP;
  assign rx_ack  = from_rtr.vld && from_rtr.kind == K_ACK;
  assign rx_nack = from_rtr.vld && from_rtr.kind == K_NACK;
  assign ev_nack = rx_nack;

  assign resp_valid = rx_resp;
  assign resp_rid   = from_rtr.rid;
  assign resp_we    = from_rtr.we;
  assign resp_data  = from_rtr.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rid_ctr     <= '0;
      outstanding <= '0;
      need        <= '0;
      busy        <= 1'b0;
      busy_b      <= '0;
      tear_pend   <= 1'b0;
      tear_slot   <= '0;
      tear_hops   <= '0;
      to_rtr      <= FLIT_NONE;
      for (int b = 0; b < NBANK_P; b++) begin
        cst[b]   <= C_IDLE;
        // spread the start slots of all (core, bank) pairs over the table
        slot0[b] <= SLOT_W'(((CORE_ID * NBANK_P + b) * 5) % SLOTS);
      end
    end else begin
      if (lsq_push) rid_ctr <= rid_ctr + 1'b1;
      outstanding <= outstanding + (send_req ? 1'b1 : 1'b0) - (rx_resp ? 1'b1 : 1'b0);

      // wanted circuits: the head's bank and early setup requests
      if (lsq_nempty && cst[head_b] == C_IDLE) need[head_b] <= 1'b1;
      if (setup_valid && int'(setup_bank) < NBANK_P && cst[setup_bank[BW-1:0]] == C_IDLE)
        need[setup_bank[BW-1:0]] <= 1'b1;

      to_rtr <= FLIT_NONE;
      if (send_req) begin
        to_rtr <= lsq_head;
      end else if (send_tear) begin
        to_rtr      <= FLIT_NONE;
        to_rtr.vld  <= 1'b1;
        to_rtr.kind <= K_TEAR;
        to_rtr.src  <= NODE_W'(NODE);
        to_rtr.slot <= tear_slot;
        to_rtr.hops <= tear_hops;
        tear_pend   <= 1'b0;
      end else if (send_setup) begin
        to_rtr      <= FLIT_NONE;
        to_rtr.vld  <= 1'b1;
        to_rtr.kind <= K_SETUP;
        to_rtr.src  <= NODE_W'(NODE);
        to_rtr.dst  <= bank_node(int'(setup_b));
        to_rtr.core <= CORE_W'(CORE_ID);
        to_rtr.slot <= slot0[setup_b];
        cst[setup_b]  <= C_WAIT;
        need[setup_b] <= 1'b0;
        busy          <= 1'b1;
        busy_b        <= setup_b;
      end

      if (rx_ack && busy) begin
        cst[busy_b] <= C_OPEN;
        busy        <= 1'b0;
      end
      if (rx_nack && busy) begin
        busy          <= 1'b0;
        cst[busy_b]   <= C_IDLE;
        need[busy_b]  <= 1'b1;
        slot0[busy_b] <= slot_next(slot0[busy_b]);
        if (from_rtr.hops != 0) begin
          tear_pend <= 1'b1;
          tear_slot <= slot0[busy_b];
          tear_hops <= from_rtr.hops;
        end
      end
    end
  end

  // The ACK comes from the bank being set up; a NACK never overlaps a
  // pending teardown because only one setup is outstanding.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(rx_ack && (!busy || node_to_bank(from_rtr.src) != busy_b)))
        else $error("core_ni %0d: unexpected ACK", CORE_ID);
      assert (!(rx_nack && tear_pend)) else $error("core_ni %0d: NACK during teardown", CORE_ID);
      assert (!(rx_resp && outstanding == 0)) else $error("core_ni %0d: response without request", CORE_ID);
    end
  end

endmodule
