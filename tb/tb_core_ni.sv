// tb_core_ni: the core-side interface against a scripted network.
// The testbench plays router and bank: it refuses the first SETUP with a
// NACK that reports two reserved routers, then acknowledges the retry.
// Checked: the teardown that follows the NACK (same slot, two hops), the retry
// one slot later, the requests leaving only in their circuit's slot, in
// program order, with consecutive ReqIDs and the right CoreID, bank node and
// critical-section marks; the window that stops the fifth outstanding request;
// responses passed to the core; and an early setup asked for on setup_*.
// ReqID stamping follows the ordering scheme; setup retry, start slots and
// the window are this design's own.
module tb_core_ni;
  import scnoc_pkg::*;

  localparam int S = 10;
  localparam int CID = 2;
  localparam int NODE = 2;
  localparam int WIN = 4;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic [SLOT_W-1:0] cur_slot;
  logic req_valid, req_ready, req_we, req_cs, req_cs_last, setup_valid;
  logic [ADDR_W-1:0] req_addr;
  logic [DATA_W-1:0] req_data, resp_data;
  logic [RID_W-1:0]  req_rid, resp_rid;
  logic [3:0]        setup_bank;
  logic              resp_valid, resp_we, to_rtr_rdy, from_rtr_rdy;
  flit_t             to_rtr, from_rtr;
  logic [NBANK-1:0]  circ_open;
  logic [$clog2(WIN+1)-1:0] outstanding;
  logic ev_setup, ev_nack, ev_tear, ev_win_stall;

  core_ni #(.CORE_ID(CID), .NODE(NODE), .NBANK_P(NBANK), .SLOTS(S), .WIN(WIN), .LSQ_D(4)) dut (.*);

  int checks = 0, failures = 0, n_stall = 0;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) cur_slot <= '0;
    else        cur_slot <= (cur_slot == SLOT_W'(S - 1)) ? '0 : cur_slot + 1'b1;
  always @(posedge clk) if (ev_win_stall) n_stall++;

  // everything the interface sends, with the slot of the cycle it is on the wire
  flit_t             sent [$];
  logic [SLOT_W-1:0] sent_slot [$];
  always @(negedge clk)
    if (rst_n && to_rtr.vld) begin sent.push_back(to_rtr); sent_slot.push_back(cur_slot); end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic reply(kind_e k, logic [NODE_W-1:0] src, int hops = 0, int rid = 0, int data = 0);
    from_rtr = FLIT_NONE;
    from_rtr.vld = 1; from_rtr.kind = k; from_rtr.src = src; from_rtr.dst = NODE;
    from_rtr.hops = HOP_W'(hops); from_rtr.rid = RID_W'(rid); from_rtr.data = DATA_W'(data);
    @(negedge clk);
    from_rtr = FLIT_NONE;
  endtask

  task automatic wait_sent(int n);
    int t = 0;
    while (sent.size() < n && t < 200) begin @(negedge clk); t++; end
  endtask

  initial begin
    flit_t f;
    logic [SLOT_W-1:0] s0;
    #1 rst_n = 0;
    req_valid = 0; req_we = 0; req_cs = 0; req_cs_last = 0; req_addr = '0; req_data = '0;
    setup_valid = 0; setup_bank = '0; to_rtr_rdy = 1; from_rtr = FLIT_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // five requests to bank 1 (word addresses 1, 5, 9, ...); the queue holds
    // four, so the core issues them in the background
    fork
      for (int k = 0; k < 5; k++) begin
        req_valid = 1; req_we = (k != 2); req_addr = ADDR_W'((k * 4 + 1) * 4);
        req_data = DATA_W'(100 + k); req_cs = (k >= 3); req_cs_last = (k == 4);
        while (!req_ready) @(negedge clk);
        chk(req_rid == RID_W'(k), $sformatf("ReqID %0d given as %0d", k, req_rid));
        @(negedge clk);
        req_valid = 0; req_cs = 0; req_cs_last = 0;
      end
    join_none

    // first setup
    wait_sent(1);
    f = sent.pop_front(); void'(sent_slot.pop_front());
    chk(f.kind == K_SETUP && f.dst == bank_node(1) && f.src == NODE && !f.circ, "setup to bank 1");
    s0 = f.slot;
    reply(K_NACK, 6, 2);
    wait_sent(2);
    f = sent.pop_front(); void'(sent_slot.pop_front());
    chk(f.kind == K_TEAR && f.slot == s0 && f.hops == 2, "teardown of two routers in the refused slot");
    f = sent.pop_front(); void'(sent_slot.pop_front());
    chk(f.kind == K_SETUP && f.slot == SLOT_W'((int'(s0) + 1) % S), "retry one slot later");
    s0 = f.slot;
    chk(sent.size() == 0 && !circ_open[1], "nothing sent before the ACK");
    repeat (15) @(negedge clk);
    chk(sent.size() == 0, "requests wait for the circuit");
    reply(K_ACK, bank_node(1));
    chk(circ_open[1], "circuit open after ACK");

    // window: four requests leave, the fifth waits
    repeat (60) @(negedge clk);
    chk(sent.size() == WIN, $sformatf("%0d requests sent with window %0d", sent.size(), WIN));
    chk(outstanding == WIN && n_stall > 0, "window full, stall seen");
    for (int k = 0; k < sent.size(); k++) begin
      chk(sent[k].circ && sent[k].kind == K_REQ && sent_slot[k] == s0,
          $sformatf("request %0d on the circuit in its slot (%0d vs %0d)", k, sent_slot[k], s0));
      chk(sent[k].rid == RID_W'(k) && sent[k].core == CID && sent[k].dst == bank_node(1)
          && sent[k].data == DATA_W'(100 + k) && sent[k].cs == (k >= 3),
          $sformatf("request %0d contents", k));
    end
    // a response frees the window
    fork
      reply(K_RESP, bank_node(1), 0, 0, 777);
      begin
        @(posedge clk); #1;
        chk(resp_valid && resp_rid == 0 && resp_data == 777, "response passed to the core");
      end
    join
    repeat (30) @(negedge clk);
    chk(sent.size() == WIN + 1 && sent[WIN].rid == 4 && sent[WIN].cs_last, "fifth request after a response");

    // early setup of bank 3
    setup_valid = 1; setup_bank = 4'd3;
    @(negedge clk);
    setup_valid = 0;
    repeat (5) @(negedge clk);
    chk(sent.size() == WIN + 2 && sent[WIN + 1].kind == K_SETUP && sent[WIN + 1].dst == bank_node(3),
        "early setup sent");
    reply(K_ACK, bank_node(3));
    chk(circ_open == 4'b1010, "circuits to banks 1 and 3 open");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
