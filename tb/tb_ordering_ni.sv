// tb_ordering_ni: one ordering point with the token ring and the bank played
// by the testbench.
//  - requests of core 0 arrive as ReqID 1 then 0; without the token nothing
//    is serviced and the wait is reported;
//  - core 0's token arrives expecting ReqID 0: ReqIDs 0 and 1 go to the bank
//    in the two following cycles, the token is held meanwhile and then leaves
//    expecting ReqID 2; the two responses leave in that order with bank data;
//  - a token with no request here passes on unchanged one cycle later;
//  - a critical-section request of core 1 holds core 1's token and waits
//    while the critical-section token is absent or owned by core 3, then is
//    serviced when a free critical-section token arrives, which then leaves
//    owned by core 1.
// The service rule being checked (ReqID order under a token, whole critical
// sections) follows the ordering scheme; the cycle-exact token and response
// timing is this design's own.
module tb_ordering_ni;
  import scnoc_pkg::*;

  localparam int NC = 4;
  localparam int W  = 64;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  flit_t from_rtr, to_rtr;
  logic from_rtr_rdy, to_rtr_rdy;
  logic [NC-1:0] tok_in_v, tok_out_v, tok_held;
  logic [RID_W-1:0] tok_in_id [NC], tok_out_id [NC];
  logic cs_in_v, cs_in_own_v, cs_out_v, cs_out_own_v;
  logic [CORE_W-1:0] cs_in_own, cs_out_own;
  logic bank_req_v, bank_req_we, bank_resp_v;
  logic [$clog2(W)-1:0] bank_req_idx;
  logic [DATA_W-1:0] bank_req_wdata, bank_resp_rdata;
  logic ev_service, ev_wait, ev_cs_block, ev_hold;

  ordering_ni #(.NODE(5), .NC(NC), .NBANK_P(4), .DEPTH(4), .WORDS(W), .RESP_D(4),
                .INIT_TOKENS(1'b0)) dut (.*);

  // bank model: answers the next cycle with a value derived from the index
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin bank_resp_v <= 0; bank_resp_rdata <= '0; end
    else begin
      bank_resp_v     <= bank_req_v;
      bank_resp_rdata <= bank_req_we ? bank_req_wdata : DATA_W'(32'hB000 + bank_req_idx);
    end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // log of bank requests and responses
  int     svc_rid [$];
  longint svc_t [$];
  flit_t  resp [$];
  always @(negedge clk) if (rst_n) begin
    if (bank_req_v) begin svc_rid.push_back(int'(bank_req_wdata)); svc_t.push_back(cyc); end
    if (to_rtr.vld) resp.push_back(to_rtr);
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, s); end
  endtask

  task automatic arrive(int core, int rid, bit we, int word, bit cs = 0, bit csl = 0);
    from_rtr = FLIT_NONE;
    from_rtr.vld = 1; from_rtr.circ = 1; from_rtr.kind = K_REQ;
    from_rtr.core = CORE_W'(core); from_rtr.rid = RID_W'(rid); from_rtr.we = we;
    from_rtr.addr = ADDR_W'(word * 4); from_rtr.data = DATA_W'(rid);
    from_rtr.cs = cs; from_rtr.cs_last = csl;
    @(negedge clk);
    from_rtr = FLIT_NONE;
  endtask

  task automatic token(int core, int id);
    tok_in_v[core] = 1; tok_in_id[core] = RID_W'(id);
    @(negedge clk);
    tok_in_v[core] = 0;
  endtask

  task automatic cs_token(bit own_v, int own);
    cs_in_v = 1; cs_in_own_v = own_v; cs_in_own = CORE_W'(own);
    @(negedge clk);
    cs_in_v = 0; cs_in_own_v = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    from_rtr = FLIT_NONE; to_rtr_rdy = 1;
    tok_in_v = '0; cs_in_v = 0; cs_in_own_v = 0; cs_in_own = '0;
    for (int c = 0; c < NC; c++) tok_in_id[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // out-of-order arrival, no token yet (store rid 1 to word 8, load rid 0 of word 12)
    arrive(0, 1, 1, 8);
    arrive(0, 0, 0, 12);
    repeat (5) @(negedge clk);
    chk(svc_rid.size() == 0 && ev_wait, "nothing serviced without the token");

    // token of core 0 expecting ReqID 0
    token(0, 0);
    repeat (2) @(negedge clk);
    chk(svc_rid.size() == 2 && svc_t[1] == svc_t[0] + 1, "two requests serviced back to back");
    chk(tok_out_v[0] && tok_out_id[0] == 2, "token leaves expecting ReqID 2");
    @(negedge clk);
    chk(!tok_out_v[0] && !tok_held[0], "token gone");
    repeat (4) @(negedge clk);
    chk(resp.size() == 2, "two responses");
    if (resp.size() == 2) begin
      chk(resp[0].rid == 0 && !resp[0].we && resp[0].data == 32'hB000 + 12 / 4
          && resp[0].kind == K_RESP && resp[0].dst == core_node(0), "load answered first, with bank data");
      chk(resp[1].rid == 1 && resp[1].we, "store acknowledged second");
    end

    // a token with nothing to do passes through
    token(2, 7);
    chk(tok_out_v[2] && tok_out_id[2] == 7 && !tok_held[2], "idle token forwarded unchanged");

    // critical section: core 1, ReqID 5
    arrive(1, 5, 1, 16, 1, 0);
    token(1, 5);
    repeat (2) @(negedge clk);
    chk(tok_held[1] && ev_cs_block && svc_rid.size() == 2, "cs request holds its token, waits for the cs token");
    cs_token(1, 3);
    chk(svc_rid.size() == 2 && cs_out_v && cs_out_own_v && cs_out_own == 3,
        "cs token owned by core 3 passes on, request still waits");
    repeat (2) @(negedge clk);
    cs_token(0, 0);
    @(negedge clk);
    chk(svc_rid.size() == 3 && svc_rid[2] == 5, "cs request serviced with a free cs token");
    repeat (3) @(negedge clk);
    chk(!tok_held[1], "core 1 token released");
    begin
      automatic bit seen_own = 0;
      // the cs token has left owned by core 1 (seen on the ring output earlier)
      seen_own = cs_out_seen_own1;
      chk(seen_own, "cs token left owned by core 1");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit cs_out_seen_own1 = 0;
  always @(negedge clk) if (rst_n && cs_out_v && cs_out_own_v && cs_out_own == 1) cs_out_seen_own1 = 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
