// tb_hybrid_router: one router at (1,1) of a 4x4 mesh with an 8-slot table.
//  - packets: random destinations from every input leave by the XY output,
//    unchanged, and none is lost or duplicated;
//  - setup: a SETUP from the west for slot 3 towards (3,1) leaves east with
//    slot 4 and one more hop; a circuit flit then entering west in slot 3
//    leaves east through the output register of that same cycle;
//  - conflict: a SETUP from the north for the same output and slot is turned
//    into a NACK back north carrying its hop count;
//  - destination: a SETUP addressed to (1,1) comes back as an ACK;
//  - teardown: a TEAR frees the slot and moves on; the north SETUP then
//    succeeds;
//  - backpressure: with the east output blocked, packets wait and the input
//    ready drops once the buffer is nearly full.
// Slot tables and setup/ack/teardown follow the hybrid network the design
// builds on; XY routing, NACKs and buffer sizes are this design's own.
module tb_hybrid_router;
  import scnoc_pkg::*;

  localparam int S = 8;
  localparam logic [NODE_W-1:0] HERE = 5;   // (1,1)

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic [SLOT_W-1:0] cur_slot;
  flit_t             in_flit [NPORT], out_flit [NPORT];
  logic [NPORT-1:0]  in_rdy, out_rdy, ev_circ, ev_reserve, ev_nack, ev_free;

  hybrid_router #(.X(1), .Y(1), .NX(4), .NY(4), .SLOTS(S), .FIFO_D(4)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;

  always @(posedge clk or negedge rst_n)
    if (!rst_n) cur_slot <= '0;
    else        cur_slot <= (cur_slot == SLOT_W'(S - 1)) ? '0 : cur_slot + 1'b1;
  always @(posedge clk) cyc <= cyc + 1;

  // outputs seen, per port
  flit_t  seen [NPORT][$];
  longint seen_t [NPORT][$];
  always @(posedge clk) #1
    for (int o = 0; o < NPORT; o++)
      if (out_flit[o].vld) begin
        seen[o].push_back(out_flit[o]);
        seen_t[o].push_back(cyc);
      end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, s); end
  endtask

  function automatic port_t xy(logic [NODE_W-1:0] d);
    int dx = int'(d) % 4, dy = int'(d) / 4;
    if (dx > 1) return port_t'(P_E);
    if (dx < 1) return port_t'(P_W);
    if (dy > 1) return port_t'(P_S);
    if (dy < 1) return port_t'(P_N);
    return port_t'(P_LOC);
  endfunction

  // drive one flit on input p for one cycle (called just after a falling edge)
  task automatic send(int p, flit_t f);
    in_flit[p] = f;
    @(negedge clk);
    in_flit[p] = FLIT_NONE;
  endtask

  function automatic flit_t mk(kind_e k, logic [NODE_W-1:0] s, logic [NODE_W-1:0] d,
                               int slot = 0, int hops = 0, int data = 0);
    flit_t f = FLIT_NONE;
    f.vld = 1; f.kind = k; f.src = s; f.dst = d;
    f.slot = SLOT_W'(slot); f.hops = HOP_W'(hops); f.data = DATA_W'(data);
    return f;
  endfunction

  task automatic wait_slot(int s);   // returns at a falling edge inside slot s
    while (int'(cur_slot) != s) @(negedge clk);
  endtask

  task automatic clear_seen();
    for (int o = 0; o < NPORT; o++) begin seen[o].delete(); seen_t[o].delete(); end
  endtask

  initial begin
    #1 rst_n = 0;
    for (int p = 0; p < NPORT; p++) in_flit[p] = FLIT_NONE;
    out_rdy = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------------------------------------------------- packets
    begin
      automatic int sent [NPORT];
      automatic int n = 0;
      for (int o = 0; o < NPORT; o++) sent[o] = 0;
      for (int k = 0; k < 200; k++) begin
        for (int p = 0; p < NPORT; p++) begin
          automatic logic [NODE_W-1:0] d = NODE_W'($urandom_range(15));
          if (in_rdy[p] && $urandom_range(1)) begin
            in_flit[p] = mk(K_RESP, NODE_W'(p), d, 0, 0, n);
            sent[xy(d)]++;
            n++;
          end else in_flit[p] = FLIT_NONE;
        end
        @(negedge clk);
      end
      for (int p = 0; p < NPORT; p++) in_flit[p] = FLIT_NONE;
      repeat (40) @(negedge clk);
      for (int o = 0; o < NPORT; o++) begin
        chk(seen[o].size() == sent[o], $sformatf("port %0d: %0d packets out, %0d sent", o, seen[o].size(), sent[o]));
        foreach (seen[o][i]) chk(xy(seen[o][i].dst) == port_t'(o) && seen[o][i].kind == K_RESP,
                                 $sformatf("packet on wrong port %0d", o));
      end
      clear_seen();
    end

    // ------------------------------------------------------------ setup
    send(P_W, mk(K_SETUP, 4, 7, 3, 1));       // from (0,1) to (3,1), slot 3 here
    repeat (4) @(negedge clk);
    chk(seen[P_E].size() == 1 && seen[P_E][0].kind == K_SETUP && seen[P_E][0].slot == 4
        && seen[P_E][0].hops == 2, "setup forwarded east with slot 4, hops 2");
    clear_seen();

    // circuit flit in slot 3: one cycle to the east output
    wait_slot(3);
    begin
      automatic flit_t f = mk(K_REQ, 4, 7, 0, 0, 32'hC1C1);
      automatic longint t0;
      f.circ = 1;
      in_flit[P_W] = f;
      @(posedge clk); #1 t0 = cyc;
      @(negedge clk);
      in_flit[P_W] = FLIT_NONE;
      repeat (3) @(negedge clk);
      chk(seen[P_E].size() == 1 && seen[P_E][0].data == 32'hC1C1 && seen[P_E][0].circ,
          "circuit flit switched east");
      chk(seen_t[P_E].size() == 1 && seen_t[P_E][0] == t0, "circuit hop takes one cycle");
    end
    clear_seen();

    // conflicting setup from the north for the same output and slot
    send(P_N, mk(K_SETUP, 1, 7, 3, 1));
    repeat (4) @(negedge clk);
    chk(seen[P_N].size() == 1 && seen[P_N][0].kind == K_NACK && seen[P_N][0].dst == 1
        && seen[P_N][0].hops == 1, "conflicting setup answered by NACK north, hops 1");
    chk(seen[P_E].size() == 0, "nothing forwarded east");
    clear_seen();

    // setup to this node: ACK back west
    send(P_W, mk(K_SETUP, 4, HERE, 6, 1));
    repeat (4) @(negedge clk);
    chk(seen[P_W].size() == 1 && seen[P_W][0].kind == K_ACK && seen[P_W][0].dst == 4
        && seen[P_W][0].src == HERE, "setup to this node answered by ACK");
    clear_seen();

    // teardown of the west->east slot 3 circuit, then the north setup succeeds
    send(P_W, mk(K_TEAR, 4, 0, 3, 2));
    repeat (4) @(negedge clk);
    chk(seen[P_E].size() == 1 && seen[P_E][0].kind == K_TEAR && seen[P_E][0].slot == 4
        && seen[P_E][0].hops == 1, "teardown forwarded with slot 4, hops 1");
    clear_seen();
    send(P_N, mk(K_SETUP, 1, 7, 3, 1));
    repeat (4) @(negedge clk);
    chk(seen[P_E].size() == 1 && seen[P_E][0].kind == K_SETUP, "setup succeeds after teardown");
    clear_seen();

    // ----------------------------------------------------- backpressure
    out_rdy[P_E] = 1'b0;
    for (int k = 0; k < 3; k++) send(P_W, mk(K_RESP, 4, 7, 0, 0, 100 + k));
    repeat (3) @(negedge clk);
    chk(seen[P_E].size() == 0, "blocked output holds packets");
    chk(!in_rdy[P_W], "input ready drops when buffer nearly full");
    out_rdy[P_E] = 1'b1;
    repeat (6) @(negedge clk);
    chk(seen[P_E].size() == 3 && seen[P_E][0].data == 100 && seen[P_E][2].data == 102,
        "packets released in order");
    chk(in_rdy[P_W], "input ready again");

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
