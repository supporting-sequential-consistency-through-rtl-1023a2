// tb_mesh_noc: the 4x4 hybrid mesh with a 16-slot table; the testbench plays
// the network interfaces of all 16 nodes.
//  - packets: random packets between random nodes all arrive at their
//    destination's local port, once, and in order per source;
//  - setup: node 0 sets up a circuit to node 10 in slot 3 and gets an ACK;
//  - circuit latency: a circuit flit injected at node 0 in slot 3 leaves at
//    node 10 one cycle per router later (5 routers, so 5 clock edges);
//  - conflict: node 4 asks for slot 4 towards node 10, which collides with
//    the first circuit on the south output of router (2,1); the NACK reports
//    the 2 routers that had reserved, and the teardown frees exactly 2 slots;
//  - after tearing down the first circuit the retry of node 4 succeeds and
//    its circuit carries a flit through 4 routers in 4 cycles.
// Slot reservation, acknowledgement and teardown follow the hybrid network
// the design is based on; NACK with hop count and the one-cycle-per-router
// circuit timing are this design's own.
module tb_mesh_noc;
  import scnoc_pkg::*;

  localparam int NX = 4, NY = 4, N = NX * NY, S = 16;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic [SLOT_W-1:0] cur_slot;
  flit_t             loc_in [N], loc_out [N];
  logic [N-1:0]      loc_in_rdy, loc_out_rdy, ev_circ, ev_reserve, ev_nack, ev_free;

  mesh_noc #(.NX(NX), .NY(NY), .SLOTS(S), .FIFO_D(4)) dut (.*);

  int checks = 0, failures = 0, n_free = 0;
  longint cyc = 0;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) cur_slot <= '0;
    else        cur_slot <= (cur_slot == SLOT_W'(S - 1)) ? '0 : cur_slot + 1'b1;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) n_free += $countones(ev_free);

  // everything delivered, per node, with the clock edge it was seen after
  flit_t  got [N][$];
  longint got_t [N][$];
  always @(posedge clk) #1
    for (int n = 0; n < N; n++)
      if (loc_out[n].vld) begin got[n].push_back(loc_out[n]); got_t[n].push_back(cyc); end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, s); end
  endtask

  function automatic flit_t mk(kind_e k, int s, int d, int slot = 0, int hops = 0, int data = 0);
    flit_t f = FLIT_NONE;
    f.vld = 1; f.kind = k; f.src = NODE_W'(s); f.dst = NODE_W'(d);
    f.slot = SLOT_W'(slot); f.hops = HOP_W'(hops); f.data = DATA_W'(data);
    return f;
  endfunction

  task automatic send(int n, flit_t f);
    while (!loc_in_rdy[n]) @(negedge clk);
    loc_in[n] = f;
    @(negedge clk);
    loc_in[n] = FLIT_NONE;
  endtask

  task automatic clear_got();
    for (int n = 0; n < N; n++) begin got[n].delete(); got_t[n].delete(); end
  endtask

  // waits up to 100 cycles for one flit at node n and returns it
  task automatic expect_one(int n, output flit_t f);
    int t = 0;
    while (got[n].size() == 0 && t < 100) begin @(negedge clk); t++; end
    f = (got[n].size() != 0) ? got[n].pop_front() : FLIT_NONE;
    if (got_t[n].size() != 0) last_t = got_t[n].pop_front();
  endtask

  longint last_t = 0;

  initial begin
    flit_t f;
    #1 rst_n = 0;
    for (int n = 0; n < N; n++) loc_in[n] = FLIT_NONE;
    loc_out_rdy = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ------------------------------------------------------------ packets
    begin
      automatic int sent = 0;
      automatic int last [N][N];
      automatic int total = 0;
      for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) last[a][b] = -1;
      for (int k = 0; k < 300; k++) begin
        for (int n = 0; n < N; n++) begin
          if (loc_in_rdy[n] && $urandom_range(3) == 0) begin
            automatic int d = $urandom_range(N - 1);
            loc_in[n] = mk(K_RESP, n, d, 0, 0, sent);
            sent++;
          end else loc_in[n] = FLIT_NONE;
        end
        @(negedge clk);
      end
      for (int n = 0; n < N; n++) loc_in[n] = FLIT_NONE;
      repeat (100) @(negedge clk);
      for (int n = 0; n < N; n++) begin
        total += got[n].size();
        foreach (got[n][i]) begin
          automatic int s = int'(got[n][i].src);
          chk(got[n][i].dst == NODE_W'(n), $sformatf("packet for %0d delivered at %0d", got[n][i].dst, n));
          chk(int'(got[n][i].data) > last[s][n], $sformatf("packets %0d->%0d out of order", s, n));
          last[s][n] = int'(got[n][i].data);
        end
      end
      chk(total == sent, $sformatf("%0d packets delivered of %0d", total, sent));
      clear_got();
    end

    // --------------------------------------------- circuit 0 -> 10, slot 3
    send(0, mk(K_SETUP, 0, 10, 3, 0));
    expect_one(0, f);
    chk(f.vld && f.kind == K_ACK && f.src == 10, "setup 0->10 acknowledged");

    while (cur_slot != 3) @(negedge clk);
    begin
      automatic flit_t c = mk(K_REQ, 0, 10, 0, 0, 32'hCAFE);
      automatic longint t0;
      c.circ = 1;
      loc_in[0] = c;
      @(posedge clk); #1 t0 = cyc;
      @(negedge clk);
      loc_in[0] = FLIT_NONE;
      expect_one(10, f);
      chk(f.vld && f.circ && f.data == 32'hCAFE, "circuit flit delivered at node 10");
      chk(last_t == t0 + 4, $sformatf("circuit latency %0d edges, expected 5 (one per router)", last_t - t0 + 1));
    end

    // ---------------------------------------------------- conflict at (2,1)
    clear_got();
    n_free = 0;
    send(4, mk(K_SETUP, 4, 10, 4, 0));
    expect_one(4, f);
    chk(f.vld && f.kind == K_NACK && f.hops == 2 && f.src == 6,
        $sformatf("setup 4->10 refused at node 6 after 2 routers (kind %0d src %0d hops %0d)", f.kind, f.src, f.hops));
    send(4, mk(K_TEAR, 4, 10, 4, 2));
    repeat (20) @(negedge clk);
    chk(n_free == 2, $sformatf("teardown freed %0d slots, expected 2", n_free));

    // tear down the first circuit (5 routers) and retry
    n_free = 0;
    send(0, mk(K_TEAR, 0, 10, 3, 5));
    repeat (20) @(negedge clk);
    chk(n_free == 5, $sformatf("teardown of 0->10 freed %0d slots, expected 5", n_free));
    send(4, mk(K_SETUP, 4, 10, 4, 0));
    expect_one(4, f);
    chk(f.vld && f.kind == K_ACK && f.hops == 4, "retry of 4->10 acknowledged over 4 routers");

    while (cur_slot != 4) @(negedge clk);
    begin
      automatic flit_t c = mk(K_REQ, 4, 10, 0, 0, 32'hBEEF);
      automatic longint t0;
      c.circ = 1;
      loc_in[4] = c;
      @(posedge clk); #1 t0 = cyc;
      @(negedge clk);
      loc_in[4] = FLIT_NONE;
      repeat (10) @(negedge clk);
      chk(got[10].size() == 1 && got[10][0].data == 32'hBEEF && got[10][0].circ,
          "flit on the new circuit delivered");
      chk(got_t[10].size() == 1 && got_t[10][0] == t0 + 3,
          $sformatf("circuit latency: seen %0d edges after injection, expected 4 routers",
                    got_t[10].size() ? got_t[10][0] - t0 + 1 : -1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
