// tb_sc_manycore_top: end-to-end test of the 16-node network-ordered
// many-core at its default parameters.
//
// Eight simple in-order core models drive the core ports. Loads block the
// core until their response arrives; stores are posted (the core moves on as
// soon as the interface takes the store). The run has five phases:
//  1. circuits: every core asks for circuits to every bank at once, which
//     makes setups contend for slots (NACK, teardown, retry).
//  2. message passing: core 0 writes a far word (Value = 10) then a near word
//     (Flag = 1) back to back; core 7 spins on Flag and must then read 10.
//     Core 1 meanwhile writes X = k then Y = k for k = 1..N into two banks,
//     while core 6 reads Y then X and must never see X < Y.
//  3. independent read-modify-write: every core increments five private words
//     ten times (load, +1, store), then posts a burst of stores beyond the
//     request window and reads them back.
//  4. critical sections: a lock, granted by the testbench in FIFO order,
//     protects two shared counters in different banks; inside, a core loads
//     and increments each (requests marked cs, the last store cs_last) and
//     gives the lock away right after issuing its last store, without waiting
//     for it to complete. Both counters must end at cores x rounds.
//  5. long critical sections: the same with eight counters spread over all
//     four banks in every section.
// Every mechanism the design names is counted (setup, NACK, teardown, circuit
// hops, reorder waits, token holding, critical-section blocking, window
// stalls) and must have happened at least once.
module tb_sc_manycore_top;
  import scnoc_pkg::*;

  localparam int NC = NCORE;
  localparam int CS_ROUNDS = 3;
  localparam int LONG_ROUNDS = 2;
  localparam int LONG_CS = 8;
  localparam int MP_N = 6;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  // core ports (per core, unpacked, then packed for the top)
  logic              req_valid [NC];
  logic              req_we    [NC];
  logic [ADDR_W-1:0] req_addr  [NC];
  logic [DATA_W-1:0] req_data  [NC];
  logic              req_cs    [NC];
  logic              req_csl   [NC];
  logic              setup_v   [NC];
  logic [3:0]        setup_b   [NC];

  logic [NC-1:0] p_valid, p_we, p_cs, p_csl, p_setup, p_ready, p_rv, p_rwe;
  logic [RID_W-1:0]  req_rid  [NC];
  logic [RID_W-1:0]  resp_rid [NC];
  logic [DATA_W-1:0] resp_data[NC];

  always_comb
    for (int c = 0; c < NC; c++) begin
      p_valid[c] = req_valid[c];
      p_we[c]    = req_we[c];
      p_cs[c]    = req_cs[c];
      p_csl[c]   = req_csl[c];
      p_setup[c] = setup_v[c];
    end

  flit_t         mc_to [NMC];
  flit_t         mc_from [NMC];
  logic [NMC-1:0] mc_to_rdy;
  logic [SLOT_W-1:0] slot_now;
  logic [NC*NBANK-1:0] circ_open;
  logic [15:0] e_circ, e_res, e_rnack, e_free;
  logic [NC-1:0] e_setup, e_nack, e_tear, e_win;
  logic [NBANK-1:0] e_svc, e_wait, e_csb, e_hold;

  always_comb for (int m = 0; m < NMC; m++) mc_to[m] = FLIT_NONE;

  sc_manycore_top dut (
    .clk, .rst_n,
    .core_req_valid (p_valid), .core_req_ready (p_ready), .core_req_we (p_we),
    .core_req_addr (req_addr), .core_req_data (req_data), .core_req_cs (p_cs),
    .core_req_cs_last (p_csl), .core_req_rid (req_rid),
    .core_setup_valid (p_setup), .core_setup_bank (setup_b),
    .core_resp_valid (p_rv), .core_resp_rid (resp_rid), .core_resp_we (p_rwe),
    .core_resp_data (resp_data),
    .mc_to_rtr (mc_to), .mc_to_rtr_rdy (mc_to_rdy), .mc_from_rtr (mc_from),
    .mc_from_rtr_rdy ('1),
    .slot_now, .circ_open,
    .ev_circ (e_circ), .ev_reserve (e_res), .ev_rtr_nack (e_rnack), .ev_free (e_free),
    .ev_setup (e_setup), .ev_nack (e_nack), .ev_tear (e_tear), .ev_win_stall (e_win),
    .ev_service (e_svc), .ev_wait (e_wait), .ev_cs_block (e_csb), .ev_hold (e_hold)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------- event counters
  int n_circ, n_res, n_rnack, n_free, n_setup, n_nack, n_tear, n_win;
  int n_svc, n_wait, n_csb, n_hold, n_slotwrap, n_mc;
  always @(posedge clk) if (rst_n) begin
    n_circ  <= n_circ  + $countones(e_circ);
    n_res   <= n_res   + $countones(e_res);
    n_rnack <= n_rnack + $countones(e_rnack);
    n_free  <= n_free  + $countones(e_free);
    n_setup <= n_setup + $countones(e_setup);
    n_nack  <= n_nack  + $countones(e_nack);
    n_tear  <= n_tear  + $countones(e_tear);
    n_win   <= n_win   + $countones(e_win);
    n_svc   <= n_svc   + $countones(e_svc);
    n_wait  <= n_wait  + $countones(e_wait);
    n_csb   <= n_csb   + $countones(e_csb);
    n_hold  <= n_hold  + $countones(e_hold);
    if (slot_now == SLOT_W'(49)) n_slotwrap <= n_slotwrap + 1;
    for (int m = 0; m < NMC; m++) if (mc_from[m].vld) n_mc <= n_mc + 1;
  end

  // ------------------------------------------------------ response capture
  logic [DATA_W-1:0] rdata [NC][int];
  bit                rseen [NC][int];
  int                nresp [NC];
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NC; c++)
      if (p_rv[c]) begin
        rdata[c][int'(resp_rid[c])] = resp_data[c];
        rseen[c][int'(resp_rid[c])] = 1'b1;
        nresp[c] = nresp[c] + 1;
      end

  // ------------------------------------------------------------ core model
  // All core-model tasks start and end just after a falling edge, so inputs
  // change away from the rising edge and p_ready is read before it.
  task automatic issue(int c, bit we, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d,
                       bit cs, bit csl, output int rid);
    req_valid[c] = 1'b1;
    req_we[c]    = we;
    req_addr[c]  = a;
    req_data[c]  = d;
    req_cs[c]    = cs;
    req_csl[c]   = csl;
    while (!p_ready[c]) @(negedge clk);
    rid = int'(req_rid[c]);
    @(negedge clk);
    req_valid[c] = 1'b0;
    req_cs[c]    = 1'b0;
    req_csl[c]   = 1'b0;
  endtask

  task automatic store(int c, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d, bit cs = 0, bit csl = 0);
    int rid;
    issue(c, 1'b1, a, d, cs, csl, rid);
  endtask

  task automatic load(int c, logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] d, input bit cs = 0);
    int rid;
    issue(c, 1'b0, a, '0, cs, 1'b0, rid);
    while (!rseen[c].exists(rid)) @(negedge clk);
    d = rdata[c][rid];
  endtask

  // word w of bank b, row r  ->  byte address
  function automatic logic [ADDR_W-1:0] waddr(int b, int r);
    return ADDR_W'((r * NBANK + b) * 4);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // -------------------------------------------------------------- phase 1
  task automatic phase_circuits();
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < NBANK; b++) begin
        setup_v[c] = 1'b1;
        setup_b[c] = 4'(b);
        @(negedge clk);
        setup_v[c] = 1'b0;
      end
    while (circ_open != '1) @(negedge clk);
    check(circ_open == '1, "all circuits open");
  endtask

  // -------------------------------------------------------------- phase 2
  task automatic mp_writer();
    store(0, waddr(3, 10), 32'd10);     // Value: bank 3, far from core 0
    store(0, waddr(0, 10), 32'd1);      // Flag : bank 0, next to core 0
  endtask

  task automatic mp_reader();
    logic [DATA_W-1:0] f, v;
    int spins = 0;
    do begin load(7, waddr(0, 10), f); spins++; end while (f != 1 && spins < 2000);
    load(7, waddr(3, 10), v);
    check(f == 1, "flag seen");
    check(v == 10, $sformatf("value after flag is %0d, expected 10", v));
  endtask

  task automatic xy_writer();
    for (int k = 1; k <= MP_N; k++) begin
      store(1, waddr(2, 20), DATA_W'(k));   // X
      store(1, waddr(1, 20), DATA_W'(k));   // Y
    end
  endtask

  task automatic xy_reader();
    logic [DATA_W-1:0] x, y;
    for (int i = 0; i < 3 * MP_N; i++) begin
      load(6, waddr(1, 20), y);
      load(6, waddr(2, 20), x);
      check(x >= y, $sformatf("read Y=%0d then X=%0d", y, x));
    end
  endtask

  // -------------------------------------------------------------- phase 3
  task automatic rmw_core(int c);
    logic [DATA_W-1:0] d;
    for (int it = 0; it < 10; it++)
      for (int j = 0; j < 5; j++) begin
        load(c, waddr((c + j) % NBANK, 100 + c * 8 + j), d);
        store(c, waddr((c + j) % NBANK, 100 + c * 8 + j), d + 1);
      end
    for (int j = 0; j < 5; j++) begin
      load(c, waddr((c + j) % NBANK, 100 + c * 8 + j), d);
      check(d == 10, $sformatf("core %0d var %0d = %0d, expected 10", c, j, d));
    end
    for (int j = 0; j < 10; j++) store(c, waddr(j % NBANK, 200 + c * 16 + j), DATA_W'(c * 100 + j));
    for (int j = 0; j < 10; j++) begin
      load(c, waddr(j % NBANK, 200 + c * 16 + j), d);
      check(d == DATA_W'(c * 100 + j), $sformatf("core %0d burst word %0d = %0d", c, j, d));
    end
  endtask

  // -------------------------------------------------------------- phase 4
  int lock_q[$];
  int lock_owner = -1;
  always @(posedge clk)
    if (lock_owner < 0 && lock_q.size() > 0) lock_owner = lock_q.pop_front();

  task automatic cs_core(int c);
    logic [DATA_W-1:0] d;
    for (int r = 0; r < CS_ROUNDS; r++) begin
      lock_q.push_back(c);
      while (lock_owner != c) @(negedge clk);
      load (c, waddr(1, 300), d, 1'b1);
      store(c, waddr(1, 300), d + 1, 1'b1, 1'b0);
      load (c, waddr(2, 300), d, 1'b1);
      store(c, waddr(2, 300), d + 1, 1'b1, 1'b1);   // lock release
      lock_owner = -1;
    end
  endtask

  // -------------------------------------------------------------- phase 5
  // long critical sections: one counter in every bank, LONG_CS words each
  task automatic cs_long_core(int c);
    logic [DATA_W-1:0] d;
    for (int r = 0; r < LONG_ROUNDS; r++) begin
      lock_q.push_back(c);
      while (lock_owner != c) @(negedge clk);
      for (int k = 0; k < LONG_CS; k++) begin
        load (c, waddr(k % NBANK, 310 + k / NBANK), d, 1'b1);
        store(c, waddr(k % NBANK, 310 + k / NBANK), d + 1, 1'b1, k == LONG_CS - 1);
      end
      lock_owner = -1;
    end
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    #1 rst_n = 0;
    for (int c = 0; c < NC; c++) begin
      req_valid[c] = 0; req_we[c] = 0; req_addr[c] = '0; req_data[c] = '0;
      req_cs[c] = 0; req_csl[c] = 0; setup_v[c] = 0; setup_b[c] = '0; nresp[c] = 0;
    end
    {n_circ, n_res, n_rnack, n_free, n_setup, n_nack, n_tear, n_win} = '0;
    {n_svc, n_wait, n_csb, n_hold, n_slotwrap, n_mc} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);

    phase_circuits();
    $display("phase 1 done @%0d: setups %0d nacks %0d teardowns %0d", cyc, n_setup, n_nack, n_tear);

    fork
      mp_writer();
      mp_reader();
      xy_writer();
      xy_reader();
    join
    $display("phase 2 done @%0d", cyc);

    fork
      rmw_core(0); rmw_core(1); rmw_core(2); rmw_core(3);
      rmw_core(4); rmw_core(5); rmw_core(6); rmw_core(7);
    join
    $display("phase 3 done @%0d", cyc);

    fork
      cs_core(0); cs_core(1); cs_core(2); cs_core(3);
      cs_core(4); cs_core(5); cs_core(6); cs_core(7);
    join
    begin
      logic [DATA_W-1:0] d0, d1;
      load(3, waddr(1, 300), d0);
      load(3, waddr(2, 300), d1);
      check(d0 == DATA_W'(NC * CS_ROUNDS), $sformatf("counter 0 = %0d", d0));
      check(d1 == DATA_W'(NC * CS_ROUNDS), $sformatf("counter 1 = %0d", d1));
    end
    $display("phase 4 done @%0d", cyc);

    fork
      cs_long_core(0); cs_long_core(1); cs_long_core(2); cs_long_core(3);
      cs_long_core(4); cs_long_core(5); cs_long_core(6); cs_long_core(7);
    join
    for (int k = 0; k < LONG_CS; k++) begin
      logic [DATA_W-1:0] d;
      load(5, waddr(k % NBANK, 310 + k / NBANK), d);
      check(d == DATA_W'(NC * LONG_ROUNDS), $sformatf("long-section counter %0d = %0d", k, d));
    end
    $display("phase 5 done @%0d", cyc);

    // drain: every request answered
    repeat (200) @(posedge clk);
    for (int c = 0; c < NC; c++)
      check(nresp[c] == int'(req_rid[c]), $sformatf("core %0d: %0d responses for %0d requests",
                                                     c, nresp[c], req_rid[c]));
    check(n_mc == 0, "no traffic to memory controller nodes");

    $display("events: circuit hops %0d, reservations %0d, router nacks %0d, frees %0d",
             n_circ, n_res, n_rnack, n_free);
    $display("events: setups %0d, nacks %0d, teardowns %0d, window stalls %0d",
             n_setup, n_nack, n_tear, n_win);
    $display("events: bank services %0d, reorder waits %0d, cs blocks %0d, token holds %0d, slot wraps %0d",
             n_svc, n_wait, n_csb, n_hold, n_slotwrap);
    check(n_setup > 0, "setup happened");
    check(n_nack > 0,  "setup refused (NACK) happened");
    check(n_tear > 0,  "teardown happened");
    check(n_free > 0,  "slot freed by teardown");
    check(n_circ > 0,  "circuit switching happened");
    check(n_win > 0,   "window stall happened");
    check(n_wait > 0,  "reorder wait happened");
    check(n_csb > 0,   "critical-section blocking happened");
    check(n_hold > 0,  "token holding happened");
    check(n_slotwrap > 0, "slot counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
