// tb_token_ring_memory: four ordering points with their banks on one token
// ring, serving four cores.
// Every core runs a random program of loads and stores to its own words,
// spread over all banks, with some critical sections (three requests, the
// last marked cs_last) to shared words. The testbench delivers the requests
// to the banks in scrambled order, at most one per bank per cycle and never
// more than four ahead of the oldest unanswered request of a core (the
// reorder depth). Checked:
//  - every request is answered exactly once, by a response to its core;
//  - the responses of each core come back in program order at strictly
//    increasing cycles, although they are served by different banks;
//  - loads return the value of the core's last earlier store to the word
//    (a program-order model), stores echo their data;
//  - critical sections of different cores never interleave;
//  - waits, token holds and blocked critical-section requests all occur.
// The properties checked are the ones the ordering scheme promises; the
// window of four and the address interleaving are this design's own.
module tb_token_ring_memory;
  import scnoc_pkg::*;

  localparam int NC = 4, NB = 4, D = 4, W = 256, M = 80;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  flit_t         from_rtr [NB], to_rtr [NB];
  logic [NB-1:0] from_rtr_rdy, to_rtr_rdy, ev_service, ev_wait, ev_cs_block, ev_hold;

  token_ring_memory #(.NC(NC), .NB(NB), .DEPTH(D), .WORDS(W)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_wait = 0, n_hold = 0, n_csb = 0, n_svc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    n_wait += $countones(ev_wait); n_hold += $countones(ev_hold);
    n_csb  += $countones(ev_cs_block); n_svc += $countones(ev_service);
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, s); end
  endtask

  // the programs
  int          p_bank [NC][M], p_idx [NC][M];
  bit          p_we [NC][M], p_cs [NC][M], p_last [NC][M];
  logic [31:0] p_data [NC][M], p_exp [NC][M];
  bit          injected [NC][M];
  int          answered [NC];      // responses received per core
  longint      last_t [NC];
  int          cs_owner = -1;      // core whose critical section is being answered

  initial begin
    for (int c = 0; c < NC; c++) begin
      automatic logic [31:0] mem [NB*W];
      automatic int i = 0;
      for (int w = 0; w < NB * W; w++) mem[w] = '0;
      while (i < M) begin
        if (i + 3 <= M && $urandom_range(7) == 0) begin
          for (int k = 0; k < 3; k++) begin
            p_bank[c][i] = $urandom_range(NB - 1); p_idx[c][i] = 200 + $urandom_range(7);
            p_we[c][i] = 1; p_cs[c][i] = 1; p_last[c][i] = (k == 2);
            p_data[c][i] = 32'h5000 + c; p_exp[c][i] = p_data[c][i];
            i++;
          end
        end else begin
          p_bank[c][i] = $urandom_range(NB - 1); p_idx[c][i] = c * 32 + $urandom_range(15);
          p_we[c][i] = $urandom_range(1); p_cs[c][i] = 0; p_last[c][i] = 0;
          p_data[c][i] = $urandom;
          if (p_we[c][i]) mem[p_bank[c][i] * W + p_idx[c][i]] = p_data[c][i];
          p_exp[c][i] = p_we[c][i] ? p_data[c][i] : mem[p_bank[c][i] * W + p_idx[c][i]];
          i++;
        end
      end
    end
  end

  // a request names (bank, index); its word address interleaves the banks
  function automatic int word_addr(int c, int i);
    return (p_idx[c][i] * NB + p_bank[c][i]) * 4;     // word address -> bank, index
  endfunction

  // responses
  always @(posedge clk) #1 if (rst_n)
    for (int b = 0; b < NB; b++)
      if (to_rtr[b].vld) begin
        automatic int c = -1;
        for (int k = 0; k < NC; k++) if (to_rtr[b].dst == core_node(k)) c = k;
        chk(c >= 0 && to_rtr[b].kind == K_RESP, "response to a core node");
        if (c >= 0) begin
          automatic int r = answered[c];
          chk(int'(to_rtr[b].rid) == r, $sformatf("core %0d: response rid %0d, expected %0d", c, to_rtr[b].rid, r));
          chk(cyc > last_t[c], $sformatf("core %0d: two responses in one cycle", c));
          chk(b == p_bank[c][r], $sformatf("core %0d rid %0d answered by bank %0d", c, r, b));
          if (!p_cs[c][r])
            chk(to_rtr[b].data == p_exp[c][r],
                $sformatf("core %0d rid %0d data %h expected %h", c, r, to_rtr[b].data, p_exp[c][r]));
          if (p_cs[c][r]) begin
            chk(cs_owner == -1 || cs_owner == c,
                $sformatf("critical section of core %0d inside that of core %0d", c, cs_owner));
            cs_owner = p_last[c][r] ? -1 : c;
          end
          last_t[c] = cyc;
          answered[c]++;
        end
      end

  initial begin
    #1 rst_n = 0;
    for (int b = 0; b < NB; b++) from_rtr[b] = FLIT_NONE;
    to_rtr_rdy = '1;
    for (int c = 0; c < NC; c++) begin
      answered[c] = 0; last_t[c] = -1;
      for (int i = 0; i < M; i++) injected[c][i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int t = 0; t < 4000; t++) begin
      automatic bit done = 1;
      for (int c = 0; c < NC; c++) if (answered[c] < M) done = 0;
      if (done) break;
      for (int b = 0; b < NB; b++) begin
        automatic int c = $urandom_range(NC - 1);
        automatic int cand [$];
        from_rtr[b] = FLIT_NONE;
        for (int i = answered[c]; i < M && i < answered[c] + D; i++)
          if (!injected[c][i] && p_bank[c][i] == b) cand.push_back(i);
        if (cand.size() != 0 && $urandom_range(2) != 0) begin
          automatic int i = cand[$urandom_range(cand.size() - 1)];
          automatic flit_t f = FLIT_NONE;
          f.vld = 1; f.circ = 1; f.kind = K_REQ; f.src = core_node(c); f.dst = bank_node(b);
          f.core = CORE_W'(c); f.rid = RID_W'(i); f.we = p_we[c][i];
          f.addr = ADDR_W'(word_addr(c, i)); f.data = p_data[c][i];
          f.cs = p_cs[c][i]; f.cs_last = p_last[c][i];
          from_rtr[b] = f;
          injected[c][i] = 1;
        end
      end
      @(negedge clk);
    end
    for (int b = 0; b < NB; b++) from_rtr[b] = FLIT_NONE;
    repeat (20) @(negedge clk);

    for (int c = 0; c < NC; c++) chk(answered[c] == M, $sformatf("core %0d: %0d of %0d answered", c, answered[c], M));
    chk(n_svc == NC * M, $sformatf("%0d services for %0d requests", n_svc, NC * M));
    chk(n_wait > 0 && n_hold > 0 && n_csb > 0, "waits, holds and blocked critical sections occurred");
    $display("services %0d waits %0d holds %0d cs_blocks %0d", n_svc, n_wait, n_hold, n_csb);
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
