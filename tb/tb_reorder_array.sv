// tb_reorder_array: each core's requests are written in a scrambled order
// (never more than DEPTH consecutive ReqIDs live at once) and removed in ReqID
// order, as an ordering point does. Every cycle the testbench compares the
// hit/entry outputs for the expected ReqID of every core and the occupancy
// with its own model; every fifth cycle it looks up the ReqID one window
// ahead instead, which shares the set but not the tag and must miss.
// The (CoreID, ReqID) indexing follows the ordering scheme; the direct-mapped
// organisation with a ReqID tag is this design's own.
module tb_reorder_array;
  import scnoc_pkg::*;

  localparam int NC = 3;
  localparam int D  = 4;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic              wr_v;
  flit_t             wr_flit;
  logic [RID_W-1:0]  q_rid [NC];
  logic [NC-1:0]     hit, clr;
  flit_t             ent [NC];
  logic [$clog2(NC*D+1)-1:0] occupancy;
  logic              collision;

  reorder_array #(.NC(NC), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  int expect_id [NC];     // next ReqID to remove
  bit written [NC][int];
  int occ_model = 0, n_ooo = 0;
  bit probe = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #1 rst_n = 0;
    wr_v = 0; wr_flit = FLIT_NONE; clr = '0;
    for (int c = 0; c < NC; c++) begin expect_id[c] = 0; q_rid[c] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // every fifth cycle look one window ahead: same set, other tag, must miss
      probe = (cyc % 5 == 4);
      for (int c = 0; c < NC; c++) q_rid[c] = RID_W'(expect_id[c] + (probe ? D : 0));
      #1;
      for (int c = 0; c < NC; c++) begin
        automatic bit m = !probe && written[c].exists(expect_id[c]);
        chk(hit[c] == m, $sformatf("hit core %0d id %0d", c, expect_id[c]));
        if (m) chk(ent[c].rid == RID_W'(expect_id[c]) && ent[c].data == DATA_W'(c * 65536 + expect_id[c]),
                   $sformatf("entry core %0d id %0d", c, expect_id[c]));
      end
      chk(int'(occupancy) == occ_model, $sformatf("occupancy %0d vs %0d", occupancy, occ_model));
      // remove hits (random), write one random request inside the window
      clr = '0;
      for (int c = 0; c < NC; c++)
        if (hit[c] && $urandom_range(2) != 0) clr[c] = 1;
      wr_v = 0;
      begin
        automatic int c = $urandom_range(NC - 1);
        automatic int cand[$];
        // live ReqIDs of a core stay within DEPTH of the next one to remove
        for (int r = expect_id[c]; r < expect_id[c] + D; r++)
          if (!written[c].exists(r)) cand.push_back(r);
        if (cand.size() > 0) begin
          automatic int r = cand[$urandom_range(cand.size() - 1)];
          wr_v = 1;
          wr_flit = FLIT_NONE;
          wr_flit.vld = 1; wr_flit.kind = K_REQ;
          wr_flit.core = CORE_W'(c); wr_flit.rid = RID_W'(r);
          wr_flit.data = DATA_W'(c * 65536 + r);
          if (r != expect_id[c]) n_ooo++;
        end
      end
      #1;
      chk(!collision, "no collision");
      @(posedge clk);
      for (int c = 0; c < NC; c++)
        if (clr[c]) begin
          written[c].delete(expect_id[c]);
          expect_id[c]++;
          occ_model--;
        end
      if (wr_v) begin
        written[int'(wr_flit.core)][int'(wr_flit.rid)] = 1;
        occ_model++;
      end
    end
    chk(expect_id[0] > 100 && n_ooo > 50, $sformatf("progress %0d, out-of-order writes %0d", expect_id[0], n_ooo));
    // a ReqID one window ahead maps to the same set and must not hit
    @(negedge clk);
    q_rid[0] = RID_W'(expect_id[0] + D);
    #1;
    chk(!hit[0], "tag mismatch misses");
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
