// tb_slot_table: random reserve/free traffic against a reference model of the
// slot table. Each cycle every input port may reserve or free one slot; the
// testbench keeps its own copy of the table and compares the lookup at the
// current slot and the check outputs (input free, output unused, reserved
// output) for random slots every cycle. Reservations are only made when the
// model says the input and output are free, as the router does.
// One output per slot and per router is this design's rule; the table itself
// follows the hybrid network the design builds on.
module tb_slot_table;
  import scnoc_pkg::*;

  localparam int S  = 50;
  localparam int NP = NPORT;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic [SLOT_W-1:0] cur_slot;
  logic [NP-1:0]     cir_v, chk_in_free, chk_out_free, res_v, free_v;
  port_t             cir_o [NP], chk_out [NP], chk_o [NP], res_out [NP];
  logic [SLOT_W-1:0] chk_slot [NP], res_slot [NP], free_slot [NP];

  slot_table #(.SLOTS(S), .NP(NP)) dut (.*);

  bit    mv [NP][S];
  port_t mo [NP][S];
  int checks = 0, failures = 0, n_res = 0, n_free = 0;

  function automatic bit out_used(int s, port_t o);
    for (int q = 0; q < NP; q++) if (mv[q][s] && mo[q][s] == o) return 1;
    return 0;
  endfunction

  initial begin
    #1 rst_n = 0;
    cur_slot = '0;
    res_v = '0; free_v = '0;
    for (int p = 0; p < NP; p++) begin
      chk_slot[p] = '0; chk_out[p] = '0; res_slot[p] = '0; res_out[p] = '0; free_slot[p] = '0;
      for (int s = 0; s < S; s++) begin mv[p][s] = 0; mo[p][s] = '0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare outputs for the values applied now
      cur_slot = SLOT_W'(cyc % S);
      for (int p = 0; p < NP; p++) begin
        chk_slot[p] = SLOT_W'($urandom_range(S - 1));
        chk_out[p]  = port_t'($urandom_range(NP - 1));
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (cir_v[p] !== mv[p][cyc % S] || (mv[p][cyc % S] && cir_o[p] !== mo[p][cyc % S])) begin
          failures++; $display("FAIL lookup p%0d slot %0d", p, cyc % S);
        end
        checks++;
        if (chk_in_free[p] !== !mv[p][chk_slot[p]] ||
            chk_out_free[p] !== !out_used(int'(chk_slot[p]), chk_out[p]) ||
            (mv[p][chk_slot[p]] && chk_o[p] !== mo[p][chk_slot[p]])) begin
          failures++; $display("FAIL check p%0d slot %0d", p, chk_slot[p]);
        end
      end
      // choose this cycle's updates
      res_v = '0; free_v = '0;
      for (int p = 0; p < NP; p++) begin
        int s;
        port_t o;
        s = $urandom_range(S - 1);
        o = port_t'($urandom_range(NP - 1));
        if ($urandom_range(3) == 0 && mv[p][s]) begin
          free_v[p] = 1; free_slot[p] = SLOT_W'(s);
        end else if ($urandom_range(1) == 0 && !mv[p][s] && !out_used(s, o)) begin
          // one reservation per (output, slot) in a cycle
          automatic bit clash = 0;
          for (int q = 0; q < p; q++)
            if (res_v[q] && int'(res_slot[q]) == s && res_out[q] == o) clash = 1;
          if (!clash) begin
            res_v[p] = 1; res_slot[p] = SLOT_W'(s); res_out[p] = o;
          end
        end
      end
      @(posedge clk);
      for (int p = 0; p < NP; p++) begin
        if (free_v[p]) begin mv[p][free_slot[p]] = 0; n_free++; end
        if (res_v[p])  begin mv[p][res_slot[p]] = 1; mo[p][res_slot[p]] = res_out[p]; n_res++; end
      end
    end
    checks++;
    if (n_res == 0 || n_free == 0) begin failures++; $display("FAIL no traffic"); end
    $display("reservations %0d frees %0d", n_res, n_free);
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
