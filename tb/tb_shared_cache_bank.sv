// tb_shared_cache_bank: random loads and stores against a word-array model.
// Checks that every request is answered exactly one cycle later, that a load
// returns the last value stored to its word (zero if never written) and that
// a store echoes the stored word.
// The bank is this design's simple always-hit stand-in for a cache bank.
module tb_shared_cache_bank;
  import scnoc_pkg::*;

  localparam int W = 1024;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic                 req_v, req_we, resp_v;
  logic [$clog2(W)-1:0] req_idx;
  logic [DATA_W-1:0]    req_wdata, resp_rdata;

  shared_cache_bank #(.WORDS(W)) dut (.*);

  logic [DATA_W-1:0] model [W];
  int checks = 0, failures = 0;

  initial begin
    #1 rst_n = 0;
    req_v = 0; req_we = 0; req_idx = '0; req_wdata = '0;
    for (int i = 0; i < W; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      automatic logic [DATA_W-1:0] exp_d;
      automatic bit v;
      @(negedge clk);
      v = ($urandom_range(3) != 0);
      req_v     = v;
      req_we    = $urandom_range(1);
      req_idx   = $clog2(W)'($urandom_range(63));   // a small region, so loads hit stores
      req_wdata = $urandom;
      exp_d     = req_we ? req_wdata : model[req_idx];
      if (v && req_we) model[req_idx] = req_wdata;
      @(posedge clk);
      #1;
      checks++;
      if (resp_v !== v || (v && resp_rdata !== exp_d)) begin
        failures++;
        $display("FAIL cycle %0d: resp_v %0d data %h expected %0d %h", cyc, resp_v, resp_rdata, v, exp_d);
      end
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
