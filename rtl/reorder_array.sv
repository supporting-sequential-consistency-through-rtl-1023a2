// reorder_array: cache-like store of the requests waiting at an ordering point.
//
// Requests arrive from the network in any order. Each is written to the row
// of its core and the set given by the low bits of its ReqID, the ReqID being
// kept as the tag. The ordering point asks, for every core at once, whether
// the request with the ReqID it expects next is present (hit/ent), and removes
// it once it is serviced. Indexing by (CoreID, ReqID) and using the array to
// put the requests of each core back in order follow the document; the size
// (DEPTH sets per core) is this design's choice, and the sender keeps at most
// DEPTH requests outstanding so that two live requests never share a set.
//
// Interface: wr_v/wr_flit store a request (registered, visible next cycle);
// q_rid[c] is the ReqID looked up for core c (combinational hit[c], ent[c]);
// clr[c] frees the set of q_rid[c]. occupancy counts the requests held.
module reorder_array
  import scnoc_pkg::*;
#(
  parameter int unsigned NC    = NCORE,
  parameter int unsigned DEPTH = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               wr_v,
  input  flit_t                              wr_flit,
  input  logic [RID_W-1:0]                   q_rid [NC],
  output logic [NC-1:0]                      hit,
  output flit_t                              ent   [NC],
  input  logic [NC-1:0]                      clr,
  output logic [$clog2(NC*DEPTH+1)-1:0]      occupancy,
  output logic                               collision   // write into an occupied set
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic   v   [NC][DEPTH];
  flit_t  arr [NC][DEPTH];

  function automatic logic [IW-1:0] set_of(input logic [RID_W-1:0] r);
    return IW'(int'(r) % DEPTH);
  endfunction

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      hit[c] = v[c][set_of(q_rid[c])] && arr[c][set_of(q_rid[c])].rid == q_rid[c];
      ent[c] = arr[c][set_of(q_rid[c])];
    end
  end

  logic [CORE_W-1:0] wc;
  logic [IW-1:0]     ws;
  assign wc = wr_flit.core;
  assign ws = set_of(wr_flit.rid);
  assign collision = wr_v && int'(wc) < NC && v[wc][ws];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occupancy <= '0;
      for (int c = 0; c < NC; c++)
        for (int s = 0; s < DEPTH; s++) begin
          v[c][s]   <= 1'b0;
          arr[c][s] <= FLIT_NONE;
        end
    end else begin
      for (int c = 0; c < NC; c++)
        if (clr[c]) v[c][set_of(q_rid[c])] <= 1'b0;
      if (wr_v && int'(wc) < NC) begin
        v[wc][ws]   <= 1'b1;
        arr[wc][ws] <= wr_flit;
      end
      occupancy <= occupancy + (wr_v ? 1'b1 : 1'b0) - $countones(clr);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!collision) else $error("reorder_array: set already occupied");
      assert (!wr_v || int'(wc) < NC) else $error("reorder_array: CoreID out of range");
      for (int c = 0; c < NC; c++)
        assert (!clr[c] || hit[c]) else $error("reorder_array: clearing a missing entry");
    end
  end

endmodule
