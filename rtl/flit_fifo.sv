// flit_fifo: small synchronous first-in first-out buffer of flits.
//
// Used for the packet-switched input buffers of the routers and for the
// response queue of the memory-side interface. push writes in_flit at the
// tail, pop removes the head; head/not_empty show the oldest entry in the same
// cycle. count is the number of entries held. Pushing into a full buffer or
// popping an empty one is a protocol error and is asserted against. Depth and
// the buffer itself are this design's choice: the document calls for buffers
// at the network interfaces but gives no sizes.
module flit_fifo
  import scnoc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        push,
  input  flit_t                       in_flit,
  input  logic                        pop,
  output flit_t                       head,
  output logic                        not_empty,
  output logic [$clog2(DEPTH+1)-1:0]  count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;

  assign head      = mem[rd_ptr];
  assign not_empty = (count != 0);

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= FLIT_NONE;
    end else begin
      if (push) begin
        mem[wr_ptr] <= in_flit;
        wr_ptr      <= incr(wr_ptr);
      end
      if (pop) rd_ptr <= incr(rd_ptr);
      count <= count + (push ? 1'b1 : 1'b0) - (pop ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(push && !pop && count == DEPTH)) else $error("flit_fifo overflow");
      assert (!(pop && count == 0)) else $error("flit_fifo underflow");
    end
  end

endmodule
