// slot_table: time-division slot reservation table of one hybrid router.
//
// The link bandwidth of the router is divided into SLOTS time slots that
// repeat. For every input port and every slot the table holds whether a
// circuit is reserved and to which output port it is switched. A flit that
// arrives on a circuit at input p in slot s is sent to output tbl_o[p][s]
// without buffering or arbitration. An output can be owned by at most one
// input in a given slot; the router checks this before it reserves.
//
// Ports, all per input port p:
//   lookup  : cir_v/cir_o give the reservation of input p in slot cur_slot
//             (combinational, used to switch arriving circuit flits).
//   check   : chk_slot/chk_out ask whether input p is free in chk_slot
//             (chk_in_free) and whether output chk_out is unused by any input
//             in chk_slot (chk_out_free); chk_o returns the output input p is
//             reserved to in chk_slot (used by teardown).
//   reserve : res_v writes tbl[p][res_slot] = res_out (effective next cycle).
//   free    : free_v clears tbl[p][free_slot] (effective next cycle).
// Reset clears every entry. The reserve/ack/teardown protocol and the slot
// tables follow the hybrid circuit/packet network the design is built on; the
// default of 50 slots is this design's pick inside the range of slot-table
// sizes the evaluation sweeps.
module slot_table
  import scnoc_pkg::*;
#(
  parameter int unsigned SLOTS = 50,
  parameter int unsigned NP    = NPORT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [SLOT_W-1:0]      cur_slot,
  output logic [NP-1:0]          cir_v,
  output port_t                  cir_o      [NP],
  input  logic [SLOT_W-1:0]      chk_slot   [NP],
  input  port_t                  chk_out    [NP],
  output logic [NP-1:0]          chk_in_free,
  output logic [NP-1:0]          chk_out_free,
  output port_t                  chk_o      [NP],
  input  logic [NP-1:0]          res_v,
  input  logic [SLOT_W-1:0]      res_slot   [NP],
  input  port_t                  res_out    [NP],
  input  logic [NP-1:0]          free_v,
  input  logic [SLOT_W-1:0]      free_slot  [NP]
);

  logic  tbl_v [NP][SLOTS];
  port_t tbl_o [NP][SLOTS];

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      cir_v[p]        = tbl_v[p][cur_slot];
      cir_o[p]        = tbl_o[p][cur_slot];
      chk_in_free[p]  = !tbl_v[p][chk_slot[p]];
      chk_o[p]        = tbl_o[p][chk_slot[p]];
      chk_out_free[p] = 1'b1;
      for (int q = 0; q < NP; q++)
        if (tbl_v[q][chk_slot[p]] && tbl_o[q][chk_slot[p]] == chk_out[p])
          chk_out_free[p] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++)
        for (int s = 0; s < SLOTS; s++) begin
          tbl_v[p][s] <= 1'b0;
          tbl_o[p][s] <= '0;
        end
    end else begin
      for (int p = 0; p < NP; p++) begin
        if (free_v[p]) tbl_v[p][free_slot[p]] <= 1'b0;
        if (res_v[p]) begin
          tbl_v[p][res_slot[p]] <= 1'b1;
          tbl_o[p][res_slot[p]] <= res_out[p];
        end
      end
    end
  end

  // A slot index is always below SLOTS.
  always_ff @(posedge clk) begin
    if (rst_n)
      for (int p = 0; p < NP; p++) begin
        assert (!res_v[p]  || res_slot[p]  < SLOTS) else $error("slot_table: reserve slot out of range");
        assert (!free_v[p] || free_slot[p] < SLOTS) else $error("slot_table: free slot out of range");
      end
  end

endmodule
