// mesh_noc: NX x NY mesh of hybrid circuit/packet routers.
//
// Node n = y*NX + x holds router (x, y). Neighbouring routers are joined by
// one link in each direction; each link carries a flit register and a ready
// signal that flows back for packet traffic (circuit flits never wait). The
// routers share one slot counter, cur_slot, so a circuit reserved in slot s at
// one router continues in slot s+1 at the next. Links on the mesh border are
// tied off. The local port of every node is brought out as loc_* arrays; the
// network interfaces of cores, cache banks and memory controllers attach
// there. ev_* gather the routers' event pulses, one bit per node.
//
// The 2D mesh joining routers that can switch both circuits and packets is
// the document's; link registers and the border tie-off are this design's.
module mesh_noc
  import scnoc_pkg::*;
#(
  parameter int unsigned NX     = MESH_X,
  parameter int unsigned NY     = MESH_Y,
  parameter int unsigned SLOTS  = 50,
  parameter int unsigned FIFO_D = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SLOT_W-1:0]   cur_slot,
  input  flit_t               loc_in      [NX*NY],
  output logic [NX*NY-1:0]    loc_in_rdy,
  output flit_t               loc_out     [NX*NY],
  input  logic [NX*NY-1:0]    loc_out_rdy,
  output logic [NX*NY-1:0]    ev_circ,
  output logic [NX*NY-1:0]    ev_reserve,
  output logic [NX*NY-1:0]    ev_nack,
  output logic [NX*NY-1:0]    ev_free
);

  localparam int unsigned N = NX * NY;

  // per router, per port
  flit_t             rin   [N][NPORT];
  flit_t             rout  [N][NPORT];
  logic [NPORT-1:0]  rirdy [N];
  logic [NPORT-1:0]  rordy [N];
  logic [NPORT-1:0]  e_circ [N], e_res [N], e_nack [N], e_free [N];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned n = y * NX + x;

      hybrid_router #(
        .X (x), .Y (y), .NX (NX), .NY (NY), .SLOTS (SLOTS), .FIFO_D (FIFO_D)
      ) u_rtr (
        .clk, .rst_n, .cur_slot,
        .in_flit (rin[n]), .in_rdy (rirdy[n]),
        .out_flit (rout[n]), .out_rdy (rordy[n]),
        .ev_circ (e_circ[n]), .ev_reserve (e_res[n]),
        .ev_nack (e_nack[n]), .ev_free (e_free[n])
      );

      // local port
      assign rin[n][P_LOC]   = loc_in[n];
      assign loc_in_rdy[n]   = rirdy[n][P_LOC];
      assign loc_out[n]      = rout[n][P_LOC];
      assign rordy[n][P_LOC] = loc_out_rdy[n];

      // north neighbour (y-1): its south output feeds our north input
      if (y > 0) begin : g_n
        assign rin[n][P_N]   = rout[n-NX][P_S];
        assign rordy[n][P_N] = rirdy[n-NX][P_S];
      end else begin : g_nb
        assign rin[n][P_N]   = FLIT_NONE;
        assign rordy[n][P_N] = 1'b1;
      end
      if (y < NY - 1) begin : g_s
        assign rin[n][P_S]   = rout[n+NX][P_N];
        assign rordy[n][P_S] = rirdy[n+NX][P_N];
      end else begin : g_sb
        assign rin[n][P_S]   = FLIT_NONE;
        assign rordy[n][P_S] = 1'b1;
      end
      if (x < NX - 1) begin : g_e
        assign rin[n][P_E]   = rout[n+1][P_W];
        assign rordy[n][P_E] = rirdy[n+1][P_W];
      end else begin : g_eb
        assign rin[n][P_E]   = FLIT_NONE;
        assign rordy[n][P_E] = 1'b1;
      end
      if (x > 0) begin : g_w
        assign rin[n][P_W]   = rout[n-1][P_E];
        assign rordy[n][P_W] = rirdy[n-1][P_E];
      end else begin : g_wb
        assign rin[n][P_W]   = FLIT_NONE;
        assign rordy[n][P_W] = 1'b1;
      end

      assign ev_circ[n]    = |e_circ[n];
      assign ev_reserve[n] = |e_res[n];
      assign ev_nack[n]    = |e_nack[n];
      assign ev_free[n]    = |e_free[n];
    end
  end

endmodule
