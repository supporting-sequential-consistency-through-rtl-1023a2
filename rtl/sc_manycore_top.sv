// sc_manycore_top: 16-node many-core that keeps sequential consistency by
// ordering memory requests inside the network instead of fencing at the cores.
//
// Layout (node = y*4 + x, 4x4 mesh):
//     y=0   C0  C1  C2  C3
//     y=1   MC0 M0  M1  MC1
//     y=2   MC2 M2  M3  MC3
//     y=3   C4  C5  C6  C7
// C = core node (core_ni, the core itself sits outside on the core_* ports),
// M = shared cache bank node (ordering_ni + shared_cache_bank, linked by the
// token ring), MC = memory controller node (router port brought out on mc_*).
//
// A core's request gets (CoreID, ReqID), travels on a circuit reserved in the
// routers' slot tables to the bank owning its address, waits in that bank's
// reorder array until the bank holds the core's token with that ReqID, is
// performed, and is answered by a packet. Cores never wait for one request to
// complete before issuing the next (up to a window of WIN), yet every core's
// requests are performed in program order across all banks, and critical
// sections (requests marked cs, closed by cs_last) are performed whole.
//
// The slot counter that all routers share lives here; it counts 0..SLOTS-1.
// Defaults: 8 cores, 4 banks, 4 memory controllers (the 16-node configuration
// of the document); SLOTS, WIN, LSQ_D and WORDS are this design's choices.
module sc_manycore_top
  import scnoc_pkg::*;
#(
  parameter int unsigned SLOTS = 50,
  parameter int unsigned WIN   = 4,
  parameter int unsigned LSQ_D = 4,
  parameter int unsigned WORDS = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // core ports
  input  logic [NCORE-1:0]        core_req_valid,
  output logic [NCORE-1:0]        core_req_ready,
  input  logic [NCORE-1:0]        core_req_we,
  input  logic [ADDR_W-1:0]       core_req_addr     [NCORE],
  input  logic [DATA_W-1:0]       core_req_data     [NCORE],
  input  logic [NCORE-1:0]        core_req_cs,
  input  logic [NCORE-1:0]        core_req_cs_last,
  output logic [RID_W-1:0]        core_req_rid      [NCORE],
  input  logic [NCORE-1:0]        core_setup_valid,
  input  logic [3:0]              core_setup_bank   [NCORE],
  output logic [NCORE-1:0]        core_resp_valid,
  output logic [RID_W-1:0]        core_resp_rid     [NCORE],
  output logic [NCORE-1:0]        core_resp_we,
  output logic [DATA_W-1:0]       core_resp_data    [NCORE],
  // memory controller nodes: router local ports
  input  flit_t                   mc_to_rtr         [NMC],
  output logic [NMC-1:0]          mc_to_rtr_rdy,
  output flit_t                   mc_from_rtr       [NMC],
  input  logic [NMC-1:0]          mc_from_rtr_rdy,
  // status and events
  output logic [SLOT_W-1:0]       slot_now,
  output logic [NCORE*NBANK-1:0]  circ_open,        // core c, bank b at c*NBANK+b
  output logic [MESH_X*MESH_Y-1:0] ev_circ,
  output logic [MESH_X*MESH_Y-1:0] ev_reserve,
  output logic [MESH_X*MESH_Y-1:0] ev_rtr_nack,
  output logic [MESH_X*MESH_Y-1:0] ev_free,
  output logic [NCORE-1:0]        ev_setup,
  output logic [NCORE-1:0]        ev_nack,
  output logic [NCORE-1:0]        ev_tear,
  output logic [NCORE-1:0]        ev_win_stall,
  output logic [NBANK-1:0]        ev_service,
  output logic [NBANK-1:0]        ev_wait,
  output logic [NBANK-1:0]        ev_cs_block,
  output logic [NBANK-1:0]        ev_hold
);

  localparam int unsigned N = MESH_X * MESH_Y;

  // ------------------------------------------------------- TDM slot counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               slot_now <= '0;
    else if (slot_now == SLOT_W'(SLOTS - 1))  slot_now <= '0;
    else                                      slot_now <= slot_now + 1'b1;
  end

  // ------------------------------------------------------------------- mesh
  flit_t         loc_in  [N];
  flit_t         loc_out [N];
  logic [N-1:0]  loc_in_rdy, loc_out_rdy;

  mesh_noc #(.NX (MESH_X), .NY (MESH_Y), .SLOTS (SLOTS)) u_noc (
    .clk, .rst_n, .cur_slot (slot_now),
    .loc_in, .loc_in_rdy, .loc_out, .loc_out_rdy,
    .ev_circ, .ev_reserve, .ev_nack (ev_rtr_nack), .ev_free
  );

  // ------------------------------------------------------------ core nodes
  for (genvar c = 0; c < NCORE; c++) begin : g_core
    localparam int unsigned NODE = core_node(c);
    logic [$clog2(WIN+1)-1:0] outst;

    core_ni #(
      .CORE_ID (c), .NODE (NODE), .NBANK_P (NBANK), .SLOTS (SLOTS),
      .WIN (WIN), .LSQ_D (LSQ_D)
    ) u_ni (
      .clk, .rst_n, .cur_slot (slot_now),
      .req_valid (core_req_valid[c]), .req_ready (core_req_ready[c]),
      .req_we (core_req_we[c]), .req_addr (core_req_addr[c]),
      .req_data (core_req_data[c]), .req_cs (core_req_cs[c]),
      .req_cs_last (core_req_cs_last[c]), .req_rid (core_req_rid[c]),
      .setup_valid (core_setup_valid[c]), .setup_bank (core_setup_bank[c]),
      .resp_valid (core_resp_valid[c]), .resp_rid (core_resp_rid[c]),
      .resp_we (core_resp_we[c]), .resp_data (core_resp_data[c]),
      .to_rtr (loc_in[NODE]), .to_rtr_rdy (loc_in_rdy[NODE]),
      .from_rtr (loc_out[NODE]), .from_rtr_rdy (loc_out_rdy[NODE]),
      .circ_open (circ_open[c*NBANK +: NBANK]), .outstanding (outst),
      .ev_setup (ev_setup[c]), .ev_nack (ev_nack[c]), .ev_tear (ev_tear[c]),
      .ev_win_stall (ev_win_stall[c])
    );
  end

  // ------------------------------------------------- bank nodes, token ring
  flit_t             bank_from [NBANK];
  flit_t             bank_to   [NBANK];
  logic [NBANK-1:0]  bank_from_rdy, bank_to_rdy;

  token_ring_memory #(
    .NC (NCORE), .NB (NBANK), .DEPTH (WIN), .WORDS (WORDS)
  ) u_mem (
    .clk, .rst_n,
    .from_rtr (bank_from), .from_rtr_rdy (bank_from_rdy),
    .to_rtr (bank_to), .to_rtr_rdy (bank_to_rdy),
    .ev_service, .ev_wait, .ev_cs_block, .ev_hold
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    localparam int unsigned NODE = bank_node(b);
    assign bank_from[b]      = loc_out[NODE];
    assign loc_out_rdy[NODE] = bank_from_rdy[b];
    assign loc_in[NODE]      = bank_to[b];
    assign bank_to_rdy[b]    = loc_in_rdy[NODE];
  end

  // -------------------------------------------- memory controller nodes
  for (genvar m = 0; m < NMC; m++) begin : g_mc
    localparam int unsigned NODE = mc_node(m);
    assign loc_in[NODE]      = mc_to_rtr[m];
    assign mc_to_rtr_rdy[m]  = loc_in_rdy[NODE];
    assign mc_from_rtr[m]    = loc_out[NODE];
    assign loc_out_rdy[NODE] = mc_from_rtr_rdy[m];
  end

endmodule
