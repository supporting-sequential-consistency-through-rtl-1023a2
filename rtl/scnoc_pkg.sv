// scnoc_pkg: types and constants shared by the network-ordered many-core.
//
// The fabric is a 2D mesh that carries two kinds of traffic on the same links:
// packet-switched flits (circuit setup/ack/nack/teardown and memory responses)
// and circuit-switched flits (memory requests from a core to a shared cache
// bank) that follow a path reserved in the time-division slot tables of the
// routers. Every flit is a single wide word (one flit per message); this is a
// choice of this design, the field set (CoreID, ReqID, source, destination,
// slot ID) follows the description of setup messages and request metadata.
//
// Field widths are fixed here, sized for meshes up to 8x8 (64 nodes), 32
// cores and slot tables of up to 256 slots, so one flit type serves every
// configuration; the mesh size, slot-table size and core count are
// parameters of the modules that use it.
//
// The default 4x4 layout (node = y*4 + x) places the cores on the top and
// bottom rows, the shared cache banks in the centre and the memory controllers
// on the left and right columns of the two middle rows.
package scnoc_pkg;

  localparam int unsigned NODE_W = 6;   // node index, up to 64 nodes
  localparam int unsigned CORE_W = 5;   // CoreID, up to 32 cores
  localparam int unsigned RID_W  = 16;  // ReqID, per-core request counter
  localparam int unsigned SLOT_W = 8;   // slot ID, up to 256 slots
  localparam int unsigned HOP_W  = 5;   // hop counter of a setup path
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  // Router ports.
  localparam int unsigned NPORT  = 5;
  localparam int unsigned P_LOC  = 0;
  localparam int unsigned P_N    = 1;   // towards y-1
  localparam int unsigned P_E    = 2;   // towards x+1
  localparam int unsigned P_S    = 3;   // towards y+1
  localparam int unsigned P_W    = 4;   // towards x-1
  typedef logic [2:0] port_t;

  typedef enum logic [2:0] {
    K_REQ   = 3'd0,  // memory request (circuit switched)
    K_RESP  = 3'd1,  // memory response (packet switched)
    K_SETUP = 3'd2,  // circuit setup message
    K_ACK   = 3'd3,  // setup succeeded, back to the source
    K_NACK  = 3'd4,  // setup failed at some router, back to the source
    K_TEAR  = 3'd5   // teardown of a (partial) circuit
  } kind_e;

  typedef struct packed {
    logic                vld;
    logic                circ;     // 1: travels on a reserved circuit
    kind_e               kind;
    logic [NODE_W-1:0]   src;
    logic [NODE_W-1:0]   dst;
    logic [SLOT_W-1:0]   slot;     // setup/teardown: slot at the current router
    logic [HOP_W-1:0]    hops;     // setup: routers reserved; teardown: routers to free
    logic [CORE_W-1:0]   core;     // CoreID of the request
    logic [RID_W-1:0]    rid;      // ReqID of the request
    logic                cs;       // request belongs to a critical section
    logic                cs_last;  // last request of the critical section (lock release)
    logic                we;       // store (1) or load (0)
    logic [ADDR_W-1:0]   addr;
    logic [DATA_W-1:0]   data;
  } flit_t;

  localparam flit_t FLIT_NONE = '0;

  // ---- default 4x4 layout --------------------------------------------------
  localparam int unsigned MESH_X = 4;
  localparam int unsigned MESH_Y = 4;
  localparam int unsigned NCORE  = 8;
  localparam int unsigned NBANK  = 4;
  localparam int unsigned NMC    = 4;

  function automatic logic [NODE_W-1:0] core_node(input int unsigned c);
    // cores 0..3 on row 0, cores 4..7 on row 3
    return NODE_W'((c < 4) ? c : 12 + (c - 4));
  endfunction

  function automatic logic [NODE_W-1:0] bank_node(input int unsigned b);
    // banks at (1,1) (2,1) (1,2) (2,2)
    return NODE_W'((b < 2) ? 5 + b : 9 + (b - 2));
  endfunction

  function automatic logic [NODE_W-1:0] mc_node(input int unsigned m);
    // controllers at (0,1) (3,1) (0,2) (3,2)
    case (m)
      0: return NODE_W'(4);
      1: return NODE_W'(7);
      2: return NODE_W'(8);
      default: return NODE_W'(11);
    endcase
  endfunction

  // Word-interleaved address map: word address modulo the bank count selects
  // the bank, the quotient is the word index inside the bank.
  function automatic int unsigned addr_bank(input logic [ADDR_W-1:0] a, input int unsigned nb);
    return int'(a[ADDR_W-1:2]) % nb;
  endfunction

endpackage
