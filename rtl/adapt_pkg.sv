// adapt_pkg: types and constants shared by every Adapt-NoC module.
//
// The network is an 8x8 mesh of adaptable routers (the size the design is
// evaluated at). Each router has five ports (local, east, west, north, south),
// two virtual networks (request and reply, to keep protocol deadlock away),
// two virtual channels per virtual network and four flits per virtual channel,
// all as evaluated for Adapt-NoC. Links are 256 bits wide. Packets are single
// flits here (a design choice: the buffer organisation is virtual cut-through,
// so a whole packet is always accepted or refused at once).
//
// Coordinates: x grows towards east, y grows towards south. Node id = y*8+x.
// A node is a core or memory controller; normally each node has its own
// router, but in a concentrated mesh (cmesh) subNoC the four nodes of an
// aligned 2x2 block share the router at the block's north-west corner.
package adapt_pkg;

  localparam int MESH_X    = 8;
  localparam int MESH_Y    = 8;
  localparam int NODES     = MESH_X * MESH_Y;
  localparam int NODE_W    = $clog2(NODES);
  localparam int XW        = $clog2(MESH_X);
  localparam int YW        = $clog2(MESH_Y);

  localparam int NUM_PORTS = 5;
  localparam int NUM_VNET  = 2;
  localparam int VC_PER_VN = 2;
  localparam int NUM_VC    = NUM_VNET * VC_PER_VN;
  localparam int VC_W      = $clog2(NUM_VC);
  localparam int VC_DEPTH  = 4;

  localparam int FLIT_W    = 256;

  // Up to eight subNoCs: one RL controller per 2x4 block of the 8x8 NoC.
  localparam int MAX_SUBNOC = 8;
  localparam int SN_W       = $clog2(MAX_SUBNOC);

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_E     = 3'd1,
    P_W     = 3'd2,
    P_N     = 3'd3,
    P_S     = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    TOPO_MESH  = 2'd0,
    TOPO_CMESH = 2'd1,
    TOPO_TORUS = 2'd2,
    TOPO_TREE  = 2'd3
  } topo_e;

  localparam int HDR_W = 2*NODE_W + 2 + 16;

  typedef struct packed {
    logic [15:0]       tag;     // free for the sender (sequence number, etc.)
    logic              is_data; // data packet (1) or coherence/control (0)
    logic              vnet;    // 0: request network, 1: reply network
    logic [NODE_W-1:0] src;
    logic [NODE_W-1:0] dst;
  } hdr_t;

  typedef struct packed {
    logic [FLIT_W-HDR_W-1:0] payload;
    hdr_t                    hdr;
  } flit_t;

  // One direction of a link: a flit with the virtual channel it is written to.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
    flit_t           flit;
  } link_t;

  // Credit returned upstream when a buffer slot of virtual channel vc frees.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  // Routing-table entry: output port, and whether the flit leaves on the
  // adaptable (express) link of that port instead of its mesh link.
  typedef struct packed {
    logic  express;
    port_e port;
  } rte_t;

  // Per-port wiring set by the link controller.
  typedef struct packed {
    logic in_exp;   // input mux: 1 = adaptable link, 0 = mesh link
    logic in_ch;    // adaptable channel (0/1) the input listens to
    logic in_dir;   // direction the data travels on it (0 = to higher index)
    logic out_exp;  // this port may drive an adaptable channel
    logic out_ch;
    logic out_dir;
  } portcfg_t;

  typedef struct packed {
    logic             valid;
    logic [XW-1:0]    x0;
    logic [YW-1:0]    y0;
    logic [XW:0]      w;
    logic [YW:0]      h;
  } region_t;

  function automatic logic [NODE_W-1:0] node_id(input int x, input int y);
    return NODE_W'(y * MESH_X + x);
  endfunction

  function automatic logic same_dim(input port_e a, input port_e b);
    return ((a == P_E || a == P_W) && (b == P_E || b == P_W)) ||
           ((a == P_N || a == P_S) && (b == P_N || b == P_S));
  endfunction

endpackage
