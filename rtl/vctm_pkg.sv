// vctm_pkg -- shared types and constants of the Virtual Circuit Tree
// Multicasting (VCTM) network.
//
// The network is a 4x4 mesh of five-port routers. Node n sits at column
// x = n % MESH_X and row y = n / MESH_X; row 0 is the north edge, so "South"
// means y+1 and "East" means x+1.
//
// Every flit is one 128-bit channel word (16-byte links). Its top 22 bits are
// the header of the published encoding, most significant field first:
//   Head/Body/Tail (2) | MC/UC (2) | Id (1) | VCT# = {src, tree} (10) |
//   UC Dst (4) | VC# (3) | payload (106)
// The packet type codes 00 normal unicast, 01 unicast+setup and 10 multicast
// and the head code 00 are the published ones. The body, tail and single-flit
// codes are this design's choice. In this design the VC# field and the
// Head/Body/Tail field are meaningful in every flit; the other header fields
// only in a head flit. The 10-bit VCT# field always carries the source node
// (upper 4 bits) and the tree number local to that source (lower 6 bits); a
// normal unicast is routed from its UC Dst field, so it does not need the
// lookahead route encoding there.
//
// Router port order follows the columns of the virtual circuit tree table:
// Ej (local/ejection), N, S, E, W.
package vctm_pkg;

  // ---------------- network size ----------------
  localparam int MESH_X    = 4;
  localparam int MESH_Y    = 4;
  localparam int NODES     = MESH_X * MESH_Y;      // 16
  localparam int NODE_W    = $clog2(NODES);        // 4

  // ---------------- router ----------------
  localparam int NUM_PORTS   = 5;                  // Ej, N, S, E, W
  localparam int PORT_W      = 3;
  localparam int NUM_VCS     = 4;                  // virtual channels per port
  localparam int VC_IDX_W    = $clog2(NUM_VCS);    // 2
  localparam int BUF_PER_PORT = 24;                // flit buffers per input port
  localparam int FORK_W      = 3;                  // output-port count field

  // ---------------- virtual circuit trees ----------------
  localparam int VCT_TOTAL   = 1024;               // entries per router table
  localparam int VCT_PER_SRC = VCT_TOTAL / NODES;  // 64 trees per source
  localparam int TREE_W      = $clog2(VCT_PER_SRC);// 6
  localparam int VCTID_W     = NODE_W + TREE_W;    // 10

  // ---------------- flit ----------------
  localparam int FLIT_W      = 128;                // 16-byte channel
  localparam int HDR_VC_W    = 3;                  // VC# header field
  localparam int HDR_W       = 2 + 2 + 1 + VCTID_W + NODE_W + HDR_VC_W; // 22
  localparam int PAYLOAD_W   = FLIT_W - HDR_W;     // 106
  localparam int MAX_PKT_LEN = 5;                  // data packets are 5 flits
  localparam int LEN_W       = 3;

  typedef enum logic [1:0] {
    FT_HEAD   = 2'b00,
    FT_BODY   = 2'b01,
    FT_TAIL   = 2'b10,
    FT_SINGLE = 2'b11    // head and tail in one flit
  } flit_kind_e;

  typedef enum logic [1:0] {
    PT_NORMAL = 2'b00,   // normal unicast, dimension-order routed
    PT_SETUP  = 2'b01,   // unicast that also adds its destination to a tree
    PT_MC     = 2'b10,   // multicast, routed by its tree
    PT_RSVD   = 2'b11
  } pkt_type_e;

  typedef enum logic [PORT_W-1:0] {
    P_EJ = 3'd0,
    P_N  = 3'd1,
    P_S  = 3'd2,
    P_E  = 3'd3,
    P_W  = 3'd4
  } port_e;

  typedef struct packed {
    logic [NODE_W-1:0] src;
    logic [TREE_W-1:0] tree;
  } vct_id_t;

  typedef struct packed {
    flit_kind_e             kind;
    pkt_type_e              ptype;
    logic                   id;
    vct_id_t                vct;
    logic [NODE_W-1:0]      dst;
    logic [HDR_VC_W-1:0]    vc;
    logic [PAYLOAD_W-1:0]   payload;
  } flit_t;

  // One direction of a link: a flit and its valid bit.
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  // Credit returned upstream when a buffer slot of a VC is freed.
  typedef struct packed {
    logic                valid;
    logic [VC_IDX_W-1:0] vc;
  } credit_t;

  // One virtual circuit tree table entry, 9 bits as in the published table:
  // Id, one bit per output port (Ej, N, S, E, W), and the fork (port) count.
  typedef struct packed {
    logic                  id;
    logic [NUM_PORTS-1:0]  ports;   // bit p = port_e p
    logic [FORK_W-1:0]     fork_cnt;
  } vct_entry_t;

  // A buffered flit with the route worked out when it was written: the set
  // of output ports and how many there are.
  typedef struct packed {
    flit_t                 flit;
    logic [NUM_PORTS-1:0]  route;
    logic [FORK_W-1:0]     fork_cnt;
  } buf_entry_t;

  function automatic logic is_head(flit_kind_e k);
    return (k == FT_HEAD) || (k == FT_SINGLE);
  endfunction

  function automatic logic is_tail(flit_kind_e k);
    return (k == FT_TAIL) || (k == FT_SINGLE);
  endfunction

endpackage
