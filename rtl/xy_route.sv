// xy_route -- dimension-ordered (X first, then Y) unicast route computation.
//
// Given the node this router belongs to and a packet's destination node, it
// returns the single output port the packet takes, as a one-hot mask,: East/West until the column
// matches, then North/South until the row matches, then the ejection port.
// Purely combinational. X-Y routing is the routing algorithm of the network;
// the node numbering (row-major, row 0 at the north edge) is this design's.
//
// Ports: cur_node, dst_node (node numbers); port_mask, one bit per output
// port in the order Ej, N, S, E, W.
module xy_route
  import vctm_pkg::*;
(
  input  logic [NODE_W-1:0]    cur_node,
  input  logic [NODE_W-1:0]    dst_node,
  output logic [NUM_PORTS-1:0] port_mask
);
  int unsigned cx, cy, dx, dy;
  port_e       port;

  always_comb begin
    cx = int'(cur_node) % MESH_X;
    cy = int'(cur_node) / MESH_X;
    dx = int'(dst_node) % MESH_X;
    dy = int'(dst_node) / MESH_X;
    if      (dx > cx) port = P_E;
    else if (dx < cx) port = P_W;
    else if (dy > cy) port = P_S;
    else if (dy < cy) port = P_N;
    else              port = P_EJ;
    port_mask = NUM_PORTS'(1) << port;
  end
endmodule
