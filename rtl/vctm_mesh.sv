// vctm_mesh -- a MESH_X x MESH_Y (4x4) mesh of VCTM routers, one network
// interface per tile.
//
// Router n (row-major numbering, row 0 at the north edge) connects its E port
// to the W port of router n+1 and its S port to the N port of router
// n+MESH_X; credits run the other way on each link. Ports at the edge of the
// mesh are tied off: no flit ever arrives there and X-Y routing never sends
// one there. Each router's Ej port connects to its tile's interface (vctm_nic).
//
// Top-level ports, one element per tile: a message request (destination set,
// length, payload, with valid/ready), the flits delivered to the tile
// (rx_valid, rx_flit) and the message-kind event pulses of the interface.
// A flit takes two cycles per router with no contention, plus one cycle in
// the injecting interface's register.
module vctm_mesh
  import vctm_pkg::*;
#(
  parameter int unsigned CAM_ENTRIES = VCT_PER_SRC
)(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NODES-1:0]                req_valid,
  output logic [NODES-1:0]                req_ready,
  input  logic [NODES-1:0][NODES-1:0]     req_dests,
  input  logic [NODES-1:0][LEN_W-1:0]     req_len,
  input  logic [NODES-1:0][PAYLOAD_W-1:0] req_payload,
  output logic [NODES-1:0]                rx_valid,
  output flit_t [NODES-1:0]               rx_flit,
  output logic [NODES-1:0]                ev_unicast,
  output logic [NODES-1:0]                ev_mc_hit,
  output logic [NODES-1:0]                ev_mc_setup
);
  link_t   [NODES-1:0][NUM_PORTS-1:0] r_in, r_out;
  credit_t [NODES-1:0][NUM_PORTS-1:0] r_in_cr, r_out_cr;
  link_t   [NODES-1:0]                rx_link;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    localparam int X = n % MESH_X;
    localparam int Y = n / MESH_X;

    vctm_router #(.NODE_ID(n)) u_router (
      .clk, .rst_n,
      .in_link    (r_in[n]),
      .in_credit  (r_in_cr[n]),
      .out_link   (r_out[n]),
      .out_credit (r_out_cr[n])
    );

    vctm_nic #(.NODE_ID(n), .CAM_ENTRIES(CAM_ENTRIES)) u_nic (
      .clk, .rst_n,
      .req_valid   (req_valid[n]),
      .req_ready   (req_ready[n]),
      .req_dests   (req_dests[n]),
      .req_len     (req_len[n]),
      .req_payload (req_payload[n]),
      .rx_link     (rx_link[n]),
      .inj_link    (r_in[n][P_EJ]),
      .inj_credit  (r_in_cr[n][P_EJ]),
      .ej_link     (r_out[n][P_EJ]),
      .ej_credit   (r_out_cr[n][P_EJ]),
      .ev_unicast  (ev_unicast[n]),
      .ev_mc_hit   (ev_mc_hit[n]),
      .ev_mc_setup (ev_mc_setup[n])
    );

    assign rx_valid[n] = rx_link[n].valid;
    assign rx_flit[n]  = rx_link[n].flit;

    // flits into this router, credits back into it from its neighbours
    if (Y > 0) begin : g_n
      assign r_in[n][P_N]     = r_out[n-MESH_X][P_S];
      assign r_out_cr[n][P_N] = r_in_cr[n-MESH_X][P_S];
    end else begin : g_n_edge
      assign r_in[n][P_N]     = '0;
      assign r_out_cr[n][P_N] = '0;
    end
    if (Y < MESH_Y - 1) begin : g_s
      assign r_in[n][P_S]     = r_out[n+MESH_X][P_N];
      assign r_out_cr[n][P_S] = r_in_cr[n+MESH_X][P_N];
    end else begin : g_s_edge
      assign r_in[n][P_S]     = '0;
      assign r_out_cr[n][P_S] = '0;
    end
    if (X < MESH_X - 1) begin : g_e
      assign r_in[n][P_E]     = r_out[n+1][P_W];
      assign r_out_cr[n][P_E] = r_in_cr[n+1][P_W];
    end else begin : g_e_edge
      assign r_in[n][P_E]     = '0;
      assign r_out_cr[n][P_E] = '0;
    end
    if (X > 0) begin : g_w
      assign r_in[n][P_W]     = r_out[n-1][P_E];
      assign r_out_cr[n][P_W] = r_in_cr[n-1][P_E];
    end else begin : g_w_edge
      assign r_in[n][P_W]     = '0;
      assign r_out_cr[n][P_W] = '0;
    end
  end
endmodule
