// vctm_router -- five-port virtual-channel router with Virtual Circuit Tree
// Multicasting.
//
// Ports are Ej (the local network interface), N, S, E and W. Each input has
// NUM_VCS virtual channels sharing BUF_PER_PORT flit slots (input_buffer).
// Three packet types are handled:
//   * normal unicast: routed X-Y (xy_route) from its destination field;
//   * unicast+setup: routed X-Y like a unicast, and in passing it adds its
//     X-Y output port to the tree's entry in the VCT table (vct_table);
//   * multicast: its output ports are read from the VCT table, indexed by the
//     {source, tree} number in its header; the flit is copied to each of them.
//
// Pipeline. In the cycle a head flit arrives its route is computed (X-Y
// logic, or the VCT table read for a multicast) and written into the buffer
// next to the flit. This stands for the published lookahead, which performs
// routing ahead of the flit and leaves VA/SA and ST as the router's two
// stages. From the next cycle on the flit competes in combined VC and switch
// allocation (vc_allocator, switch_allocator), crosses the crossbar in the same
// cycle and is captured in the output register, which drives the link. With
// no contention a flit thus spends two cycles per hop: arrival/buffer write,
// then allocation + switch traversal, the register being the link.
//
// Multicast replication. A buffered flit requests one of its outstanding
// output ports per cycle and stays in the buffer until the number of grants
// equals the fork count of its route (1 for unicasts, the VCT entry's count for
// multicasts). Only then is it removed and a credit returned upstream. Each
// branch of a multicast packet gets its own downstream VC, allocated with its
// head flit and released by its tail flit; body flits follow on the VCs their
// head obtained. No resources are reserved ahead of a packet.
//
// Interface: in_link/in_credit towards the upstream neighbours (credits are
// combinational, in the cycle a slot is freed); out_link (registered) and
// out_credit (credits coming back from the downstream neighbours). Edge ports
// of the mesh are simply left unconnected by the top level.
module vctm_router
  import vctm_pkg::*;
#(
  parameter int unsigned NODE_ID = 0
)(
  input  logic                      clk,
  input  logic                      rst_n,
  input  link_t   [NUM_PORTS-1:0]   in_link,
  output credit_t [NUM_PORTS-1:0]   in_credit,
  output link_t   [NUM_PORTS-1:0]   out_link,
  input  credit_t [NUM_PORTS-1:0]   out_credit
);
  localparam int NP = NUM_PORTS;
  localparam int NV = NUM_VCS;
  localparam int VW = VC_IDX_W;
  localparam int IW = $clog2(NP);

  // ---------------------------------------------------------------- routing
  logic [NP-1:0]              acc_valid, acc_setup, acc_id;
  logic [NP-1:0][VCTID_W-1:0] acc_idx;
  logic [NP-1:0][NP-1:0]      xy_mask;
  vct_entry_t [NP-1:0]        vct_rd;
  buf_entry_t [NP-1:0]        push_data;

  for (genvar p = 0; p < NP; p++) begin : g_rc
    xy_route u_xy (
      .cur_node  (NODE_W'(NODE_ID)),
      .dst_node  (in_link[p].flit.dst),
      .port_mask (xy_mask[p])
    );
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      acc_valid[p] = in_link[p].valid && is_head(in_link[p].flit.kind)
                     && (in_link[p].flit.ptype == PT_SETUP || in_link[p].flit.ptype == PT_MC);
      acc_setup[p] = (in_link[p].flit.ptype == PT_SETUP);
      acc_idx[p]   = in_link[p].flit.vct;
      acc_id[p]    = in_link[p].flit.id;
    end
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      push_data[p].flit = in_link[p].flit;
      if (in_link[p].flit.ptype == PT_MC) begin
        push_data[p].route    = vct_rd[p].ports;
        push_data[p].fork_cnt = vct_rd[p].fork_cnt;
      end else begin
        push_data[p].route    = xy_mask[p];
        push_data[p].fork_cnt = FORK_W'(1);
      end
    end
  end

  vct_table #(.N_ENTRIES(VCT_TOTAL), .N_CH(NP)) u_vct (
    .clk, .rst_n,
    .acc_valid, .acc_setup, .acc_idx, .acc_id,
    .acc_port_mask (xy_mask),
    .rd_entry      (vct_rd)
  );

  // ---------------------------------------------------------------- buffers
  buf_entry_t [NP-1:0][NV-1:0] front;
  logic       [NP-1:0][NV-1:0] not_empty;
  logic       [NP-1:0]         pop;
  logic       [NP-1:0][VW-1:0] pop_vc;

  for (genvar p = 0; p < NP; p++) begin : g_ib
    input_buffer #(.N_VC(NV), .N_SLOTS(BUF_PER_PORT)) u_ib (
      .clk, .rst_n,
      .push      (in_link[p].valid),
      .push_vc   (in_link[p].flit.vc[VW-1:0]),
      .push_data (push_data[p]),
      .pop       (pop[p]),
      .pop_vc    (pop_vc[p]),
      .front     (front[p]),
      .not_empty (not_empty[p]),
      .credit_out(in_credit[p])
    );
  end

  // ------------------------------------------------------ per input VC state
  logic [NP-1:0][NV-1:0][NP-1:0]         cur_route;   // route of current packet
  logic [NP-1:0][NV-1:0][FORK_W-1:0]     cur_fork;
  logic [NP-1:0][NV-1:0][NP-1:0]         done_mask;   // ports served, this flit
  logic [NP-1:0][NV-1:0][FORK_W-1:0]     gcnt;        // grants, this flit
  logic [NP-1:0][NV-1:0][NP-1:0]         ovc_valid;   // downstream VC held
  logic [NP-1:0][NV-1:0][NP-1:0][VW-1:0] ovc;

  // ------------------------------------------------------------ allocation
  logic [NP-1:0]           has_free;
  logic [NP-1:0][VW-1:0]   free_vc;
  logic [NP-1:0][NV-1:0]   credit_ok;

  logic [NP-1:0][NV-1:0]             req_valid;
  logic [NP-1:0][NV-1:0][PORT_W-1:0] req_port;
  logic [NP-1:0][NV-1:0][NP-1:0]     route_now;
  logic [NP-1:0][NV-1:0][FORK_W-1:0] fork_now;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      for (int v = 0; v < NV; v++) begin
        logic hd;
        logic [NP-1:0] rem;
        hd = is_head(front[p][v].flit.kind);
        route_now[p][v] = hd ? front[p][v].route    : cur_route[p][v];
        fork_now[p][v]  = hd ? front[p][v].fork_cnt : cur_fork[p][v];
        rem = route_now[p][v] & ~done_mask[p][v];
        req_valid[p][v] = 1'b0;
        req_port[p][v]  = '0;
        for (int o = 0; o < NP; o++) begin
          logic ok;
          ok = ovc_valid[p][v][o] ? credit_ok[o][ovc[p][v][o]]
                                  : (hd && has_free[o]);
          if (!req_valid[p][v] && not_empty[p][v] && rem[o] && ok) begin
            req_valid[p][v] = 1'b1;
            req_port[p][v]  = PORT_W'(o);
          end
        end
      end
    end
  end

  logic [NP-1:0]              in_gnt;
  logic [NP-1:0][VW-1:0]      in_gnt_vc;
  logic [NP-1:0][PORT_W-1:0]  in_gnt_port;
  logic [NP-1:0]              out_used;
  logic [NP-1:0][IW-1:0]      out_sel;

  switch_allocator #(.N_IN(NP), .N_OUT(NP), .N_VC(NV)) u_sa (
    .clk, .rst_n,
    .req_valid, .req_port,
    .in_gnt, .in_gnt_vc, .in_gnt_port,
    .out_used, .out_sel
  );

  // What each winning input sends: its flit with the downstream VC filled in.
  flit_t [NP-1:0]          xb_in;
  logic  [NP-1:0]          in_alloc;    // winner takes a new downstream VC
  logic  [NP-1:0][VW-1:0]  in_ovc;
  logic  [NP-1:0]          in_last;     // this grant completes the flit

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      logic [VW-1:0] v;
      int unsigned   o;
      v = in_gnt_vc[p];
      o = int'(in_gnt_port[p]);
      in_alloc[p] = !ovc_valid[p][v][o];
      in_ovc[p]   = in_alloc[p] ? free_vc[o] : ovc[p][v][o];
      in_last[p]  = in_gnt[p] && (gcnt[p][v] + FORK_W'(1) == fork_now[p][v]);
      xb_in[p]    = front[p][v].flit;
      xb_in[p].vc = HDR_VC_W'(in_ovc[p]);
      pop[p]      = in_last[p];
      pop_vc[p]   = v;
    end
  end

  link_t [NP-1:0] xb_out;

  crossbar #(.N_IN(NP), .N_OUT(NP)) u_xb (
    .in_flit  (xb_in),
    .out_used (out_used),
    .out_sel  (out_sel),
    .out_link (xb_out)
  );

  logic [NP-1:0]         send_alloc, send_tail;
  logic [NP-1:0][VW-1:0] send_vc;

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      send_vc[o]    = in_ovc[out_sel[o]];
      send_alloc[o] = in_alloc[out_sel[o]];
      send_tail[o]  = is_tail(xb_out[o].flit.kind);
    end
  end

  vc_allocator #(.N_OUT(NP), .N_VC(NV), .N_SLOTS(BUF_PER_PORT)) u_va (
    .clk, .rst_n,
    .credit_in  (out_credit),
    .send_valid (out_used),
    .send_vc, .send_alloc, .send_tail,
    .has_free, .free_vc, .credit_ok
  );

  // --------------------------------------------------------- state update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_route <= '0;
      cur_fork  <= '0;
      done_mask <= '0;
      gcnt      <= '0;
      ovc_valid <= '0;
      ovc       <= '0;
      out_link  <= '0;
    end else begin
      out_link <= xb_out;
      for (int p = 0; p < NP; p++) begin
        if (in_gnt[p]) begin
          logic [VW-1:0] v;
          int unsigned   o;
          v = in_gnt_vc[p];
          o = int'(in_gnt_port[p]);
          cur_route[p][v] <= route_now[p][v];
          cur_fork[p][v]  <= fork_now[p][v];
          if (in_alloc[p]) begin
            ovc_valid[p][v][o] <= 1'b1;
            ovc[p][v][o]       <= in_ovc[p];
          end
          if (in_last[p]) begin
            done_mask[p][v] <= '0;
            gcnt[p][v]      <= '0;
            if (is_tail(front[p][v].flit.kind)) ovc_valid[p][v] <= '0;
          end else begin
            done_mask[p][v][o] <= 1'b1;
            gcnt[p][v]         <= gcnt[p][v] + FORK_W'(1);
          end
        end
      end
    end
  end

  // A multicast must hit a set-up tree entry.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NP; p++)
        assert (!(acc_valid[p] && !acc_setup[p]) || vct_rd[p].fork_cnt != '0)
          else $error("vctm_router %0d: multicast for empty tree %0h on port %0d",
                      NODE_ID, acc_idx[p], p);
    end
  end
endmodule
