// vctm_nic -- network interface controller of one tile.
//
// The tile hands it a message with a destination set (one bit per node), a
// length in flits and a payload word. The interface decides how to send it:
//   * one destination: a normal unicast packet;
//   * several destinations, set found in the Destination Set CAM (dest_set_cam):
//     one multicast packet carrying the tree's {source, tree} number;
//   * several destinations, set not found: the oldest tree is replaced and
//     the message is sent as one unicast+setup packet per destination, all
//     with the new tree number and its new Id bit, lowest node first. These
//     packets build the tree in the routers on their way.
// Its own node is removed from the destination set; a message for no other
// node is dropped.
//
// Injection: one flit per cycle into the router's local input port, with
// credit-based flow control on its VCs (a vc_allocator instance counts the
// router's shared buffer slots per VC and picks an idle VC for each packet).
// The flit register drives the link. A new message is accepted (req_ready)
// only when the previous one has been sent completely; the CAM is searched
// in the cycle it is accepted.
// Every flit of a packet carries the message's payload word; the head code
// distinguishes the first flit.
//
// Ejection: flits arriving from the router (ej_link) are passed to the tile
// (rx_link) in the same cycle and a credit is returned at once, so the tile
// must always accept them.
//
// The CAM search, the decomposition into setup unicasts and injecting them in
// consecutive cycles follow the published design; the request interface,
// the payload handling and the lowest-first order are this design's choices.
// The ev_* outputs pulse once per accepted message of each kind.
module vctm_nic
  import vctm_pkg::*;
#(
  parameter int unsigned NODE_ID     = 0,
  parameter int unsigned CAM_ENTRIES = VCT_PER_SRC
)(
  input  logic                  clk,
  input  logic                  rst_n,
  // tile side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic [NODES-1:0]      req_dests,
  input  logic [LEN_W-1:0]      req_len,      // 1..MAX_PKT_LEN flits
  input  logic [PAYLOAD_W-1:0]  req_payload,
  output link_t                 rx_link,
  // router side
  output link_t                 inj_link,
  input  credit_t               inj_credit,
  input  link_t                 ej_link,
  output credit_t               ej_credit,
  // events
  output logic                  ev_unicast,
  output logic                  ev_mc_hit,
  output logic                  ev_mc_setup
);
  localparam int TW = $clog2(CAM_ENTRIES);

  typedef enum logic [1:0] {S_IDLE, S_SEND} state_e;
  typedef enum logic [1:0] {M_UNI, M_MC, M_SETUP} mode_e;

  state_e               state;
  mode_e                mode;
  logic [NODES-1:0]     pending;     // destinations still to send to
  logic [LEN_W-1:0]     len;
  logic [LEN_W-1:0]     fidx;        // flit index inside the packet
  logic [PAYLOAD_W-1:0] payload;
  logic [TW-1:0]        tree;
  logic                 tree_id;
  logic [VC_IDX_W-1:0]  cur_vc;

  // ----------------------------------------------------------- accept
  logic [NODES-1:0] dests;
  logic             cam_hit, cam_hit_id, alloc_id;
  logic [TW-1:0]    cam_hit_tree, alloc_tree;
  logic             accept, multi;
  int unsigned      ndest;

  always_comb begin
    dests = req_dests & ~(NODES'(1) << NODE_ID);
    ndest = $countones(dests);
    multi = (ndest > 1);
  end

  assign req_ready = (state == S_IDLE);
  assign accept    = req_valid && req_ready;

  dest_set_cam #(.N_ENTRIES(CAM_ENTRIES), .MASK_W(NODES)) u_cam (
    .clk, .rst_n,
    .search_mask (dests),
    .hit         (cam_hit),
    .hit_tree    (cam_hit_tree),
    .hit_id      (cam_hit_id),
    .insert      (accept && multi && !cam_hit),
    .insert_mask (dests),
    .alloc_tree  (alloc_tree),
    .alloc_id    (alloc_id)
  );

  assign ev_unicast  = accept && (ndest == 1);
  assign ev_mc_hit   = accept && multi && cam_hit;
  assign ev_mc_setup = accept && multi && !cam_hit;

  // ----------------------------------------------------------- inject
  logic                 has_free;
  logic [VC_IDX_W-1:0]  free_vc;
  logic [NUM_VCS-1:0]   credit_ok;
  logic                 first, last, can_send;
  logic [VC_IDX_W-1:0]  use_vc;
  logic [NODE_W-1:0]    dst;
  flit_t                f;

  always_comb begin
    first    = (fidx == '0);
    last     = (fidx == len - LEN_W'(1));
    use_vc   = first ? free_vc : cur_vc;
    can_send = (state == S_SEND) && (first ? has_free : credit_ok[cur_vc]);
    dst      = '0;
    for (int n = NODES - 1; n >= 0; n--)
      if (pending[n]) dst = NODE_W'(n);

    f.kind     = (len == LEN_W'(1)) ? FT_SINGLE :
                 first ? FT_HEAD : (last ? FT_TAIL : FT_BODY);
    f.ptype    = (mode == M_MC) ? PT_MC : (mode == M_SETUP) ? PT_SETUP : PT_NORMAL;
    f.id       = (mode == M_UNI) ? 1'b0 : tree_id;
    f.vct.src  = NODE_W'(NODE_ID);
    f.vct.tree = (mode == M_UNI) ? '0 : TREE_W'(tree);
    f.dst      = (mode == M_MC) ? '0 : dst;
    f.vc       = HDR_VC_W'(use_vc);
    f.payload  = payload;
  end

  vc_allocator #(.N_OUT(1), .N_VC(NUM_VCS), .N_SLOTS(BUF_PER_PORT)) u_credits (
    .clk, .rst_n,
    .credit_in  (inj_credit),
    .send_valid (can_send),
    .send_vc    (use_vc),
    .send_alloc (first),
    .send_tail  (last),
    .has_free   (has_free),
    .free_vc    (free_vc),
    .credit_ok  (credit_ok)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      mode     <= M_UNI;
      pending  <= '0;
      len      <= LEN_W'(1);
      fidx     <= '0;
      payload  <= '0;
      tree     <= '0;
      tree_id  <= 1'b0;
      cur_vc   <= '0;
      inj_link <= '0;
    end else begin
      inj_link.valid <= can_send;
      inj_link.flit  <= f;
      case (state)
        S_IDLE: begin
          if (accept && ndest != 0) begin
            state   <= S_SEND;
            pending <= dests;
            len     <= (req_len == '0) ? LEN_W'(1) : req_len;
            fidx    <= '0;
            payload <= req_payload;
            if (!multi) begin
              mode <= M_UNI;
            end else if (cam_hit) begin
              mode    <= M_MC;
              tree    <= cam_hit_tree;
              tree_id <= cam_hit_id;
            end else begin
              mode    <= M_SETUP;
              tree    <= alloc_tree;
              tree_id <= alloc_id;
            end
          end
        end
        S_SEND: begin
          if (can_send) begin
            if (first) cur_vc <= free_vc;
            if (!last) begin
              fidx <= fidx + LEN_W'(1);
            end else begin
              fidx <= '0;
              if (mode == M_SETUP) begin
                pending[dst] <= 1'b0;
                if ((pending & ~(NODES'(1) << dst)) == '0) state <= S_IDLE;
              end else begin
                state <= S_IDLE;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ----------------------------------------------------------- eject
  assign rx_link         = ej_link;
  assign ej_credit.valid = ej_link.valid;
  assign ej_credit.vc    = ej_link.flit.vc[VC_IDX_W-1:0];
endmodule
