// switch_allocator -- separable input-first switch allocator.
//
// Each input VC that can move a flit this cycle presents one request, for one
// output port (req_valid, req_port). A multicast flit that must leave through
// several ports therefore requests them one per cycle, which is how the
// published router serialises a branching flit. Stage 1 picks one VC per
// input port with a round-robin arbiter; stage 2 picks one input per output
// port, again round robin. An input's stage-1 priority advances only when its
// request also wins stage 2. Combinational grants; priorities change at the
// clock edge.
//
// Outputs: per input, whether it won, with which VC and for which port; per
// output, whether it is used and by which input (crossbar select).
module switch_allocator
  import vctm_pkg::*;
#(
  parameter int unsigned N_IN  = NUM_PORTS,
  parameter int unsigned N_OUT = NUM_PORTS,
  parameter int unsigned N_VC  = NUM_VCS
)(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [N_IN-1:0][N_VC-1:0]            req_valid,
  input  logic [N_IN-1:0][N_VC-1:0][PORT_W-1:0] req_port,
  output logic [N_IN-1:0]                      in_gnt,
  output logic [N_IN-1:0][$clog2(N_VC)-1:0]    in_gnt_vc,
  output logic [N_IN-1:0][PORT_W-1:0]          in_gnt_port,
  output logic [N_OUT-1:0]                     out_used,
  output logic [N_OUT-1:0][$clog2(N_IN)-1:0]   out_sel
);
  localparam int VW = $clog2(N_VC);
  localparam int IW = $clog2(N_IN);

  logic [N_IN-1:0]              s1_any;
  logic [N_IN-1:0][VW-1:0]      s1_vc;
  logic [N_IN-1:0][N_VC-1:0]    s1_gnt;
  logic [N_IN-1:0][PORT_W-1:0]  s1_port;
  logic [N_OUT-1:0][N_IN-1:0]   s2_req;
  logic [N_OUT-1:0][N_IN-1:0]   s2_gnt;
  logic [N_OUT-1:0]             s2_any;
  logic [N_OUT-1:0][IW-1:0]     s2_idx;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    rr_arbiter #(.N(N_VC)) u_arb (
      .clk, .rst_n,
      .req       (req_valid[i]),
      .advance   (in_gnt[i]),
      .grant     (s1_gnt[i]),
      .grant_idx (s1_vc[i]),
      .any       (s1_any[i])
    );
    assign s1_port[i] = req_port[i][s1_vc[i]];
  end

  always_comb begin
    for (int o = 0; o < N_OUT; o++)
      for (int i = 0; i < N_IN; i++)
        s2_req[o][i] = s1_any[i] && (int'(s1_port[i]) == o);
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    rr_arbiter #(.N(N_IN)) u_arb (
      .clk, .rst_n,
      .req       (s2_req[o]),
      .advance   (s2_any[o]),
      .grant     (s2_gnt[o]),
      .grant_idx (s2_idx[o]),
      .any       (s2_any[o])
    );
  end

  always_comb begin
    out_used = s2_any;
    out_sel  = s2_idx;
    for (int i = 0; i < N_IN; i++) begin
      in_gnt[i]      = 1'b0;
      in_gnt_vc[i]   = s1_vc[i];
      in_gnt_port[i] = s1_port[i];
      for (int o = 0; o < N_OUT; o++)
        if (s2_gnt[o][i]) in_gnt[i] = 1'b1;
    end
  end

  // At most one grant per output, and a grant only for a requesting VC.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N_IN; i++)
        assert (!in_gnt[i] || req_valid[i][in_gnt_vc[i]])
          else $error("switch_allocator: grant without request on input %0d", i);
    end
  end
endmodule
