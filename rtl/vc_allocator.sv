// vc_allocator -- output virtual channel state and buffer accounting of a
// router (also used by the network interface for its one output).
//
// For every output port and downstream VC it keeps a busy bit (the VC is held
// by a packet whose tail has not yet left) and the number of downstream
// buffer slots the VC occupies (sent flits whose credit has not come back).
// The downstream input port shares its N_SLOTS slots among its N_VC VCs
// (input_buffer): each VC owns one slot and the other N_SLOTS - N_VC are a
// common pool. A flit may be sent on VC v (credit_ok) if v occupies no slot
// yet, or if the slots held beyond their first by all VCs together are fewer
// than the pool. The allocator offers, per output port, the lowest-numbered VC
// that is idle and may send (has_free, free_vc).
//
// In the cycle a flit leaves on output o (send_valid) with VC send_vc, the VC's
// count grows by one; send_alloc marks a head flit that takes free_vc, which
// becomes busy unless the flit is also the tail; a tail frees its VC. A credit
// returned from downstream (credit_in) lowers the count at the edge. Because
// the switch allocator grants at most one flit per output per cycle, at most
// one VC is allocated per output per cycle. VCs are allocated per packet and
// per branch, so a multicast holds one VC on each of its output ports, as in
// the published design where VCs are allocated dynamically to each tree at
// each hop; VC allocation is done together with switch allocation, in the same
// cycle. The one-slot reserve per VC is this design's choice.
module vc_allocator
  import vctm_pkg::*;
#(
  parameter int unsigned N_OUT   = NUM_PORTS,
  parameter int unsigned N_VC    = NUM_VCS,
  parameter int unsigned N_SLOTS = BUF_PER_PORT
)(
  input  logic                              clk,
  input  logic                              rst_n,
  input  credit_t [N_OUT-1:0]               credit_in,
  input  logic    [N_OUT-1:0]               send_valid,
  input  logic    [N_OUT-1:0][$clog2(N_VC)-1:0] send_vc,
  input  logic    [N_OUT-1:0]               send_alloc,
  input  logic    [N_OUT-1:0]               send_tail,
  output logic    [N_OUT-1:0]               has_free,
  output logic    [N_OUT-1:0][$clog2(N_VC)-1:0] free_vc,
  output logic    [N_OUT-1:0][N_VC-1:0]     credit_ok
);
  localparam int VW = $clog2(N_VC);
  localparam int CW = $clog2(N_SLOTS + 1);
  localparam int POOL = N_SLOTS - N_VC;

  logic [N_OUT-1:0][N_VC-1:0] busy;
  logic [CW-1:0]              used [N_OUT][N_VC];
  logic [CW-1:0]              shared_used [N_OUT];

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      shared_used[o] = '0;
      for (int v = 0; v < N_VC; v++)
        if (used[o][v] != '0) shared_used[o] = shared_used[o] + used[o][v] - CW'(1);
      has_free[o] = 1'b0;
      free_vc[o]  = '0;
      for (int v = 0; v < N_VC; v++) begin
        credit_ok[o][v] = (used[o][v] == '0) || (shared_used[o] < CW'(POOL));
        if (!has_free[o] && !busy[o][v] && credit_ok[o][v]) begin
          has_free[o] = 1'b1;
          free_vc[o]  = VW'(v);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= '0;
      for (int o = 0; o < N_OUT; o++)
        for (int v = 0; v < N_VC; v++) used[o][v] <= '0;
    end else begin
      for (int o = 0; o < N_OUT; o++) begin
        for (int v = 0; v < N_VC; v++) begin
          logic snd, ret;
          snd = send_valid[o] && (send_vc[o] == VW'(v));
          ret = credit_in[o].valid && (credit_in[o].vc == VC_IDX_W'(v));
          if (snd && !ret)      used[o][v] <= used[o][v] + CW'(1);
          else if (ret && !snd) used[o][v] <= used[o][v] - CW'(1);
          if (snd && send_tail[o])       busy[o][v] <= 1'b0;
          else if (snd && send_alloc[o]) busy[o][v] <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < N_OUT; o++) begin
        assert (!send_valid[o] || credit_ok[o][send_vc[o]])
          else $error("vc_allocator: send without a free slot on port %0d", o);
        assert (!(send_valid[o] && send_alloc[o]) || (has_free[o] && send_vc[o] == free_vc[o]))
          else $error("vc_allocator: head on port %0d did not take the free VC", o);
        assert (!(credit_in[o].valid && used[o][credit_in[o].vc] == '0))
          else $error("vc_allocator: credit for an empty VC on port %0d", o);
      end
    end
  end
endmodule
