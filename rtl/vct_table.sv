// vct_table -- the Virtual Circuit Tree (VCT) table of one router.
//
// One 9-bit entry per tree: an Id bit, one bit per output port (Ej, N, S, E,
// W) that the tree leaves this router through, and a fork count, the number
// of those ports. The table is indexed by {source node, tree number}; the
// source field statically partitions it among the sources, VCT_PER_SRC trees
// each (64 of 1024 at the default size).
//
// Each input port has its own access channel (acc_*). In the cycle a head flit
// arrives on it:
//   * a multicast reads the entry (rd_entry, combinational) to learn which
//     output ports the flit must be copied to;
//   * a unicast+setup writes the entry at the clock edge. If its Id bit
//     differs from the stored one the entry is stale: it is cleared and gets
//     only the setup packet's X-Y output port, with a fork count of 1. If the
//     Id bits match, the port is added and the count incremented, unless the
//     port is already marked, in which case nothing changes.
// This is the update rule of the published tree construction example. The
// per-input-port channels are this design's choice: because trees follow X-Y
// routes from their source, all packets of one source reach a router through
// the same input port, so two channels never write the same partition in one
// cycle (checked by an assertion). Reset clears every entry (Id 0, no ports).
module vct_table
  import vctm_pkg::*;
#(
  parameter int unsigned N_ENTRIES = VCT_TOTAL,
  parameter int unsigned N_CH      = NUM_PORTS
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CH-1:0]            acc_valid,
  input  logic [N_CH-1:0]            acc_setup,   // 1: update, 0: read only
  input  logic [N_CH-1:0][$clog2(N_ENTRIES)-1:0] acc_idx,
  input  logic [N_CH-1:0]            acc_id,
  input  logic [N_CH-1:0][NUM_PORTS-1:0] acc_port_mask, // one-hot X-Y port
  output vct_entry_t [N_CH-1:0]      rd_entry
);

  vct_entry_t mem [N_ENTRIES];

  always_comb begin
    for (int c = 0; c < N_CH; c++) rd_entry[c] = mem[acc_idx[c]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENTRIES; i++) mem[i] <= '0;
    end else begin
      for (int c = 0; c < N_CH; c++) begin
        if (acc_valid[c] && acc_setup[c]) begin
          if (mem[acc_idx[c]].id != acc_id[c]) begin
            mem[acc_idx[c]].id       <= acc_id[c];
            mem[acc_idx[c]].ports    <= acc_port_mask[c];
            mem[acc_idx[c]].fork_cnt <= FORK_W'(1);
          end else if ((mem[acc_idx[c]].ports & acc_port_mask[c]) == '0) begin
            mem[acc_idx[c]].ports    <= mem[acc_idx[c]].ports | acc_port_mask[c];
            mem[acc_idx[c]].fork_cnt <= mem[acc_idx[c]].fork_cnt + FORK_W'(1);
          end
        end
      end
    end
  end

  // Two channels never update the same entry in one cycle.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int a = 0; a < N_CH; a++)
        for (int b = a + 1; b < N_CH; b++)
          assert (!(acc_valid[a] && acc_setup[a] && acc_valid[b] && acc_setup[b]
                    && acc_idx[a] == acc_idx[b]))
            else $error("vct_table: two setup writes to entry %0d", acc_idx[a]);
    end
  end
endmodule
