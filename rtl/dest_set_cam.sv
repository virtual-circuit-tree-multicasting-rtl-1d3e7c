// dest_set_cam -- Destination Set CAM of a network interface.
//
// Holds the destination sets (one bit per node) of the multicast trees this
// source currently has set up; the entry number is the tree number. A search
// (search_mask) compares all valid entries in parallel and returns hit and
// the matching tree number and Id bit, combinationally.
//
// On a miss the interface calls insert: the oldest tree is given up and
// replaced. Trees are created in order into a circular set of entries, so the
// oldest is the one at the insertion pointer; alloc_tree and alloc_id
// (combinational) tell, before the insert, which tree number will be used and
// with which Id bit -- the inverse of the Id the entry had, so that routers
// recognise their old entry as stale. The insert takes effect at the clock
// edge. Reset empties the CAM and sets every Id bit to 0.
//
// Searching for the tree and evicting the oldest on a miss, and flipping the
// Id bit, are the published behaviour; oldest-first as a circular pointer is
// this design's choice.
module dest_set_cam
  import vctm_pkg::*;
#(
  parameter int unsigned N_ENTRIES = VCT_PER_SRC,
  parameter int unsigned MASK_W    = NODES
)(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [MASK_W-1:0]             search_mask,
  output logic                          hit,
  output logic [$clog2(N_ENTRIES)-1:0]  hit_tree,
  output logic                          hit_id,
  input  logic                          insert,
  input  logic [MASK_W-1:0]             insert_mask,
  output logic [$clog2(N_ENTRIES)-1:0]  alloc_tree,
  output logic                          alloc_id
);
  localparam int IW = $clog2(N_ENTRIES);

  logic [N_ENTRIES-1:0]   valid;
  logic [N_ENTRIES-1:0]   id;
  logic [MASK_W-1:0]      mask [N_ENTRIES];
  logic [IW-1:0]          ptr;

  always_comb begin
    hit      = 1'b0;
    hit_tree = '0;
    hit_id   = 1'b0;
    for (int i = 0; i < N_ENTRIES; i++) begin
      if (!hit && valid[i] && mask[i] == search_mask) begin
        hit      = 1'b1;
        hit_tree = IW'(i);
        hit_id   = id[i];
      end
    end
    alloc_tree = ptr;
    alloc_id   = ~id[ptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      id    <= '0;
      ptr   <= '0;
      for (int i = 0; i < N_ENTRIES; i++) mask[i] <= '0;
    end else if (insert) begin
      valid[ptr] <= 1'b1;
      id[ptr]    <= ~id[ptr];
      mask[ptr]  <= insert_mask;
      ptr        <= (ptr == IW'(N_ENTRIES - 1)) ? '0 : ptr + IW'(1);
    end
  end
endmodule
