// rr_arbiter -- round-robin arbiter.
//
// Grants one of N requests (grant is one-hot, combinational). The search
// starts just after the requester that last had a grant accepted; advance
// (high when the grant is actually used) moves the priority past the current
// winner at the clock edge. Reset gives requester 0 the highest priority.
module rr_arbiter #(
  parameter int unsigned N = 4
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 any
);
  localparam int W = (N > 1) ? $clog2(N) : 1;
  logic [W-1:0] prio;   // index with the highest priority

  // Requests rotated so that the highest-priority one is at position 0.
  logic [2*N-1:0] req2;
  logic [N-1:0]   rot;

  always_comb begin
    req2      = {req, req} >> prio;
    rot       = req2[N-1:0];
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (rot[k]) begin
        any       = 1'b1;
        grant_idx = ((int'(prio) + k) >= N) ? $clog2(N)'(int'(prio) + k - N)
                                            : $clog2(N)'(int'(prio) + k);
      end
    end
    if (any) grant[grant_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) prio <= '0;
    else if (advance && any)
      prio <= (int'(grant_idx) == N - 1) ? '0 : W'(grant_idx) + W'(1);
  end
endmodule
