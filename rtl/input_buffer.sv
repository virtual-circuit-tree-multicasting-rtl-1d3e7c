// input_buffer -- flit storage of one router input port, shared dynamically
// among its virtual channels.
//
// N_SLOTS flit slots (24 at the default size) form one pool. Each of the N_VC
// virtual channels keeps a first-in first-out queue as a linked list through
// the pool: head and tail slot, a count, and a next-slot pointer per slot. A
// flit arriving on VC v (push, push_vc) is written, together with the route
// the router computed for it, into the lowest-numbered free slot and linked
// behind v's tail. The router reads the head of every queue (front,
// not_empty) and removes at most one flit per cycle (pop, pop_vc); the slot
// returns to the pool and a credit for that VC is sent upstream in the same
// cycle (credit_out, combinational).
//
// A busy VC may therefore occupy many more slots than an even split would
// give it. The upstream side (vc_allocator) keeps one slot per VC in reserve
// and lets the VCs share the other N_SLOTS - N_VC, so a push never finds the
// pool full and no VC is ever starved of its last slot; an assertion checks
// the first. Sharing the slots of a port among its VCs follows the published
// router; the linked-list organisation and the one-slot reserve are this
// design's choices.
module input_buffer
  import vctm_pkg::*;
#(
  parameter int unsigned N_VC    = NUM_VCS,
  parameter int unsigned N_SLOTS = BUF_PER_PORT
)(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push,
  input  logic [$clog2(N_VC)-1:0]      push_vc,
  input  buf_entry_t                   push_data,
  input  logic                         pop,
  input  logic [$clog2(N_VC)-1:0]      pop_vc,
  output buf_entry_t [N_VC-1:0]        front,
  output logic [N_VC-1:0]              not_empty,
  output credit_t                      credit_out
);
  localparam int VW = $clog2(N_VC);
  localparam int SW = $clog2(N_SLOTS);
  localparam int CW = $clog2(N_SLOTS + 1);

  buf_entry_t         mem   [N_SLOTS];
  logic [SW-1:0]      nxt   [N_SLOTS];   // next slot of the same queue
  logic [N_SLOTS-1:0] free;
  logic [SW-1:0]      head  [N_VC];
  logic [SW-1:0]      tail  [N_VC];
  logic [CW-1:0]      count [N_VC];

  logic               any_free;
  logic [SW-1:0]      wr_slot;
  logic [N_SLOTS-1:0] free_next;

  always_comb begin
    any_free = 1'b0;
    wr_slot  = '0;
    for (int s = N_SLOTS - 1; s >= 0; s--)
      if (free[s]) begin
        any_free = 1'b1;
        wr_slot  = SW'(s);
      end
    free_next = free;
    if (push) free_next[wr_slot] = 1'b0;
    if (pop)  free_next[head[pop_vc]] = 1'b1;
    for (int v = 0; v < N_VC; v++) begin
      front[v]     = mem[head[v]];
      not_empty[v] = (count[v] != '0);
    end
    credit_out.valid = pop;
    credit_out.vc    = VC_IDX_W'(pop_vc);
  end

  always_ff @(posedge clk) begin
    if (push) begin
      mem[wr_slot] <= push_data;
      if (count[push_vc] != '0) nxt[tail[push_vc]] <= wr_slot;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      free <= '1;
      for (int v = 0; v < N_VC; v++) begin
        head[v]  <= '0;
        tail[v]  <= '0;
        count[v] <= '0;
      end
    end else begin
      free <= free_next;
      for (int v = 0; v < N_VC; v++) begin
        logic do_push, do_pop;
        do_push = push && (push_vc == VW'(v));
        do_pop  = pop  && (pop_vc  == VW'(v));
        if (do_pop)
          head[v] <= (count[v] == CW'(1)) ? wr_slot : nxt[head[v]];
        else if (do_push && count[v] == '0)
          head[v] <= wr_slot;
        if (do_push) tail[v] <= wr_slot;
        if (do_push && !do_pop)      count[v] <= count[v] + CW'(1);
        else if (do_pop && !do_push) count[v] <= count[v] - CW'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!push || any_free)
        else $error("input_buffer: push with all %0d slots in use", N_SLOTS);
      assert (!(pop && count[pop_vc] == '0))
        else $error("input_buffer: pop from empty VC %0d", pop_vc);
    end
  end
endmodule
