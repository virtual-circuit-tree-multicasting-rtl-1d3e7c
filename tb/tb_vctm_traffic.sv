// tb_vctm_traffic -- synthetic-traffic test of the 4x4 VCTM mesh at its
// default size, in the style of a uniform-random traffic generator with an
// adjustable share of multicasts.
//
// 1. Broadcast, one source at a time on an idle network: every node sends to
//    all 15 others twice. The first send builds the tree (15 unicast+setup
//    packets injected one per cycle); the second is a single multicast packet
//    that the routers replicate. The flits leaving router ports are counted:
//    the unicasts must cost the sum of their X-Y hop counts plus 15
//    ejections, the multicast exactly 30 (one per tree edge, 15 edges reach
//    the 15 nodes, plus 15 ejections). Both latencies are printed.
// 2. Uniform random traffic from all 16 tiles at two loads (long and zero
//    think time between messages): 90 % unicasts to a uniformly drawn node,
//    half of them 1-flit requests and half 5-flit data packets, and 10 %
//    multicasts to sets drawn from a per-source pool of eight sets, so that
//    most multicasts find their tree already built.
// A source issues its next message only after every copy of its previous one
// has arrived (this keeps a multicast behind the setup packets of its own
// tree). Every delivered flit is checked against a scoreboard; average
// message latencies (request accepted to last flit delivered) are printed
// per phase, and the higher load must show the higher unicast latency.
module tb_vctm_traffic;
  import vctm_pkg::*;

  localparam int MSGS_PER_SRC = 30;

  logic clk = 0, rst_n = 0;
  logic [15:0]        req_valid, req_ready;
  logic [15:0][15:0]  req_dests;
  logic [15:0][2:0]   req_len;
  logic [15:0][PAYLOAD_W-1:0] req_payload;
  logic [15:0]        rx_valid;
  flit_t [15:0]       rx_flit;
  logic [15:0]        ev_unicast, ev_mc_hit, ev_mc_setup;
  int checks = 0, failures = 0, cycle = 0;

  vctm_mesh dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_dests, .req_len, .req_payload,
    .rx_valid, .rx_flit, .ev_unicast, .ev_mc_hit, .ev_mc_setup);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL [%0d] %s", cycle, what); end
  endtask

  // ------------------------------------------------------------ scoreboard
  logic [15:0] out_dests [16];
  int          out_len   [16];
  int          out_seq   [16];
  int          out_rcv   [16][16];
  int          out_left  [16];
  int          accept_t  [16];
  int          last_deliver_t [16];

  // payload: [31:28] source, [27:12] sequence, [11:0] check pattern
  function automatic logic [PAYLOAD_W-1:0] mkpl(int src, int seq);
    return PAYLOAD_W'({4'(src), 16'(seq), 12'h3C9});
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int d = 0; d < 16; d++) begin
      if (rx_valid[d]) begin
        int s, q;
        flit_t f;
        f = rx_flit[d];
        s = int'(f.payload[31:28]);
        q = int'(f.payload[27:12]);
        checks++;
        if (f.payload[11:0] != 12'h3C9 || q != out_seq[s] || !out_dests[s][d]
            || out_rcv[s][d] >= out_len[s]) begin
          failures++;
          $display("FAIL [%0d] node %0d got unexpected flit src %0d seq %0d", cycle, d, s, q);
        end else begin
          if (out_rcv[s][d] == 0)
            chk(is_head(f.kind), "first flit of a packet is a head");
          out_rcv[s][d]++;
          if (out_rcv[s][d] == out_len[s]) begin
            chk(is_tail(f.kind), "last flit of a packet is a tail");
            out_left[s]--;
            last_deliver_t[s] = cycle;
          end
        end
      end
    end
  end

  int n_hit = 0, n_setup = 0;
  always @(posedge clk) begin
    n_hit   += $countones(ev_mc_hit);
    n_setup += $countones(ev_mc_setup);
  end

  // flits leaving any router port (links plus ejections) = crossbar traversals
  int n_trav = 0;
  for (genvar n = 0; n < 16; n++) begin : g_trav
    always @(posedge clk)
      for (int p = 0; p < NUM_PORTS; p++)
        if (dut.g_node[n].u_router.out_link[p].valid) n_trav++;
  end

  // --------------------------------------------------------------- sending
  task automatic issue(int s, logic [15:0] dests, int len);
    @(negedge clk);
    out_seq[s]++;
    out_dests[s] = dests & ~(16'(1) << s);
    out_len[s]   = len;
    out_left[s]  = $countones(out_dests[s]);
    for (int d = 0; d < 16; d++) out_rcv[s][d] = 0;
    req_valid[s] = 1; req_dests[s] = dests; req_len[s] = 3'(len);
    req_payload[s] = mkpl(s, out_seq[s]);
    while (!req_ready[s]) @(negedge clk);
    accept_t[s] = cycle;
    @(negedge clk);
    req_valid[s] = 0;
  endtask

  task automatic wait_done(int s);
    while (out_left[s] != 0) @(negedge clk);
  endtask

  function automatic logic [15:0] rand_set(int s, int ndst);
    logic [15:0] m;
    m = '0;
    while ($countones(m) < ndst) begin
      int d;
      d = $urandom % 16;
      if (d != s) m[d] = 1'b1;
    end
    return m;
  endfunction

  // per-phase latency sums
  longint uni_lat_sum [2], mc_lat_sum [2];
  int     uni_cnt [2], mc_cnt [2];

  task automatic source(int s, int phase, int think);
    logic [15:0] pool [8];
    for (int i = 0; i < 8; i++) pool[i] = rand_set(s, 2 + $urandom % 14);
    for (int m = 0; m < MSGS_PER_SRC; m++) begin
      logic mc;
      mc = ($urandom % 10 == 0);
      if (mc) issue(s, pool[$urandom % 8], 1);
      else    issue(s, rand_set(s, 1), ($urandom % 2 == 0) ? 1 : 5);
      wait_done(s);
      if (mc) begin mc_lat_sum[phase] += last_deliver_t[s] - accept_t[s]; mc_cnt[phase]++; end
      else    begin uni_lat_sum[phase] += last_deliver_t[s] - accept_t[s]; uni_cnt[phase]++; end
      if (think > 0) repeat ($urandom % think) @(negedge clk);
    end
  endtask

  task automatic run_phase(int phase, int think);
    for (int s = 0; s < 16; s++) begin
      fork
        automatic int ss = s;
        source(ss, phase, think);
      join_none
    end
    wait fork;
  endtask

  int t_setup, t_mc, hit0;
  real avg_u [2], avg_m [2];

  initial begin
    req_valid = '0; req_dests = '0; req_len = '0; req_payload = '0;
    for (int s = 0; s < 16; s++) begin
      out_dests[s] = '0; out_len[s] = 0; out_seq[s] = 0; out_left[s] = 0;
      for (int d = 0; d < 16; d++) out_rcv[s][d] = 0;
    end
    for (int p = 0; p < 2; p++) begin
      uni_lat_sum[p] = 0; mc_lat_sum[p] = 0; uni_cnt[p] = 0; mc_cnt[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. broadcast from each source: setup burst, then one multicast
    for (int s = 0; s < 16; s++) begin
      int sx, sy, hops, tr0, tr_setup, tr_mc;
      sx = s % 4; sy = s / 4;
      hops = 0;
      for (int d = 0; d < 16; d++)
        hops += ((d % 4 > sx) ? d % 4 - sx : sx - d % 4) + ((d / 4 > sy) ? d / 4 - sy : sy - d / 4);
      tr0 = n_trav;
      issue(s, 16'hFFFF, 1);
      wait_done(s);
      repeat (4) @(negedge clk);
      tr_setup = n_trav - tr0;
      t_setup = last_deliver_t[s] - accept_t[s];
      hit0 = n_hit;
      tr0 = n_trav;
      issue(s, 16'hFFFF, 1);
      wait_done(s);
      repeat (4) @(negedge clk);
      tr_mc = n_trav - tr0;
      t_mc = last_deliver_t[s] - accept_t[s];
      chk(n_hit == hit0 + 1, $sformatf("node %0d: repeated broadcast is one multicast", s));
      // unicasts: every destination's X-Y hops plus its ejection; the tree: one
      // traversal per tree edge (15, one reaching each node) plus 15 ejections
      chk(tr_setup == hops + 15, $sformatf("node %0d: setup burst %0d traversals, expected %0d",
                                           s, tr_setup, hops + 15));
      chk(tr_mc == 30, $sformatf("node %0d: broadcast on its tree %0d traversals, expected 30", s, tr_mc));
      $display("broadcast from node %0d: setup unicasts %0d cycles, %0d traversals; multicast %0d cycles, %0d traversals",
               s, t_setup, tr_setup, t_mc, tr_mc);
    end

    // 2. uniform random traffic, low then high load
    run_phase(0, 40);
    run_phase(1, 0);
    repeat (20) @(negedge clk);
    for (int s = 0; s < 16; s++) chk(out_left[s] == 0, $sformatf("source %0d complete", s));

    for (int p = 0; p < 2; p++) begin
      avg_u[p] = (uni_cnt[p] > 0) ? real'(uni_lat_sum[p]) / uni_cnt[p] : 0.0;
      avg_m[p] = (mc_cnt[p]  > 0) ? real'(mc_lat_sum[p])  / mc_cnt[p]  : 0.0;
      $display("load %s: %0d unicasts, average latency %0.1f; %0d multicasts, average latency %0.1f",
               p == 0 ? "low " : "high", uni_cnt[p], avg_u[p], mc_cnt[p], avg_m[p]);
      chk(uni_cnt[p] > 0 && mc_cnt[p] > 0, "both message kinds in the phase");
    end
    chk(avg_u[1] > avg_u[0], "higher load gives higher unicast latency");
    chk(n_hit > 16, "multicasts found built trees during random traffic");
    $display("setups=%0d mc_hits=%0d cycles=%0d", n_setup, n_hit, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
