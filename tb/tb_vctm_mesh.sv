// tb_vctm_mesh -- end-to-end test of the 4x4 VCTM mesh at its default size
// (64 trees per source, 1024-entry tree tables, 4 VCs sharing 24 flit slots
// per port).
//
// 1. Zero-load latency: a one-flit unicast from node 0 to node 15 (6 hops,
//    7 routers) must reach its tile 2 + 2*7 = 16 cycles after the request is
//    presented (one edge to accept it, one for the interface's flit register,
//    then two per router).
// 2. Tree build and reuse, then a multicast on it: node 0 sends to {2,4,5}
//    (setup), then again (multicast), and every destination gets one copy.
// 3. Random traffic from all 16 tiles at once: unicasts of 1..5 flits and
//    multicasts of 1 or 3 flits to destination sets drawn from a small pool
//    per source (so trees are reused) plus fresh random sets. Node 0 in
//    addition cycles through more distinct sets than it has trees, forcing
//    trees to be replaced and their router entries to be found stale.
//    A source issues its next message only when every copy of its previous
//    one has been delivered; this keeps a multicast from overtaking the setup
//    packets of its own tree (the network does not order packets on
//    different VCs).
// 4. A burst: all 16 tiles at once send 5-flit messages to 14 destinations
//    as setup packets (70 flits each), which fills the input pools at the
//    injection ports and makes the interfaces stall.
// Every delivered flit is matched against a scoreboard: it must belong to an
// outstanding message of which the receiving node is a destination, and each
// destination must receive exactly that message's length in flits, head
// first, tail last. The test counts how often each mechanism occurred
// (unicast, tree setup, multicast on an existing tree, tree replacement, stale
// table entry, branching flit, switch contention, credit stall at injection)
// and counts a failure for any that never did.
module tb_vctm_mesh;
  import vctm_pkg::*;

  localparam int MSGS_PER_SRC = 40;

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
  // Outstanding message of each source: destination set, length, sequence
  // number, flits received per destination.
  logic [15:0] out_dests [16];
  int          out_len   [16];
  int          out_seq   [16];
  int          out_rcv   [16][16];
  int          out_left  [16];     // destinations not yet complete
  int          accept_t  [16];
  int          last_deliver_t [16];

  // payload: [31:28] source, [27:12] sequence, [11:0] flit check pattern
  function automatic logic [PAYLOAD_W-1:0] mkpl(int src, int seq);
    return PAYLOAD_W'({4'(src), 16'(seq), 12'hA5C});
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
        if (f.payload[11:0] != 12'hA5C || q != out_seq[s] || !out_dests[s][d]
            || out_rcv[s][d] >= out_len[s]) begin
          failures++;
          $display("FAIL [%0d] node %0d got unexpected flit src %0d seq %0d (outstanding seq %0d)",
                   cycle, d, s, q, out_seq[s]);
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

  // ------------------------------------------------------ mechanism counts
  int n_uni = 0, n_setup = 0, n_hit = 0, n_replace = 0, n_stale = 0;
  int n_fork = 0, n_conflict = 0, n_inj_stall = 0, n_long = 0;

  always @(posedge clk) begin
    n_uni   += $countones(ev_unicast);
    n_setup += $countones(ev_mc_setup);
    n_hit   += $countones(ev_mc_hit);
  end

  for (genvar n = 0; n < 16; n++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      // a setup that finds its CAM slot already holding a tree
      if (dut.g_node[n].u_nic.ev_mc_setup && dut.g_node[n].u_nic.u_cam.valid[dut.g_node[n].u_nic.u_cam.ptr])
        n_replace++;
      if (dut.g_node[n].u_nic.state == 1 && !dut.g_node[n].u_nic.can_send) n_inj_stall++;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (dut.g_node[n].u_router.acc_valid[p] && dut.g_node[n].u_router.acc_setup[p]
            && dut.g_node[n].u_router.vct_rd[p].fork_cnt != 0
            && dut.g_node[n].u_router.vct_rd[p].id != dut.g_node[n].u_router.acc_id[p])
          n_stale++;
        if (dut.g_node[n].u_router.in_gnt[p] &&
            dut.g_node[n].u_router.fork_now[p][dut.g_node[n].u_router.in_gnt_vc[p]] > 1)
          n_fork++;
        for (int v = 0; v < NUM_VCS; v++)
          if (dut.g_node[n].u_router.req_valid[p][v] &&
              !(dut.g_node[n].u_router.in_gnt[p] && dut.g_node[n].u_router.in_gnt_vc[p] == 2'(v)))
            n_conflict++;
      end
    end
  end

  // --------------------------------------------------------------- sending
  task automatic issue(int s, logic [15:0] dests, int len);
    @(negedge clk);
    out_seq[s]++;
    out_dests[s] = dests & ~(16'(1) << s);
    out_len[s]   = len;
    out_left[s]  = $countones(out_dests[s]);
    for (int d = 0; d < 16; d++) out_rcv[s][d] = 0;
    if (len > 1) n_long++;
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

  task automatic source(int s);
    logic [15:0] pool [4];
    for (int i = 0; i < 4; i++) pool[i] = rand_set(s, 2 + $urandom % 14);
    for (int m = 0; m < MSGS_PER_SRC; m++) begin
      int kind;
      kind = $urandom % 10;
      if (kind < 4)      issue(s, rand_set(s, 1), 1 + $urandom % 5);
      else if (kind < 9) issue(s, pool[$urandom % 4], ($urandom % 4 == 0) ? 3 : 1);
      else               issue(s, rand_set(s, 2 + $urandom % 3), 1);
      wait_done(s);
      repeat ($urandom % 4) @(negedge clk);
    end
  endtask

  // node 0: more distinct sets than its 64 trees, then the first ones again
  task automatic source0_wrap();
    for (int m = 0; m < VCT_PER_SRC + 8; m++) begin
      issue(0, 16'(((m + 3) << 1) | 16'h8000), 1);
      wait_done(0);
    end
    for (int m = 0; m < 8; m++) begin
      issue(0, 16'(((m + 3) << 1) | 16'h8000), 1);
      wait_done(0);
    end
  endtask

  int lat;

  initial begin
    req_valid = '0; req_dests = '0; req_len = '0; req_payload = '0;
    for (int s = 0; s < 16; s++) begin
      out_dests[s] = '0; out_len[s] = 0; out_seq[s] = 0; out_left[s] = 0;
      for (int d = 0; d < 16; d++) out_rcv[s][d] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. zero-load latency, 0 -> 15
    issue(0, 16'h8000, 1);
    wait_done(0);
    lat = last_deliver_t[0] - accept_t[0];
    chk(lat == 16, $sformatf("zero-load latency 0->15: %0d cycles, expected 16", lat));

    // 2. the set {2,4,5} from node 0: setup, then multicast
    issue(0, 16'h0034, 1);
    wait_done(0);
    chk(dut.g_node[1].u_router.u_vct.mem[{4'd0, 6'd0}] == {1'b1, 5'b01100, 3'd2},
        "node 1 entry of tree 0 of node 0: Id 1, S and E, 2 ports");
    issue(0, 16'h0034, 1);
    wait_done(0);
    chk(n_hit == 1, "second send of the set is one multicast");

    // 3. all sources at once
    fork
      begin source0_wrap(); source(0); end
      for (int s = 1; s < 16; s++) begin
        fork
          automatic int ss = s;
          source(ss);
        join_none
      end
    join
    wait fork;
    repeat (20) @(negedge clk);

    // 4. burst: every tile at once sends 5-flit messages to 14 destinations
    //    (all but itself and one other, a new set each time, so each goes out
    //    as 14 setup packets = 70 flits); the local input pools fill up and
    //    the interfaces must stall
    for (int s = 0; s < 16; s++) begin
      fork
        automatic int ss = s;
        for (int r = 0; r < 3; r++) begin
          issue(ss, 16'hFFFF & ~(16'(1) << ((ss + 5 + 3 * r) % 16 == ss ? (ss + 1) % 16 : (ss + 5 + 3 * r) % 16)), 5);
          wait_done(ss);
        end
      join_none
    end
    wait fork;
    repeat (20) @(negedge clk);
    for (int s = 0; s < 16; s++) chk(out_left[s] == 0, $sformatf("source %0d complete", s));

    $display("mechanisms: unicast=%0d setup=%0d mc_hit=%0d tree_replaced=%0d stale_entry=%0d branch_grants=%0d contention=%0d inj_stall=%0d multi_flit=%0d cycles=%0d",
             n_uni, n_setup, n_hit, n_replace, n_stale, n_fork, n_conflict, n_inj_stall, n_long, cycle);
    chk(n_uni > 0, "unicast seen");
    chk(n_setup > 0, "tree setup seen");
    chk(n_hit > 0, "multicast on an existing tree seen");
    chk(n_replace > 0, "tree replacement seen");
    chk(n_stale > 0, "stale table entry seen");
    chk(n_fork > 0, "branching flit seen");
    chk(n_conflict > 0, "switch contention seen");
    chk(n_inj_stall > 0, "injection stall seen");
    chk(n_long > 0, "multi-flit packet seen");
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
