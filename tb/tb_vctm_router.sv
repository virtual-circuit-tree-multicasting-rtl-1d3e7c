// tb_vctm_router -- checks one VCTM router (node 5, in the middle of the
// 4x4 mesh: x=1, y=1) driven directly on its five ports.
//
// The testbench acts as the five upstream neighbours (it injects flits only
// when it holds a credit for that VC; it keeps to at most 6 flits per VC,
// within what the shared 24-slot buffer accepts) and as the five downstream neighbours
// (it records every flit and returns its credit one cycle later, unless
// credits of a port are being withheld). Scenarios, each checked against
// expectations worked out by hand from the X-Y rule and the tree-table rules:
//   1. a normal unicast W->E leaves exactly 2 cycles after it arrives and
//      its slot's credit returns in the cycle after arrival;
//   2. three unicast+setup packets of tree {src 4, tree 3} build the entry
//      {Id 1, Ej S E, 3}; a repeated setup changes nothing;
//   3. a single-flit multicast on that tree leaves once on each of Ej, S and E,
//      one port per cycle, and its buffer slot is credited only after the
//      third copy;
//   4. a 3-flit multicast arrives intact, in order, on each branch, each
//      branch on one VC;
//   5. two unicasts for the same output arriving together leave one after
//      the other;
//   6. with the credits of E withheld, exactly 24 flits (the downstream
//      port's pool of 24 slots) leave on E, 21 of them on VC 0 (its reserved
//      slot plus the 20 shared ones), the rest wait, and all leave once
//      credits return;
//   7. a setup with a flipped Id finds the entry stale and restarts it.
module tb_vctm_router;
  import vctm_pkg::*;

  logic clk = 0, rst_n = 0;
  link_t   [4:0] in_link, out_link;
  credit_t [4:0] in_credit, out_credit;
  int checks = 0, failures = 0;
  int cycle = 0;

  vctm_router #(.NODE_ID(5)) dut (
    .clk, .rst_n, .in_link, .in_credit, .out_link, .out_credit);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL [%0d] %s", cycle, what); end
  endtask

  // ------------------------------------------------------------ downstream
  typedef struct { flit_t f; int t; } rec_t;
  rec_t     got [5][$];
  logic     hold [5];
  credit_t  pend [5];
  int       held_cnt [5][4];

  always @(posedge clk) begin
    for (int o = 0; o < 5; o++) begin
      out_credit[o] <= pend[o];
      pend[o] = '0;
    end
    #1;
    for (int o = 0; o < 5; o++) begin
      if (out_link[o].valid) begin
        rec_t r;
        r.f = out_link[o].flit; r.t = cycle;
        got[o].push_back(r);
        if (hold[o]) held_cnt[o][out_link[o].flit.vc[1:0]]++;
        else begin pend[o].valid = 1; pend[o].vc = out_link[o].flit.vc[1:0]; end
      end
      if (!hold[o]) begin
        for (int v = 0; v < 4; v++)
          if (held_cnt[o][v] > 0 && !pend[o].valid) begin
            held_cnt[o][v]--; pend[o].valid = 1; pend[o].vc = 2'(v);
          end
      end
    end
  end

  // -------------------------------------------------------------- upstream
  int   up_cr [5][4];
  int   cred_seen [5];
  int   cred_t [5][$];

  always @(posedge clk) begin
    for (int p = 0; p < 5; p++)
      if (in_credit[p].valid) begin
        up_cr[p][in_credit[p].vc]++;
        cred_seen[p]++;
        cred_t[p].push_back(cycle);
      end
  end

  function automatic flit_t mk(flit_kind_e k, pkt_type_e pt, logic id, int src,
                               int tree, int dst, int vc, int pl);
    flit_t f;
    f.kind = k; f.ptype = pt; f.id = id;
    f.vct.src = NODE_W'(src); f.vct.tree = TREE_W'(tree);
    f.dst = NODE_W'(dst); f.vc = HDR_VC_W'(vc);
    f.payload = PAYLOAD_W'(pl);
    return f;
  endfunction

  // drive a set of flits on several ports in one cycle (all must have credit)
  task automatic drive1(int p, flit_t f);
    @(negedge clk);
    chk(up_cr[p][f.vc[1:0]] > 0, "upstream holds a credit");
    up_cr[p][f.vc[1:0]]--;
    in_link = '0;
    in_link[p].valid = 1; in_link[p].flit = f;
    @(negedge clk);
    in_link = '0;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic clear_got();
    for (int o = 0; o < 5; o++) got[o].delete();
  endtask

  localparam int EJ = 0, NN = 1, SS = 2, EE = 3, WW = 4;
  localparam int UP_PER_VC = 6;
  int t0;

  initial begin
    in_link = '0; out_credit = '0;
    for (int p = 0; p < 5; p++) begin
      hold[p] = 0; pend[p] = '0; cred_seen[p] = 0;
      for (int v = 0; v < 4; v++) begin up_cr[p][v] = UP_PER_VC; held_cnt[p][v] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    idle(2);

    // ---- 1. unicast W -> E, latency
    clear_got();
    cred_t[WW].delete();
    @(negedge clk); t0 = cycle;
    up_cr[WW][1]--;
    in_link[WW].valid = 1; in_link[WW].flit = mk(FT_SINGLE, PT_NORMAL, 0, 4, 0, 7, 1, 'h111);
    @(negedge clk); in_link = '0;
    idle(4);
    chk(got[EE].size() == 1, "unicast leaves on E");
    if (got[EE].size() == 1) begin
      chk(got[EE][0].t - t0 == 2, $sformatf("unicast hop latency %0d, expected 2", got[EE][0].t - t0));
      chk(got[EE][0].f.payload == PAYLOAD_W'('h111) && got[EE][0].f.dst == 4'd7, "unicast flit intact");
    end
    chk(cred_t[WW].size() == 1 && cred_t[WW][0] - t0 == 1, "credit back one cycle after arrival");
    for (int o = 0; o < 5; o++) if (o != EE) chk(got[o].size() == 0, "nothing on other ports");

    // ---- 2. setup packets from source 4 (arrive on W), tree 3, Id 1
    clear_got();
    drive1(WW, mk(FT_SINGLE, PT_SETUP, 1, 4, 3, 6, 0, 'h201));  // -> E
    drive1(WW, mk(FT_SINGLE, PT_SETUP, 1, 4, 3, 9, 1, 'h202));  // -> S
    drive1(WW, mk(FT_SINGLE, PT_SETUP, 1, 4, 3, 5, 2, 'h203));  // -> Ej
    drive1(WW, mk(FT_SINGLE, PT_SETUP, 1, 4, 3, 7, 3, 'h204));  // -> E again
    idle(4);
    chk(dut.u_vct.mem[{4'd4, 6'd3}] == {1'b1, 5'b01101, 3'd3}, "tree entry after setup");
    chk(got[EE].size() == 2 && got[SS].size() == 1 && got[EJ].size() == 1,
        "setup packets delivered as unicasts");

    // ---- 3. single-flit multicast on tree {4,3}
    clear_got();
    cred_t[WW].delete();
    @(negedge clk); t0 = cycle;
    up_cr[WW][0]--;
    in_link[WW].valid = 1; in_link[WW].flit = mk(FT_SINGLE, PT_MC, 1, 4, 3, 0, 0, 'h300);
    @(negedge clk); in_link = '0;
    idle(6);
    chk(got[EJ].size() == 1 && got[SS].size() == 1 && got[EE].size() == 1
        && got[NN].size() == 0 && got[WW].size() == 0, "multicast copied to Ej, S, E only");
    if (got[EJ].size() == 1 && got[SS].size() == 1 && got[EE].size() == 1) begin
      int ts [3];
      ts[0] = got[EJ][0].t; ts[1] = got[SS][0].t; ts[2] = got[EE][0].t;
      ts.sort();
      chk(ts[0] == t0 + 2 && ts[1] == t0 + 3 && ts[2] == t0 + 4,
          $sformatf("one branch per cycle: %0d %0d %0d from %0d", ts[0], ts[1], ts[2], t0));
      chk(got[EJ][0].f.payload == PAYLOAD_W'('h300) && got[EE][0].f.ptype == PT_MC, "multicast flit intact");
    end
    chk(cred_t[WW].size() == 1 && cred_t[WW][0] == t0 + 3,
        "one credit, after the last branch was granted");

    // ---- 4. 3-flit multicast
    clear_got();
    drive1(WW, mk(FT_HEAD, PT_MC, 1, 4, 3, 0, 2, 'h400));
    drive1(WW, mk(FT_BODY, PT_MC, 1, 4, 3, 0, 2, 'h401));
    drive1(WW, mk(FT_TAIL, PT_MC, 1, 4, 3, 0, 2, 'h402));
    idle(8);
    foreach (got[o]) begin
      if (o == EJ || o == SS || o == EE) begin
        chk(got[o].size() == 3, $sformatf("3 flits on port %0d", o));
        if (got[o].size() == 3) begin
          chk(got[o][0].f.kind == FT_HEAD && got[o][1].f.kind == FT_BODY && got[o][2].f.kind == FT_TAIL,
              "flit order on branch");
          chk(got[o][0].f.payload == PAYLOAD_W'('h400) && got[o][2].f.payload == PAYLOAD_W'('h402),
              "payloads on branch");
          chk(got[o][0].f.vc == got[o][1].f.vc && got[o][1].f.vc == got[o][2].f.vc,
              "one VC per branch");
        end
      end
    end

    // ---- 5. contention: N and W both want E in the same cycle
    clear_got();
    @(negedge clk); t0 = cycle;
    up_cr[WW][0]--; up_cr[NN][0]--;
    in_link[WW].valid = 1; in_link[WW].flit = mk(FT_SINGLE, PT_NORMAL, 0, 4, 0, 6, 0, 'h501);
    in_link[NN].valid = 1; in_link[NN].flit = mk(FT_SINGLE, PT_NORMAL, 0, 1, 0, 7, 0, 'h502);
    @(negedge clk); in_link = '0;
    idle(5);
    chk(got[EE].size() == 2, "both unicasts leave on E");
    if (got[EE].size() == 2)
      chk(got[EE][0].t == t0 + 2 && got[EE][1].t == t0 + 3, "second waits one cycle");

    // ---- 6. back-pressure on E
    clear_got();
    hold[EE] = 1;
    for (int k = 0; k < 28; k++) begin
      int vc;
      vc = k % 4;
      @(negedge clk);
      while (up_cr[WW][vc] == 0) @(negedge clk);
      up_cr[WW][vc]--;
      in_link[WW].valid = 1; in_link[WW].flit = mk(FT_SINGLE, PT_NORMAL, 0, 4, 0, 7, vc, 'h600 + k);
      @(negedge clk); in_link = '0;
    end
    idle(10);
    chk(got[EE].size() == 24, $sformatf("24 flits pass while credits are withheld, got %0d", got[EE].size()));
    begin
      int n0;
      n0 = 0;
      foreach (got[EE][j]) if (got[EE][j].f.vc == 3'd0) n0++;
      chk(n0 == 21, $sformatf("VC 0 took its own slot and the shared 20, got %0d", n0));
    end
    hold[EE] = 0;
    idle(40);
    chk(got[EE].size() == 28, $sformatf("all 28 flits after credits return, got %0d", got[EE].size()));
    for (int k = 0; k < 28 && k < got[EE].size(); k++) begin
      // per VC order is kept; check that every payload arrived once
      int n;
      n = 0;
      foreach (got[EE][j]) if (got[EE][j].f.payload == PAYLOAD_W'('h600 + k)) n++;
      chk(n == 1, $sformatf("payload %0h delivered once", 'h600 + k));
    end

    // ---- 7. stale entry replaced by a setup with the other Id
    drive1(WW, mk(FT_SINGLE, PT_SETUP, 0, 4, 3, 13, 0, 'h700));  // -> S
    idle(4);
    chk(dut.u_vct.mem[{4'd4, 6'd3}] == {1'b0, 5'b00100, 3'd1}, "stale entry restarted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
