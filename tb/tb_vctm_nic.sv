// tb_vctm_nic -- checks the network interface of node 0 with a 4-entry
// destination set CAM. The testbench plays the router: it records the
// injected flits and returns each credit one cycle later (or withholds them).
// Expected flits are worked out by hand:
//   1. one destination -> one normal unicast flit;
//   2. destinations {2,4,5}, first time -> three unicast+setup flits in
//      consecutive cycles, tree 0, Id 1, lowest destination first;
//   3. the same set again -> one multicast flit, tree 0, Id 1;
//   4. a 3-flit unicast -> head, body, tail on one VC;
//   5. four new sets fill the CAM and replace the oldest tree (0), which gets
//      Id 0; set {2,4,5} then misses and takes tree 1 with Id 0;
//   6. its own node is dropped from a destination set;
//   7. with credits withheld, 24 flits (the router port's whole pool: 21 on
//      VC 0, its own slot plus the shared 20, then one on each other VC) are
//      injected, then none;
//   8. ejected flits go to the tile and are credited in the same cycle.
module tb_vctm_nic;
  import vctm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready;
  logic [15:0] req_dests;
  logic [2:0]  req_len;
  logic [PAYLOAD_W-1:0] req_payload;
  link_t   rx_link, inj_link, ej_link;
  credit_t inj_credit, ej_credit;
  logic ev_unicast, ev_mc_hit, ev_mc_setup;
  int checks = 0, failures = 0, cycle = 0;
  int n_uni = 0, n_hit = 0, n_setup = 0;

  vctm_nic #(.NODE_ID(0), .CAM_ENTRIES(4)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_dests, .req_len, .req_payload,
    .rx_link, .inj_link, .inj_credit, .ej_link, .ej_credit,
    .ev_unicast, .ev_mc_hit, .ev_mc_setup);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL [%0d] %s", cycle, what); end
  endtask

  typedef struct { flit_t f; int t; } rec_t;
  rec_t got [$];
  logic hold = 0;
  int   held [4];
  credit_t pend;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (ev_unicast)  n_uni++;
    if (ev_mc_hit)   n_hit++;
    if (ev_mc_setup) n_setup++;
    inj_credit <= pend;
    pend = '0;
    #1;
    if (inj_link.valid) begin
      rec_t r;
      r.f = inj_link.flit; r.t = cycle;
      got.push_back(r);
      if (hold) held[inj_link.flit.vc[1:0]]++;
      else begin pend.valid = 1; pend.vc = inj_link.flit.vc[1:0]; end
    end
    if (!hold)
      for (int v = 0; v < 4; v++)
        if (held[v] > 0 && !pend.valid) begin held[v]--; pend.valid = 1; pend.vc = 2'(v); end
  end

  task automatic send(logic [15:0] d, int len, int pl);
    @(negedge clk);
    req_valid = 1; req_dests = d; req_len = 3'(len); req_payload = PAYLOAD_W'(pl);
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic settle(int n);
    repeat (n) @(negedge clk);
  endtask

  function automatic logic [15:0] bits3(int a, int b, int c);
    return (16'(1) << a) | (16'(1) << b) | (16'(1) << c);
  endfunction

  initial begin
    req_valid = 0; req_dests = '0; req_len = 1; req_payload = '0;
    ej_link = '0; inj_credit = '0; pend = '0;
    for (int v = 0; v < 4; v++) held[v] = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // 1. unicast
    got.delete();
    send(16'h0008, 1, 'h11); settle(4);
    chk(got.size() == 1, "one flit for a unicast");
    if (got.size() == 1)
      chk(got[0].f.kind == FT_SINGLE && got[0].f.ptype == PT_NORMAL && got[0].f.dst == 4'd3
          && got[0].f.payload == PAYLOAD_W'('h11) && got[0].f.vct.src == 4'd0, "unicast header");

    // 2. new multicast set {2,4,5}
    got.delete();
    send(bits3(5, 4, 2), 1, 'h22); settle(6);
    chk(got.size() == 3, "three setup packets");
    if (got.size() == 3) begin
      chk(got[0].f.dst == 2 && got[1].f.dst == 4 && got[2].f.dst == 5, "one per destination, lowest first");
      for (int i = 0; i < 3; i++)
        chk(got[i].f.ptype == PT_SETUP && got[i].f.vct.tree == 0 && got[i].f.id == 1'b1
            && got[i].f.payload == PAYLOAD_W'('h22), "setup header: tree 0, Id 1");
      chk(got[1].t == got[0].t + 1 && got[2].t == got[1].t + 1, "consecutive cycles");
    end

    // 3. same set: CAM hit
    got.delete();
    send(bits3(2, 4, 5), 1, 'h33); settle(4);
    chk(got.size() == 1, "one multicast packet");
    if (got.size() == 1)
      chk(got[0].f.ptype == PT_MC && got[0].f.vct.tree == 0 && got[0].f.id == 1'b1
          && got[0].f.vct.src == 0, "multicast header");

    // 4. 3-flit unicast
    got.delete();
    send(16'h0002, 3, 'h44); settle(6);
    chk(got.size() == 3, "three flits");
    if (got.size() == 3)
      chk(got[0].f.kind == FT_HEAD && got[1].f.kind == FT_BODY && got[2].f.kind == FT_TAIL
          && got[0].f.vc == got[2].f.vc && got[1].f.vc == got[2].f.vc, "head/body/tail on one VC");

    // 5. fill and wrap the CAM
    send(bits3(1, 2, 3), 1, 'h51);  // tree 1
    send(bits3(1, 2, 4), 1, 'h52);  // tree 2
    send(bits3(1, 2, 5), 1, 'h53);  // tree 3
    settle(6);
    got.delete();
    send(bits3(1, 2, 6), 1, 'h54);  // replaces tree 0
    settle(6);
    chk(got.size() == 3 && got[0].f.vct.tree == 0 && got[0].f.id == 1'b0, "oldest tree replaced, Id flipped");
    got.delete();
    send(bits3(2, 4, 5), 1, 'h55);  // was evicted: tree 1 now, Id 0
    settle(6);
    chk(got.size() == 3 && got[0].f.ptype == PT_SETUP && got[0].f.vct.tree == 1 && got[0].f.id == 1'b0,
        "evicted set sets up again");

    // 6. own node removed
    got.delete();
    send(16'h0009, 1, 'h66); settle(4);
    chk(got.size() == 1 && got[0].f.ptype == PT_NORMAL && got[0].f.dst == 3, "own node dropped");

    // 7. credit stall
    got.delete();
    hold = 1;
    for (int k = 0; k < 26; k++) begin
      fork
        send(16'h0004, 1, 'h700 + k);
        settle(40);
      join_any
      disable fork;
      req_valid = 0;
    end
    settle(4);
    chk(got.size() == 24, $sformatf("24 flits without credits, got %0d", got.size()));
    hold = 0;
    settle(20);
    chk(got.size() == 25, $sformatf("stalled packet sent after credits return, got %0d", got.size()));

    // 8. ejection
    @(negedge clk);
    ej_link.valid = 1; ej_link.flit = '0; ej_link.flit.vc = 3'd2; ej_link.flit.payload = PAYLOAD_W'('h88);
    #1;
    chk(rx_link == ej_link && ej_credit.valid && ej_credit.vc == 2'd2, "ejection and its credit");
    @(negedge clk); ej_link = '0;

    chk(n_uni > 0 && n_hit > 0 && n_setup > 0, "all three message kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
