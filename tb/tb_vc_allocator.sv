// tb_vc_allocator -- checks output VC state and downstream slot accounting
// for 2 output ports with 4 VCs sharing 24 downstream slots (one reserved per
// VC, a pool of 20).
// Directed part: a head takes VC 0, which stops being offered; a one-flit
// packet does not hold its VC; a tail frees the VC; 21 flits on one VC (its
// own slot plus the whole pool) stop that VC while the others can still
// send into their reserved slot; a returned credit lets it go on. Random
// part: random legal sends and credit returns compared with a reference model.
module tb_vc_allocator;
  import vctm_pkg::*;
  localparam int NO = 2, NV = 4, NS = 24, POOL = NS - NV;
  logic clk = 0, rst_n = 0;
  credit_t [NO-1:0] credit_in;
  logic [NO-1:0] send_valid, send_alloc, send_tail, has_free;
  logic [NO-1:0][1:0] send_vc, free_vc;
  logic [NO-1:0][NV-1:0] credit_ok;
  int checks = 0, failures = 0;

  vc_allocator #(.N_OUT(NO), .N_VC(NV), .N_SLOTS(NS)) dut (
    .clk, .rst_n, .credit_in, .send_valid, .send_vc, .send_alloc, .send_tail,
    .has_free, .free_vc, .credit_ok);

  always #5 clk = ~clk;

  int  cr   [NO][NV];   // slots in use downstream, per VC
  logic bz  [NO][NV];

  function automatic logic ok(int o, int v);
    int sh;
    sh = 0;
    for (int k = 0; k < NV; k++) if (cr[o][k] > 0) sh += cr[o][k] - 1;
    return cr[o][v] == 0 || sh < POOL;
  endfunction

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic compare();
    for (int o = 0; o < NO; o++) begin
      int f;
      f = -1;
      for (int v = NV - 1; v >= 0; v--) if (!bz[o][v] && ok(o, v)) f = v;
      chk(has_free[o] == (f >= 0), $sformatf("has_free port %0d", o));
      if (f >= 0) chk(free_vc[o] == 2'(f), $sformatf("free_vc port %0d: %0d exp %0d", o, free_vc[o], f));
      for (int v = 0; v < NV; v++)
        chk(credit_ok[o][v] == ok(o, v), $sformatf("credit_ok %0d/%0d", o, v));
    end
  endtask

  // apply one cycle of activity and update the model
  task automatic step();
    @(posedge clk); #1;
    for (int o = 0; o < NO; o++) begin
      if (send_valid[o]) begin
        cr[o][send_vc[o]]++;
        if (send_tail[o]) bz[o][send_vc[o]] = 0;
        else if (send_alloc[o]) bz[o][send_vc[o]] = 1;
      end
      if (credit_in[o].valid) cr[o][credit_in[o].vc]--;
    end
    send_valid = '0; send_alloc = '0; send_tail = '0; credit_in = '0;
    compare();
  endtask

  initial begin
    send_valid = '0; send_alloc = '0; send_tail = '0; send_vc = '0; credit_in = '0;
    for (int o = 0; o < NO; o++) for (int v = 0; v < NV; v++) begin cr[o][v] = 0; bz[o][v] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; #1;
    compare();
    // head of a 3-flit packet on port 0 takes VC 0
    send_valid[0] = 1; send_vc[0] = 0; send_alloc[0] = 1; step();
    chk(free_vc[0] == 2'd1, "VC 0 held by a packet");
    // single-flit packet on VC 1 does not hold it
    send_valid[0] = 1; send_vc[0] = 1; send_alloc[0] = 1; send_tail[0] = 1; step();
    chk(free_vc[0] == 2'd1, "single flit packet releases its VC");
    // body and tail of the first packet
    send_valid[0] = 1; send_vc[0] = 0; step();
    send_valid[0] = 1; send_vc[0] = 0; send_tail[0] = 1; step();
    chk(free_vc[0] == 2'd0, "tail frees VC 0");
    // fill the reserved slot of VC 0 on port 1 and the whole pool
    for (int k = 0; k < POOL + 1; k++) begin
      chk(credit_ok[1][0], "VC 0 may still send");
      send_valid[1] = 1; send_vc[1] = 0; send_alloc[1] = 1; send_tail[1] = 1; step();
    end
    chk(!credit_ok[1][0] && free_vc[1] == 2'd1 && credit_ok[1][1] && credit_ok[1][3],
        "VC 0 stopped, the others keep their reserved slot");
    send_valid[1] = 1; send_vc[1] = 3; send_tail[1] = 1; step();
    chk(!credit_ok[1][3] && credit_ok[1][1], "VC 3 used its reserved slot");
    credit_in[1].valid = 1; credit_in[1].vc = 3; step();
    credit_in[1].valid = 1; credit_in[1].vc = 0; step();
    chk(credit_ok[1][0], "credit returned");
    // random legal activity
    for (int t = 0; t < 3000; t++) begin
      for (int o = 0; o < NO; o++) begin
        int v;
        v = $urandom % NV;
        if ($urandom % 2 && ok(o, v)) begin
          if (!bz[o][v]) begin
            if (has_free[o]) begin
              send_valid[o] = 1; send_vc[o] = free_vc[o]; send_alloc[o] = 1;
              send_tail[o] = $urandom % 2;
            end
          end else begin
            send_valid[o] = 1; send_vc[o] = 2'(v); send_tail[o] = $urandom % 2;
          end
        end
        v = $urandom % NV;
        if ($urandom % 3 == 0 && cr[o][v] > 0) begin
          credit_in[o].valid = 1; credit_in[o].vc = 2'(v);
        end
      end
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
