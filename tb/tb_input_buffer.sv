// tb_input_buffer -- checks the shared-pool input buffer of one port (4 VCs,
// 24 slots) against reference queues kept in the testbench.
// Directed part: all 24 slots are filled through one VC and drained in
// order; then the four VCs are filled to 6, 10, 1 and 7 flits, interleaved,
// and drained while new flits arrive. Random part: pushes to random VCs,
// skewed so that one VC often holds most of the pool, whenever the pool has
// room (as the upstream slot accounting guarantees), and pops from non-empty
// queues. Every cycle the head of every queue and the not-empty flags are
// compared, and each pop must return a credit for the popped VC in the same
// cycle.
module tb_input_buffer;
  import vctm_pkg::*;
  localparam int NV = 4, NS = 24;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [1:0] push_vc, pop_vc;
  buf_entry_t push_data;
  buf_entry_t [NV-1:0] front;
  logic [NV-1:0] not_empty;
  credit_t credit_out;
  int checks = 0, failures = 0;

  input_buffer #(.N_VC(NV), .N_SLOTS(NS)) dut (
    .clk, .rst_n, .push, .push_vc, .push_data, .pop, .pop_vc,
    .front, .not_empty, .credit_out);

  always #5 clk = ~clk;

  buf_entry_t q [NV][$];

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int total();
    int n;
    n = 0;
    for (int v = 0; v < NV; v++) n += q[v].size();
    return n;
  endfunction

  task automatic compare();
    for (int v = 0; v < NV; v++) begin
      chk(not_empty[v] == (q[v].size() != 0), $sformatf("not_empty vc %0d", v));
      if (q[v].size() != 0) chk(front[v] == q[v][0], $sformatf("front vc %0d", v));
    end
  endtask

  // one cycle with the given push / pop (already legal)
  task automatic cycle1(logic pu, int pv, logic po, int ov);
    push = pu; push_vc = 2'(pv); pop = po; pop_vc = 2'(ov);
    push_data = buf_entry_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
    #1;
    chk(credit_out.valid == pop && (!pop || credit_out.vc == pop_vc), "credit");
    @(posedge clk); #1;
    if (pop) void'(q[pop_vc].pop_front());
    if (push) q[push_vc].push_back(push_data);
    push = 0; pop = 0;
    compare();
  endtask

  initial begin
    push = 0; pop = 0; push_vc = 0; pop_vc = 0; push_data = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    compare();

    // the whole pool through VC 2
    for (int k = 0; k < NS; k++) cycle1(1, 2, 0, 0);
    chk(q[2].size() == NS, "24 flits held by one VC");
    for (int k = 0; k < NS; k++) cycle1(0, 0, 1, 2);
    chk(!not_empty[2], "VC 2 drained");

    // uneven fill, interleaved
    begin
      int want [NV] = '{6, 10, 1, 7};
      for (int k = 0; k < 10; k++)
        for (int v = 0; v < NV; v++)
          if (q[v].size() < want[v]) cycle1(1, v, 0, 0);
      chk(total() == NS, "pool full with 6/10/1/7");
      // drain while refilling (a freed slot is reusable from the next cycle)
      for (int k = 0; k < 60; k++) begin
        int ov, pv;
        ov = $urandom % NV;
        while (q[ov].size() == 0) ov = (ov + 1) % NV;
        pv = $urandom % NV;
        cycle1(total() < NS, pv, 1, ov);
      end
    end

    // random, skewed towards VC 0
    for (int t = 0; t < 6000; t++) begin
      int pv, ov;
      logic pu, po;
      pv = ($urandom % 2) ? 0 : $urandom % NV;
      ov = $urandom % NV;
      po = ($urandom % 2 == 0) && (q[ov].size() != 0);
      pu = ($urandom % 3 != 0) && (total() < NS);
      cycle1(pu, pv, po, ov);
    end
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
