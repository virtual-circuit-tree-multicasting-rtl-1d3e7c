// tb_switch_allocator -- checks the 5x5, 4-VC separable switch allocator.
// Random phase: every grant must answer a request of that VC for that port,
// no output is granted twice, out_used/out_sel agree with the input grants,
// and whenever some VC requests, some grant is made.
// Fairness phase: all 20 input VCs request the same output continuously;
// round robin at both stages must serve each of them exactly once in every
// 20 consecutive cycles.
module tb_switch_allocator;
  import vctm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0][3:0] req_valid;
  logic [4:0][3:0][2:0] req_port;
  logic [4:0] in_gnt, out_used;
  logic [4:0][1:0] in_gnt_vc;
  logic [4:0][2:0] in_gnt_port, out_sel;
  int checks = 0, failures = 0;

  switch_allocator #(.N_IN(5), .N_OUT(5), .N_VC(4)) dut (
    .clk, .rst_n, .req_valid, .req_port, .in_gnt, .in_gnt_vc, .in_gnt_port,
    .out_used, .out_sel);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  int served [5][4];

  initial begin
    req_valid = '0; req_port = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++)
        for (int v = 0; v < 4; v++) begin
          req_valid[i][v] = ($urandom % 3) == 0;
          req_port[i][v]  = 3'($urandom % 5);
        end
      #1;
      for (int o = 0; o < 5; o++) begin
        int n;
        n = 0;
        for (int i = 0; i < 5; i++)
          if (in_gnt[i] && in_gnt_port[i] == 3'(o)) begin
            n++;
            chk(out_used[o] && out_sel[o] == 3'(i), "out_sel matches input grant");
          end
        chk(n == (out_used[o] ? 1 : 0), "one grant per output");
      end
      for (int i = 0; i < 5; i++)
        if (in_gnt[i])
          chk(req_valid[i][in_gnt_vc[i]] && req_port[i][in_gnt_vc[i]] == in_gnt_port[i],
              "grant answers a request");
      chk((req_valid == '0) == (in_gnt == '0), "work conserving");
    end
    // fairness
    @(negedge clk);
    req_valid = '1;
    for (int i = 0; i < 5; i++) for (int v = 0; v < 4; v++) req_port[i][v] = 3'd2;
    for (int i = 0; i < 5; i++) for (int v = 0; v < 4; v++) served[i][v] = 0;
    for (int t = 0; t < 40; t++) begin
      #1;
      for (int i = 0; i < 5; i++) if (in_gnt[i]) served[i][in_gnt_vc[i]]++;
      @(negedge clk);
    end
    for (int i = 0; i < 5; i++)
      for (int v = 0; v < 4; v++)
        chk(served[i][v] == 2, $sformatf("input %0d vc %0d served %0d times in 40 cycles", i, v, served[i][v]));
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
