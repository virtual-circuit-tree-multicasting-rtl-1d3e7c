// tb_vct_table -- checks the virtual circuit tree table.
// Part 1 replays the tree construction example: the entry of tree 1 of source
// 0 at node 1 first holds {Id 0, S, count 1}; setup packet A (Id 1, East)
// finds it stale and replaces it with {1, E, 1}; B (Id 1, South) adds S,
// count 2; C (Id 1, East) changes nothing.
// Part 2 drives random setups and lookups on all five channels (each channel
// owning its own set of sources, as in the router) and compares every read
// with a reference model kept in the testbench.
module tb_vct_table;
  import vctm_pkg::*;
  localparam int NE = 1024;
  localparam int NC = 5;

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] acc_valid, acc_setup, acc_id;
  logic [NC-1:0][9:0] acc_idx;
  logic [NC-1:0][NUM_PORTS-1:0] acc_mask;
  vct_entry_t [NC-1:0] rd;
  int checks = 0, failures = 0;

  vct_table #(.N_ENTRIES(NE), .N_CH(NC)) dut (
    .clk, .rst_n, .acc_valid, .acc_setup, .acc_idx, .acc_id,
    .acc_port_mask(acc_mask), .rd_entry(rd));

  always #5 clk = ~clk;

  logic [8:0] model [NE];

  task automatic check_entry(int ch, logic [8:0] exp, string what);
    checks++;
    if (rd[ch] !== exp) begin
      failures++;
      $display("FAIL %s: entry %0d got %b exp %b", what, acc_idx[ch], rd[ch], exp);
    end
  endtask

  task automatic setup1(int idx, logic id, logic [4:0] m);
    acc_valid = '0; acc_setup = '0;
    acc_valid[0] = 1; acc_setup[0] = 1; acc_idx[0] = 10'(idx);
    acc_id[0] = id; acc_mask[0] = m;
    @(posedge clk); #1;
    acc_valid = '0; acc_setup = '0;
  endtask

  localparam logic [4:0] EJ = 5'b00001, N = 5'b00010, S = 5'b00100,
                         E = 5'b01000, W = 5'b10000;

  initial begin
    acc_valid = '0; acc_setup = '0; acc_id = '0; acc_idx = '0; acc_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // ---- part 1: the construction example, tree {src 0, tree 1}
    setup1(1, 1'b0, S);
    acc_idx[0] = 10'd1; #1; check_entry(0, {1'b0, S, 3'd1}, "step 5");
    setup1(1, 1'b1, E);
    acc_idx[0] = 10'd1; #1; check_entry(0, {1'b1, E, 3'd1}, "after A");
    setup1(1, 1'b1, S);
    acc_idx[0] = 10'd1; #1; check_entry(0, {1'b1, E | S, 3'd2}, "after B");
    setup1(1, 1'b1, E);
    acc_idx[0] = 10'd1; #1; check_entry(0, {1'b1, E | S, 3'd2}, "after C");
    // entries untouched by these writes are still clear
    acc_idx[0] = 10'd0; #1; check_entry(0, 9'd0, "untouched");

    // ---- part 2: random traffic against a model
    for (int i = 0; i < NE; i++) model[i] = '0;
    model[1] = {1'b1, E | S, 3'd2};
    for (int t = 0; t < 4000; t++) begin
      for (int c = 0; c < NC; c++) begin
        // channel c owns sources c, c+5, c+10, c+15
        int src;
        src = c + 5 * ($urandom % ((c == 0) ? 4 : 3));
        acc_valid[c] = ($urandom % 4) != 0;
        acc_setup[c] = $urandom % 2;
        acc_idx[c]   = 10'({src[3:0], 6'($urandom % 8)});
        acc_id[c]    = $urandom % 2;
        acc_mask[c]  = 5'b1 << ($urandom % 5);
      end
      #1;
      for (int c = 0; c < NC; c++) check_entry(c, model[acc_idx[c]], "random read");
      for (int c = 0; c < NC; c++) begin
        if (acc_valid[c] && acc_setup[c]) begin
          logic [8:0] m;
          m = model[acc_idx[c]];
          if (m[8] != acc_id[c])            m = {acc_id[c], acc_mask[c], 3'd1};
          else if ((m[7:3] & acc_mask[c]) == 0) m = {m[8], m[7:3] | acc_mask[c], m[2:0] + 3'd1};
          model[acc_idx[c]] = m;
        end
      end
      @(posedge clk); #1;
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
