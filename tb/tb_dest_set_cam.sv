// tb_dest_set_cam -- checks the destination set CAM with 4 entries.
// Inserts five different sets: the first four fill trees 0..3 with Id 1,
// the fifth replaces the oldest (tree 0) and must get Id 0 (flipped again).
// After each insert every set is searched; the expected hit, tree number and
// Id come from a list kept by the testbench. The last part repeats random
// inserts and searches against the same reference.
module tb_dest_set_cam;
  localparam int NE = 4, MW = 16;
  logic clk = 0, rst_n = 0;
  logic [MW-1:0] search_mask, insert_mask;
  logic hit, hit_id, insert, alloc_id;
  logic [1:0] hit_tree, alloc_tree;
  int checks = 0, failures = 0;

  dest_set_cam #(.N_ENTRIES(NE), .MASK_W(MW)) dut (
    .clk, .rst_n, .search_mask, .hit, .hit_tree, .hit_id,
    .insert, .insert_mask, .alloc_tree, .alloc_id);

  always #5 clk = ~clk;

  logic [MW-1:0] ref_mask [NE];
  logic          ref_valid [NE];
  logic          ref_id [NE];
  int            ref_ptr;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic search(logic [MW-1:0] m);
    int exp_t;
    exp_t = -1;
    for (int i = NE - 1; i >= 0; i--) if (ref_valid[i] && ref_mask[i] == m) exp_t = i;
    search_mask = m; #1;
    chk(hit == (exp_t >= 0), $sformatf("hit for %h", m));
    if (exp_t >= 0) begin
      chk(hit_tree == 2'(exp_t), $sformatf("tree for %h: %0d exp %0d", m, hit_tree, exp_t));
      chk(hit_id == ref_id[exp_t], $sformatf("id for %h", m));
    end
  endtask

  task automatic do_insert(logic [MW-1:0] m);
    @(negedge clk);
    chk(alloc_tree == 2'(ref_ptr), $sformatf("alloc tree %0d exp %0d", alloc_tree, ref_ptr));
    chk(alloc_id == !ref_id[ref_ptr], "alloc id is the flipped id");
    insert = 1; insert_mask = m;
    @(negedge clk); insert = 0;
    ref_valid[ref_ptr] = 1; ref_mask[ref_ptr] = m; ref_id[ref_ptr] = !ref_id[ref_ptr];
    ref_ptr = (ref_ptr + 1) % NE;
  endtask

  logic [MW-1:0] sets [5] = '{16'h0034, 16'h0213, 16'h8000, 16'hfffe, 16'h0100};

  initial begin
    insert = 0; insert_mask = '0; search_mask = '0;
    for (int i = 0; i < NE; i++) begin ref_valid[i] = 0; ref_id[i] = 0; ref_mask[i] = '0; end
    ref_ptr = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    search(16'h0034);
    for (int s = 0; s < 5; s++) begin
      do_insert(sets[s]);
      for (int q = 0; q < 5; q++) search(sets[q]);
    end
    // fifth insert replaced tree 0 and flipped its Id back to 0
    search(sets[4]); chk(hit && hit_tree == 0 && hit_id == 0, "eviction of oldest");
    for (int t = 0; t < 500; t++) begin
      logic [MW-1:0] m;
      m = MW'($urandom % 8);
      search(m);
      if (!hit) do_insert(m);
    end
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
