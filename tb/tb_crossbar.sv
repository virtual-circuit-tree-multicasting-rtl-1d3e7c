// tb_crossbar -- random selects and flits; every output must carry the flit
// of the input it selects, valid exactly when it is used.
module tb_crossbar;
  import vctm_pkg::*;
  flit_t [4:0] in_flit;
  logic  [4:0] out_used;
  logic  [4:0][2:0] out_sel;
  link_t [4:0] out_link;
  int checks = 0, failures = 0;

  crossbar #(.N_IN(5), .N_OUT(5)) dut (.in_flit, .out_used, .out_sel, .out_link);

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 5; i++) begin
        in_flit[i]  = {$urandom, $urandom, $urandom, $urandom};
        out_used[i] = $urandom % 2;
        out_sel[i]  = 3'($urandom % 5);
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (out_link[o].valid !== out_used[o] ||
            (out_used[o] && out_link[o].flit !== in_flit[out_sel[o]])) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
