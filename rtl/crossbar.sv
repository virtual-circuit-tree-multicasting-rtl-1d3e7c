// crossbar -- N_IN x N_OUT crossbar switch for flits.
//
// Each output takes the flit of the input named by its select and is valid
// when the switch allocator used it this cycle. Purely combinational; the
// router registers the outputs, which form the link traversal stage.
module crossbar
  import vctm_pkg::*;
#(
  parameter int unsigned N_IN  = NUM_PORTS,
  parameter int unsigned N_OUT = NUM_PORTS
)(
  input  flit_t [N_IN-1:0]                   in_flit,
  input  logic  [N_OUT-1:0]                  out_used,
  input  logic  [N_OUT-1:0][$clog2(N_IN)-1:0] out_sel,
  output link_t [N_OUT-1:0]                  out_link
);
  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out_link[o].valid = out_used[o];
      out_link[o].flit  = in_flit[out_sel[o]];
    end
  end
endmodule
