// tb_xy_route -- exhaustive check of the X-Y route computation.
// For every (current node, destination) pair of the 4x4 mesh the expected
// port is derived by walking the coordinates: first the column difference
// decides East/West, then the row difference decides South/North, equal
// coordinates mean ejection. Purely combinational, no clock needed.
module tb_xy_route;
  import vctm_pkg::*;
  logic [NODE_W-1:0]    cur, dst;
  logic [NUM_PORTS-1:0] mask;
  int checks = 0, failures = 0;

  xy_route dut (.cur_node(cur), .dst_node(dst), .port_mask(mask));

  initial begin
    for (int c = 0; c < NODES; c++) begin
      for (int d = 0; d < NODES; d++) begin
        int cx, cy, dx, dy;
        logic [NUM_PORTS-1:0] exp;
        cx = c % 4; cy = c / 4; dx = d % 4; dy = d / 4;
        if (cx < dx)      exp = 5'b01000;   // E
        else if (cx > dx) exp = 5'b10000;   // W
        else if (cy < dy) exp = 5'b00100;   // S
        else if (cy > dy) exp = 5'b00010;   // N
        else              exp = 5'b00001;   // Ej
        cur = NODE_W'(c); dst = NODE_W'(d);
        #1;
        checks++;
        if (mask !== exp) begin
          failures++;
          $display("FAIL cur=%0d dst=%0d got %b exp %b", c, d, mask, exp);
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
