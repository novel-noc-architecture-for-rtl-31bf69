// tb_xy_route: self-checking test of XY route computation.
//
// Two instances, at tiles (1,1) and (3,0), are given every destination of a
// 4x4 mesh; the expected port is worked out here from the XY rule (X first,
// east/north for larger coordinates, local when both match).
module tb_xy_route;
  import noc_pkg::*;
  logic [COORD_W-1:0] dst_x, dst_y;
  port_e out_a, out_b;
  int checks = 0, failures = 0;

  xy_route #(.X_POS(2'd1), .Y_POS(2'd1)) dut_a (.dst_x, .dst_y, .out_port(out_a));
  xy_route #(.X_POS(2'd3), .Y_POS(2'd0)) dut_b (.dst_x, .dst_y, .out_port(out_b));

  function automatic port_e expect_port(int x, int y, int px, int py);
    if (x != px) return (x > px) ? PORT_E : PORT_W;
    if (y != py) return (y > py) ? PORT_N : PORT_S;
    return PORT_L;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 4; y++) begin
        dst_x = 2'(x); dst_y = 2'(y); #1;
        checks += 2;
        if (out_a != expect_port(x, y, 1, 1)) begin
          failures++; $display("FAIL (1,1) dst (%0d,%0d) got %s", x, y, out_a.name());
        end
        if (out_b != expect_port(x, y, 3, 0)) begin
          failures++; $display("FAIL (3,0) dst (%0d,%0d) got %s", x, y, out_b.name());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
