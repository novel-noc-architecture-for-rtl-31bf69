// xy_route: dimension-ordered XY route computation for one flit.
//
// Compares the flit's destination (dst_x, dst_y) with this router's own
// tile coordinates (X_POS, Y_POS): a flit first travels along X until its
// column matches (east if the destination is larger, west if smaller),
// then along Y (north if larger, south if smaller), and leaves through the
// local port when both match. XY routing is the algorithm the source names;
// it allows no Y-to-X turn, which keeps a mesh free of deadlock. Which
// direction counts as "larger" (east and north) is this design's choice.
// Purely combinational.
module xy_route
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X_POS = 1,
  parameter logic [COORD_W-1:0] Y_POS = 1
) (
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port
);

  always_comb begin
    if (dst_x > X_POS)      out_port = PORT_E;
    else if (dst_x < X_POS) out_port = PORT_W;
    else if (dst_y > Y_POS) out_port = PORT_N;
    else if (dst_y < Y_POS) out_port = PORT_S;
    else                    out_port = PORT_L;
  end

endmodule
