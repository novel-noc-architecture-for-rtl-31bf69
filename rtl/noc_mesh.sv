// noc_mesh: a 2D mesh network-on-chip built from noc_router tiles.
//
// MESH_X x MESH_Y routers; the router in column x, row y has tile
// coordinates (x, y) and tile index t = y*MESH_X + x. Neighbours are joined
// channel to channel: east output of (x,y) to west input of (x+1,y), north
// output of (x,y) to south input of (x,y+1), and the reverse directions
// likewise. Each link carries a flit, its valid bit, and the receiving
// FIFO's full flag back to the sender. The whole mesh runs on clk; the
// dual-clock FIFOs of the local channels let every processing element use
// its own clock (clk_in_l[t]). Building the network from the proposed router
// with XY routing follows the source; the mesh size is this design's choice
// (the source gives none): 4x4, the largest mesh the 2-bit flit coordinates
// can address.
//
// Channels at the mesh boundary: their inputs are idle and their outputs
// always accepted and left open, so a flit addressed outside the mesh
// (possible only when MESH_X or MESH_Y is below 4) leaves through the edge
// and is lost. In a 4x4 mesh XY routing never sends a flit off the edge.
//
// Per tile t, on the local channel: din_l/din_valid_l/in_full_l/in_half_l
// on clk_in_l[t]; dout_l/dout_valid_l/out_full_l on clk, with the same
// handshake as noc_router. drop[t] collects the U-turn drop pulses of the
// five channels of tile t. rst is asynchronous, active high.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned DEPTH  = FIFO_DEPTH,
  localparam int unsigned TILES = MESH_X * MESH_Y
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic  [TILES-1:0]           clk_in_l,
  input  flit_t [TILES-1:0]           din_l,
  input  logic  [TILES-1:0]           din_valid_l,
  output logic  [TILES-1:0]           in_full_l,
  output logic  [TILES-1:0]           in_half_l,
  output flit_t [TILES-1:0]           dout_l,
  output logic  [TILES-1:0]           dout_valid_l,
  input  logic  [TILES-1:0]           out_full_l,
  output logic  [TILES-1:0][NUM_PORTS-1:0] drop
);

  // Per-tile router port bundles.
  logic  [TILES-1:0][NUM_PORTS-1:0] r_clk_in;
  flit_t [TILES-1:0][NUM_PORTS-1:0] r_din;
  logic  [TILES-1:0][NUM_PORTS-1:0] r_din_valid;
  logic  [TILES-1:0][NUM_PORTS-1:0] r_in_full;
  logic  [TILES-1:0][NUM_PORTS-1:0] r_in_half;
  flit_t [TILES-1:0][NUM_PORTS-1:0] r_dout;
  logic  [TILES-1:0][NUM_PORTS-1:0] r_dout_valid;
  logic  [TILES-1:0][NUM_PORTS-1:0] r_out_full;

  initial assert (MESH_X >= 1 && MESH_X <= (1 << COORD_W) && MESH_Y >= 1 && MESH_Y <= (1 << COORD_W))
    else $error("noc_mesh: mesh larger than the flit coordinates can address");

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int unsigned T = y * MESH_X + x;

      noc_router #(
        .X_POS (COORD_W'(x)),
        .Y_POS (COORD_W'(y)),
        .DEPTH (DEPTH)
      ) u_router (
        .clk        (clk),
        .rst        (rst),
        .clk_in     (r_clk_in[T]),
        .din        (r_din[T]),
        .din_valid  (r_din_valid[T]),
        .in_full    (r_in_full[T]),
        .in_half    (r_in_half[T]),
        .dout       (r_dout[T]),
        .dout_valid (r_dout_valid[T]),
        .out_full   (r_out_full[T]),
        .drop       (drop[T])
      );

      // local channel
      assign r_clk_in[T][PORT_L]    = clk_in_l[T];
      assign r_din[T][PORT_L]       = din_l[T];
      assign r_din_valid[T][PORT_L] = din_valid_l[T];
      assign in_full_l[T]           = r_in_full[T][PORT_L];
      assign in_half_l[T]           = r_in_half[T][PORT_L];
      assign dout_l[T]              = r_dout[T][PORT_L];
      assign dout_valid_l[T]        = r_dout_valid[T][PORT_L];
      assign r_out_full[T][PORT_L]  = out_full_l[T];

      // Inputs: each comes from the neighbour's opposite output.
      // East input <- east neighbour's west output, and so on.
      if (x + 1 < MESH_X) begin : g_e
        assign r_clk_in[T][PORT_E]    = clk;
        assign r_din[T][PORT_E]       = r_dout[T + 1][PORT_W];
        assign r_din_valid[T][PORT_E] = r_dout_valid[T + 1][PORT_W];
        assign r_out_full[T][PORT_E]  = r_in_full[T + 1][PORT_W];
      end else begin : g_e_edge
        assign r_clk_in[T][PORT_E]    = clk;
        assign r_din[T][PORT_E]       = '0;
        assign r_din_valid[T][PORT_E] = 1'b0;
        assign r_out_full[T][PORT_E]  = 1'b0;
      end

      if (x > 0) begin : g_w
        assign r_clk_in[T][PORT_W]    = clk;
        assign r_din[T][PORT_W]       = r_dout[T - 1][PORT_E];
        assign r_din_valid[T][PORT_W] = r_dout_valid[T - 1][PORT_E];
        assign r_out_full[T][PORT_W]  = r_in_full[T - 1][PORT_E];
      end else begin : g_w_edge
        assign r_clk_in[T][PORT_W]    = clk;
        assign r_din[T][PORT_W]       = '0;
        assign r_din_valid[T][PORT_W] = 1'b0;
        assign r_out_full[T][PORT_W]  = 1'b0;
      end

      if (y + 1 < MESH_Y) begin : g_n
        assign r_clk_in[T][PORT_N]    = clk;
        assign r_din[T][PORT_N]       = r_dout[T + MESH_X][PORT_S];
        assign r_din_valid[T][PORT_N] = r_dout_valid[T + MESH_X][PORT_S];
        assign r_out_full[T][PORT_N]  = r_in_full[T + MESH_X][PORT_S];
      end else begin : g_n_edge
        assign r_clk_in[T][PORT_N]    = clk;
        assign r_din[T][PORT_N]       = '0;
        assign r_din_valid[T][PORT_N] = 1'b0;
        assign r_out_full[T][PORT_N]  = 1'b0;
      end

      if (y > 0) begin : g_s
        assign r_clk_in[T][PORT_S]    = clk;
        assign r_din[T][PORT_S]       = r_dout[T - MESH_X][PORT_N];
        assign r_din_valid[T][PORT_S] = r_dout_valid[T - MESH_X][PORT_N];
        assign r_out_full[T][PORT_S]  = r_in_full[T - MESH_X][PORT_N];
      end else begin : g_s_edge
        assign r_clk_in[T][PORT_S]    = clk;
        assign r_din[T][PORT_S]       = '0;
        assign r_din_valid[T][PORT_S] = 1'b0;
        assign r_out_full[T][PORT_S]  = 1'b0;
      end
    end
  end

endmodule
