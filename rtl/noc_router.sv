// noc_router: five-port network-on-chip router for a 2D mesh.
//
// Four neighbour channels (north, east, south, west) and one local channel
// for the attached processing element surround a 5x5 crossbar. Each
// channel's input side is a dual-clock FIFO, so every sender may run on its
// own clock (clk_in[p]) while the switch runs on clk; flits are routed with
// dimension-ordered XY routing, which is free of deadlock in a mesh. Each
// output has a round-robin arbiter that picks one of the four other
// channels whose head flit wants that output, and the crossbar's 4:1
// multiplexer passes the winner through. The channel structure, FIFO per
// channel, dual clocks, crossbar and XY routing follow the source; the flit
// format, arbitration policy, handshake and U-turn handling are this
// design's choices.
//
// Ports are indexed by noc_pkg::port_e (N=0, E=1, S=2, W=3, L=4).
//  - input p (clk_in[p]): din[p] is written when din_valid[p] is high and
//    in_full[p] is low; in_half[p] warns that the FIFO is half full.
//  - output p (clk): dout[p] is a flit for the neighbour when
//    dout_valid[p] is high; it is only raised while out_full[p] (the
//    neighbour FIFO's full flag, in clk's domain) is low, so the neighbour
//    must store it on that rising edge of clk. One flit per output per cycle.
//  - drop[p] pulses when channel p discards a U-turn flit.
//  - latency: a flit written on clk_in reaches dout two to three clk edges
//    later when its output is free.
// rst is asynchronous, active high, and must be held for a few edges of
// every clock.
module noc_router
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X_POS = 1,
  parameter logic [COORD_W-1:0] Y_POS = 1,
  parameter int unsigned        DEPTH = FIFO_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst,
  // input sides of the five channels
  input  logic  [NUM_PORTS-1:0] clk_in,
  input  flit_t [NUM_PORTS-1:0] din,
  input  logic  [NUM_PORTS-1:0] din_valid,
  output logic  [NUM_PORTS-1:0] in_full,
  output logic  [NUM_PORTS-1:0] in_half,
  // output sides of the five channels
  output flit_t [NUM_PORTS-1:0] dout,
  output logic  [NUM_PORTS-1:0] dout_valid,
  input  logic  [NUM_PORTS-1:0] out_full,
  // discarded U-turn flits
  output logic  [NUM_PORTS-1:0] drop
);

  flit_t [NUM_PORTS-1:0]                 head;
  logic  [NUM_PORTS-1:0][NUM_PORTS-1:0]  req;     // req[in][out]
  logic  [NUM_PORTS-1:0]                 pop;
  logic  [NUM_PORTS-1:0][3:0]            arb_req; // arb_req[out][sel]
  logic  [NUM_PORTS-1:0][3:0]            arb_gnt;
  logic  [NUM_PORTS-1:0][1:0]            arb_idx;
  logic  [NUM_PORTS-1:0]                 arb_any;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_ch
    input_channel #(
      .PORT  (port_e'(p)),
      .X_POS (X_POS),
      .Y_POS (Y_POS),
      .DEPTH (DEPTH)
    ) u_ch (
      .rst       (rst),
      .clk_in    (clk_in[p]),
      .din       (din[p]),
      .din_valid (din_valid[p]),
      .full      (in_full[p]),
      .half      (in_half[p]),
      .clk       (clk),
      .head      (head[p]),
      .req       (req[p]),
      .pop       (pop[p]),
      .drop      (drop[p])
    );
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_arb
    // Requests from the four other channels, gated by downstream space.
    for (genvar k = 0; k < 4; k++) begin : g_req
      assign arb_req[o][k] = req[(k >= o) ? k + 1 : k][o] && !out_full[o];
    end

    rr_arbiter #(.N(4)) u_arb (
      .clk         (clk),
      .rst         (rst),
      .req         (arb_req[o]),
      .grant       (arb_gnt[o]),
      .grant_idx   (arb_idx[o]),
      .grant_valid (arb_any[o])
    );
  end

  // A channel is popped when the arbiter of the output it asked for grants it.
  always_comb begin
    pop = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int k = 0; k < 4; k++) begin
        if (arb_gnt[o][k]) pop[sel_to_in(o, k)] = 1'b1;
      end
    end
  end

  crossbar u_xbar (
    .in_data   (head),
    .sel       (arb_idx),
    .sel_valid (arb_any),
    .out_data  (dout),
    .out_valid (dout_valid)
  );

  assert property (@(posedge clk) disable iff (rst) (dout_valid & out_full) == '0);

endmodule
