// input_channel: input side of one router channel (north, east, south,
// west or local).
//
// Flits arrive in the sender's clock domain (clk_in) and are stored in a
// dual-clock FIFO (async_fifo, four locations by default) whose read side
// runs on the router clock, so a sender with a faster or slower clock loses
// no data: the source's reason for the per-channel FIFO. The oldest flit
// (head) is routed by xy_route, and the channel raises the one request bit
// of the output that route names. When the router pops the head (pop high
// on a rising edge of clk) the next flit moves up.
//
// A head whose route is the channel's own port would be a U-turn, which
// correct XY traffic never asks for and the crossbar cannot carry; the
// channel discards such a flit in one cycle and pulses drop. This rule is
// this design's choice; the source does not say what happens to a flit
// addressed back to where it came from.
//
// Write side (clk_in): din is stored when din_valid is high and full is
// low; full and half are the FIFO's flags for the sender. Read side (clk):
// head, req are combinational from the FIFO state. rst is asynchronous,
// active high.
module input_channel
  import noc_pkg::*;
#(
  parameter port_e              PORT  = PORT_L,
  parameter logic [COORD_W-1:0] X_POS = 1,
  parameter logic [COORD_W-1:0] Y_POS = 1,
  parameter int unsigned        DEPTH = FIFO_DEPTH
) (
  input  logic                 rst,
  // sender side
  input  logic                 clk_in,
  input  flit_t                din,
  input  logic                 din_valid,
  output logic                 full,
  output logic                 half,
  // router side
  input  logic                 clk,
  output flit_t                head,
  output logic [NUM_PORTS-1:0] req,
  input  logic                 pop,
  output logic                 drop
);

  logic [FLIT_W-1:0] fifo_out;
  logic              empty;
  port_e             route;

  async_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_fifo (
    .clk_write       (clk_in),
    .rst             (rst),
    .data_in         (din),
    .write_to_stack  (din_valid),
    .stack_full      (full),
    .stack_half      (half),
    .clk_read        (clk),
    .read_from_stack (pop || drop),
    .data_out        (fifo_out),
    .stack_empty     (empty)
  );

  assign head = flit_t'(fifo_out);

  xy_route #(.X_POS(X_POS), .Y_POS(Y_POS)) u_route (
    .dst_x    (head.dst_x),
    .dst_y    (head.dst_y),
    .out_port (route)
  );

  always_comb begin
    req  = '0;
    drop = 1'b0;
    if (!empty) begin
      if (route == PORT) drop = 1'b1;
      else               req[route] = 1'b1;
    end
  end

  // The router may only pop a flit that is there and that asked for an output.
  assert property (@(posedge clk) disable iff (rst) pop |-> (|req));

endmodule
