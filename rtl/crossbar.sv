// crossbar: 5x5 crossbar switch joining the router's channels.
//
// Five inputs (north, east, south, west, local) and five outputs, the size
// the source gives. Each output has one mux4 that picks among the four
// other inputs; a flit never leaves through the port it came in on, so a
// 4:1 multiplexer (the source's multiplexer) is enough per output. For
// output o, select value k names input k when k < o and input k+1
// otherwise (noc_pkg::sel_to_in). out_valid[o] copies sel_valid[o]; the
// data of an output whose sel_valid is low is whatever its mux selects.
// Purely combinational.
module crossbar
  import noc_pkg::*;
(
  input  flit_t [NUM_PORTS-1:0]       in_data,
  input  logic  [NUM_PORTS-1:0][1:0]  sel,
  input  logic  [NUM_PORTS-1:0]       sel_valid,
  output flit_t [NUM_PORTS-1:0]       out_data,
  output logic  [NUM_PORTS-1:0]       out_valid
);

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    logic [3:0][FLIT_W-1:0] mux_in;
    logic [FLIT_W-1:0]      mux_out;

    for (genvar k = 0; k < 4; k++) begin : g_in
      assign mux_in[k] = in_data[(k >= o) ? k + 1 : k];
    end

    mux4 #(.WIDTH(FLIT_W)) u_mux (
      .i (mux_in),
      .s (sel[o]),
      .y (mux_out)
    );

    assign out_data[o]  = flit_t'(mux_out);
    assign out_valid[o] = sel_valid[o];
  end

endmodule
