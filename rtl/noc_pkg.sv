// noc_pkg: types and constants shared by the router modules.
//
// The router has five channels, north, east, south, west and local, joined
// by a 5x5 crossbar. A flit is one word of the channel FIFO; it carries the
// destination tile coordinates used by XY routing and a payload. The field
// widths (2-bit coordinates, 8-bit payload) are this design's choice: the
// source names the header and destination address but gives no widths. The
// FIFO depth of four locations follows the source.
package noc_pkg;

  // Channel / port numbering. Also the crossbar input and output index.
  typedef enum logic [2:0] {
    PORT_N = 3'd0,
    PORT_E = 3'd1,
    PORT_S = 3'd2,
    PORT_W = 3'd3,
    PORT_L = 3'd4
  } port_e;

  localparam int unsigned NUM_PORTS  = 5;
  localparam int unsigned COORD_W    = 2;   // mesh coordinate width (up to 4x4 tiles)
  localparam int unsigned PAYLOAD_W  = 8;   // payload bits per flit
  localparam int unsigned FIFO_DEPTH = 4;   // locations per channel FIFO

  typedef struct packed {
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // Crossbar select: each output chooses among the four other inputs
  // (no U-turns), numbered in ascending port order with the output's own
  // port skipped. These two helpers convert between the two numberings.
  function automatic logic [1:0] in_to_sel(input int unsigned out_port, input int unsigned in_port);
    return (in_port > out_port) ? 2'(in_port - 1) : 2'(in_port);
  endfunction

  function automatic int unsigned sel_to_in(input int unsigned out_port, input int unsigned sel);
    return (sel >= out_port) ? sel + 1 : sel;
  endfunction

endpackage
