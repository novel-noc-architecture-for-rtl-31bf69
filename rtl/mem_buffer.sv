// mem_buffer: storage array of one channel FIFO (the "memory buffer").
//
// A DEPTH x WIDTH register array with one write port and one read port.
// The write port is synchronous: on the rising edge of clk, when
// write_enable is high, write_data is stored at write_addr. The read port
// is combinational: while read_enable is high, read_data shows the word at
// read_addr, otherwise it is zero. The combinational read lets the FIFO
// present its oldest word without a clock of the reading domain, which is
// what makes one clock enough for this block in a dual-clock FIFO; clk is
// therefore the writer's clock. The port list follows the source's memory
// buffer drawing; the combinational read and the zero output while
// read_enable is low are this design's choices. No reset: the FIFO never
// reads a location it has not written.
module mem_buffer #(
  parameter int unsigned WIDTH  = 12,
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] write_addr,
  input  logic [ADDR_W-1:0] read_addr,
  input  logic              write_enable,
  input  logic              read_enable,
  input  logic [WIDTH-1:0]  write_data,
  output logic [WIDTH-1:0]  read_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (write_enable) mem[write_addr] <= write_data;
  end

  always_comb begin
    read_data = read_enable ? mem[read_addr] : '0;
  end

endmodule
