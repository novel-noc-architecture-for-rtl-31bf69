// read_ctrl: read control logic of the dual-clock FIFO.
//
// Holds the binary read pointer, one bit wider than the memory address.
// Each accepted read (read_from_stack high and the FIFO not empty)
// increments the pointer by one, as the source describes. The write pointer
// arrives Gray coded from the write clock domain, passes a two-flop
// synchronizer and is turned back into binary; the FIFO is empty when both
// pointers are equal, the source's rule for "empty". read_enable is high
// whenever a word is available, so the memory shows the oldest word on its
// read port (first-word fall-through), and read_from_stack removes it.
// The Gray-coded crossing and fall-through output are this design's
// choices. Timing: everything on clk_read; a write becomes visible two to
// three read-clock edges after it happens. rst is asynchronous, active high.
module read_ctrl #(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned PTR_W  = ADDR_W + 1
) (
  input  logic              clk_read,
  input  logic              rst,
  input  logic              read_from_stack,
  input  logic [PTR_W-1:0]  wptr_gray,      // from the write domain, unsynchronized
  output logic [ADDR_W-1:0] read_addr,
  output logic              read_enable,
  output logic [PTR_W-1:0]  rptr_gray,      // to the write domain
  output logic              stack_empty
);

  import gray_pkg::*;

  logic [PTR_W-1:0] rptr;
  logic [PTR_W-1:0] rptr_next;   // wraps at 2*DEPTH before Gray coding
  logic [PTR_W-1:0] wptr_gray_sync;
  logic [PTR_W-1:0] wptr_bin;
  logic             do_read;

  gray_sync #(.WIDTH(PTR_W)) u_sync (
    .clk (clk_read),
    .rst (rst),
    .d   (wptr_gray),
    .q   (wptr_gray_sync)
  );

  always_comb begin
    rptr_next     = rptr + 1'b1;
    wptr_bin    = PTR_W'(gray2bin(32'(wptr_gray_sync)));
    stack_empty = (wptr_bin == rptr);
    read_enable = !stack_empty;
    read_addr   = rptr[ADDR_W-1:0];
    do_read     = read_from_stack && !stack_empty;
  end

  always_ff @(posedge clk_read or posedge rst) begin
    if (rst) begin
      rptr      <= '0;
      rptr_gray <= '0;
    end else if (do_read) begin
      rptr      <= rptr_next;
      rptr_gray <= rptr_next ^ (rptr_next >> 1);
    end
  end

endmodule
