// write_ctrl: write control logic of the dual-clock FIFO.
//
// Holds the binary write pointer, one bit wider than the memory address.
// Each accepted write (write_to_stack high and the FIFO not full) stores
// the word at the location the pointer names and then increments the
// pointer by one, as the source describes. The read pointer arrives Gray
// coded from the read clock domain, passes a two-flop synchronizer and is
// turned back into binary. The FIFO is full when write pointer minus read
// pointer equals DEPTH, the source's rule for "full"; stack_half is high
// while at least DEPTH/2 words are stored. The half-full threshold and the
// Gray-coded crossing are this design's choices.
// Timing: everything on clk_write; flags are combinational from registers
// and see reads two to three write-clock edges late (pessimistic, never
// overflowing). rst is asynchronous, active high.
module write_ctrl #(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned PTR_W  = ADDR_W + 1
) (
  input  logic              clk_write,
  input  logic              rst,
  input  logic              write_to_stack,
  input  logic [PTR_W-1:0]  rptr_gray,      // from the read domain, unsynchronized
  output logic [ADDR_W-1:0] write_addr,
  output logic              write_enable,
  output logic [PTR_W-1:0]  wptr_gray,      // to the read domain
  output logic              stack_full,
  output logic              stack_half
);

  import gray_pkg::*;

  logic [PTR_W-1:0] wptr;
  logic [PTR_W-1:0] wptr_next;   // wraps at 2*DEPTH before Gray coding
  logic [PTR_W-1:0] rptr_gray_sync;
  logic [PTR_W-1:0] rptr_bin;
  logic [PTR_W-1:0] used;

  gray_sync #(.WIDTH(PTR_W)) u_sync (
    .clk (clk_write),
    .rst (rst),
    .d   (rptr_gray),
    .q   (rptr_gray_sync)
  );

  always_comb begin
    wptr_next     = wptr + 1'b1;
    rptr_bin     = PTR_W'(gray2bin(32'(rptr_gray_sync)));
    used         = wptr - rptr_bin;
    stack_full   = (used == PTR_W'(DEPTH));
    stack_half   = (used >= PTR_W'(DEPTH / 2));
    write_enable = write_to_stack && !stack_full;
    write_addr   = wptr[ADDR_W-1:0];
  end

  always_ff @(posedge clk_write or posedge rst) begin
    if (rst) begin
      wptr      <= '0;
      wptr_gray <= '0;
    end else if (write_enable) begin
      wptr      <= wptr_next;
      wptr_gray <= wptr_next ^ (wptr_next >> 1);
    end
  end

endmodule
