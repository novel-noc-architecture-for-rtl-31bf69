// async_fifo: channel FIFO buffer with independent write and read clocks.
//
// The router's channels use this FIFO to pass flits between the sender's
// clock domain and the router's clock domain without losing data when the
// two clocks differ, the problem the source sets out to solve. It is built
// from the three parts the source names: a memory buffer (mem_buffer), write
// control logic (write_ctrl) and read control logic (read_ctrl), each with
// a binary pointer that steps by one per access. Port names follow the
// source's FIFO drawing (Data_in, Write_to_stack, Clk_write, Rst,
// Stack_full, Stack_empty, Stack_Half, Data_out, Read_from_stack,
// Clk_read). The default depth of four locations follows the source.
//
// Interface and timing:
//  - write side (clk_write): data_in is stored on a rising edge while
//    write_to_stack is high and stack_full is low. stack_half is high while
//    at least DEPTH/2 words are held (write-domain view).
//  - read side (clk_read): data_out shows the oldest word whenever
//    stack_empty is low (first-word fall-through, zero when empty);
//    read_from_stack on a rising edge removes it.
//  - a written word reaches data_out after two to three read-clock edges.
//  - rst is asynchronous, active high, and clears both domains.
module async_fifo #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk_write,
  input  logic             rst,
  input  logic [WIDTH-1:0] data_in,
  input  logic             write_to_stack,
  output logic             stack_full,
  output logic             stack_half,
  input  logic             clk_read,
  input  logic             read_from_stack,
  output logic [WIDTH-1:0] data_out,
  output logic             stack_empty
);

  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned PTR_W  = ADDR_W + 1;

  logic [ADDR_W-1:0] write_addr, read_addr;
  logic              write_enable, read_enable;
  logic [PTR_W-1:0]  wptr_gray, rptr_gray;

  // The pointer-difference full test needs a power-of-two depth.
  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("async_fifo: DEPTH must be a power of two, at least 2");

  write_ctrl #(.DEPTH(DEPTH)) u_wctrl (
    .clk_write      (clk_write),
    .rst            (rst),
    .write_to_stack (write_to_stack),
    .rptr_gray      (rptr_gray),
    .write_addr     (write_addr),
    .write_enable   (write_enable),
    .wptr_gray      (wptr_gray),
    .stack_full     (stack_full),
    .stack_half     (stack_half)
  );

  read_ctrl #(.DEPTH(DEPTH)) u_rctrl (
    .clk_read        (clk_read),
    .rst             (rst),
    .read_from_stack (read_from_stack),
    .wptr_gray       (wptr_gray),
    .read_addr       (read_addr),
    .read_enable     (read_enable),
    .rptr_gray       (rptr_gray),
    .stack_empty     (stack_empty)
  );

  mem_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_mem (
    .clk          (clk_write),
    .write_addr   (write_addr),
    .read_addr    (read_addr),
    .write_enable (write_enable),
    .read_enable  (read_enable),
    .write_data   (data_in),
    .read_data    (data_out)
  );

endmodule
