// tb_read_ctrl: self-checking test of the FIFO read control logic.
//
// The write pointer is driven directly (Gray coded). Checks: the FIFO is
// empty after reset; a write pointer move is seen after the two-flop
// synchronizer delay and not before; the read address steps by one per
// accepted read; a read while empty is ignored; the Gray read pointer
// matches the count; read_enable is the inverse of stack_empty.
module tb_read_ctrl;
  localparam int unsigned DEPTH = 4;
  logic       clk_read = 0, rst = 1;
  logic       read_from_stack;
  logic [2:0] wptr_gray, rptr_gray;
  logic [1:0] read_addr;
  logic       read_enable, stack_empty;
  int written = 0, read_cnt = 0;
  int checks = 0, failures = 0;

  read_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk_read = ~clk_read;

  function automatic logic [2:0] gray(int b);
    return 3'(b ^ (b >> 1));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    read_from_stack = 0; wptr_gray = 0;
    repeat (3) @(negedge clk_read);
    rst = 0;
    #1 check(stack_empty && !read_enable, "empty after reset");
    for (int lap = 0; lap < 6; lap++) begin
      int n_new;
      n_new = 1 + lap % DEPTH;
      written += n_new;
      wptr_gray = gray(written % (2 * DEPTH));
      @(negedge clk_read);
      check(stack_empty, "write visible too early");
      @(negedge clk_read);
      check(!stack_empty && read_enable, "write not visible after two edges");
      read_from_stack = 1;
      for (int n = 0; n < n_new + 2; n++) begin
        #1;
        check(stack_empty == (read_cnt == written), "stack_empty");
        check(read_enable == !stack_empty, "read_enable");
        check(read_addr == 2'(read_cnt % DEPTH), "read_addr");
        @(negedge clk_read);
        if (read_cnt < written) read_cnt++;
        check(rptr_gray == gray(read_cnt % (2 * DEPTH)), $sformatf("rptr_gray %b cnt %0d wr %0d", rptr_gray, read_cnt, written));
      end
      read_from_stack = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
