// tb_write_ctrl: self-checking test of the FIFO write control logic.
//
// The read pointer is driven directly (Gray coded, as the read domain
// would send it). Checks: the write address steps by one per accepted
// write; stack_half rises at DEPTH/2 words; stack_full at DEPTH words,
// after which write_enable stays low; the Gray write pointer matches the
// count; and a read pointer move frees space after the two-flop
// synchronizer delay (two clock edges) and not before.
module tb_write_ctrl;
  localparam int unsigned DEPTH = 4;
  logic       clk_write = 0, rst = 1;
  logic       write_to_stack;
  logic [2:0] rptr_gray, wptr_gray;
  logic [1:0] write_addr;
  logic       write_enable, stack_full, stack_half;
  int written = 0, read_cnt = 0;
  int checks = 0, failures = 0;

  write_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk_write = ~clk_write;

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
    write_to_stack = 0; rptr_gray = 0;
    repeat (3) @(negedge clk_write);
    rst = 0;
    for (int lap = 0; lap < 6; lap++) begin
      // fill until full
      write_to_stack = 1;
      for (int n = 0; n < DEPTH + 2; n++) begin
        bit we;
        #1;
        we = write_enable;
        check(stack_full == (written - read_cnt == DEPTH), "stack_full");
        check(stack_half == (written - read_cnt >= DEPTH / 2), "stack_half");
        check(write_enable == !stack_full, "write_enable gating");
        check(write_addr == 2'(written % DEPTH), "write_addr");
        @(negedge clk_write);
        if (we) written++;
        check(wptr_gray == gray(written % (2 * DEPTH)), "wptr_gray");
      end
      write_to_stack = 0;
      // the read side takes two words
      read_cnt += 2;
      rptr_gray = gray(read_cnt % (2 * DEPTH));
      @(negedge clk_write);
      check(stack_full, "full must hold until the read pointer is synchronized");
      @(negedge clk_write);
      check(!stack_full && stack_half, "space after two edges");
      // drain the rest
      read_cnt = written;
      rptr_gray = gray(read_cnt % (2 * DEPTH));
      repeat (2) @(negedge clk_write);
      check(!stack_half && !stack_full, "empty view");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
