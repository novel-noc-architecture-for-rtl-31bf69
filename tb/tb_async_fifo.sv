// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// First measures the latency of one word through an empty FIFO (two to
// three read-clock edges). Then runs random writes and reads in three clock
// settings: write clock faster than read clock, slower, and equal. A queue
// in the testbench records every accepted write; every accepted read must
// return the oldest queued word. Also checks that data_out is zero while
// empty, that stack_full is reached (and blocks writes), that stack_half
// appears, and that nothing is lost at the end.
module tb_async_fifo;
  localparam int unsigned WIDTH = 12;
  localparam int unsigned DEPTH = 4;

  logic             clk_write = 0, clk_read = 0, rst = 1;
  logic [WIDTH-1:0] data_in, data_out;
  logic             write_to_stack, read_from_stack;
  logic             stack_full, stack_half, stack_empty;
  int wper = 6, rper = 10;
  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0;
  int n_full = 0, n_half = 0, n_written = 0, n_read = 0;
  bit run = 0;

  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #(wper) clk_write = ~clk_write;
  always #(rper) clk_read  = ~clk_read;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write side scoreboard
  always @(posedge clk_write) begin
    if (!rst && write_to_stack) begin
      if (stack_full) n_full++;
      else begin q.push_back(data_in); n_written++; end
    end
    if (!rst && stack_half) n_half++;
  end

  // read side scoreboard
  always @(posedge clk_read) begin
    if (!rst) begin
      if (stack_empty) check(data_out == '0, "data_out not zero while empty");
      else if (read_from_stack) begin
        check(q.size() > 0, "read with empty model");
        if (q.size() > 0) begin
          logic [WIDTH-1:0] exp;
          exp = q.pop_front();
          check(data_out == exp, $sformatf("data got %h exp %h", data_out, exp));
          n_read++;
        end
      end
    end
  end

  always @(negedge clk_write) if (run) begin
    write_to_stack <= ($urandom % 3) != 0;
    data_in        <= WIDTH'($urandom);
  end
  always @(negedge clk_read) if (run) read_from_stack <= ($urandom % 3) != 0;

  initial begin
    int edges;
    write_to_stack = 0; read_from_stack = 0; data_in = 0;
    repeat (4) @(posedge clk_read);
    rst = 0;
    repeat (2) @(posedge clk_read);
    // latency of one word
    @(negedge clk_write);
    data_in = 12'h5a5; write_to_stack = 1;
    @(posedge clk_write);
    #1 write_to_stack = 0;
    edges = 0;
    while (stack_empty && edges < 10) begin @(posedge clk_read); #1; edges++; end
    check(edges >= 2 && edges <= 3, $sformatf("latency %0d read edges", edges));
    @(negedge clk_read);
    read_from_stack = 1;
    @(negedge clk_read);
    read_from_stack = 0;
    // random traffic, three clock ratios
    for (int phase = 0; phase < 3; phase++) begin
      wper = (phase == 0) ? 3 : (phase == 1) ? 11 : 5;
      rper = (phase == 0) ? 10 : (phase == 1) ? 4 : 5;
      run = 1;
      repeat (600) @(posedge clk_read);
    end
    run = 0;
    write_to_stack = 0;
    read_from_stack = 1;
    repeat (20) @(posedge clk_read);
    #1;
    check(q.size() == 0 && stack_empty, "FIFO not drained");
    check(n_full > 0, "full never reached");
    check(n_half > 0, "half never reached");
    $display("written=%0d read=%0d full_hits=%0d", n_written, n_read, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
