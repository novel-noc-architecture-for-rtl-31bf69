// tb_input_channel: self-checking test of one router input channel.
//
// The channel under test is the east channel of the router at tile (1,1);
// the sender clock (period 14) is slower than the router clock (period
// 10). Random flits with random destinations are written; the testbench
// predicts each flit's output port from the XY rule. A flit whose route is
// the east port itself (destination column 2 or 3) is a U-turn and must be
// discarded with a drop pulse; every other flit must appear at head, in
// order, with exactly the request bit of its port set. The router side pops
// at random, so the FIFO also fills up and exerts backpressure.
module tb_input_channel;
  import noc_pkg::*;

  logic                 rst = 1, clk_in = 0, clk = 0;
  flit_t                din, head;
  logic                 din_valid, full, half, pop, drop;
  logic [NUM_PORTS-1:0] req;
  flit_t q[$];
  int checks = 0, failures = 0;
  int n_drop = 0, n_full = 0, n_pop = 0, n_sent = 0;

  input_channel #(.PORT(PORT_E), .X_POS(2'd1), .Y_POS(2'd1)) dut (.*);

  always #7 clk_in = ~clk_in;
  always #5 clk    = ~clk;

  function automatic int exp_port(flit_t f);
    if (f.dst_x != 1) return (f.dst_x > 1) ? int'(PORT_E) : int'(PORT_W);
    if (f.dst_y != 1) return (f.dst_y > 1) ? int'(PORT_N) : int'(PORT_S);
    return int'(PORT_L);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sender
  always @(posedge clk_in) begin
    if (!rst && din_valid) begin
      if (full) n_full++;
      else begin q.push_back(din); n_sent++; end
    end
  end
  always @(negedge clk_in) begin
    din_valid <= !rst && n_sent < 300 && ($urandom % 4 != 0);
    din       <= flit_t'($urandom);
  end

  // router side
  always @(posedge clk) begin
    if (!rst) begin
      // flits still crossing the clock boundary are in q but not yet visible
      if (drop) begin
        check(q.size() > 0 && exp_port(q[0]) == int'(PORT_E) && req == '0, "drop of a routable flit");
        if (q.size() > 0) void'(q.pop_front());
        n_drop++;
      end else if (req != '0) begin
        check(q.size() > 0, "request with no flit sent");
        if (q.size() > 0) begin
          check(exp_port(q[0]) != int'(PORT_E), "U-turn flit not dropped");
          check(head == q[0], $sformatf("head %h exp %h", head, q[0]));
          check(req == NUM_PORTS'(1 << exp_port(q[0])), $sformatf("req %b for dst (%0d,%0d)", req, q[0].dst_x, q[0].dst_y));
          if (pop) begin void'(q.pop_front()); n_pop++; end
        end
      end
    end
  end
  always @(negedge clk) pop <= (req != '0) && ($urandom % 3 == 0);

  initial begin
    pop = 0; din_valid = 0; din = '0;
    repeat (4) @(posedge clk_in);
    rst = 0;
    wait (n_sent == 300);
    repeat (300) @(posedge clk);
    check(q.size() == 0, $sformatf("%0d flits left", q.size()));
    check(n_drop > 0, "no U-turn drop seen");
    check(n_full > 0, "FIFO never full");
    $display("sent=%0d popped=%0d dropped=%0d full_hits=%0d", n_sent, n_pop, n_drop, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
