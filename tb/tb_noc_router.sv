// tb_noc_router: end-to-end test of the five-port router at its default
// parameters (tile (1,1), four-flit channel FIFOs).
//
// Every channel has its own sender clock, some faster and some slower than
// the router clock. Part 1 sends one flit west-to-east through an idle
// router and checks its latency (two to three router clock edges from the
// write edge). Part 2 sends random flits with random destinations from all
// five senders at once while the five receivers raise out_full at random.
// The testbench computes each flit's output port from the XY rule; the
// payload carries the source port and a sequence number, so every flit that
// comes out is matched against a per-(input, output) queue and must arrive
// on the right port, unchanged and in order. Flits addressed back to their
// own input port must instead be dropped, one drop pulse each. Part 3
// drains the router and checks that nothing is lost.
//
// Mechanisms that must each be seen at least once: input FIFO full
// (backpressure to a sender), half-full flag, output blocked by out_full
// while a flit waits, two or more inputs competing for one output, a U-turn
// drop, every output used, and flits crossing from faster and from slower
// sender clocks.
module tb_noc_router;
  import noc_pkg::*;

  localparam int unsigned FLITS_PER_PORT = 200;

  logic                  clk = 0, rst = 1;
  logic  [NUM_PORTS-1:0] clk_in = '0;
  flit_t [NUM_PORTS-1:0] din, dout;
  logic  [NUM_PORTS-1:0] din_valid, in_full, in_half, dout_valid, out_full, drop;

  noc_router dut (.*);

  // router clock period 10; sender half periods below
  const int half_per[NUM_PORTS] = '{7, 9, 13, 3, 5};
  always #5 clk = ~clk;
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_clk
    always #(half_per[p]) clk_in[p] = ~clk_in[p];
  end

  flit_t exp_q[NUM_PORTS][NUM_PORTS][$];   // [input][output]
  int    sent[NUM_PORTS];
  int    exp_drops[NUM_PORTS], got_drops[NUM_PORTS];
  int    delivered[NUM_PORTS];
  int    checks = 0, failures = 0;
  int    n_in_full = 0, n_half = 0, n_blocked = 0, n_contend = 0;
  int    n_fast_src = 0, n_slow_src = 0;
  bit    traffic = 0, stop = 0, draining = 0;

  function automatic int xy_port(flit_t f);
    if (f.dst_x != 1) return (f.dst_x > 1) ? int'(PORT_E) : int'(PORT_W);
    if (f.dst_y != 1) return (f.dst_y > 1) ? int'(PORT_N) : int'(PORT_S);
    return int'(PORT_L);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- senders ----------------
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_send
    flit_t d = '0;
    logic  v = 1'b0;
    assign din[p]       = d;
    assign din_valid[p] = v;

    always @(posedge clk_in[p]) begin
      if (!rst && din_valid[p]) begin
        if (in_full[p]) n_in_full++;
        else begin
          int o;
          o = xy_port(din[p]);
          if (o == p) exp_drops[p]++;
          else exp_q[p][o].push_back(din[p]);
          sent[p]++;
          if (half_per[p] < 5) n_fast_src++;
          if (half_per[p] > 5) n_slow_src++;
        end
      end
      if (!rst && in_half[p]) n_half++;
    end
    always @(negedge clk_in[p]) begin
      if (traffic && sent[p] < FLITS_PER_PORT) begin
        v         <= ($urandom % 4) != 0;
        d.dst_x   <= COORD_W'($urandom);
        d.dst_y   <= COORD_W'($urandom);
        d.payload <= {3'(p), 5'($urandom)};
      end else if (traffic || stop) begin
        v <= 1'b0;
      end
    end
  end

  // ---------------- receivers ----------------
  always @(posedge clk) begin
    if (!rst) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        int src, want, ones;
        if (drop[o]) got_drops[o]++;
        check(!(dout_valid[o] && out_full[o]), "flit sent into a full receiver");
        if (dout_valid[o]) begin
          src = int'(dout[o].payload[7:5]);
          check(src < NUM_PORTS && src != o, $sformatf("output %0d bad source %0d", o, src));
          if (src < NUM_PORTS && src != o) begin
            check(exp_q[src][o].size() > 0, $sformatf("unexpected flit %h on output %0d", dout[o], o));
            if (exp_q[src][o].size() > 0) begin
              flit_t e;
              e = exp_q[src][o].pop_front();
              check(dout[o] == e, $sformatf("output %0d got %h exp %h", o, dout[o], e));
            end
          end
          delivered[o]++;
        end
        // mechanisms, seen from the head flits of the five channels
        want = 0;
        for (int i = 0; i < NUM_PORTS; i++) if (dut.req[i][o]) want++;
        if (want > 0 && out_full[o]) n_blocked++;
        ones = 0;
        for (int k = 0; k < 4; k++) if (dut.arb_req[o][k]) ones++;
        if (ones >= 2) n_contend++;
      end
    end
  end
  always @(negedge clk) out_full <= draining ? '0 : NUM_PORTS'($urandom & $urandom);

  initial begin
    int edges;
    out_full = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin sent[p] = 0; exp_drops[p] = 0; got_drops[p] = 0; delivered[p] = 0; end
    repeat (6) @(posedge clk_in[PORT_S]);
    rst = 0;
    repeat (4) @(posedge clk);

    // Part 1: latency of one flit west -> east
    @(negedge clk_in[PORT_W]);
    g_send[3].d = '{dst_x: 2'd3, dst_y: 2'd1, payload: {3'(PORT_W), 5'd31}};
    g_send[3].v = 1;
    @(posedge clk_in[PORT_W]);
    #1 g_send[3].v = 0;
    edges = 0;
    while (!dout_valid[PORT_E] && edges < 10) begin @(posedge clk); #1; edges++; end
    check(edges >= 2 && edges <= 3, $sformatf("latency %0d router clock edges", edges));
    repeat (3) @(posedge clk);
    for (int p = 0; p < NUM_PORTS; p++) sent[p] = 0;

    // Part 2: random traffic with random backpressure
    traffic = 1;
    for (int p = 0; p < NUM_PORTS; p++) wait (sent[p] >= FLITS_PER_PORT);
    traffic = 0;
    stop = 1;

    // Part 3: drain
    draining = 1;
    repeat (100) @(posedge clk);
    for (int i = 0; i < NUM_PORTS; i++) begin
      check(exp_drops[i] == got_drops[i], $sformatf("port %0d drops %0d exp %0d", i, got_drops[i], exp_drops[i]));
      for (int o = 0; o < NUM_PORTS; o++)
        check(exp_q[i][o].size() == 0, $sformatf("%0d flits lost from %0d to %0d", exp_q[i][o].size(), i, o));
      check(delivered[i] > 0, $sformatf("output %0d never used", i));
    end
    check(n_in_full > 0,  "input FIFO never full");
    check(n_half > 0,     "half flag never seen");
    check(n_blocked > 0,  "output never blocked");
    check(n_contend > 0,  "no output contention");
    check(got_drops.sum() > 0, "no U-turn drop");
    check(n_fast_src > 0 && n_slow_src > 0, "clock crossing from faster and slower senders");
    $display("delivered N=%0d E=%0d S=%0d W=%0d L=%0d drops=%0d in_full=%0d half=%0d blocked=%0d contention=%0d",
             delivered[0], delivered[1], delivered[2], delivered[3], delivered[4], got_drops.sum(),
             n_in_full, n_half, n_blocked, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
