// tb_noc_mesh: end-to-end test of the 4x4 mesh at its default parameters.
//
// Sixteen processing elements, each on its own clock (some faster, some
// slower than the mesh clock), send random flits to random tiles through
// their local channels, while the sixteen receivers raise out_full at
// random. The payload carries the source tile and a random tag; the
// testbench keeps one queue per (source, destination) pair, and every flit
// that leaves a local port must be the oldest outstanding flit of its pair
// at that tile: XY routing on a single path keeps each pair in order. A
// flit addressed to its own tile is a U-turn at the local channel and must
// produce a drop pulse instead. After the traffic, the mesh is drained and
// every queue must be empty: no flit lost, none duplicated, no deadlock.
//
// Part 1 first measures one flit from corner (0,0) to corner (3,3), six
// hops. The flit passes seven channel FIFOs (the local one and one per
// link), each costing two to three mesh clock edges, so the trip must take
// between 7*2 and 7*3 edges.
//
// Mechanisms that must each be seen at least once: local FIFO full, a
// mesh link blocked by a full neighbour FIFO, two or more inputs competing
// for one router output, a receiver blocking its tile's output, a U-turn
// drop, and a delivery over the longest (six-hop) path.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int unsigned MX = 4, MY = 4, TILES = MX * MY;
  localparam int unsigned FLITS_PER_TILE = 120;

  logic                  clk = 0, rst = 1;
  logic  [TILES-1:0]     clk_in_l = '0;
  flit_t [TILES-1:0]     din_l, dout_l;
  logic  [TILES-1:0]     din_valid_l, in_full_l, in_half_l, dout_valid_l, out_full_l;
  logic  [TILES-1:0][NUM_PORTS-1:0] drop;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  flit_t exp_q[TILES][TILES][$];   // [source][destination]
  int    sent[TILES];
  int    exp_drops = 0, got_drops = 0, delivered = 0, long_hauls = 0;
  int    n_in_full = 0, n_link_block = 0, n_contend = 0, n_rx_block = 0;
  int    checks = 0, failures = 0;
  bit    traffic = 0, stop = 0, draining = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = (s % MX) - (d % MX);
    dy = (s / MX) - (d / MX);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- senders, one per tile ----------------
  for (genvar t = 0; t < TILES; t++) begin : g_pe
    localparam int HALF = 3 + (t * 7) % 11;   // 3 .. 13 time units
    flit_t d = '0;
    logic  v = 1'b0;
    assign din_l[t]       = d;
    assign din_valid_l[t] = v;

    always #(HALF) clk_in_l[t] = ~clk_in_l[t];

    always @(posedge clk_in_l[t]) begin
      if (!rst && v) begin
        if (in_full_l[t]) n_in_full++;
        else begin
          int dst;
          dst = int'(d.dst_y) * MX + int'(d.dst_x);
          if (dst == t) exp_drops++;
          else exp_q[t][dst].push_back(d);
          sent[t]++;
        end
      end
    end

    always @(negedge clk_in_l[t]) begin
      if (traffic && sent[t] < FLITS_PER_TILE) begin
        v         <= ($urandom % 3) != 0;
        d.dst_x   <= COORD_W'($urandom);
        d.dst_y   <= COORD_W'($urandom);
        d.payload <= {4'(t), 4'($urandom)};
      end else if (traffic || stop) begin
        v <= 1'b0;
      end
    end
  end

  // ---------------- mechanism counters inside the routers ----------------
  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      always @(posedge clk) if (!rst) begin
        for (int o = 0; o < NUM_PORTS; o++) begin
          int ones, want;
          ones = 0; want = 0;
          for (int k = 0; k < 4; k++) if (dut.g_row[y].g_col[x].u_router.arb_req[o][k]) ones++;
          for (int i = 0; i < NUM_PORTS; i++) if (dut.g_row[y].g_col[x].u_router.req[i][o]) want++;
          if (ones >= 2) n_contend++;
          if (want > 0 && dut.g_row[y].g_col[x].u_router.out_full[o]) begin
            if (o == int'(PORT_L)) n_rx_block++;
            else n_link_block++;
          end
        end
      end
    end
  end

  // ---------------- receivers ----------------
  always @(posedge clk) begin
    if (!rst) begin
      for (int t = 0; t < TILES; t++) begin
        for (int p = 0; p < NUM_PORTS; p++) if (drop[t][p]) got_drops++;
        check(!(dout_valid_l[t] && out_full_l[t]), "flit offered to a full receiver");
        if (dout_valid_l[t]) begin
          int src;
          src = int'(dout_l[t].payload[7:4]);
          check(int'(dout_l[t].dst_y) * MX + int'(dout_l[t].dst_x) == t,
                $sformatf("tile %0d got flit for (%0d,%0d)", t, dout_l[t].dst_x, dout_l[t].dst_y));
          check(exp_q[src][t].size() > 0, $sformatf("unexpected flit %h at tile %0d", dout_l[t], t));
          if (exp_q[src][t].size() > 0) begin
            flit_t e;
            e = exp_q[src][t].pop_front();
            check(dout_l[t] == e, $sformatf("tile %0d got %h exp %h", t, dout_l[t], e));
          end
          if (hops(src, t) == 6) long_hauls++;
          delivered++;
        end
      end
    end
  end
  always @(negedge clk) out_full_l <= draining ? '0 : TILES'($urandom & $urandom);

  initial begin
    int edges;
    for (int t = 0; t < TILES; t++) sent[t] = 0;
    repeat (8) @(posedge clk_in_l[TILES-1]);
    rst = 0;
    repeat (4) @(posedge clk);

    // Part 1: six-hop latency, tile 0 -> tile 15
    @(negedge clk_in_l[0]);
    g_pe[0].d = '{dst_x: 2'd3, dst_y: 2'd3, payload: 8'h0a};
    g_pe[0].v = 1;
    @(posedge clk_in_l[0]);
    #1 g_pe[0].v = 0;
    edges = 0;
    while (!dout_valid_l[15] && edges < 60) begin @(posedge clk); #1; edges++; end
    check(edges >= 7 * 2 && edges <= 7 * 3, $sformatf("six-hop latency %0d edges", edges));
    $display("six-hop latency: %0d mesh clock edges", edges);
    repeat (3) @(posedge clk);
    for (int t = 0; t < TILES; t++) sent[t] = 0;

    // Part 2: random traffic
    traffic = 1;
    for (int t = 0; t < TILES; t++) wait (sent[t] >= FLITS_PER_TILE);
    traffic = 0;
    stop = 1;

    // Part 3: drain
    draining = 1;
    repeat (400) @(posedge clk);
    for (int s = 0; s < TILES; s++)
      for (int t = 0; t < TILES; t++)
        check(exp_q[s][t].size() == 0, $sformatf("%0d flits lost from %0d to %0d", exp_q[s][t].size(), s, t));
    check(got_drops == exp_drops, $sformatf("drops %0d exp %0d", got_drops, exp_drops));
    check(n_in_full > 0,    "local FIFO never full");
    check(n_link_block > 0, "no mesh link ever blocked");
    check(n_contend > 0,    "no output contention");
    check(n_rx_block > 0,   "no receiver ever blocked its tile");
    check(got_drops > 0,    "no U-turn drop");
    check(long_hauls > 0,   "no six-hop delivery");
    $display("delivered=%0d drops=%0d long_hauls=%0d local_full=%0d link_blocked=%0d rx_blocked=%0d contention=%0d",
             delivered, got_drops, long_hauls, n_in_full, n_link_block, n_rx_block, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
