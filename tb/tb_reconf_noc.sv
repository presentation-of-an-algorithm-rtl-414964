// tb_reconf_noc: end-to-end test of the reconfigurable network at its
// default size (16 core slots on a 4 x 4 grid of operators).
//
// The sixteen slots are modelled here as traffic sources and sinks. The test
// runs two configurations:
//   1. after reset: every slot on its own operator (plain mesh);
//   2. clustered: the slots are written into groups of four around the
//      operators (1,1), (1,3), (3,1) and (3,3), so that four cores share
//      one operator, as the design procedure does for clusters.
// In each configuration it checks the no-contention latency of single
// packets (hops + 1 cycles, hops worked out here from the configuration),
// then runs random all-to-all traffic with random receiver readiness and
// checks that every packet reaches the slot it is addressed to, unaltered
// and in order per source/destination pair. Configuration writes naming a
// corner operator that does not exist must be rejected.
// Mechanisms counted (each must happen): accepted and rejected
// configuration writes, injection stalls, receiver backpressure, deliveries
// between slots sharing an operator, multi-hop deliveries, and deliveries
// through each of the four corner links.
module tb_reconf_noc;
  import noc_pkg::*;

  localparam int unsigned X  = 4;
  localparam int unsigned Y  = 4;
  localparam int unsigned NS = X * Y;

  logic     clk = 1'b0;
  logic     rst_n;
  logic     cfg_we;
  core_id_t cfg_core;
  corner_t  cfg_sel;
  logic     cfg_ack, cfg_err;
  corner_t  cfg_sel_o     [NS];
  flit_t    core_tx       [NS];
  logic     core_tx_valid [NS];
  logic     core_tx_ready [NS];
  flit_t    core_rx       [NS];
  logic     core_rx_valid [NS];
  logic     core_rx_ready [NS];

  reconf_noc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cfg_ok = 0, n_cfg_rej = 0, n_tx_stall = 0, n_rx_bp = 0;
  int n_shared = 0, n_multihop = 0;
  int n_corner [4] = '{0, 0, 0, 0};
  int n_sent = 0, n_recv = 0;

  corner_t cfg_model [NS];
  flit_t   exp_q [NS][NS][$];   // [src][dst]
  int      seq   [NS];
  bit      fired [NS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  function automatic int op_row(int slot);
    return slot / Y + int'(cfg_model[slot][1]);
  endfunction
  function automatic int op_col(int slot);
    return slot % Y + int'(cfg_model[slot][0]);
  endfunction
  function automatic int hops(int s, int d);
    int dr, dc;
    dr = op_row(s) - op_row(d);
    dc = op_col(s) - op_col(d);
    return (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input int slot, input int s, input bit expect_ok);
    @(negedge clk);
    cfg_we = 1'b1; cfg_core = core_id_t'(slot); cfg_sel = corner_t'(s);
    @(negedge clk);
    cfg_we = 1'b0;
    check(cfg_ack == expect_ok && cfg_err == !expect_ok, "configuration write answer");
    if (cfg_ack) begin
      n_cfg_ok++;
      cfg_model[slot] = corner_t'(s);
    end
    if (cfg_err) n_cfg_rej++;
  endtask

  // One packet through an empty network: latency must be hops + 1.
  task automatic single_packet(input int s, input int d);
    flit_t f;
    int lat;
    f.dst = core_id_t'(d); f.src = core_id_t'(s); f.data = 32'hA5A50000 | DATA_W'(s * 16 + d);
    for (int k = 0; k < NS; k++) core_rx_ready[k] = 1'b1;
    @(negedge clk);
    core_tx[s] = f; core_tx_valid[s] = 1'b1;
    #1 check(core_tx_ready[s], "empty network accepts");
    @(negedge clk);
    core_tx_valid[s] = 1'b0;
    lat = 1;
    while (!core_rx_valid[d] && lat < 40) begin
      @(negedge clk);
      lat++;
    end
    check(core_rx_valid[d] && core_rx[d] == f, "single packet delivered");
    check(lat == hops(s, d) + 1, "latency is hops + 1");
    if (lat != hops(s, d) + 1)
      $display("  %0d -> %0d: latency %0d, hops %0d", s, d, lat, hops(s, d));
    @(negedge clk);
  endtask

  // Random traffic for `cycles` cycles, then drain.
  task automatic random_traffic(input int cycles, input int load_pct);
    int cyc;
    bit busy;
    for (int k = 0; k < NS; k++) fired[k] = 1'b0;
    cyc  = 0;
    busy = 1'b1;
    while (cyc < cycles || busy) begin
      @(negedge clk);
      for (int k = 0; k < NS; k++) begin
        if (fired[k]) core_tx_valid[k] = 1'b0;
        if (!core_tx_valid[k] && cyc < cycles && $urandom_range(99) < load_pct) begin
          flit_t f;
          f.dst  = core_id_t'($urandom_range(NS - 1));
          f.src  = core_id_t'(k);
          f.data = DATA_W'(seq[k]);
          seq[k]++;
          core_tx[k]       = f;
          core_tx_valid[k] = 1'b1;
        end
        core_rx_ready[k] = ($urandom_range(99) < 75);
      end
      #1;
      busy = 1'b0;
      for (int k = 0; k < NS; k++) begin
        fired[k] = core_tx_valid[k] && core_tx_ready[k];
        if (core_tx_valid[k] && !core_tx_ready[k]) n_tx_stall++;
        if (core_tx_valid[k]) busy = 1'b1;
        if (fired[k]) begin
          exp_q[k][int'(core_tx[k].dst)].push_back(core_tx[k]);
          n_sent++;
        end
      end
      for (int d = 0; d < NS; d++) begin
        if (core_rx_valid[d] && !core_rx_ready[d]) n_rx_bp++;
        if (core_rx_valid[d] && core_rx_ready[d]) begin
          int s;
          s = int'(core_rx[d].src);
          n_recv++;
          check(int'(core_rx[d].dst) == d, "packet reaches its destination slot");
          if (s >= NS || exp_q[s][d].size() == 0) begin
            check(1'b0, "unexpected packet");
          end else begin
            flit_t e;
            e = exp_q[s][d].pop_front();
            check(core_rx[d] == e, "packet unaltered and in order");
            if (s != d && op_row(s) == op_row(d) && op_col(s) == op_col(d)) n_shared++;
            if (hops(s, d) > 1) n_multihop++;
            n_corner[int'(cfg_model[d])]++;
          end
        end
      end
      for (int s = 0; s < NS && !busy; s++)
        for (int d = 0; d < NS && !busy; d++)
          if (exp_q[s][d].size() != 0) busy = 1'b1;
      cyc++;
      if (cyc > cycles + 5000) begin
        check(1'b0, "network drains");
        busy = 1'b0;
      end
    end
    for (int k = 0; k < NS; k++) core_tx_valid[k] = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_core = '0; cfg_sel = '0;
    for (int k = 0; k < NS; k++) begin
      core_tx[k] = '0; core_tx_valid[k] = 1'b0; core_rx_ready[k] = 1'b1;
      cfg_model[k] = 2'd0; seq[k] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- configuration 1: plain mesh after reset ----
    for (int k = 0; k < NS; k++) check(cfg_sel_o[k] == 2'd0, "reset configuration");
    single_packet(0, 15);    // 6 hops
    single_packet(15, 0);
    single_packet(5, 6);     // 1 hop
    single_packet(9, 9);     // to itself
    random_traffic(1500, 40);

    // ---- configuration 2: four clusters of four slots ----
    // slot (i, j) goes to operator (2*(i/2)+1, 2*(j/2)+1):
    // corner bit 1 = row i even, corner bit 0 = column j even
    for (int k = 0; k < NS; k++) begin
      int i, j;
      i = k / Y; j = k % Y;
      cfg_write(k, ((i % 2 == 0) ? 2 : 0) + ((j % 2 == 0) ? 1 : 0), 1'b1);
    end
    cfg_write(15, 3, 1'b0);  // bottom-right slot has only corner 0
    cfg_write(3, 1, 1'b0);   // last column has no corner 1
    cfg_write(12, 2, 1'b0);  // last row has no corner 2
    for (int k = 0; k < NS; k++) check(cfg_sel_o[k] == cfg_model[k], "configuration read back");
    single_packet(0, 5);     // same operator (1,1): 0 hops
    single_packet(4, 1);
    single_packet(0, 15);    // operator (1,1) to (3,3): 4 hops
    single_packet(10, 3);    // operator (3,3) to (1,3): 2 hops
    random_traffic(1500, 40);

    // ---- back to the mesh, by writing corner 0 everywhere ----
    for (int k = 0; k < NS; k++) cfg_write(k, 0, 1'b1);
    single_packet(0, 15);
    random_traffic(500, 60);

    $display("sent=%0d received=%0d", n_sent, n_recv);
    $display("cfg accepted=%0d rejected=%0d tx_stalls=%0d rx_backpressure=%0d",
             n_cfg_ok, n_cfg_rej, n_tx_stall, n_rx_bp);
    $display("shared-operator=%0d multi-hop=%0d corner0..3=%0d %0d %0d %0d",
             n_shared, n_multihop, n_corner[0], n_corner[1], n_corner[2], n_corner[3]);
    check(n_sent == n_recv, "every packet received");
    check(n_cfg_ok > 0, "mechanism: configuration accepted");
    check(n_cfg_rej > 0, "mechanism: configuration rejected");
    check(n_tx_stall > 0, "mechanism: injection stall");
    check(n_rx_bp > 0, "mechanism: receiver backpressure");
    check(n_shared > 0, "mechanism: delivery between slots sharing an operator");
    check(n_multihop > 0, "mechanism: multi-hop delivery");
    for (int k = 0; k < 4; k++) check(n_corner[k] > 0, "mechanism: delivery through every corner link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
