// tb_vopd: the video object plane decoder (VOPD) application on the
// reconfigurable network at its default size.
//
// VOPD has sixteen cores; its communication graph gives one traffic volume
// per directed core pair (table below, core numbers 1..16). The test runs it
// twice on the same hardware:
//   mesh      - core n in slot n-1, every slot on its own operator (reset
//               configuration);
//   clustered - cores grouped four to an operator, the groups centred on
//               operators (1,1), (1,3), (3,1), (3,3):
//                 {5,6,7,8} {4,10,11,12} {9,13,14,15} {1,2,3,16}
//               (at most four cores per operator; the heaviest group on
//               the central operator)
// For each run every source core sends VOLUME/4 + 1 packets per edge, as fast as
// the network accepts them, to receivers that are always ready. The test
// checks that every packet arrives unaltered at the right slot, and that no
// packet is faster than hops+1 cycles. It reports the completion time,
// accepted throughput, mean latency and the communication energy
// sum(V * ((h+1) Es + h El)), with h taken from the configuration read back
// from the hardware, and checks that clustering lowers that energy.
module tb_vopd;
  import noc_pkg::*;

  localparam int unsigned X  = 4;
  localparam int unsigned Y  = 4;
  localparam int unsigned NS = X * Y;
  localparam int NE = 18;
  localparam int SCALE = 4;          // packets per edge = volume / SCALE

  // VOPD edges: source core, destination core, volume
  localparam int E_SRC [NE] = '{1, 2, 3, 4,  4, 16, 5, 6, 7, 8, 10, 9, 10, 12, 12, 15, 11, 12};
  localparam int E_DST [NE] = '{2, 3, 4, 5, 16,  5, 6, 7, 8, 9,  8, 10, 9,  6,  9, 11, 12, 13};
  localparam int E_VOL [NE] = '{70, 362, 362, 362, 49, 27, 357, 353, 300, 313, 500, 313, 94, 16, 16, 16, 16, 16};
  // the remaining three edges, between cores 13, 14 and 15
  localparam int NE2 = 3;
  localparam int E2_SRC [NE2] = '{15, 13, 14};
  localparam int E2_DST [NE2] = '{13, 14, 15};
  localparam int E2_VOL [NE2] = '{16, 157, 16};

  // Slot of each core (index 1..16) in the clustered placement. The group
  // with the most internal traffic, {5,6,7,8}, sits on the central operator
  // (1,1) of the 4 x 4 grid (row and column ceil(4/2) = 2, counted from 1);
  // the group it exchanges most with, {4,10,11,12}, on (1,3); {9,13,14,15}
  // on (3,1); {1,2,3,16} on (3,3).
  localparam int CL_SLOT [17] = '{0,
    /*1*/ 10, /*2*/ 11, /*3*/ 14, /*4*/ 2, /*5*/ 0, /*6*/ 1, /*7*/ 4, /*8*/ 5,
    /*9*/ 8, /*10*/ 3, /*11*/ 6, /*12*/ 7, /*13*/ 9, /*14*/ 12, /*15*/ 13, /*16*/ 15};

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
  int slot_of [17];
  flit_t pend  [NS][$];          // packets still to inject, per source slot
  flit_t exp_q [NS][NS][$];
  longint sent_at [NS][NS][$];
  longint now;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  function automatic int hops_hw(int s, int d);
    int rs, cs, rd, cd, dr, dc;
    rs = s / Y + int'(cfg_sel_o[s][1]); cs = s % Y + int'(cfg_sel_o[s][0]);
    rd = d / Y + int'(cfg_sel_o[d][1]); cd = d % Y + int'(cfg_sel_o[d][0]);
    dr = rs - rd; dc = cs - cd;
    return (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) now++;

  // Energy with Es = El = 1 (per-bit energies of operator and link; no
  // values are given, so only the comparison between placements matters).
  function automatic longint energy();
    longint e;
    e = 0;
    for (int k = 0; k < NE; k++) begin
      int h;
      h = hops_hw(slot_of[E_SRC[k]], slot_of[E_DST[k]]);
      e += E_VOL[k] * ((h + 1) + h);
    end
    for (int k = 0; k < NE2; k++) begin
      int h;
      h = hops_hw(slot_of[E2_SRC[k]], slot_of[E2_DST[k]]);
      e += E2_VOL[k] * ((h + 1) + h);
    end
    return e;
  endfunction

  task automatic add_edge(int s, int d, int vol, inout int seqn);
    for (int n = 0; n < vol / SCALE + 1; n++) begin
      flit_t f;
      f.src  = core_id_t'(slot_of[s]);
      f.dst  = core_id_t'(slot_of[d]);
      f.data = DATA_W'(seqn);
      seqn++;
      pend[slot_of[s]].push_back(f);
    end
  endtask

  task automatic run(input string name, output longint e_out);
    int seqn, n_pkt, n_recv;
    longint t0, lat_sum;
    bit fired [NS];
    seqn = 0; n_pkt = 0; n_recv = 0; lat_sum = 0;
    for (int k = 0; k < NE; k++) add_edge(E_SRC[k], E_DST[k], E_VOL[k], seqn);
    for (int k = 0; k < NE2; k++) add_edge(E2_SRC[k], E2_DST[k], E2_VOL[k], seqn);
    n_pkt = seqn;
    for (int k = 0; k < NS; k++) fired[k] = 1'b0;
    t0 = now;
    while (n_recv < n_pkt && now - t0 < 50000) begin
      @(negedge clk);
      for (int k = 0; k < NS; k++) begin
        if (fired[k]) begin
          void'(pend[k].pop_front());
          core_tx_valid[k] = 1'b0;
        end
        if (pend[k].size() != 0) begin
          core_tx[k]       = pend[k][0];
          core_tx_valid[k] = 1'b1;
        end
        core_rx_ready[k] = 1'b1;
      end
      #1;
      for (int k = 0; k < NS; k++) begin
        fired[k] = core_tx_valid[k] && core_tx_ready[k];
        if (fired[k]) begin
          exp_q[k][int'(core_tx[k].dst)].push_back(core_tx[k]);
          sent_at[k][int'(core_tx[k].dst)].push_back(now);
        end
      end
      for (int d = 0; d < NS; d++) begin
        if (core_rx_valid[d]) begin
          int s;
          s = int'(core_rx[d].src);
          n_recv++;
          if (s >= NS || exp_q[s][d].size() == 0) check(1'b0, "unexpected packet");
          else begin
            flit_t e;
            longint lat;
            e   = exp_q[s][d].pop_front();
            lat = now - sent_at[s][d].pop_front() + 1;
            lat_sum += lat;
            check(core_rx[d] == e && int'(core_rx[d].dst) == d, "packet delivered unaltered");
            check(lat >= hops_hw(s, d) + 1, "no packet faster than hops + 1");
          end
        end
      end
    end
    for (int k = 0; k < NS; k++) core_tx_valid[k] = 1'b0;
    check(n_recv == n_pkt, "all VOPD packets delivered");
    e_out = energy();
    $display("%s: packets=%0d cycles=%0d throughput=%0d.%02d flits/cycle mean latency=%0d.%02d cycles energy=%0d (Es=El=1)",
             name, n_pkt, now - t0,
             (n_pkt * 100 / (now - t0)) / 100, (n_pkt * 100 / (now - t0)) % 100,
             (lat_sum * 100 / n_pkt) / 100, (lat_sum * 100 / n_pkt) % 100, e_out);
  endtask

  initial begin
    longint e_mesh, e_clu;
    now = 0;
    rst_n = 1'b0; cfg_we = 1'b0; cfg_core = '0; cfg_sel = '0;
    for (int k = 0; k < NS; k++) begin
      core_tx[k] = '0; core_tx_valid[k] = 1'b0; core_rx_ready[k] = 1'b1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int c = 1; c <= 16; c++) slot_of[c] = c - 1;
    run("mesh     ", e_mesh);

    check(noc_pkg::central_row(X) == 2 && noc_pkg::central_col(Y) == 2,
          "central operator of the 4 x 4 grid is (2,2), counted from 1");
    check(noc_pkg::grid_rows(16) == X && noc_pkg::grid_cols(16) == Y,
          "sizing rule gives 4 x 4 for 16 cores");
    for (int c = 1; c <= 16; c++) slot_of[c] = CL_SLOT[c];
    for (int k = 0; k < NS; k++) begin
      int i, j;
      i = k / Y; j = k % Y;
      @(negedge clk);
      cfg_we = 1'b1; cfg_core = core_id_t'(k);
      cfg_sel = corner_t'(((i % 2 == 0) ? 2 : 0) + ((j % 2 == 0) ? 1 : 0));
      @(negedge clk);
      cfg_we = 1'b0;
      check(cfg_ack, "clustered configuration accepted");
    end
    run("clustered", e_clu);
    check(e_clu < e_mesh, "clustering lowers communication energy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
