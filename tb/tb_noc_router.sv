// tb_noc_router: self-checking test of one eight-port operator.
//
// The operator under test is operator (1, 1) of a 4 x 4 network, which has
// all four mesh neighbours and all four local slots. A random but legal
// corner selection is given to every slot. Part 1 sends single flits into an
// empty operator from each input and checks that each leaves on the expected
// output exactly one cycle after it was accepted. Part 2 drives all eight
// inputs with random traffic and random output readiness; every flit carries
// its input port and a sequence number, and each must leave on the output
// computed here (column first, then row, towards the operator its destination
// slot is attached to, local port 4 + corner there) in per-input order.
module tb_noc_router;
  import noc_pkg::*;

  localparam int unsigned X = 4, Y = 4, ROW = 1, COL = 1;

  logic    clk = 1'b0;
  logic    rst_n;
  corner_t core_sel  [X*Y];
  flit_t   in_flit   [NPORTS];
  logic    in_valid  [NPORTS];
  logic    in_ready  [NPORTS];
  flit_t   out_flit  [NPORTS];
  logic    out_valid [NPORTS];
  logic    out_ready [NPORTS];

  noc_router #(.X(X), .Y(Y), .ROW(ROW), .COL(COL), .FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  flit_t exp_q [NPORTS][NPORTS][$];   // [input][output]
  int    seq   [NPORTS];
  int    n_out [NPORTS];
  int    n_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // Expected output port, from the slot's row/column and its corner.
  function automatic int expected_port(core_id_t d);
    int i, j, s, tr, tc;
    i  = int'(d) / Y;
    j  = int'(d) % Y;
    s  = int'(core_sel[d]);
    tr = i + s / 2;
    tc = j + s % 2;
    if (tc != COL) return (tc > COL) ? 1 : 3;
    if (tr != ROW) return (tr > ROW) ? 2 : 0;
    return 4 + s;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    for (int k = 0; k < X*Y; k++) begin
      int i, j;
      i = k / Y; j = k % Y;
      // random legal corner
      do core_sel[k] = corner_t'($urandom_range(3));
      while (i + int'(core_sel[k][1]) >= X || j + int'(core_sel[k][0]) >= Y);
    end
    // make sure the four local ports are all in use by some slot
    core_sel[0] = 2'd3;  // slot (0,0) on operator (1,1): port L3
    core_sel[1] = 2'd2;  // slot (0,1) on operator (1,1): port L2
    core_sel[4] = 2'd1;  // slot (1,0) on operator (1,1): port L1
    core_sel[5] = 2'd0;  // slot (1,1) on operator (1,1): port L0
    for (int p = 0; p < NPORTS; p++) begin
      in_flit[p] = '0; in_valid[p] = 1'b0; out_ready[p] = 1'b1;
      seq[p] = 0; n_out[p] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- part 1: latency through an empty operator ----
    for (int n = 0; n < 64; n++) begin
      int p, o, lat;
      flit_t f;
      p = n % NPORTS;
      f = '0;
      f.dst  = core_id_t'($urandom_range(X*Y - 1));
      f.data = DATA_W'(n);
      o = expected_port(f.dst);
      @(negedge clk);
      in_flit[p] = f; in_valid[p] = 1'b1;
      #1 check(in_ready[p], "empty operator accepts");
      @(negedge clk);             // accepted at the edge just passed
      in_valid[p] = 1'b0;
      lat = 0;
      while (!out_valid[o] && lat < 10) begin
        @(negedge clk);
        lat++;
      end
      // seen at the first negedge after acceptance: one cycle
      check(lat == 0, "one cycle through the operator");
      check(out_valid[o] && out_flit[o] == f, "flit on expected output");
      for (int q = 0; q < NPORTS; q++)
        if (q != o) check(!out_valid[q], "no flit on other outputs");
      @(negedge clk);             // taken (out_ready high)
    end

    // ---- part 2: random traffic on all inputs, in two configurations ----
    // (the second re-attaches slots (0,0) and (0,1) so that the north
    // output is used too; the operator is empty when it changes)
    for (int phase = 0; phase < 2; phase++) begin
      bit fired [NPORTS];
      int sent_total;
      sent_total = 0;
      if (phase == 1) begin
        core_sel[0] = 2'd1;   // slot (0,0) on operator (0,1)
        core_sel[1] = 2'd0;   // slot (0,1) on operator (0,1)
      end
      for (int p = 0; p < NPORTS; p++) fired[p] = 1'b0;
      for (int cyc = 0; cyc < 6000; cyc++) begin
        @(negedge clk);
        for (int p = 0; p < NPORTS; p++) begin
          if (fired[p]) in_valid[p] = 1'b0;
          if (!in_valid[p] && cyc < 5000 && $urandom_range(99) < 60) begin
            flit_t f;
            f.dst  = core_id_t'($urandom_range(X*Y - 1));
            f.src  = core_id_t'(p);
            f.data = DATA_W'(seq[p]);
            seq[p]++;
            in_flit[p]  = f;
            in_valid[p] = 1'b1;
          end
        end
        for (int o = 0; o < NPORTS; o++) out_ready[o] = ($urandom_range(99) < 70);
        #1;
        for (int p = 0; p < NPORTS; p++) begin
          fired[p] = in_valid[p] && in_ready[p];
          if (in_valid[p] && !in_ready[p]) n_stall++;
          if (fired[p]) begin
            exp_q[p][expected_port(in_flit[p].dst)].push_back(in_flit[p]);
            sent_total++;
          end
        end
        for (int o = 0; o < NPORTS; o++) begin
          if (out_valid[o] && out_ready[o]) begin
            int p;
            p = int'(out_flit[o].src);
            n_out[o]++;
            if (p >= NPORTS || exp_q[p][o].size() == 0) begin
              check(1'b0, "unexpected flit on an output");
            end else begin
              flit_t e;
              e = exp_q[p][o].pop_front();
              check(out_flit[o] == e, "flit leaves on expected output in order");
            end
          end
        end
      end
      for (int p = 0; p < NPORTS; p++)
        for (int o = 0; o < NPORTS; o++)
          check(exp_q[p][o].size() == 0, "all flits delivered");
      $display("phase %0d sent=%0d stalls=%0d", phase, sent_total, n_stall);
    end
    for (int o = 0; o < NPORTS; o++) check(n_out[o] > 0, "every output used");
    check(n_stall > 0, "input backpressure occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
