// noc_router: one operator of the reconfigurable mesh, with eight ports.
//
// Ports 0..3 are the mesh links to the neighbouring operators (N, E, S, W);
// ports 4..7 are local ports, one for each of the up to four core slots whose
// cell has this operator at a corner (see noc_pkg::port_e). This is the
// eight-port operator of the architecture: four mesh links plus one link to
// every adjoining core slot, of which the multiplexer configuration enables
// the ones whose core has chosen this operator.
//
// Packets are single flits addressed to a core slot. To route, the operator
// works out where the destination core is attached: slot (i, j) with corner
// selection s sits on operator (i + s[1], j + s[0]). The flit then goes
// dimension-ordered (column first, then row) towards that operator; at the
// operator itself it leaves on local port 4 + s. The corner selections of all
// slots come in on core_sel from the configuration registers, so changing the
// configuration re-targets routing and multiplexers together. The
// configuration must only be changed while the network is empty.
//
// Each input port has a FIFO of FIFO_DEPTH flits; each output port has a
// round-robin arbiter over the eight inputs and a valid/ready handshake.
// Timing: a flit accepted at a clock edge can leave on the next cycle, so a
// flit spends one cycle in every operator it passes (no-contention latency
// of one cycle per operator). in_ready depends only on FIFO occupancy.
//
// Dimension-order routing, the FIFOs and the arbiter are this design's own
// choices; the document gives only the number of ports and their use.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned X          = 4,   // operator rows
  parameter int unsigned Y          = 4,   // operator columns
  parameter int unsigned ROW        = 0,   // this operator's row
  parameter int unsigned COL        = 0,   // this operator's column
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  corner_t core_sel  [X*Y],
  input  flit_t   in_flit   [NPORTS],
  input  logic    in_valid  [NPORTS],
  output logic    in_ready  [NPORTS],
  output flit_t   out_flit  [NPORTS],
  output logic    out_valid [NPORTS],
  input  logic    out_ready [NPORTS]
);
  flit_t             head       [NPORTS];
  logic              head_valid [NPORTS];
  logic              head_pop   [NPORTS];
  logic [NPORTS-1:0] req        [NPORTS];   // req[out][in]
  logic [NPORTS-1:0] grant      [NPORTS];   // grant[out][in]
  logic [2:0]        route      [NPORTS];   // output chosen by each input

  // Output port towards the operator to which core slot d is attached.
  function automatic logic [2:0] route_of(core_id_t d, corner_t s);
    int di, dj, tr, tc;
    di = int'(d) / Y;
    dj = int'(d) % Y;
    tr = di + int'(s[1]);
    tc = dj + int'(s[0]);
    if (tc > int'(COL))      return P_E;
    else if (tc < int'(COL)) return P_W;
    else if (tr > int'(ROW)) return P_S;
    else if (tr < int'(ROW)) return P_N;
    else               return 3'(4 + int'(s));
  endfunction

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    logic [FLIT_W-1:0] q_data;
    flit_fifo #(.W(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_data  (in_flit[p]),
      .in_valid (in_valid[p]),
      .in_ready (in_ready[p]),
      .out_data (q_data),
      .out_valid(head_valid[p]),
      .out_ready(head_pop[p])
    );
    assign head[p] = flit_t'(q_data);
    // An out-of-range destination index is clamped to slot 0 for the
    // configuration lookup; the sources of this network never produce one.
    assign route[p] = route_of(head[p].dst,
                               core_sel[(int'(head[p].dst) < X*Y) ? int'(head[p].dst) : 0]);
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        req[o][i] = head_valid[i] && (int'(route[i]) == o);
      end
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic taken;
    assign taken = out_valid[o] && out_ready[o];
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk    (clk),
      .rst_n  (rst_n),
      .req    (req[o]),
      .advance(taken),
      .grant  (grant[o])
    );
    always_comb begin
      out_flit[o]  = '0;
      out_valid[o] = 1'b0;
      for (int i = 0; i < NPORTS; i++) begin
        if (grant[o][i]) begin
          out_flit[o]  = head[i];
          out_valid[o] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      head_pop[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++) begin
        if (grant[o][i] && out_ready[o]) head_pop[i] = 1'b1;
      end
    end
  end

  // Each input is granted by at most one output, and only a valid head
  // can be granted.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    logic [NPORTS-1:0] granted_by;
    always_comb for (int o = 0; o < NPORTS; o++) granted_by[o] = grant[o][i];
    a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
                                  $onehot0(granted_by));
    a_grant_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                    (granted_by != '0) |-> head_valid[i]);
  end
endmodule
