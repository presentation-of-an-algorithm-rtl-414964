// reconf_noc: reconfigurable network-on-chip, an X-by-Y mesh of eight-port
// operators with one core slot in every mesh cell.
//
// Structure. Operators (noc_router) sit on the grid points (r, c) and are
// linked to their north, east, south and west neighbours. Core slot (i, j)
// sits in the cell whose corners are operators (i, j), (i, j+1), (i+1, j)
// and (i+1, j+1); it has a link to each of those that exists, and a
// multiplexer/demultiplexer (core_link_mux) on its side picks the one link
// in use. Seen from an operator, its local ports 4..7 lead to the slots
// (r, c), (r, c-1), (r-1, c) and (r-1, c-1). Slots in the last row or column
// have two corner operators, the last slot only one. So one operator can
// serve up to four cores, and the configuration decides which cores share an
// operator: the topology follows the application's communication without
// moving any core.
//
// Configuration. mux_config_regs holds a corner selection per slot, written
// through cfg_we / cfg_core / cfg_sel (cfg_ack or cfg_err one cycle later;
// a write naming a corner operator that does not exist is rejected). The
// selections drive the multiplexers and the operators' destination lookup
// together. Reset attaches every slot to operator (i, j), a plain mesh.
// Reconfigure only while no flit is in the network.
//
// Traffic. Each slot injects single-flit packets (noc_pkg::flit_t, addressed
// to a destination slot) on core_tx with a valid/ready handshake and
// receives on core_rx. A flit passing h operator-to-operator links crosses
// h+1 operators and, without contention, reaches core_rx_valid h+1 cycles
// after the cycle of its core_tx handshake.
//
// Size. By default the network is sized for N_IP cores by the sizing rule in
// noc_pkg (most nearly square x*y >= N_IP with (x-y)/x <= 1/3); 16 cores give
// the 4 x 4 network of the architecture. Rows and columns can also be set
// directly. Mesh operation, the grid, eight-port operators and the
// multiplexers follow the architecture; flit format, routing, buffering and
// the configuration port are this design's own choices.
module reconf_noc
  import noc_pkg::*;
#(
  parameter int unsigned N_IP       = 16,
  parameter int unsigned X          = noc_pkg::grid_rows(N_IP),
  parameter int unsigned Y          = noc_pkg::grid_cols(N_IP),
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  // configuration port
  input  logic     cfg_we,
  input  core_id_t cfg_core,
  input  corner_t  cfg_sel,
  output logic     cfg_ack,
  output logic     cfg_err,
  output corner_t  cfg_sel_o     [X*Y],
  // core slots
  input  flit_t    core_tx       [X*Y],
  input  logic     core_tx_valid [X*Y],
  output logic     core_tx_ready [X*Y],
  output flit_t    core_rx       [X*Y],
  output logic     core_rx_valid [X*Y],
  input  logic     core_rx_ready [X*Y]
);
  localparam int unsigned NR = X * Y;

  corner_t sel [NR];

  // operator port signals, [operator][port]
  flit_t r_in_flit   [NR][NPORTS];
  logic  r_in_valid  [NR][NPORTS];
  logic  r_in_ready  [NR][NPORTS];
  flit_t r_out_flit  [NR][NPORTS];
  logic  r_out_valid [NR][NPORTS];
  logic  r_out_ready [NR][NPORTS];

  // multiplexer corner links, [slot][corner]
  flit_t m_to_flit    [NR][4];
  logic  m_to_valid   [NR][4];
  logic  m_to_ready   [NR][4];
  flit_t m_from_flit  [NR][4];
  logic  m_from_valid [NR][4];
  logic  m_from_ready [NR][4];

  mux_config_regs #(.X(X), .Y(Y)) u_cfg (
    .clk     (clk),
    .rst_n   (rst_n),
    .cfg_we  (cfg_we),
    .cfg_core(cfg_core),
    .cfg_sel (cfg_sel),
    .cfg_ack (cfg_ack),
    .cfg_err (cfg_err),
    .core_sel(sel)
  );

  assign cfg_sel_o = sel;

  for (genvar r = 0; r < X; r++) begin : g_row
    for (genvar c = 0; c < Y; c++) begin : g_col
      localparam int unsigned N = r * Y + c;

      noc_router #(.X(X), .Y(Y), .ROW(r), .COL(c), .FIFO_DEPTH(FIFO_DEPTH)) u_op (
        .clk      (clk),
        .rst_n    (rst_n),
        .core_sel (sel),
        .in_flit  (r_in_flit[N]),
        .in_valid (r_in_valid[N]),
        .in_ready (r_in_ready[N]),
        .out_flit (r_out_flit[N]),
        .out_valid(r_out_valid[N]),
        .out_ready(r_out_ready[N])
      );

      // ---- mesh links: this operator's input from each neighbour ----
      if (r > 0) begin : g_n
        assign r_in_flit[N][P_N]   = r_out_flit[N-Y][P_S];
        assign r_in_valid[N][P_N]  = r_out_valid[N-Y][P_S];
        assign r_out_ready[N-Y][P_S] = r_in_ready[N][P_N];
      end else begin : g_n_edge
        assign r_in_flit[N][P_N]  = '0;
        assign r_in_valid[N][P_N] = 1'b0;
        assign r_out_ready[N][P_N] = 1'b0;
      end
      if (r < X - 1) begin : g_s
        assign r_in_flit[N][P_S]   = r_out_flit[N+Y][P_N];
        assign r_in_valid[N][P_S]  = r_out_valid[N+Y][P_N];
        assign r_out_ready[N+Y][P_N] = r_in_ready[N][P_S];
      end else begin : g_s_edge
        assign r_in_flit[N][P_S]  = '0;
        assign r_in_valid[N][P_S] = 1'b0;
        assign r_out_ready[N][P_S] = 1'b0;
      end
      if (c > 0) begin : g_w
        assign r_in_flit[N][P_W]   = r_out_flit[N-1][P_E];
        assign r_in_valid[N][P_W]  = r_out_valid[N-1][P_E];
        assign r_out_ready[N-1][P_E] = r_in_ready[N][P_W];
      end else begin : g_w_edge
        assign r_in_flit[N][P_W]  = '0;
        assign r_in_valid[N][P_W] = 1'b0;
        assign r_out_ready[N][P_W] = 1'b0;
      end
      if (c < Y - 1) begin : g_e
        assign r_in_flit[N][P_E]   = r_out_flit[N+1][P_W];
        assign r_in_valid[N][P_E]  = r_out_valid[N+1][P_W];
        assign r_out_ready[N+1][P_W] = r_in_ready[N][P_E];
      end else begin : g_e_edge
        assign r_in_flit[N][P_E]  = '0;
        assign r_in_valid[N][P_E] = 1'b0;
        assign r_out_ready[N][P_E] = 1'b0;
      end

      // ---- local ports: port 4+k serves slot (r - k[1], c - k[0]) ----
      for (genvar k = 0; k < 4; k++) begin : g_loc
        localparam int DR = k / 2;
        localparam int DC = k % 2;
        if (r >= DR && c >= DC) begin : g_slot
          localparam int unsigned S = (r - DR) * Y + (c - DC);
          assign r_in_flit[N][4+k]   = m_to_flit[S][k];
          assign r_in_valid[N][4+k]  = m_to_valid[S][k];
          assign m_to_ready[S][k]    = r_in_ready[N][4+k];
          assign m_from_flit[S][k]   = r_out_flit[N][4+k];
          assign m_from_valid[S][k]  = r_out_valid[N][4+k];
          assign r_out_ready[N][4+k] = m_from_ready[S][k];
        end else begin : g_noslot
          assign r_in_flit[N][4+k]   = '0;
          assign r_in_valid[N][4+k]  = 1'b0;
          assign r_out_ready[N][4+k] = 1'b0;
        end
      end

      // ---- core slot (r, c): corners that fall outside the grid ----
      for (genvar k = 0; k < 4; k++) begin : g_corner
        localparam int DR = k / 2;
        localparam int DC = k % 2;
        if (r + DR >= X || c + DC >= Y) begin : g_none
          assign m_to_ready[N][k]   = 1'b0;
          assign m_from_flit[N][k]  = '0;
          assign m_from_valid[N][k] = 1'b0;
        end
      end

      core_link_mux u_mux (
        .sel          (sel[N]),
        .core_tx      (core_tx[N]),
        .core_tx_valid(core_tx_valid[N]),
        .core_tx_ready(core_tx_ready[N]),
        .core_rx      (core_rx[N]),
        .core_rx_valid(core_rx_valid[N]),
        .core_rx_ready(core_rx_ready[N]),
        .to_op        (m_to_flit[N]),
        .to_op_valid  (m_to_valid[N]),
        .to_op_ready  (m_to_ready[N]),
        .from_op      (m_from_flit[N]),
        .from_op_valid(m_from_valid[N]),
        .from_op_ready(m_from_ready[N])
      );
    end
  end
endmodule
