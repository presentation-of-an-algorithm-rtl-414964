// noc_pkg: types, constants and elaboration-time helpers shared by the
// reconfigurable network-on-chip.
//
// The network carries single-flit packets. A flit names its destination and
// source core slot by index (row * Y + column) and carries a DATA_W payload.
// Destinations are core slots, not operators: which operator a core is
// attached to is decided by the multiplexer configuration, and every operator
// looks that up when it routes (see noc_router).
//
// Two rules of the design procedure are provided as constant functions so
// that a network can be sized at elaboration time:
//   grid_rows / grid_cols  - the sizing rule: starting from the number of IP
//                            cores N, find x*y == N with x >= y and
//                            (x - y)/x <= 1/3, taking the most nearly square
//                            pair; if none exists, try N+1, N+2, ...
//   central_row / central_col - the central operator of an x by y grid,
//                            1-based: ceil(x/2), ceil(y/2) (the four
//                            even/odd cases of the rule collapse to this).
// The payload width and the id width are this design's own choices.
package noc_pkg;

  localparam int unsigned DATA_W = 32;   // payload bits per flit
  localparam int unsigned ID_W   = 8;    // core index bits (up to 256 slots)

  typedef logic [ID_W-1:0] core_id_t;

  typedef struct packed {
    core_id_t           dst;   // destination core slot
    core_id_t           src;   // source core slot
    logic [DATA_W-1:0]  data;  // payload
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // Operator ports: four mesh links, then four local (core) ports.
  // Local port k serves the core for which this operator is corner k.
  typedef enum logic [2:0] {
    P_N  = 3'd0,   // towards row - 1
    P_E  = 3'd1,   // towards column + 1
    P_S  = 3'd2,   // towards row + 1
    P_W  = 3'd3,   // towards column - 1
    P_L0 = 3'd4,   // core (r,   c  ), corner 0 of that core
    P_L1 = 3'd5,   // core (r,   c-1), corner 1 of that core
    P_L2 = 3'd6,   // core (r-1, c  ), corner 2 of that core
    P_L3 = 3'd7    // core (r-1, c-1), corner 3 of that core
  } port_e;

  localparam int unsigned NPORTS = 8;

  // Corner selection of a core slot (i, j): which adjoining operator it uses.
  //   0: operator (i, j)      1: operator (i, j+1)
  //   2: operator (i+1, j)    3: operator (i+1, j+1)
  // bit 1 adds one row, bit 0 adds one column.
  typedef logic [1:0] corner_t;

  // ---- sizing rule --------------------------------------------------------
  // Returns {rows, cols} packed as rows*65536 + cols.
  function automatic int unsigned grid_size(int unsigned n_ip);
    int unsigned n;
    int unsigned best_x, best_y;
    int unsigned g_num, g_den;   // best (x-y)/x so far, as a fraction
    bit found;
    found  = 1'b0;
    best_x = 1;
    best_y = 1;
    g_num  = 1;
    g_den  = 1;
    n      = (n_ip == 0) ? 1 : n_ip;
    for (int unsigned iter = 0; iter < 4096 && !found; iter++) begin
      for (int unsigned x = 1; x <= n; x++) begin
        for (int unsigned y = 1; y <= x; y++) begin
          // x*y == n, x >= y, (x-y)/x <= 1/3, (x-y)/x < g_min
          if (x * y == n && 3 * (x - y) <= x && (x - y) * g_den < g_num * x) begin
            g_num  = x - y;
            g_den  = x;
            best_x = x;
            best_y = y;
            found  = 1'b1;
          end
        end
      end
      if (!found) n++;
    end
    return best_x * 65536 + best_y;
  endfunction

  function automatic int unsigned grid_rows(int unsigned n_ip);
    return grid_size(n_ip) / 65536;
  endfunction

  function automatic int unsigned grid_cols(int unsigned n_ip);
    return grid_size(n_ip) % 65536;
  endfunction

  // ---- central operator (1-based row and column) --------------------------
  function automatic int unsigned central_row(int unsigned x);
    return (x % 2 == 0) ? x / 2 : (x + 1) / 2;
  endfunction

  function automatic int unsigned central_col(int unsigned y);
    return (y % 2 == 0) ? y / 2 : (y + 1) / 2;
  endfunction

endpackage
