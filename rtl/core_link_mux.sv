// core_link_mux: the multiplexer/demultiplexer between one core slot and the
// operators at the four corners of its cell.
//
// Outgoing direction (demultiplexer): the core's flit is offered to all four
// corner operators, but valid is raised only towards the selected one, and the
// core sees that operator's ready. Incoming direction (multiplexer): the
// core receives the flit and valid of the selected operator's local port, and
// only that operator sees the core's ready; the other three see ready low.
// Corner numbering follows noc_pkg::corner_t. Purely combinational; sel is
// static while the network carries traffic.
//
// The placement of one multiplexer on every core link is the architecture's;
// the valid/ready handshake is this design's own choice.
module core_link_mux
  import noc_pkg::*;
(
  input  corner_t sel,
  // core side
  input  flit_t   core_tx,
  input  logic    core_tx_valid,
  output logic    core_tx_ready,
  output flit_t   core_rx,
  output logic    core_rx_valid,
  input  logic    core_rx_ready,
  // operator side, one link per corner
  output flit_t   to_op       [4],
  output logic    to_op_valid [4],
  input  logic    to_op_ready [4],
  input  flit_t   from_op       [4],
  input  logic    from_op_valid [4],
  output logic    from_op_ready [4]
);
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      to_op[k]         = core_tx;
      to_op_valid[k]   = core_tx_valid && (sel == 2'(k));
      from_op_ready[k] = core_rx_ready && (sel == 2'(k));
    end
    core_tx_ready = to_op_ready[sel];
    core_rx       = from_op[sel];
    core_rx_valid = from_op_valid[sel];
  end
endmodule
