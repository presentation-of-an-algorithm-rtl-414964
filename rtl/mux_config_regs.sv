// mux_config_regs: configuration registers of the reconfigurable network.
//
// One two-bit corner selection per core slot (noc_pkg::corner_t) records
// which adjoining operator the slot is connected to: the connectivity
// relation found by the design procedure. The selections drive every
// core_link_mux and, through core_sel, the destination lookup of every
// operator.
//
// Interface: one write port. When cfg_we is high at a clock edge, slot
// cfg_core takes selection cfg_sel, provided the slot exists and the chosen
// corner operator exists (slots in the last row or column have fewer
// neighbours; the bottom-right slot has only corner 0). A rejected write
// leaves the registers unchanged. cfg_ack (accepted) or cfg_err (rejected)
// is high for one cycle after the write. Reset selects corner 0 for every
// slot, so after reset each slot sits on its own operator and the network
// is a plain mesh with one core per operator.
//
// The register layout, write port and reset state are this design's choices.
module mux_config_regs
  import noc_pkg::*;
#(
  parameter int unsigned X = 4,   // rows of slots / operators
  parameter int unsigned Y = 4    // columns of slots / operators
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cfg_we,
  input  core_id_t cfg_core,
  input  corner_t  cfg_sel,
  output logic     cfg_ack,
  output logic     cfg_err,
  output corner_t  core_sel [X*Y]
);
  logic legal;

  always_comb begin
    int unsigned i, j;
    i = int'(cfg_core) / Y;
    j = int'(cfg_core) % Y;
    legal = (int'(cfg_core) < X * Y)
         && (i + int'(cfg_sel[1]) < X)
         && (j + int'(cfg_sel[0]) < Y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < X * Y; k++) core_sel[k] <= '0;
      cfg_ack <= 1'b0;
      cfg_err <= 1'b0;
    end else begin
      cfg_ack <= cfg_we && legal;
      cfg_err <= cfg_we && !legal;
      if (cfg_we && legal) core_sel[int'(cfg_core)] <= cfg_sel;
    end
  end
endmodule
