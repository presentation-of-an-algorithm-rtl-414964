// flit_fifo: synchronous first-in first-out buffer with a valid/ready
// interface on both sides, used as the input buffer of every operator port.
//
// DEPTH entries of W bits are held in a circular array with separate read and
// write pointers and an occupancy counter. in_ready is high whenever the
// buffer is not full; out_valid whenever it is not empty; out_data is the
// oldest entry, read combinationally. A word written at a clock edge can be
// read from the next cycle on (one cycle of latency, no fall-through), so
// in_ready never depends combinationally on out_ready. Reset empties the
// buffer. The buffer is a design choice of this implementation; its depth is
// a parameter.
module flit_fifo #(
  parameter int unsigned W     = 48,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic         out_ready
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          push, pop;

  assign in_ready  = (count < (AW + 1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW + 1)'(push) - (AW + 1)'(pop);
    end
  end
endmodule
