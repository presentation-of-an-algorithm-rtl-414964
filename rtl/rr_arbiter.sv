// rr_arbiter: round-robin arbiter for one operator output port.
//
// Among the N request lines it grants the first one at or after the priority
// pointer (one-hot grant, combinational from req). When the granted transfer
// completes (advance high) the pointer moves to the line just after the
// winner, so every requester is served within N grants. Reset points the
// priority at line 0. The arbitration policy is this design's own choice.
module rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] ptr;
  logic [PW-1:0] win;

  always_comb begin
    logic [PW:0] idx;
    grant = '0;
    win   = ptr;
    for (int unsigned k = 0; k < N; k++) begin
      // idx = (ptr + k) mod N, with ptr < N and k < N
      idx = {1'b0, ptr} + (PW + 1)'(k);
      if (idx >= (PW + 1)'(N)) idx = idx - (PW + 1)'(N);
      if (req[idx[PW-1:0]] && grant == '0) begin
        grant[idx[PW-1:0]] = 1'b1;
        win                = idx[PW-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     ptr <= '0;
    else if (advance && grant != '0) ptr <= (win == PW'(N - 1)) ? '0 : win + 1'b1;
  end
endmodule
