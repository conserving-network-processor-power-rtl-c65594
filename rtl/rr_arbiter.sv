// rr_arbiter: round-robin arbiter over N requesters.
//
// Grants at most one requester per cycle (one-hot gnt, combinational from req).
// The search starts one position after the last granted requester; the pointer
// moves only when a grant is taken (advance). Helper used where several
// processing elements share a queue port.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;

  always_comb begin
    gnt = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last_q) + k) % N;
      if (gnt == '0 && req[idx]) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1);
    end else if (advance && gnt != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) last_q <= IW'(i);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
