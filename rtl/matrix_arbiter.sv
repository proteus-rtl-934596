// matrix_arbiter: N:1 arbiter with least-recently-granted priority.
//
// The switch arbiter of the router is built from matrix arbiters. A
// priority bit for every pair of requesters records which of the two goes
// first; a requester is granted when it requests and no requester with
// priority over it does. After a grant (when update is high) the winner
// loses priority to every other requester, so it becomes the lowest. Only
// the N*(N-1)/2 bits above the diagonal are stored; the lower half is
// their complement. At reset lower indices have priority.
//
// Interface: req (one bit per requester), gnt (one-hot or zero, purely
// combinational from req and the stored state), update (apply the grant of
// this cycle to the priorities at the next clock edge).
module matrix_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] gnt
);
  // pri[i][j], i<j: 1 means i has priority over j.
  logic [N-1:0] pri [N];

  function automatic logic over(input int i, input int j, input logic [N-1:0] p [N]);
    return (i < j) ? p[i][j] : !p[j][i];
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) begin
      gnt[i] = req[i];
      for (int j = 0; j < N; j++)
        if (j != i && req[j] && !over(i, j, pri)) gnt[i] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) pri[i][j] <= (i < j);
    end else if (update) begin
      for (int i = 0; i < N; i++)
        for (int j = i + 1; j < N; j++) begin
          if (gnt[i])      pri[i][j] <= 1'b0;
          else if (gnt[j]) pri[i][j] <= 1'b1;
        end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_grant_if_req: assert property (@(posedge clk) disable iff (!rst_n) (|req) |-> (|gnt));
endmodule
