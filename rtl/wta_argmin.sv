// wta_argmin: winner-takes-all selection of the smallest cost.
//
// Returns the index and value of the minimum of N costs. On a tie the lower
// index wins (this design's choice). Purely combinational: a linear compare
// chain that synthesis may rebalance into a tree; the caller registers the
// result.
module wta_argmin #(
  parameter int unsigned N  = 25,
  parameter int unsigned CW = 7,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [CW-1:0] cost [N],
  output logic [IW-1:0] idx,
  output logic [CW-1:0] min_cost
);
  always_comb begin
    idx      = '0;
    min_cost = cost[0];
    for (int i = 1; i < int'(N); i++) begin
      if (cost[i] < min_cost) begin
        min_cost = cost[i];
        idx      = IW'(i);
      end
    end
  end
endmodule
