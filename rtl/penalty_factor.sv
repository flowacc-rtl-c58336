// penalty_factor: smoothness penalty of every flow in a 3x3 support region.
//
// For candidate i of the nine flows of the support region, the penalty is the
// sum of the L1 distances |x_i - x_j| + |y_i - y_j| to the eight other flows
// j of the region. A flow that agrees with its neighbours gets a small
// penalty. All nine penalties are computed in parallel, combinationally.
// The published design names the penalty as "the distance between two
// vectors"; summing the L1 distance over the region is this design's reading.
module penalty_factor
  import flowacc_pkg::*;
(
  input  flow_t            sr    [N_SR],
  output logic [PEN_W-1:0] theta [N_SR]
);
  function automatic logic [PEN_W-1:0] absdiff(input logic signed [FLOW_W-1:0] a,
                                               input logic signed [FLOW_W-1:0] b);
    logic signed [FLOW_W:0] d;
    d = {a[FLOW_W-1], a} - {b[FLOW_W-1], b};
    return (d < 0) ? PEN_W'(-d) : PEN_W'(d);
  endfunction

  always_comb begin
    for (int i = 0; i < int'(N_SR); i++) begin
      theta[i] = '0;
      for (int j = 0; j < int'(N_SR); j++) begin
        theta[i] = theta[i] + absdiff(sr[i].x, sr[j].x) + absdiff(sr[i].y, sr[j].y);
      end
    end
  end
endmodule
