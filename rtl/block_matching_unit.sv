// block_matching_unit: matching costs of one pixel against its d x d candidates.
//
// For pixel p the unit receives the descriptor f1 of p in the first image and
// the D*D descriptors of the second image at p + mv + offset, for every
// candidate motion vector mv in the D x D window (row-major, index
// k = (dy+R)*D + (dx+R) with R = D/2). One hamming64 per candidate computes
// all costs in parallel; the costs are registered, so out_valid/cost follow
// in_valid by one clock. A new pixel can be accepted every clock.
// The parallel per-candidate hamming units follow the published matching
// unit; the window size D=5 and the one-cycle register are this design's
// choices.
module block_matching_unit
  import flowacc_pkg::*;
#(
  parameter int unsigned D = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  feat_t f1,
  input  feat_t f2_win [D*D],
  output logic  out_valid,
  output cost_t cost [D*D]
);
  cost_t hd [D*D];

  for (genvar k = 0; k < D*D; k++) begin : g_cand
    hamming64 #(.FEAT_W(FEAT_W)) u_hd (
      .fa  (f1),
      .fb  (f2_win[k]),
      .hd(hd[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < D*D; k++) cost[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < D*D; k++) cost[k] <= hd[k];
      end
    end
  end
endmodule
