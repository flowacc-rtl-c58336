// median3x3_flow: 3x3 median filter for a flow field.
//
// The nine flows of a 3x3 neighbourhood are split into their x and y
// components and each component set is sorted by a fixed compare-exchange
// network; the fifth value of each is the output. Filtering the components
// separately (rather than picking one whole vector) is this design's choice.
// Purely combinational.
module median3x3_flow
  import flowacc_pkg::*;
(
  input  flow_t win [N_SR],
  output flow_t med
);
  // odd-even transposition sort of both components, 9 rounds
  always_comb begin
    logic signed [FLOW_W-1:0] xs [9];
    logic signed [FLOW_W-1:0] ys [9];
    logic signed [FLOW_W-1:0] t;
    t = '0;
    for (int i = 0; i < 9; i++) begin
      xs[i] = $signed(win[i].x);
      ys[i] = $signed(win[i].y);
    end
    for (int r = 0; r < 9; r++) begin
      for (int i = 0; i < 8; i++) begin
        if ((i % 2) == (r % 2)) begin
          if (xs[i] > xs[i+1]) begin t = xs[i]; xs[i] = xs[i+1]; xs[i+1] = t; end
          if (ys[i] > ys[i+1]) begin t = ys[i]; ys[i] = ys[i+1]; ys[i+1] = t; end
        end
      end
    end
    med.x = FLOW_W'(xs[4]);
    med.y = FLOW_W'(ys[4]);
  end
endmodule
