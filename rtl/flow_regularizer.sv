// flow_regularizer: smoothness constraint on the coarse flow of one pixel.
//
// Inputs are the nine coarse flows of the 3x3 support region around p
// (residuals of the current level, so each lies inside p's D x D search
// window), the descriptor f1 of p and the D x D window of second-image
// descriptors that the block-matching unit used for p. Two parallel branches
// work on the nine candidates:
//   - smooth cost: the window descriptor at candidate i is matched against f1
//     with a hamming64 (the window of the matching unit is reused, so no new
//     descriptors are fetched);
//   - penalty: penalty_factor gives each candidate's distance to the region.
// A parallel adder forms E_i = cost_i + LAMBDA * theta_i and a WTA picks the
// candidate with the lowest energy. Candidates outside the window are clamped
// to its border. Two register stages: mv_s/out_valid follow in_valid by two
// clocks, one pixel per clock. The branch structure follows the published
// design; LAMBDA, the clamping and the pipeline depth are this design's.
module flow_regularizer
  import flowacc_pkg::*;
#(
  parameter int unsigned D      = 5,
  parameter int unsigned LAMBDA = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flow_t sr     [N_SR],
  input  feat_t f1,
  input  feat_t f2_win [D*D],
  output logic  out_valid,
  output flow_t mv_s
);
  localparam int R   = int'(D) / 2;
  localparam int E_W = PEN_W + 8;

  // ---- stage 1: smooth cost and penalty branches
  feat_t            f2_sel [N_SR];
  cost_t            sc     [N_SR];
  logic [PEN_W-1:0] theta  [N_SR];

  function automatic int clampr(input logic signed [FLOW_W-1:0] v);
    int t;
    t = int'(v);
    if (t < -R) t = -R;
    if (t > R)  t = R;
    return t + R;
  endfunction

  always_comb begin
    for (int i = 0; i < int'(N_SR); i++) begin
      f2_sel[i] = f2_win[clampr(sr[i].y) * int'(D) + clampr(sr[i].x)];
    end
  end

  for (genvar i = 0; i < N_SR; i++) begin : g_sc
    hamming64 #(.FEAT_W(FEAT_W)) u_hd (.fa(f1), .fb(f2_sel[i]), .hd(sc[i]));
  end

  penalty_factor u_pen (.sr(sr), .theta(theta));

  logic             v1;
  cost_t            sc_q    [N_SR];
  logic [PEN_W-1:0] theta_q [N_SR];
  flow_t            sr_q    [N_SR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      for (int i = 0; i < int'(N_SR); i++) begin
        sc_q[i] <= '0; theta_q[i] <= '0; sr_q[i] <= '0;
      end
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        sc_q    <= sc;
        theta_q <= theta;
        sr_q    <= sr;
      end
    end
  end

  // ---- stage 2: parallel adder and WTA
  logic [E_W-1:0] energy [N_SR];
  logic [3:0]     win;
  logic [E_W-1:0] win_e;

  always_comb begin
    for (int i = 0; i < int'(N_SR); i++) begin
      energy[i] = E_W'(sc_q[i]) + E_W'(LAMBDA) * E_W'(theta_q[i]);
    end
  end

  wta_argmin #(.N(N_SR), .CW(E_W), .IW(4)) u_wta (.cost(energy), .idx(win), .min_cost(win_e));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mv_s      <= '0;
    end else begin
      out_valid <= v1;
      if (v1) mv_s <= sr_q[win];
    end
  end
endmodule
