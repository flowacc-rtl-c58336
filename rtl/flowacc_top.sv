// flowacc_top: hierarchical, BNN-based dense optical-flow accelerator.
//
// A pair of W x H grey-level frames is estimated coarse to fine over three
// pyramid levels: level 1 is the frame down-sampled by two, level 2 the frame
// itself and level 3 the frame interpolated to twice its size, so the final
// flow has half-pixel resolution. For every level l the accelerator
//   PYR   builds the level-l images of both frames (pyramid_resampler);
//   FEAT  passes every pixel's PATCH x PATCH neighbourhood of both images
//         through the one shared BNN (bnn_feature_extractor), giving a 64-bit
//         descriptor per pixel;
//   MATCH (module M) for each pixel p takes the offset o = 2 * mv_f^{l-1}(p)
//         of the previous level (0 at level 1), fetches the D x D window of
//         second-image descriptors around p + o, computes all Hamming costs
//         in parallel (block_matching_unit) and keeps the cheapest residual
//         mv_m (wta_argmin). Level 3, four times the frame size, uses four
//         matching units that take the four half-pixel positions of a 2x2
//         group together; they share the same previous-level flow;
//   REG   (module S, on the levels set in REG_LEVELS) replaces mv_m by the
//         flow of its 3x3 support region with the lowest matching cost plus
//         LAMBDA times its smoothness penalty (flow_regularizer), reusing
//         p's D x D window;
//   MED   (module F) median-filters the composed flow mv_s + o over 3x3
//         (median3x3_flow) and stores it as mv_f^l.
// Then OUT streams mv_f^3, (2W) x (2H) vectors in raster order, in units of
// half a pixel of the input frames.
//
// Each phase walks its level grid at one pixel per clock (four at level-3
// matching) and drains its
// pipeline before the next phase starts; memories are plain arrays. Pixel,
// window and neighbourhood coordinates that fall outside a grid are clamped to
// its border. The published accelerator instead streams all levels
// concurrently; this frame-sequential schedule, the down-sampling and
// interpolation filters, D, PATCH, LAMBDA and the port protocol are this
// design's choices. REG_LEVELS defaults to smoothing at level 2 only.
//
// Interface: load the BNN through wr_* while idle (busy low). Then present the
// frames as W*H pixel pairs in raster order with pix_valid; a pair is taken in
// each clock where pix_valid and pix_ready are high. Processing starts after
// the last pair; busy is high until the last flow vector, and done pulses with
// it. flow_valid marks the (2W)*(2H) output vectors; there is no back-pressure.
module flowacc_top
  import flowacc_pkg::*;
#(
  parameter int unsigned W          = 640,
  parameter int unsigned H          = 480,
  parameter int unsigned D          = 5,
  parameter int unsigned PATCH      = 5,
  parameter int unsigned HID        = 64,
  parameter int unsigned LAMBDA     = 1,
  parameter logic [2:0]  REG_LEVELS = 3'b010,
  parameter int unsigned WMAX       = (PATCH * PATCH > HID) ? PATCH * PATCH : HID
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // BNN weight load
  input  logic                 wr_en,
  input  logic [1:0]           wr_layer,
  input  logic [7:0]           wr_neuron,
  input  logic [WMAX-1:0]      wr_weight,
  input  logic signed [15:0]   wr_thresh,
  // frame pair in
  input  logic                 pix_valid,
  output logic                 pix_ready,
  input  pix_t                 pix1,
  input  pix_t                 pix2,
  // flow out
  output logic                 flow_valid,
  output flow_t                flow,
  output logic                 busy,
  output logic                 done
);
  localparam int N0    = int'(W * H);
  localparam int NMAX  = 4 * N0;
  localparam int AW    = $clog2(NMAX);
  localparam int R     = int'(D) / 2;
  localparam int NPIX  = int'(PATCH * PATCH);
  localparam int PR    = int'(PATCH) / 2;
  localparam int DRAIN = 4;

  typedef enum logic [2:0] {S_IDLE, S_PYR, S_FEAT, S_MATCH, S_REG, S_MED, S_OUT} state_t;

  // ------------------------------------------------------------------ memories
  pix_t  img1 [N0];         // input frames
  pix_t  img2 [N0];
  pix_t  lv1  [NMAX];       // current pyramid level of each frame
  pix_t  lv2  [NMAX];
  feat_t ft1  [NMAX];       // descriptors of the current level
  feat_t ft2  [NMAX];
  flow_t mvm  [NMAX];       // coarse residual flow (after WTA)
  flow_t mvs  [NMAX];       // composed flow before the median filter
  flow_t mvfa [NMAX];       // final flow of levels 1 and 3
  flow_t mvfb [N0];         // final flow of level 2

  // ------------------------------------------------------------------ control
  state_t     state;
  logic [1:0] lvl;          // 1..3
  int         x, y;         // position in the current level grid
  logic       img;          // FEAT: which frame
  logic       draining;
  int         drain_cnt;
  int         in_cnt;

  int wl, hl, wp;           // level width/height, previous level width
  always_comb begin
    wl = (lvl == 2'd1) ? int'(W / 2) : (lvl == 2'd2) ? int'(W) : 2 * int'(W);
    hl = (lvl == 2'd1) ? int'(H / 2) : (lvl == 2'd2) ? int'(H) : 2 * int'(H);
    wp = (lvl == 2'd2) ? int'(W / 2) : int'(W);
  end

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Level-3 matching runs four matching units side by side, one per
  // half-pixel phase of a 2x2 group; the walk then covers the W x H groups.
  logic quad;
  int   iw, ih;               // extent of the walk in the current phase
  assign quad = (state == S_MATCH) && (lvl == 2'd3);
  assign iw   = quad ? wl / 2 : wl;
  assign ih   = quad ? hl / 2 : hl;

  logic issue;              // a pixel (group) enters the current phase's datapath
  logic last_item;
  assign issue     = (state inside {S_PYR, S_FEAT, S_MATCH, S_REG, S_MED, S_OUT}) && !draining;
  assign last_item = (x == iw - 1) && (y == ih - 1) && (state != S_FEAT || img);
  assign pix_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  logic reg_on;
  assign reg_on = REG_LEVELS[lvl - 2'd1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; lvl <= 2'd1; x <= 0; y <= 0; img <= 1'b0;
      draining <= 1'b0; drain_cnt <= 0; in_cnt <= 0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (pix_valid) begin
          if (in_cnt == N0 - 1) begin
            in_cnt <= 0; state <= S_PYR; lvl <= 2'd1; x <= 0; y <= 0;
          end else begin
            in_cnt <= in_cnt + 1;
          end
        end
        default: begin
          if (!draining) begin
            if (last_item) begin
              draining  <= 1'b1;
              drain_cnt <= DRAIN;
              x <= 0; y <= 0; img <= 1'b0;
            end else if (x == iw - 1) begin
              x <= 0;
              if (y == ih - 1) begin y <= 0; img <= 1'b1; end
              else y <= y + 1;
            end else begin
              x <= x + 1;
            end
          end else if (drain_cnt != 0) begin
            drain_cnt <= drain_cnt - 1;
          end else begin
            draining <= 1'b0;
            case (state)
              S_PYR:   state <= S_FEAT;
              S_FEAT:  state <= S_MATCH;
              S_MATCH: state <= reg_on ? S_REG : S_MED;
              S_REG:   state <= S_MED;
              S_MED:   if (lvl == 2'd3) state <= S_OUT;
                       else begin lvl <= lvl + 2'd1; state <= S_PYR; end
              default: begin state <= S_IDLE; done <= 1'b1; lvl <= 2'd1; end
            endcase
          end
        end
      endcase
    end
  end

  // frame load
  always_ff @(posedge clk) begin
    if (state == S_IDLE && pix_valid) begin
      img1[in_cnt] <= pix1;
      img2[in_cnt] <= pix2;
    end
  end

  // ------------------------------------------------------------------ PYR
  pix_t  q1 [4], q2 [4];
  pix_t  rp1, rp2;
  logic  up, phx, phy;
  always_comb begin
    int bx0, by0, bx1, by1;
    up  = (lvl == 2'd3);
    phx = up & (x[0]);
    phy = up & (y[0]);
    if (lvl == 2'd1) begin
      bx0 = 2 * x; by0 = 2 * y; bx1 = bx0 + 1; by1 = by0 + 1;
    end else if (lvl == 2'd2) begin
      bx0 = x; by0 = y; bx1 = x; by1 = y;
    end else begin
      bx0 = x >> 1; by0 = y >> 1;
      bx1 = clampi(bx0 + 1, 0, int'(W) - 1); by1 = clampi(by0 + 1, 0, int'(H) - 1);
    end
    bx0 = clampi(bx0, 0, int'(W) - 1); bx1 = clampi(bx1, 0, int'(W) - 1);
    by0 = clampi(by0, 0, int'(H) - 1); by1 = clampi(by1, 0, int'(H) - 1);
    q1[0] = img1[by0 * int'(W) + bx0]; q1[1] = img1[by0 * int'(W) + bx1];
    q1[2] = img1[by1 * int'(W) + bx0]; q1[3] = img1[by1 * int'(W) + bx1];
    q2[0] = img2[by0 * int'(W) + bx0]; q2[1] = img2[by0 * int'(W) + bx1];
    q2[2] = img2[by1 * int'(W) + bx0]; q2[3] = img2[by1 * int'(W) + bx1];
  end

  pyramid_resampler u_rs1 (.mode_up(up), .ph_x(phx), .ph_y(phy),
                           .p00(q1[0]), .p01(q1[1]), .p10(q1[2]), .p11(q1[3]), .pix(rp1));
  pyramid_resampler u_rs2 (.mode_up(up), .ph_x(phx), .ph_y(phy),
                           .p00(q2[0]), .p01(q2[1]), .p10(q2[2]), .p11(q2[3]), .pix(rp2));

  int paddr;
  assign paddr = y * wl + x;

  always_ff @(posedge clk) begin
    if (state == S_PYR && issue) begin
      lv1[paddr] <= rp1;
      lv2[paddr] <= rp2;
    end
  end

  // ------------------------------------------------------------------ FEAT
  pix_t  patch [NPIX];
  always_comb begin
    for (int r = 0; r < int'(PATCH); r++) begin
      for (int c = 0; c < int'(PATCH); c++) begin
        int a;
        a = clampi(y + r - PR, 0, hl - 1) * wl + clampi(x + c - PR, 0, wl - 1);
        patch[r * int'(PATCH) + c] = img ? lv2[a] : lv1[a];
      end
    end
  end

  logic  bnn_v;
  feat_t bnn_f;
  bnn_feature_extractor #(.PATCH(PATCH), .HID(HID)) u_bnn (
    .clk, .rst_n,
    .wr_en(wr_en && state == S_IDLE), .wr_layer, .wr_neuron, .wr_weight, .wr_thresh,
    .in_valid(state == S_FEAT && issue), .patch(patch),
    .out_valid(bnn_v), .feat(bnn_f)
  );

  logic [AW-1:0] fa_d [3];
  logic          fi_d [3];
  always_ff @(posedge clk) begin
    fa_d[0] <= AW'(paddr); fi_d[0] <= img;
    for (int i = 1; i < 3; i++) begin fa_d[i] <= fa_d[i-1]; fi_d[i] <= fi_d[i-1]; end
    if (bnn_v) begin
      if (fi_d[2]) ft2[fa_d[2]] <= bnn_f;
      else         ft1[fa_d[2]] <= bnn_f;
    end
  end

  // ------------------------------------------------------------------ MATCH / REG window
  flow_t prev, off;
  always_comb begin
    int pa;
    pa = quad ? y * wp + x : (y >> 1) * wp + (x >> 1);
    if (lvl == 2'd1)      prev = '0;
    else if (lvl == 2'd2) prev = mvfa[pa];
    else                  prev = mvfb[pa];
    off.x = prev.x <<< 1;
    off.y = prev.y <<< 1;
  end

  // lane u works on pixel (lx[u], ly[u]); outside level-3 matching only
  // lane 0 is used and it sits at (x, y)
  localparam int NL = 4;
  int    lx [NL], ly [NL];
  int    la [NL];
  feat_t f1_l   [NL];
  feat_t f2_l   [NL][D*D];
  always_comb begin
    for (int u = 0; u < NL; u++) begin
      lx[u] = quad ? 2 * x + (u % 2) : x;
      ly[u] = quad ? 2 * y + (u / 2) : y;
      la[u] = ly[u] * wl + lx[u];
      f1_l[u] = ft1[la[u]];
      for (int dy = 0; dy < int'(D); dy++) begin
        for (int dx = 0; dx < int'(D); dx++) begin
          int wy, wx;
          wy = clampi(ly[u] + flow_y(off) + dy - R, 0, hl - 1);
          wx = clampi(lx[u] + flow_x(off) + dx - R, 0, wl - 1);
          f2_l[u][dy * int'(D) + dx] = ft2[wy * wl + wx];
        end
      end
    end
  end

  // M: block matching + WTA, four lanes
  localparam int IW = $clog2(D * D);
  logic  bm_v   [NL];
  flow_t bm_res [NL];
  for (genvar u = 0; u < NL; u++) begin : g_lane
    cost_t         cost [D*D];
    logic [IW-1:0] idx;
    cost_t         min_cost;
    block_matching_unit #(.D(D)) u_bmu (
      .clk, .rst_n, .in_valid(state == S_MATCH && issue && (u == 0 || quad)),
      .f1(f1_l[u]), .f2_win(f2_l[u]), .out_valid(bm_v[u]), .cost(cost)
    );
    wta_argmin #(.N(D * D), .CW(COST_W), .IW(IW)) u_wta (.cost(cost), .idx(idx), .min_cost(min_cost));
    always_comb begin
      bm_res[u].x = FLOW_W'(int'(idx) % int'(D) - R);
      bm_res[u].y = FLOW_W'(int'(idx) / int'(D) - R);
    end
  end

  // S: support region of coarse residuals
  flow_t sr [N_SR];
  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        sr[r * 3 + c] = mvm[clampi(y + r - 1, 0, hl - 1) * wl + clampi(x + c - 1, 0, wl - 1)];
      end
    end
  end

  logic  rg_v;
  flow_t rg_mv;
  flow_regularizer #(.D(D), .LAMBDA(LAMBDA)) u_reg (
    .clk, .rst_n, .in_valid(state == S_REG && issue), .sr(sr), .f1(f1_l[0]), .f2_win(f2_l[0]),
    .out_valid(rg_v), .mv_s(rg_mv)
  );

  logic [AW-1:0] pa_d [2];
  logic [AW-1:0] la_d [NL];
  flow_t         of_d [2];
  always_ff @(posedge clk) begin
    pa_d[0] <= AW'(paddr); of_d[0] <= off;
    pa_d[1] <= pa_d[0];    of_d[1] <= of_d[0];
    for (int u = 0; u < NL; u++) la_d[u] <= AW'(la[u]);
  end

  function automatic flow_t fadd(input flow_t a, input flow_t b);
    flow_t s;
    s.x = a.x + b.x;
    s.y = a.y + b.y;
    return s;
  endfunction

  always_ff @(posedge clk) begin
    for (int u = 0; u < NL; u++) begin
      if (bm_v[u] && state == S_MATCH) begin
        mvm[la_d[u]] <= bm_res[u];
        if (!reg_on) mvs[la_d[u]] <= fadd(bm_res[u], of_d[0]);
      end
    end
    if (rg_v && state == S_REG) mvs[pa_d[1]] <= fadd(rg_mv, of_d[1]);
  end

  // F: median filter of the composed flow
  flow_t mwin [N_SR];
  flow_t med;
  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        mwin[r * 3 + c] = mvs[clampi(y + r - 1, 0, hl - 1) * wl + clampi(x + c - 1, 0, wl - 1)];
      end
    end
  end
  median3x3_flow u_med (.win(mwin), .med(med));

  always_ff @(posedge clk) begin
    if (state == S_MED && issue) begin
      if (lvl == 2'd2) mvfb[paddr] <= med;
      else             mvfa[paddr] <= med;
    end
  end

  // ------------------------------------------------------------------ OUT
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flow_valid <= 1'b0;
      flow       <= '0;
    end else begin
      flow_valid <= (state == S_OUT) && issue;
      flow       <= mvfa[paddr];
    end
  end
endmodule
