// tb_flowacc_full: end-to-end test of flowacc_top at the default 640 x 480 frame size.
//
// Loads random BNN weights, then streams 1 frame pair(s) of random
// blocky texture in which the second frame is the first moved by (+2,+1)
// pixels, with a square object moved by (-1,+1). A reference model written
// here computes the same three-level pyramid, descriptors, block matching,
// smoothing at level 2, 3x3 median and flow composition, and every output
// vector must match it exactly. The testbench also checks the number of
// output vectors, the clock count of the whole run (one pixel per clock in
// every phase plus a fixed drain per phase) and that each mechanism of the
// design occurred: down-sampling, interpolation, descriptor extraction at all
// three levels with the one shared network, four-unit matching at level 3, use of the previous level's flow
// as offset, a smoothing decision that changed a flow, a median that changed
// a flow, border clamping of the search window, and input refused while busy.
module tb_flowacc_full;
  import flowacc_pkg::*;
  localparam int W = 640, H = 480, D = 5, R = 2, PATCH = 5, PR = 2, NPIX = 25, HID = 64;
  localparam int LAMBDA = 1;
  localparam int NFRAMES = 1;
  localparam int N0 = W * H;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [1:0] wr_layer = 0;
  logic [7:0] wr_neuron = 0;
  logic [63:0] wr_weight = 0;
  logic signed [15:0] wr_thresh = 0;
  logic pix_valid = 0, pix_ready;
  pix_t pix1 = 0, pix2 = 0;
  logic flow_valid, busy, done;
  flow_t flow;

  flowacc_top dut (
    .clk, .rst_n, .wr_en, .wr_layer, .wr_neuron, .wr_weight, .wr_thresh,
    .pix_valid, .pix_ready, .pix1, .pix2, .flow_valid, .flow, .busy, .done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- reference
  logic [NPIX-1:0] w1 [HID];  int t1 [HID];
  logic [HID-1:0]  w2 [HID];  int t2 [HID];
  logic [HID-1:0]  w3 [64];   int t3 [64];

  int base1 [], base2 [];                 // input frames
  int lim1 [], lim2 [];                   // level images
  feat_t rf1 [], rf2 [];                  // level descriptors
  int mmx [], mmy [];                     // coarse residual
  int msx [], msy [];                     // composed
  int pfx [], pfy [];                     // previous level final
  int cfx [], cfy [];                     // current level final
  int n_reg_change = 0, n_med_change = 0, n_offset = 0, n_clamp = 0;

  function automatic int cl(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int hdist(input feat_t a, input feat_t b);
    feat_t x = a ^ b;
    int n = 0;
    for (int k = 0; k < 64; k++) n += int'(x[k]);
    return n;
  endfunction

  function automatic feat_t ref_bnn(input int px [NPIX]);
    logic [HID-1:0] a1, a2;
    feat_t o;
    for (int n = 0; n < HID; n++) begin
      int s = 0;
      for (int k = 0; k < NPIX; k++) s += w1[n][k] ? px[k] : -px[k];
      a1[n] = (s >= t1[n]);
    end
    for (int n = 0; n < HID; n++) begin
      int c = 0;
      logic [HID-1:0] ag = ~(a1 ^ w2[n]);
      for (int k = 0; k < HID; k++) c += int'(ag[k]);
      a2[n] = (c >= t2[n]);
    end
    for (int n = 0; n < 64; n++) begin
      int c = 0;
      logic [HID-1:0] ag = ~(a2 ^ w3[n]);
      for (int k = 0; k < HID; k++) c += int'(ag[k]);
      o[n] = (c >= t3[n]);
    end
    return o;
  endfunction

  // fifth smallest of nine (selection by counting)
  function automatic int med9(input int v [9]);
    for (int i = 0; i < 9; i++) begin
      int lt, le;
      lt = 0; le = 0;
      for (int j = 0; j < 9; j++) begin
        if (v[j] < v[i]) lt++;
        if (v[j] <= v[i]) le++;
      end
      if (lt <= 4 && le > 4) return v[i];
    end
    return 0;
  endfunction

  task automatic run_reference();
    int wp;
    wp = 0;
    for (int l = 1; l <= 3; l++) begin
      int wl, hl, nl;
      wl = (l == 1) ? W / 2 : (l == 2) ? W : 2 * W;
      hl = (l == 1) ? H / 2 : (l == 2) ? H : 2 * H;
      nl = wl * hl;
      lim1 = new[nl]; lim2 = new[nl]; rf1 = new[nl]; rf2 = new[nl];
      mmx = new[nl]; mmy = new[nl]; msx = new[nl]; msy = new[nl];
      cfx = new[nl]; cfy = new[nl];
      // pyramid level
      for (int y = 0; y < hl; y++) for (int x = 0; x < wl; x++) begin
        int a, b, c, d, e, f, g, h, ax, ay, bx, by;
        if (l == 1) begin
          ax = 2 * x; ay = 2 * y; bx = 2 * x + 1; by = 2 * y + 1;
          lim1[y*wl+x] = (base1[ay*W+ax] + base1[ay*W+bx] + base1[by*W+ax] + base1[by*W+bx]) / 4;
          lim2[y*wl+x] = (base2[ay*W+ax] + base2[ay*W+bx] + base2[by*W+ax] + base2[by*W+bx]) / 4;
        end else if (l == 2) begin
          lim1[y*wl+x] = base1[y*W+x];
          lim2[y*wl+x] = base2[y*W+x];
        end else begin
          ax = x / 2; ay = y / 2; bx = cl(ax + 1, 0, W - 1); by = cl(ay + 1, 0, H - 1);
          a = base1[ay*W+ax]; b = base1[ay*W+bx]; c = base1[by*W+ax]; d = base1[by*W+bx];
          e = base2[ay*W+ax]; f = base2[ay*W+bx]; g = base2[by*W+ax]; h = base2[by*W+bx];
          case ({y[0], x[0]})
            2'b00: begin lim1[y*wl+x] = a; lim2[y*wl+x] = e; end
            2'b01: begin lim1[y*wl+x] = (a + b) / 2; lim2[y*wl+x] = (e + f) / 2; end
            2'b10: begin lim1[y*wl+x] = (a + c) / 2; lim2[y*wl+x] = (e + g) / 2; end
            default: begin lim1[y*wl+x] = (a+b+c+d) / 4; lim2[y*wl+x] = (e+f+g+h) / 4; end
          endcase
        end
      end
      // descriptors
      for (int y = 0; y < hl; y++) for (int x = 0; x < wl; x++) begin
        int p1 [NPIX], p2 [NPIX];
        for (int r = 0; r < PATCH; r++) for (int c = 0; c < PATCH; c++) begin
          int a = cl(y + r - PR, 0, hl - 1) * wl + cl(x + c - PR, 0, wl - 1);
          p1[r*PATCH+c] = lim1[a]; p2[r*PATCH+c] = lim2[a];
        end
        rf1[y*wl+x] = ref_bnn(p1);
        rf2[y*wl+x] = ref_bnn(p2);
      end
      // matching, smoothing, composition
      for (int pass = 0; pass < 2; pass++) begin
        for (int y = 0; y < hl; y++) for (int x = 0; x < wl; x++) begin
          int ox, oy, best, bestc;
          if (l == 1) begin ox = 0; oy = 0; end
          else begin ox = 2 * pfx[(y/2)*wp + x/2]; oy = 2 * pfy[(y/2)*wp + x/2]; end
          if (pass == 0) begin
            if (ox != 0 || oy != 0) n_offset++;
            best = 0; bestc = 1000;
            for (int k = 0; k < D*D; k++) begin
              int wy, wx, cst;
              wy = y + oy + k / D - R; wx = x + ox + k % D - R;
              if (wy != cl(wy, 0, hl - 1) || wx != cl(wx, 0, wl - 1)) n_clamp++;
              cst = hdist(rf1[y*wl+x], rf2[cl(wy, 0, hl - 1)*wl + cl(wx, 0, wl - 1)]);
              if (cst < bestc) begin bestc = cst; best = k; end
            end
            mmx[y*wl+x] = best % D - R; mmy[y*wl+x] = best / D - R;
          end else begin
            int sx, sy;
            sx = mmx[y*wl+x]; sy = mmy[y*wl+x];
            if (l == 2) begin
              int vx [9], vy [9], be;
              for (int i = 0; i < 9; i++) begin
                int a = cl(y + i / 3 - 1, 0, hl - 1) * wl + cl(x + i % 3 - 1, 0, wl - 1);
                vx[i] = mmx[a]; vy[i] = mmy[a];
              end
              be = 1 << 30;
              for (int i = 0; i < 9; i++) begin
                int e, wy, wx;
                wy = cl(y + oy + vy[i], 0, hl - 1); wx = cl(x + ox + vx[i], 0, wl - 1);
                e = hdist(rf1[y*wl+x], rf2[wy*wl+wx]);
                for (int j = 0; j < 9; j++)
                  e += LAMBDA * (((vx[i] > vx[j]) ? vx[i] - vx[j] : vx[j] - vx[i]) +
                                 ((vy[i] > vy[j]) ? vy[i] - vy[j] : vy[j] - vy[i]));
                if (e < be) begin be = e; sx = vx[i]; sy = vy[i]; end
              end
              if (sx != mmx[y*wl+x] || sy != mmy[y*wl+x]) n_reg_change++;
            end
            msx[y*wl+x] = sx + ox; msy[y*wl+x] = sy + oy;
          end
        end
      end
      // median
      for (int y = 0; y < hl; y++) for (int x = 0; x < wl; x++) begin
        int vx [9], vy [9];
        for (int i = 0; i < 9; i++) begin
          int a = cl(y + i / 3 - 1, 0, hl - 1) * wl + cl(x + i % 3 - 1, 0, wl - 1);
          vx[i] = msx[a]; vy[i] = msy[a];
        end
        cfx[y*wl+x] = med9(vx); cfy[y*wl+x] = med9(vy);
        if (cfx[y*wl+x] != msx[y*wl+x] || cfy[y*wl+x] != msy[y*wl+x]) n_med_change++;
      end
      pfx = cfx; pfy = cfy; wp = wl;
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  task automatic make_frames(input int seed);
    int tex [];
    int TW, TH;
    TW = W + 8; TH = H + 8;
    tex = new[TW * TH];
    void'($urandom(seed));
    // blocky texture: 2x2 blocks of random grey, so the pyramid keeps detail
    for (int y = 0; y < TH; y++) for (int x = 0; x < TW; x++) begin
      if (x % 2 == 0 && y % 2 == 0) tex[y*TW+x] = int'($urandom % 256);
      else if (x % 2 == 0)          tex[y*TW+x] = tex[(y-1)*TW+x];
      else                          tex[y*TW+x] = tex[y*TW+x-1];
    end
    base1 = new[N0]; base2 = new[N0];
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      base1[y*W+x] = tex[(y+4)*TW + x+4];
      // background moves by (+2,+1): frame 2 at p shows frame 1 at p-(2,1)
      base2[y*W+x] = tex[(y+3)*TW + x+2];
    end
    // object: square in the middle moving by (-1,+1)
    for (int y = H/3; y < 2*H/3; y++) for (int x = W/3; x < 2*W/3; x++) begin
      base1[y*W+x] = (x * 37 + y * 91 + seed) % 256;
      base2[(y+1)*W + x-1] = base1[y*W+x];
    end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_quad = 0, n_down = 0, n_interp = 0, n_stall = 0, n_reg_cycles = 0, busy_cycles = 0;
  int bnn_level [4];
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles <= busy_cycles + 1;
    if (pix_valid && !pix_ready) n_stall <= n_stall + 1;
    if (dut.state == 3'd1 && !dut.draining && dut.lvl == 2'd1) n_down <= n_down + 1;
    if (dut.state == 3'd1 && !dut.draining && dut.lvl == 2'd3 && (dut.phx || dut.phy)) n_interp <= n_interp + 1;
    if (dut.bnn_v) bnn_level[dut.lvl] <= bnn_level[dut.lvl] + 1;
    if (dut.rg_v) n_reg_cycles <= n_reg_cycles + 1;
    if (dut.quad && dut.issue) n_quad <= n_quad + 1;
  end

  flow_t outq [$];
  always @(posedge clk) if (rst_n && flow_valid) outq.push_back(flow);

  int exp_cycles;
  initial begin
    exp_cycles = 0;
    for (int l = 1; l <= 3; l++) begin
      int nl;
      nl = (l == 1) ? N0 / 4 : (l == 2) ? N0 : 4 * N0;
      exp_cycles += (nl + 5) + (2 * nl + 5) + (((l == 3) ? nl / 4 : nl) + 5) + (nl + 5) + ((l == 2) ? nl + 5 : 0);
    end
    exp_cycles += 4 * N0 + 5;
  end

  initial begin
    for (int i = 1; i < 4; i++) bnn_level[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // weights: random +/-1, layer-1 threshold 0, popcount layers at half
    for (int n = 0; n < HID; n++) begin
      w1[n] = NPIX'({$urandom, $urandom}); t1[n] = 0;
      w2[n] = {$urandom, $urandom};        t2[n] = HID / 2;
    end
    for (int n = 0; n < 64; n++) begin
      w3[n] = {$urandom, $urandom}; t3[n] = HID / 2;
    end
    for (int layer = 0; layer < 3; layer++) begin
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        wr_en = 1; wr_layer = 2'(layer); wr_neuron = 8'(n);
        wr_weight = (layer == 0) ? 64'(w1[n]) : (layer == 1) ? w2[n] : w3[n];
        wr_thresh = 16'((layer == 0) ? t1[n] : (layer == 1) ? t2[n] : t3[n]);
      end
    end
    @(negedge clk); wr_en = 0;

    for (int f = 0; f < NFRAMES; f++) begin
      int good, interior, bx, by, gx, gy;
      flow_t fv;
      make_frames(f + 7);
      outq.delete();
      busy_cycles = 0;
      for (int i = 0; i < N0; i++) begin
        @(negedge clk);
        pix_valid = 1; pix1 = pix_t'(base1[i]); pix2 = pix_t'(base2[i]);
        while (!pix_ready) @(negedge clk);
      end
      // hold a pixel while busy: it must be refused
      @(negedge clk);
      pix_valid = 1;
      repeat (3) @(negedge clk);
      pix_valid = 0;
      run_reference();
      @(posedge done);
      repeat (3) @(posedge clk);
      checks++;
      if (outq.size() != 4 * N0) begin
        failures++; $display("FAIL frame %0d: %0d flow vectors, expected %0d", f, outq.size(), 4 * N0);
      end
      checks++;
      if (busy_cycles != exp_cycles) begin
        failures++; $display("FAIL frame %0d: busy %0d clocks, expected %0d", f, busy_cycles, exp_cycles);
      end
      good = 0; interior = 0;
      for (int i = 0; i < outq.size() && i < 4 * N0; i++) begin
        fv = outq[i];
        gx = flow_x(fv); gy = flow_y(fv);
        checks++;
        if (gx != cfx[i] || gy != cfy[i]) begin
          failures++;
          if (failures < 20)
            $display("FAIL frame %0d vec %0d (x=%0d,y=%0d): got (%0d,%0d) exp (%0d,%0d)", f, i,
                     i % (2*W), i / (2*W), gx, gy, cfx[i], cfy[i]);
        end
        bx = (i % (2*W)) / 2; by = (i / (2*W)) / 2;
        if (bx >= 6 && bx < W - 6 && by >= 6 && by < H - 6 &&
            !(bx >= W/3 - 3 && bx < 2*W/3 + 3 && by >= H/3 - 3 && by < 2*H/3 + 3)) begin
          interior++;
          if (gx == 4 && gy == 2) good++;
        end
      end
      $display("frame %0d: %0d of %0d background vectors at the true motion (+2,+1) px", f, good, interior);
    end

    // every mechanism must have happened
    checks++; if (n_down == 0)         begin failures++; $display("FAIL no down-sampling"); end
    checks++; if (n_interp == 0)       begin failures++; $display("FAIL no interpolation"); end
    for (int l = 1; l <= 3; l++) begin
      checks++;
      if (bnn_level[l] != 2 * NFRAMES * ((l == 1) ? N0 / 4 : (l == 2) ? N0 : 4 * N0)) begin
        failures++; $display("FAIL level %0d: %0d descriptors from the shared BNN", l, bnn_level[l]);
      end
    end
    checks++; if (n_offset == 0)       begin failures++; $display("FAIL previous level never offset the search"); end
    checks++; if (n_reg_cycles == 0)   begin failures++; $display("FAIL smoothing never ran"); end
    checks++; if (n_reg_change == 0)   begin failures++; $display("FAIL smoothing never changed a flow"); end
    checks++; if (n_med_change == 0)   begin failures++; $display("FAIL median never changed a flow"); end
    checks++; if (n_clamp == 0)        begin failures++; $display("FAIL search window never clamped"); end
    checks++; if (n_stall == 0)        begin failures++; $display("FAIL input never refused"); end
    checks++; if (n_quad != NFRAMES * N0) begin failures++; $display("FAIL level-3 four-unit matching ran %0d groups", n_quad); end
    $display("mechanisms: down=%0d interp=%0d bnn=%0d/%0d/%0d offset=%0d smooth=%0d (changed %0d) median changed=%0d clamp=%0d refused=%0d quad=%0d",
             n_down, n_interp, bnn_level[1], bnn_level[2], bnn_level[3], n_offset, n_reg_cycles,
             n_reg_change, n_med_change, n_clamp, n_stall, n_quad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
