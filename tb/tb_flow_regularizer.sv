// tb_flow_regularizer: random support regions, descriptors and windows, one
// per clock with gaps. The reference forms, for each of the nine candidates,
// the Hamming cost of the window descriptor at that candidate plus LAMBDA
// times the summed L1 distance to the region, and takes the first minimum.
// The chosen flow must appear exactly two clocks after its input.
module tb_flow_regularizer;
  import flowacc_pkg::*;
  localparam int D = 5, R = 2, LAMBDA = 2;
  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  flow_t sr [N_SR];
  feat_t f1;
  feat_t f2_win [D*D];
  flow_t mv_s;
  int checks = 0, failures = 0, cycle = 0, smooth_changes = 0;
  flow_t exp_q [$];
  int    exp_t [$];

  flow_regularizer #(.D(D), .LAMBDA(LAMBDA)) dut (.clk, .rst_n, .in_valid, .sr, .f1, .f2_win,
                                                 .out_valid, .mv_s);
  always #5 clk = ~clk;

  function automatic int ref_hd(input feat_t a, input feat_t b);
    int n = 0;
    for (int k = 0; k < int'(FEAT_W); k++) if (a[k] != b[k]) n++;
    return n;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int vx [9], vy [9];
      int best, best_e;
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      f1 = {$urandom, $urandom};
      for (int k = 0; k < D*D; k++) f2_win[k] = f1 ^ {$urandom, $urandom} ^ {$urandom, $urandom};
      for (int i = 0; i < 9; i++) begin
        // mostly a common flow with a few outliers
        vx[i] = (($urandom % 3) == 0) ? int'($urandom % 5) - R : (n % 5) - R;
        vy[i] = (($urandom % 3) == 0) ? int'($urandom % 5) - R : ((n / 5) % 5) - R;
        sr[i].x = FLOW_W'(vx[i]); sr[i].y = FLOW_W'(vy[i]);
      end
      best = 0; best_e = 1 << 30;
      for (int i = 0; i < 9; i++) begin
        int e;
        e = ref_hd(f1, f2_win[(vy[i] + R) * D + vx[i] + R]);
        for (int j = 0; j < 9; j++) begin
          e += LAMBDA * (((vx[i] > vx[j]) ? vx[i] - vx[j] : vx[j] - vx[i]) +
                         ((vy[i] > vy[j]) ? vy[i] - vy[j] : vy[j] - vy[i]));
        end
        if (e < best_e) begin best_e = e; best = i; end
      end
      if (in_valid) begin
        exp_q.push_back(sr[best]);
        exp_t.push_back(cycle + 2);
        if (sr[best] != sr[4]) smooth_changes++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    checks++;
    if (smooth_changes == 0) begin failures++; $display("FAIL centre flow never replaced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        flow_t e;
        e = exp_q.pop_front();
        if (exp_t.pop_front() != cycle) begin failures++; $display("FAIL latency at cycle %0d", cycle); end
        if (mv_s != e) begin
          failures++; $display("FAIL got (%0d,%0d) exp (%0d,%0d)", flow_x(mv_s), flow_y(mv_s), flow_x(e), flow_y(e));
        end
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
