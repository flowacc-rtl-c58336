// tb_block_matching_unit: random reference descriptors and 5x5 candidate
// windows, one per clock with random gaps. Every cost must equal the Hamming
// distance counted here, and must appear exactly one clock after its input.
module tb_block_matching_unit;
  import flowacc_pkg::*;
  localparam int D = 5;
  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  feat_t f1;
  feat_t f2_win [D*D];
  cost_t cost [D*D];
  int checks = 0, failures = 0, cycle = 0;
  logic [D*D*7-1:0] exp_q [$];
  int exp_t [$];

  block_matching_unit #(.D(D)) dut (.clk, .rst_n, .in_valid, .f1, .f2_win, .out_valid, .cost);

  always #5 clk = ~clk;

  function automatic int ref_hd(input feat_t a, input feat_t b);
    int n = 0;
    for (int k = 0; k < int'(FEAT_W); k++) if (a[k] != b[k]) n++;
    return n;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      f1 = {$urandom, $urandom};
      for (int k = 0; k < D*D; k++)
        f2_win[k] = (k == n % (D*D)) ? f1 ^ feat_t'($urandom % 8) : {$urandom, $urandom};
      if (in_valid) begin
        logic [D*D*7-1:0] e;
        for (int k = 0; k < D*D; k++) e[7*k +: 7] = 7'(ref_hd(f1, f2_win[k]));
        exp_q.push_back(e);
        exp_t.push_back(cycle + 1);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
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
        logic [D*D*7-1:0] e;
        e = exp_q.pop_front();
        if (exp_t.pop_front() != cycle) begin failures++; $display("FAIL latency at cycle %0d", cycle); end
        for (int k = 0; k < D*D; k++) if (cost[k] != e[7*k +: 7]) begin
          failures++; $display("FAIL cand %0d got %0d exp %0d", k, cost[k], e[7*k +: 7]);
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
