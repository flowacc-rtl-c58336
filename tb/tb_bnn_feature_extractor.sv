// tb_bnn_feature_extractor: loads random weights and thresholds through the
// write port, then streams random patches with gaps. A reference network in
// the testbench (signed +/-1 sum on layer 1, XNOR-popcount on layers 2 and 3,
// each neuron firing at or above its threshold) predicts every descriptor,
// which must appear exactly three clocks after its patch.
module tb_bnn_feature_extractor;
  import flowacc_pkg::*;
  localparam int PATCH = 5, NPIX = 25, HID = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [1:0] wr_layer;
  logic [7:0] wr_neuron;
  logic [63:0] wr_weight;
  logic signed [15:0] wr_thresh;
  logic in_valid = 0, out_valid;
  pix_t patch [NPIX];
  feat_t feat;
  int checks = 0, failures = 0, cycle = 0;

  logic [NPIX-1:0] w1 [HID];  int t1 [HID];
  logic [HID-1:0]  w2 [HID];  int t2 [HID];
  logic [HID-1:0]  w3 [64];   int t3 [64];
  feat_t exp_q [$];
  int    exp_t [$];

  bnn_feature_extractor #(.PATCH(PATCH), .HID(HID)) dut (
    .clk, .rst_n, .wr_en, .wr_layer, .wr_neuron, .wr_weight, .wr_thresh,
    .in_valid, .patch, .out_valid, .feat);

  always #5 clk = ~clk;

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
      for (int k = 0; k < HID; k++) if (a1[k] == w2[n][k]) c++;
      a2[n] = (c >= t2[n]);
    end
    for (int n = 0; n < 64; n++) begin
      int c = 0;
      for (int k = 0; k < HID; k++) if (a2[k] == w3[n][k]) c++;
      o[n] = (c >= t3[n]);
    end
    return o;
  endfunction

  task automatic load(input int layer, input int n, input logic [63:0] w, input int t);
    @(negedge clk);
    wr_en = 1; wr_layer = 2'(layer); wr_neuron = 8'(n); wr_weight = w; wr_thresh = 16'(t);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < HID; n++) begin
      w1[n] = NPIX'({$urandom, $urandom}); t1[n] = int'($urandom % 401) - 200;
      load(0, n, 64'(w1[n]), t1[n]);
    end
    for (int n = 0; n < HID; n++) begin
      w2[n] = {$urandom, $urandom}; t2[n] = 28 + int'($urandom % 9);
      load(1, n, w2[n], t2[n]);
    end
    for (int n = 0; n < 64; n++) begin
      w3[n] = {$urandom, $urandom}; t3[n] = 28 + int'($urandom % 9);
      load(2, n, w3[n], t3[n]);
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 1500; n++) begin
      int px [NPIX];
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int k = 0; k < NPIX; k++) begin
        px[k] = (n % 7 == 0) ? 255 * int'($urandom % 2) : int'($urandom % 256);
        patch[k] = pix_t'(px[k]);
      end
      if (in_valid) begin
        exp_q.push_back(ref_bnn(px));
        exp_t.push_back(cycle + 3);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
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
        feat_t e;
        e = exp_q.pop_front();
        if (exp_t.pop_front() != cycle) begin failures++; $display("FAIL latency at cycle %0d", cycle); end
        if (feat != e) begin failures++; $display("FAIL got %h exp %h", feat, e); end
      end
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
