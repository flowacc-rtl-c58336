// bnn_feature_extractor: binary neural network that turns a pixel patch into
// a 64-bit binary descriptor.
//
// One instance, with one set of weights, serves both images and every pyramid
// level: the caller feeds it patches one after the other (temporal
// multiplexing), so its cost does not grow with the number of levels.
// Network (layer sizes are this design's choice):
//   layer 1: HID neurons on the PATCH x PATCH grey levels. Weight bit 1 means
//            +1, 0 means -1; the neuron fires when the signed weighted sum is
//            >= its threshold.
//   layer 2: HID neurons on the HID layer-1 bits, XNOR-popcount, fires when
//            the count of agreeing bits is >= its threshold.
//   layer 3: FEAT_W neurons on the layer-2 bits, XNOR-popcount and threshold;
//            the FEAT_W output bits are the descriptor.
// Weights and thresholds are loaded through the write port (wr_layer 0..2,
// wr_neuron, wr_weight LSB = input 0, wr_thresh), normally while no patch is
// in flight. Patch pixel k is patch[k], row-major, k = row*PATCH + col.
// Timing: one patch per clock, descriptor three clocks later (one register
// per layer).
module bnn_feature_extractor
  import flowacc_pkg::*;
#(
  parameter int unsigned PATCH = 5,
  parameter int unsigned HID   = 64,
  parameter int unsigned NPIX  = PATCH * PATCH,
  parameter int unsigned WMAX  = (NPIX > HID) ? NPIX : HID
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // weight load port
  input  logic                        wr_en,
  input  logic [1:0]                  wr_layer,
  input  logic [7:0]                  wr_neuron,
  input  logic [WMAX-1:0]             wr_weight,
  input  logic signed [15:0]          wr_thresh,
  // patch in, descriptor out
  input  logic                        in_valid,
  input  pix_t                        patch [NPIX],
  output logic                        out_valid,
  output feat_t                       feat
);
  localparam int unsigned S1_W = PIX_W + $clog2(NPIX) + 2;   // signed layer-1 sum
  localparam int unsigned PC_W = $clog2(HID + 1);

  logic [NPIX-1:0]          w1   [HID];
  logic signed [15:0]       t1   [HID];
  logic [HID-1:0]           w2   [HID];
  logic signed [15:0]       t2   [HID];
  logic [HID-1:0]           w3   [FEAT_W];
  logic signed [15:0]       t3   [FEAT_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < int'(HID); n++) begin
        w1[n] <= '0; t1[n] <= '0; w2[n] <= '0; t2[n] <= '0;
      end
      for (int n = 0; n < int'(FEAT_W); n++) begin
        w3[n] <= '0; t3[n] <= '0;
      end
    end else if (wr_en) begin
      case (wr_layer)
        2'd0: if (int'(wr_neuron) < int'(HID)) begin
                w1[wr_neuron] <= wr_weight[NPIX-1:0]; t1[wr_neuron] <= wr_thresh;
              end
        2'd1: if (int'(wr_neuron) < int'(HID)) begin
                w2[wr_neuron] <= wr_weight[HID-1:0];  t2[wr_neuron] <= wr_thresh;
              end
        2'd2: if (int'(wr_neuron) < int'(FEAT_W)) begin
                w3[wr_neuron] <= wr_weight[HID-1:0];  t3[wr_neuron] <= wr_thresh;
              end
        default: ;
      endcase
    end
  end

  // ---- layer 1: +/-1 weights on grey levels
  logic [HID-1:0] a1, a1_q;
  for (genvar n = 0; n < HID; n++) begin : g_l1
    always_comb begin
      logic signed [S1_W-1:0] s;
      s = '0;
      for (int k = 0; k < int'(NPIX); k++) begin
        if (w1[n][k]) s = s + $signed({2'b00, patch[k]});
        else          s = s - $signed({2'b00, patch[k]});
      end
      a1[n] = (32'(s) >= 32'(t1[n]));
    end
  end

  // ---- layers 2 and 3: XNOR-popcount with threshold
  function automatic logic [PC_W-1:0] popxnor(input logic [HID-1:0] a, input logic [HID-1:0] w);
    logic [PC_W-1:0] c;
    logic [HID-1:0]  agree;
    agree = ~(a ^ w);
    c = '0;
    for (int k = 0; k < int'(HID); k++) c = c + PC_W'(agree[k]);
    return c;
  endfunction

  logic [HID-1:0]    a2, a2_q;
  logic [FEAT_W-1:0] a3;
  for (genvar n = 0; n < HID; n++) begin : g_l2
    assign a2[n] = ($signed({1'b0, popxnor(a1_q, w2[n])}) >= t2[n]);
  end
  for (genvar n = 0; n < FEAT_W; n++) begin : g_l3
    assign a3[n] = ($signed({1'b0, popxnor(a2_q, w3[n])}) >= t3[n]);
  end

  logic v1, v2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      a1_q <= '0; a2_q <= '0; feat <= '0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
      if (in_valid) a1_q <= a1;
      if (v1)       a2_q <= a2;
      if (v2)       feat <= a3;
    end
  end
endmodule
