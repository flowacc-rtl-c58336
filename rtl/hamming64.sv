// hamming64: Hamming distance of two binary descriptors.
//
// The descriptors are cut into N_SEG segments of three bits (22 for 64 bits;
// the two bits beyond the top of the descriptor are zero in both operands and
// never differ). Each segment goes through an hd3_lut6, which yields a sum bit
// of weight 1 and a carry bit of weight 2. An adder tree then adds all sum
// bits and twice all carry bits. The segmenting and the sum/carry pairing
// follow the published block-matching unit; the adder tree is written as a
// single combinational sum and its balancing is left to synthesis.
// Purely combinational: hd is valid in the cycle fa and fb are.
module hamming64 #(
  parameter int unsigned FEAT_W = 64,
  parameter int unsigned N_SEG  = (FEAT_W + 2) / 3,
  parameter int unsigned DIST_W = $clog2(FEAT_W + 1)
) (
  input  logic [FEAT_W-1:0] fa,
  input  logic [FEAT_W-1:0] fb,
  output logic [DIST_W-1:0] hd
);
  localparam int unsigned PAD_W = 3 * N_SEG;

  logic [PAD_W-1:0] pa, pb;
  logic [N_SEG-1:0] s, c;

  assign pa = PAD_W'(fa);
  assign pb = PAD_W'(fb);

  for (genvar g = 0; g < N_SEG; g++) begin : g_seg
    hd3_lut6 u_seg (
      .a    (pa[3*g +: 3]),
      .b    (pb[3*g +: 3]),
      .sum  (s[g]),
      .carry(c[g])
    );
  end

  // adder tree over sum (weight 1) and carry (weight 2) bits
  always_comb begin
    logic [DIST_W-1:0] acc;
    acc = '0;
    for (int i = 0; i < int'(N_SEG); i++) begin
      acc = acc + DIST_W'(s[i]) + (DIST_W'(c[i]) << 1);
    end
    hd = acc;
  end
endmodule
