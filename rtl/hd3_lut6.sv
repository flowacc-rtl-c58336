// hd3_lut6: Hamming distance of two 3-bit descriptor segments.
//
// The three bits of each operand are XORed and the three difference bits are
// summed by a full adder. Each output depends on exactly six inputs, so the
// sum bit and the carry bit map to one 6-input LUT each; this pairing of XOR
// and full adder is the building block of the matching unit. The distance of
// the segment is sum + 2*carry (0..3). Purely combinational.
module hd3_lut6 (
  input  logic [2:0] a,      // segment of the reference descriptor
  input  logic [2:0] b,      // segment of the matching descriptor
  output logic       sum,    // weight-1 bit of the distance
  output logic       carry   // weight-2 bit of the distance
);
  logic [2:0] x;
  always_comb begin
    x     = a ^ b;
    sum   = x[0] ^ x[1] ^ x[2];
    carry = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
  end
endmodule
