// pyramid_resampler: one pixel of a coarser or finer pyramid level.
//
// Given the 2x2 input pixels p00 (top-left), p01 (top-right), p10, p11:
//   mode DOWN: the pixel of the half-resolution level, the mean of the four
//              (level 1 is a quarter of the input image);
//   mode UP:   the pixel of the double-resolution level at half-pixel phase
//              (ph_x, ph_y) relative to p00, by bilinear interpolation
//              (level 3 is four times the input image). Phase (0,0) returns
//              p00, (1,0) the mean of p00 and p01, (1,1) the mean of all four.
// Results are rounded down. Averaging and bilinear interpolation are this
// design's choice of down-sampling and interpolation filters. Combinational.
module pyramid_resampler
  import flowacc_pkg::*;
(
  input  logic mode_up,   // 0: 2x2 down-sample, 1: 2x up-sample
  input  logic ph_x,      // up-sample phase, horizontal half-pixel
  input  logic ph_y,      // up-sample phase, vertical half-pixel
  input  pix_t p00,
  input  pix_t p01,
  input  pix_t p10,
  input  pix_t p11,
  output pix_t pix
);
  logic [PIX_W+1:0] s4;
  logic [PIX_W:0]   s2h, s2v;

  always_comb begin
    s4  = (PIX_W+2)'(p00) + (PIX_W+2)'(p01) + (PIX_W+2)'(p10) + (PIX_W+2)'(p11);
    s2h = (PIX_W+1)'(p00) + (PIX_W+1)'(p01);
    s2v = (PIX_W+1)'(p00) + (PIX_W+1)'(p10);
    if (!mode_up || (ph_x && ph_y)) pix = pix_t'(s4 >> 2);
    else if (ph_x)                  pix = pix_t'(s2h >> 1);
    else if (ph_y)                  pix = pix_t'(s2v >> 1);
    else                            pix = p00;
  end
endmodule
