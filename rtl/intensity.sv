// intensity: power of one FFT output point, I = re^2 + im^2.
//
// Combinational. The inputs are the signed real and imaginary parts of an
// unscaled FFT output (19 bits for an 8-bit, 1024-point transform). The sum
// of squares is exact: each square is below 2^36 and the sum at most 2^37,
// so OUT_W = 2*IN_W bits hold it without loss. Only the ordering of the
// intensities matters downstream (the peak detector keeps bin numbers, not
// amplitudes).
module intensity #(
  parameter int unsigned IN_W  = 19,
  parameter int unsigned OUT_W = 2 * IN_W
) (
  input  logic signed [IN_W-1:0] re,
  input  logic signed [IN_W-1:0] im,
  output logic        [OUT_W-1:0] power
);
  logic signed [2*IN_W-1:0] re_sq, im_sq;

  always_comb begin
    re_sq = re * re;
    im_sq = im * im;
    power = OUT_W'(unsigned'(re_sq) + unsigned'(im_sq));
  end
endmodule
