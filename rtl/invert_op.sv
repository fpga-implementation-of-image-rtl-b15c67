// invert_op: inverted grayscale point operation (combinational).
//
// Turns the pixel into its grayscale negative: all three channels become
// 255 - gray, i.e. the bitwise complement of the 8-bit intensity. The
// operation is the described one; taking the intensity as an input from a
// gray_value unit shared with the other operations is this design's own
// choice.
//
// Interface: gray (intensity of the pixel, from gray_value) in; pix_out
// out, same cycle.
module invert_op
  import img_pkg::*;
(
  input  chan_t gray,
  output rgb_t  pix_out
);

  chan_t neg;

  always_comb begin
    neg     = chan_t'(PIX_MAX) - gray;
    pix_out = rgb_gray(neg);
  end

endmodule
