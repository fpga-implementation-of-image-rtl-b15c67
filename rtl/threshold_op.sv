// threshold_op: global threshold point operation (combinational).
//
// Produces a black-and-white pixel: white (255 on all channels) when the
// grayscale intensity is above the threshold, black (0) otherwise. A pixel
// exactly at the threshold becomes black (this design's choice; the
// defined operation names only "above" and "below").
//
// Interface: gray (intensity of the pixel, from gray_value), threshold in;
// pix_out out, same cycle.
module threshold_op
  import img_pkg::*;
(
  input  chan_t gray,
  input  chan_t threshold,
  output rgb_t  pix_out
);

  always_comb begin
    if (gray > threshold)
      pix_out = rgb_gray(chan_t'(PIX_MAX));
    else
      pix_out = rgb_gray(chan_t'(0));
  end

endmodule
