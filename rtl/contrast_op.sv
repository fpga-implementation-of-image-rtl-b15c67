// contrast_op: contrast stretching point operation (combinational).
//
// Pixels whose grayscale intensity lies above the threshold are made
// brighter by add_val, pixels below it darker by sub_val, on all three
// channels with saturation at 255 and 0. Dark pixels are pushed toward
// black and bright ones toward white, which widens the spread of the
// image. A pixel whose intensity equals the threshold passes unchanged
// (this design's choice; the defined operation names only the two
// strict cases).
//
// Interface: pix_in, gray (intensity of pix_in, from gray_value),
// threshold, add_val, sub_val in; pix_out out, same cycle.
module contrast_op
  import img_pkg::*;
(
  input  rgb_t  pix_in,
  input  chan_t gray,
  input  chan_t threshold,
  input  chan_t add_val,
  input  chan_t sub_val,
  output rgb_t  pix_out
);

  always_comb begin
    if (gray > threshold)
      pix_out = rgb_sat_add(pix_in, add_val);
    else if (gray < threshold)
      pix_out = rgb_sat_sub(pix_in, sub_val);
    else
      pix_out = pix_in;
  end

endmodule
