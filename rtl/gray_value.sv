// gray_value: grayscale intensity of one RGB pixel (combinational).
//
// The intensity is the mean of the three channels, (R+G+B)/3. By default
// (EXACT_MEAN = 0) it is computed without a divider, as the shift-and-add
// approximation ((S>>1) + (S>>2)) >> 1 = 3S/8 of the channel sum S, which
// is what the enhancement operations were defined with. 3S/8 exceeds 255
// for bright pixels (S > 680); this design clamps the result to 255 so
// that the value always fits one 8-bit channel. With EXACT_MEAN = 1 the
// true mean S/3 is produced by a constant divider instead.
//
// Interface: pix (RGB pixel in), gray (8-bit intensity out). No clock;
// the result is valid in the same cycle.
module gray_value
  import img_pkg::*;
#(
  parameter bit EXACT_MEAN = 1'b0
) (
  input  rgb_t  pix,
  output chan_t gray
);

  logic [PIX_W+1:0] sum;     // R+G+B, up to 765
  logic [PIX_W+1:0] half;    // S/2
  logic [PIX_W+1:0] quarter; // S/4
  logic [PIX_W+1:0] mean;    // unclamped intensity

  always_comb begin
    sum     = {2'b00, pix.r} + {2'b00, pix.g} + {2'b00, pix.b};
    half    = sum >> 1;
    quarter = sum >> 2;
    if (EXACT_MEAN)
      mean = sum / 3;
    else
      mean = (half + quarter) >> 1;
    gray = (mean > (PIX_W+2)'(PIX_MAX)) ? chan_t'(PIX_MAX) : mean[PIX_W-1:0];
  end

endmodule
