// brightness_op: brightness point operation (combinational).
//
// Adds a constant to every channel of the pixel when sign = 1 and
// subtracts it when sign = 0. Each channel saturates: a sum above 255
// gives 255, a difference below 0 gives 0. The operation, the sign
// convention and the clamping follow the described design; the clamp
// threshold is exactly 255 (a sum of 256 saturates as well).
//
// Interface: pix_in, sign, value (8-bit amount) in; pix_out out, valid in
// the same cycle.
module brightness_op
  import img_pkg::*;
(
  input  rgb_t  pix_in,
  input  logic  sign,
  input  chan_t value,
  output rgb_t  pix_out
);

  always_comb begin
    if (sign)
      pix_out = rgb_sat_add(pix_in, value);
    else
      pix_out = rgb_sat_sub(pix_in, value);
  end

endmodule
