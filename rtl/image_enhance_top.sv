// image_enhance_top: streaming RGB image enhancement unit.
//
// Pixels arrive one per clock (in_valid/pix_in) in any order; the unit
// keeps no image and needs no image dimensions. For every pixel it
// computes the grayscale intensity once (gray_value) and feeds it, with
// the pixel, to the four point operations, which all work in parallel:
// invert, threshold, contrast and brightness. The operation chosen by op
// is registered to pix_out, so the result of a pixel appears with
// out_valid exactly one clock after it was presented. The operation and
// its settings are sampled together with each pixel, so they may change
// from one pixel to the next.
//
// The four operations and their settings (threshold, the contrast add and
// subtract amounts, the brightness sign and amount) are those of the
// described design. The pixel handshake (valid only, no back-pressure),
// the single output register and the synchronous active-low reset are
// this design's own choices.
module image_enhance_top
  import img_pkg::*;
#(
  parameter bit EXACT_MEAN = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  // pixel stream in
  input  logic  in_valid,
  input  rgb_t  pix_in,
  // operation select and settings
  input  op_t   op,
  input  chan_t threshold,    // threshold and contrast pivot
  input  chan_t add_val,      // contrast: added above the threshold
  input  chan_t sub_val,      // contrast: subtracted below the threshold
  input  logic  bright_sign,  // brightness: 1 add, 0 subtract
  input  chan_t bright_val,   // brightness: amount
  // pixel stream out, one clock later
  output logic  out_valid,
  output rgb_t  pix_out
);

  chan_t gray;
  rgb_t  inv_pix, thr_pix, con_pix, bri_pix;
  rgb_t  sel_pix;

  gray_value #(.EXACT_MEAN(EXACT_MEAN)) u_gray (
    .pix  (pix_in),
    .gray (gray)
  );

  invert_op u_invert (
    .gray    (gray),
    .pix_out (inv_pix)
  );

  threshold_op u_threshold (
    .gray      (gray),
    .threshold (threshold),
    .pix_out   (thr_pix)
  );

  contrast_op u_contrast (
    .pix_in    (pix_in),
    .gray      (gray),
    .threshold (threshold),
    .add_val   (add_val),
    .sub_val   (sub_val),
    .pix_out   (con_pix)
  );

  brightness_op u_brightness (
    .pix_in  (pix_in),
    .sign    (bright_sign),
    .value   (bright_val),
    .pix_out (bri_pix)
  );

  always_comb begin
    unique case (op)
      OP_INVERT:     sel_pix = inv_pix;
      OP_THRESHOLD:  sel_pix = thr_pix;
      OP_CONTRAST:   sel_pix = con_pix;
      OP_BRIGHTNESS: sel_pix = bri_pix;
      default:       sel_pix = pix_in;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pix_out   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        pix_out <= sel_pix;
    end
  end

  // out_valid is the one-cycle-delayed copy of in_valid
  a_valid_latency : assert property (@(posedge clk) disable iff (!rst_n)
    $past(rst_n) |-> (out_valid == $past(in_valid)));

endmodule
