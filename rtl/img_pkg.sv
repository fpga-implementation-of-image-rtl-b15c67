// img_pkg: types, constants and saturating helpers shared by the image
// enhancement point operations.
//
// A pixel is three 8-bit channels (red, green, blue), each 0..255, as in
// the RGB pixel files the operations are defined on. op_t selects one of
// the four point operations of the enhancement unit. sat_add/sat_sub are
// the clamping adders the brightness and contrast operations are built
// from: a 9-bit sum above 255 clamps to white, a borrow out of the 9-bit
// difference clamps to black.
package img_pkg;

  localparam int unsigned PIX_W   = 8;
  localparam int unsigned PIX_MAX = (1 << PIX_W) - 1;

  typedef logic [PIX_W-1:0] chan_t;

  typedef struct packed {
    chan_t r;
    chan_t g;
    chan_t b;
  } rgb_t;

  typedef enum logic [1:0] {
    OP_INVERT     = 2'd0,
    OP_THRESHOLD  = 2'd1,
    OP_CONTRAST   = 2'd2,
    OP_BRIGHTNESS = 2'd3
  } op_t;

  // a + b, clamped to PIX_MAX
  function automatic chan_t sat_add(chan_t a, chan_t b);
    logic [PIX_W:0] t;
    t = {1'b0, a} + {1'b0, b};
    return t[PIX_W] ? chan_t'(PIX_MAX) : t[PIX_W-1:0];
  endfunction

  // a - b, clamped to 0 (bit PIX_W of the difference is the borrow)
  function automatic chan_t sat_sub(chan_t a, chan_t b);
    logic [PIX_W:0] t;
    t = {1'b0, a} - {1'b0, b};
    return t[PIX_W] ? chan_t'(0) : t[PIX_W-1:0];
  endfunction

  function automatic rgb_t rgb_sat_add(rgb_t p, chan_t v);
    return '{r: sat_add(p.r, v), g: sat_add(p.g, v), b: sat_add(p.b, v)};
  endfunction

  function automatic rgb_t rgb_sat_sub(rgb_t p, chan_t v);
    return '{r: sat_sub(p.r, v), g: sat_sub(p.g, v), b: sat_sub(p.b, v)};
  endfunction

  function automatic rgb_t rgb_gray(chan_t v);
    return '{r: v, g: v, b: v};
  endfunction

endpackage
