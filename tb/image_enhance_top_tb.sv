// image_enhance_top_tb: end-to-end test of the image enhancement unit at
// its default configuration.
//
// A 768 x 512 RGB test image is generated in the bench (smooth colour
// gradients plus a pseudo-random texture, so that dark, bright and
// saturated pixels all occur). The whole image is streamed through the
// unit once for each of the four operations, with the settings of the
// published examples: invert; threshold 120; contrast with threshold 90,
// +10 and -15; brightness with sign 0 and amount 60. A final section
// streams random pixels with a random operation, random settings and
// random idle cycles per pixel.
//
// Every output pixel is compared with an integer model of the operations
// written independently of the RTL, and out_valid must follow in_valid by
// exactly one clock. Each mechanism (every operation, operation switches,
// idle cycles, both clamps of brightness and contrast, the contrast
// "equal" case, both threshold levels, the clamp of the intensity) is
// counted and must occur at least once.
module image_enhance_top_tb;
  import img_pkg::*;

  localparam int IMG_W = 768;
  localparam int IMG_H = 512;
  localparam int NMIX  = 50000;
  localparam int WATCHDOG = 4 * IMG_W * IMG_H + 3 * NMIX + 1000;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  in_valid;
  rgb_t  pix_in;
  op_t   op;
  chan_t threshold, add_val, sub_val, bright_val;
  logic  bright_sign;
  logic  out_valid;
  rgb_t  pix_out;

  int    checks = 0, failures = 0;
  longint cyc = 0;

  // expectation for the pixel presented in the previous cycle
  logic  exp_valid = 1'b0;
  rgb_t  exp_pix;
  op_t   last_op  = OP_INVERT;

  // mechanism counters
  int n_op[4];
  int n_switch = 0, n_idle = 0, n_gray_clamp = 0;
  int n_b_hi = 0, n_b_lo = 0;
  int n_c_up = 0, n_c_down = 0, n_c_eq = 0, n_c_hi = 0, n_c_lo = 0;
  int n_t_white = 0, n_t_black = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  image_enhance_top dut (
    .clk, .rst_n, .in_valid, .pix_in, .op, .threshold, .add_val, .sub_val,
    .bright_sign, .bright_val, .out_valid, .pix_out
  );

  // ---------------- reference model ----------------
  function automatic int clamp8(int v);
    return (v > 255) ? 255 : ((v < 0) ? 0 : v);
  endfunction

  function automatic int ref_gray(rgb_t p);
    int s, m;
    s = int'(p.r) + int'(p.g) + int'(p.b);
    m = ((s / 2) + (s / 4)) / 2;
    return clamp8(m);
  endfunction

  function automatic rgb_t mk(int r, int g, int b);
    return '{r: chan_t'(r), g: chan_t'(g), b: chan_t'(b)};
  endfunction

  function automatic rgb_t ref_op(rgb_t p, op_t o, int th, int a, int s, bit bs, int bv);
    int gv, k;
    gv = ref_gray(p);
    case (o)
      OP_INVERT:    return mk(255 - gv, 255 - gv, 255 - gv);
      OP_THRESHOLD: begin
        k = (gv > th) ? 255 : 0;
        return mk(k, k, k);
      end
      OP_CONTRAST: begin
        if (gv > th)      return mk(clamp8(int'(p.r) + a), clamp8(int'(p.g) + a), clamp8(int'(p.b) + a));
        else if (gv < th) return mk(clamp8(int'(p.r) - s), clamp8(int'(p.g) - s), clamp8(int'(p.b) - s));
        else              return p;
      end
      default: begin
        if (bs) return mk(clamp8(int'(p.r) + bv), clamp8(int'(p.g) + bv), clamp8(int'(p.b) + bv));
        else    return mk(clamp8(int'(p.r) - bv), clamp8(int'(p.g) - bv), clamp8(int'(p.b) - bv));
      end
    endcase
  endfunction

  // test image: gradients plus a hashed texture
  function automatic rgb_t image_pixel(int x, int y);
    int h;
    h = (x * 7919 + y * 104729) ^ (x * y * 31);
    h = (h ^ (h >> 7)) & 63;
    return mk((x * 255 / (IMG_W - 1) + h) % 256,
              clamp8(y * 255 / (IMG_H - 1) + h - 32),
              clamp8(((x + y) * 255) / (IMG_W + IMG_H - 2) - h + 32));
  endfunction

  // ---------------- checking, at the falling edge ----------------
  task automatic check_output();
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: out_valid=%0d expected %0d", cyc, out_valid, exp_valid);
    end else if (exp_valid && pix_out !== exp_pix) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d: pixel (%0d,%0d,%0d) expected (%0d,%0d,%0d)", cyc,
                 pix_out.r, pix_out.g, pix_out.b, exp_pix.r, exp_pix.g, exp_pix.b);
    end
  endtask

  // present one pixel (or an idle cycle) and record what must come out
  task automatic send(bit v, rgb_t p, op_t o, int th, int a, int s, bit bs, int bv);
    int gv;
    @(negedge clk);
    check_output();
    in_valid    = v;
    pix_in      = p;
    op          = o;
    threshold   = chan_t'(th);
    add_val     = chan_t'(a);
    sub_val     = chan_t'(s);
    bright_sign = bs;
    bright_val  = chan_t'(bv);
    exp_valid   = v;
    if (!v) begin
      n_idle++;
      return;
    end
    exp_pix = ref_op(p, o, th, a, s, bs, bv);
    // mechanism bookkeeping
    gv = ref_gray(p);
    n_op[int'(o)]++;
    if (o != last_op) n_switch++;
    last_op = o;
    if (((int'(p.r) + int'(p.g) + int'(p.b)) / 2 + (int'(p.r) + int'(p.g) + int'(p.b)) / 4) / 2 > 255)
      n_gray_clamp++;
    case (o)
      OP_THRESHOLD: if (gv > th) n_t_white++; else n_t_black++;
      OP_CONTRAST: begin
        if (gv > th) begin
          n_c_up++;
          if (int'(p.r) + a > 255 || int'(p.g) + a > 255 || int'(p.b) + a > 255) n_c_hi++;
        end else if (gv < th) begin
          n_c_down++;
          if (int'(p.r) < s || int'(p.g) < s || int'(p.b) < s) n_c_lo++;
        end else n_c_eq++;
      end
      OP_BRIGHTNESS: begin
        if (bs && (int'(p.r) + bv > 255 || int'(p.g) + bv > 255 || int'(p.b) + bv > 255)) n_b_hi++;
        if (!bs && (int'(p.r) < bv || int'(p.g) < bv || int'(p.b) < bv)) n_b_lo++;
      end
      default: ;
    endcase
  endtask

  task automatic run_image(op_t o, int th, int a, int s, bit bs, int bv);
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        send(1'b1, image_pixel(x, y), o, th, a, s, bs, bv);
  endtask

  task automatic need(string what, int n);
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    pix_in = '0;
    op = OP_INVERT;
    {threshold, add_val, sub_val, bright_val} = '0;
    bright_sign = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL: out_valid set during reset");
    end
    rst_n = 1'b1;

    run_image(OP_INVERT,     0,   0,  0, 1'b0, 0);
    run_image(OP_THRESHOLD,  120, 0,  0, 1'b0, 0);
    run_image(OP_CONTRAST,   90,  10, 15, 1'b0, 0);
    run_image(OP_BRIGHTNESS, 0,   0,  0, 1'b0, 60);

    for (int i = 0; i < NMIX; i++) begin
      int th;
      th = $urandom_range(255);
      if ($urandom_range(3) == 0)
        send(1'b0, mk($urandom_range(255), 0, 0), op_t'($urandom_range(3)), 0, 0, 0, 1'b0, 0);
      send(1'b1, mk($urandom_range(255), $urandom_range(255), $urandom_range(255)),
           op_t'($urandom_range(3)), th, $urandom_range(255), $urandom_range(255),
           1'($urandom_range(1)), $urandom_range(255));
    end
    send(1'b0, '0, OP_INVERT, 0, 0, 0, 1'b0, 0);
    send(1'b0, '0, OP_INVERT, 0, 0, 0, 1'b0, 0);

    $display("mechanism counts:");
    need("invert pixels",              n_op[0]);
    need("threshold pixels",           n_op[1]);
    need("contrast pixels",            n_op[2]);
    need("brightness pixels",          n_op[3]);
    need("operation switches",         n_switch);
    need("idle cycles",                n_idle);
    need("intensity clamped to 255",   n_gray_clamp);
    need("threshold white",            n_t_white);
    need("threshold black",            n_t_black);
    need("contrast raised",            n_c_up);
    need("contrast lowered",           n_c_down);
    need("contrast at threshold",      n_c_eq);
    need("contrast clamp at 255",      n_c_hi);
    need("contrast clamp at 0",        n_c_lo);
    need("brightness clamp at 255",    n_b_hi);
    need("brightness clamp at 0",      n_b_lo);
    $display("cycles: %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
