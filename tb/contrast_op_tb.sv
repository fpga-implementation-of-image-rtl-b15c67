// contrast_op_tb: self-checking test of contrast_op.
//
// Drives random pixels with random intensities, thresholds and amounts,
// and directed cases at the threshold and at both clamps, one per clock.
// The expected pixel is computed per channel with integers: gray above
// the threshold -> min(255, c+add), below -> max(0, c-sub), equal -> c.
// Each of the three branches and both clamps must occur.
module contrast_op_tb;
  import img_pkg::*;

  localparam int NRAND = 20000;

  logic  clk = 1'b0;
  rgb_t  pix_in, pix_out;
  chan_t gray, threshold, add_val, sub_val;
  int    checks = 0, failures = 0;
  int    n_up = 0, n_down = 0, n_eq = 0, n_hi = 0, n_lo = 0;

  always #5 clk = ~clk;

  contrast_op dut (.pix_in(pix_in), .gray(gray), .threshold(threshold),
                   .add_val(add_val), .sub_val(sub_val), .pix_out(pix_out));

  function automatic int model(int c, int gv, int th, int a, int s);
    int t;
    if (gv > th)      t = c + a;
    else if (gv < th) t = c - s;
    else              t = c;
    if (t > 255) t = 255;
    if (t < 0)   t = 0;
    return t;
  endfunction

  task automatic one(int r, int g, int b, int gv, int th, int a, int s);
    int er, eg, eb;
    pix_in    = '{r: chan_t'(r), g: chan_t'(g), b: chan_t'(b)};
    gray      = chan_t'(gv);
    threshold = chan_t'(th);
    add_val   = chan_t'(a);
    sub_val   = chan_t'(s);
    @(posedge clk);
    er = model(r, gv, th, a, s); eg = model(g, gv, th, a, s); eb = model(b, gv, th, a, s);
    if (gv > th) n_up++; else if (gv < th) n_down++; else n_eq++;
    if (gv > th && r + a > 255) n_hi++;
    if (gv < th && r - s < 0)   n_lo++;
    checks++;
    if (int'(pix_out.r) != er || int'(pix_out.g) != eg || int'(pix_out.b) != eb) begin
      failures++;
      if (failures < 10)
        $display("FAIL (%0d,%0d,%0d) g=%0d th=%0d +%0d -%0d: got (%0d,%0d,%0d) exp (%0d,%0d,%0d)",
                 r, g, b, gv, th, a, s, pix_out.r, pix_out.g, pix_out.b, er, eg, eb);
    end
  endtask

  initial begin
    // the settings of the published contrast example: threshold 90, +10, -15
    one(100, 120, 250, 91, 90, 10, 15);
    one(100, 120, 250, 89, 90, 10, 15);
    one(100, 120, 250, 90, 90, 10, 15);
    one(246, 245, 247, 200, 90, 10, 15);
    one(14, 15, 16, 20, 90, 10, 15);
    for (int i = 0; i < NRAND; i++) begin
      int th;
      th = $urandom_range(255);
      one($urandom_range(255), $urandom_range(255), $urandom_range(255),
          ($urandom_range(7) == 0) ? th : $urandom_range(255), th,
          $urandom_range(255), $urandom_range(255));
    end
    if (n_up == 0 || n_down == 0 || n_eq == 0 || n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("FAIL: a case never occurred (up=%0d down=%0d eq=%0d hi=%0d lo=%0d)",
               n_up, n_down, n_eq, n_hi, n_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
