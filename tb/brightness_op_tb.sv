// brightness_op_tb: self-checking test of brightness_op.
//
// Applies pixels and amounts (corners, the boundary sums 255/256, random)
// with both signs, one per clock, and compares every channel with the
// integer model: sign=1 -> min(255, c+v), sign=0 -> max(0, c-v). Counts
// how often each clamp fired and fails if one never did.
module brightness_op_tb;
  import img_pkg::*;

  localparam int NRAND = 20000;

  logic  clk = 1'b0;
  rgb_t  pix_in, pix_out;
  logic  sign;
  chan_t value;
  int    checks = 0, failures = 0;
  int    n_hi = 0, n_lo = 0;

  always #5 clk = ~clk;

  brightness_op dut (.pix_in(pix_in), .sign(sign), .value(value), .pix_out(pix_out));

  function automatic int model(int c, int v, bit s);
    int t;
    t = s ? c + v : c - v;
    if (t > 255) t = 255;
    if (t < 0)   t = 0;
    return t;
  endfunction

  task automatic one(int r, int g, int b, int v, bit s);
    int er, eg, eb;
    pix_in = '{r: chan_t'(r), g: chan_t'(g), b: chan_t'(b)};
    value  = chan_t'(v);
    sign   = s;
    @(posedge clk);
    er = model(r, v, s); eg = model(g, v, s); eb = model(b, v, s);
    if (s && (r + v > 255)) n_hi++;
    if (!s && (r - v < 0))  n_lo++;
    checks++;
    if (int'(pix_out.r) != er || int'(pix_out.g) != eg || int'(pix_out.b) != eb) begin
      failures++;
      if (failures < 10)
        $display("FAIL (%0d,%0d,%0d) v=%0d s=%0d: got (%0d,%0d,%0d) exp (%0d,%0d,%0d)",
                 r, g, b, v, s, pix_out.r, pix_out.g, pix_out.b, er, eg, eb);
    end
  endtask

  initial begin
    one(0, 0, 0, 0, 1);
    one(255, 255, 255, 255, 1);
    one(200, 55, 56, 200, 1);   // sums 400, 255, 256
    one(196, 195, 197, 60, 1);  // sums 256, 255, 257
    one(60, 59, 61, 60, 0);     // differences 0, -1, 1
    one(0, 255, 128, 255, 0);
    for (int i = 0; i < NRAND; i++)
      one($urandom_range(255), $urandom_range(255), $urandom_range(255),
          $urandom_range(255), 1'($urandom_range(1)));
    if (n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("FAIL: a clamp never fired (hi=%0d lo=%0d)", n_hi, n_lo);
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
