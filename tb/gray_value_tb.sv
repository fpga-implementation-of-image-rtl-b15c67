// gray_value_tb: self-checking test of gray_value.
//
// Drives both variants (shift-and-add approximation and exact mean) with
// the corner pixels and random pixels, one per clock, and compares each
// intensity with an integer model: min(255, ((S/2)+(S/4))/2) and S/3,
// where S = R+G+B. A watchdog ends the run as a failure if it hangs.
module gray_value_tb;
  import img_pkg::*;

  localparam int NRAND = 20000;

  logic  clk = 1'b0;
  rgb_t  pix;
  chan_t gray_apx, gray_ex;
  int    checks = 0, failures = 0;
  int    clamped = 0;

  always #5 clk = ~clk;

  gray_value #(.EXACT_MEAN(1'b0)) dut_apx (.pix(pix), .gray(gray_apx));
  gray_value #(.EXACT_MEAN(1'b1)) dut_ex  (.pix(pix), .gray(gray_ex));

  task automatic check_pix(int r, int g, int b);
    int s, e_apx, e_ex;
    pix = '{r: chan_t'(r), g: chan_t'(g), b: chan_t'(b)};
    @(posedge clk);
    s     = r + g + b;
    e_apx = ((s / 2) + (s / 4)) / 2;
    if (e_apx > 255) begin
      e_apx = 255;
      clamped++;
    end
    e_ex  = s / 3;
    checks += 2;
    if (int'(gray_apx) != e_apx) begin
      failures++;
      if (failures < 10) $display("FAIL approx (%0d,%0d,%0d): got %0d exp %0d", r, g, b, gray_apx, e_apx);
    end
    if (int'(gray_ex) != e_ex) begin
      failures++;
      if (failures < 10) $display("FAIL exact (%0d,%0d,%0d): got %0d exp %0d", r, g, b, gray_ex, e_ex);
    end
  endtask

  initial begin
    check_pix(0, 0, 0);
    check_pix(255, 255, 255);
    check_pix(255, 0, 0);
    check_pix(0, 255, 0);
    check_pix(0, 0, 255);
    check_pix(227, 227, 227); // S = 681, approx 255 after clamp
    check_pix(226, 227, 227); // S = 680, approx exactly 255
    for (int s = 0; s <= 765; s++)
      check_pix(s / 3, (s + 1) / 3, (s + 2) / 3);
    for (int i = 0; i < NRAND; i++)
      check_pix($urandom_range(255), $urandom_range(255), $urandom_range(255));
    if (clamped == 0) begin
      failures++;
      $display("FAIL: clamp case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
