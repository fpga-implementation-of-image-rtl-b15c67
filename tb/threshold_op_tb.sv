// threshold_op_tb: self-checking test of threshold_op.
//
// Sweeps every intensity against a set of thresholds (0, the published
// example 120, 255 and random ones), one pair per clock, and checks for
// white when intensity > threshold and black otherwise.
module threshold_op_tb;
  import img_pkg::*;

  logic  clk = 1'b0;
  chan_t gray, threshold;
  rgb_t  pix_out;
  int    checks = 0, failures = 0;
  int    n_white = 0, n_black = 0;

  always #5 clk = ~clk;

  threshold_op dut (.gray(gray), .threshold(threshold), .pix_out(pix_out));

  task automatic sweep(int th);
    int e;
    threshold = chan_t'(th);
    for (int v = 0; v < 256; v++) begin
      gray = chan_t'(v);
      @(posedge clk);
      e = (v > th) ? 255 : 0;
      if (e == 255) n_white++; else n_black++;
      checks++;
      if (int'(pix_out.r) != e || int'(pix_out.g) != e || int'(pix_out.b) != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL gray=%0d th=%0d: got (%0d,%0d,%0d) exp %0d", v, th, pix_out.r, pix_out.g, pix_out.b, e);
      end
    end
  endtask

  initial begin
    sweep(0);
    sweep(120);
    sweep(255);
    for (int i = 0; i < 8; i++) sweep($urandom_range(255));
    if (n_white == 0 || n_black == 0) begin
      failures++;
      $display("FAIL: an output level never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (11 * 256 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
