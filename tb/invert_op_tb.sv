// invert_op_tb: self-checking test of invert_op.
//
// Sweeps every 8-bit intensity, one per clock, and checks that all three
// output channels equal 255 minus the intensity.
module invert_op_tb;
  import img_pkg::*;

  logic  clk = 1'b0;
  chan_t gray;
  rgb_t  pix_out;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  invert_op dut (.gray(gray), .pix_out(pix_out));

  initial begin
    for (int v = 0; v < 256; v++) begin
      gray = chan_t'(v);
      @(posedge clk);
      checks++;
      if (int'(pix_out.r) != 255 - v || int'(pix_out.g) != 255 - v || int'(pix_out.b) != 255 - v) begin
        failures++;
        if (failures < 10)
          $display("FAIL gray=%0d: got (%0d,%0d,%0d) exp %0d", v, pix_out.r, pix_out.g, pix_out.b, 255 - v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
