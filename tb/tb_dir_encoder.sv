// tb_dir_encoder: self-checking testbench for the twiddle direction ROM.
// For every index k the signed step angles selected by the 18 direction
// bits (+-90 degrees, then +-atan(2^-i), i = 0..16) must add up to
// 22.5*k degrees within 0.001 degree; every row must start with the
// counter-clockwise 90-degree step. Rows are also rotated numerically
// (x, y) = (1, 0) through the 18 steps and compared with (cos, sin) of the
// target angle times the CORDIC gain, within 2e-5.
module tb_dir_encoder;
  localparam real PI = 3.14159265358979323846;
  logic [2:0]  k;
  logic [17:0] t;
  int checks = 0, failures = 0;

  dir_encoder dut (.k(k), .t(t));

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int kk = 0; kk < 8; kk++) begin
      real a, x, y, xn, gain, target;
      k = 3'(kk);
      #1;
      target = 22.5 * kk;
      a = t[0] ? 90.0 : -90.0;
      x = 0.0; y = t[0] ? 1.0 : -1.0;     // (1, 0) turned by +-90 degrees
      gain = 1.0;
      for (int i = 0; i < 17; i++) begin
        real d;
        d = t[i+1] ? 1.0 : -1.0;
        a += d * $atan(2.0 ** (-i)) * 180.0 / PI;
        xn = x - d * y * (2.0 ** (-i));
        y  = y + d * x * (2.0 ** (-i));
        x  = xn;
        gain = gain * $sqrt(1.0 + 2.0 ** (-2 * i));
      end
      checks++;
      if (fabs(a - target) > 0.001) begin
        failures++;
        $display("k=%0d: angle %f expected %f", kk, a, target);
      end
      checks++;
      if (!t[0]) begin failures++; $display("k=%0d: first step not +90", kk); end
      checks++;
      if (fabs(x / gain - $cos(target * PI / 180.0)) > 2.0e-5 ||
          fabs(y / gain - $sin(target * PI / 180.0)) > 2.0e-5) begin
        failures++;
        $display("k=%0d: rotated to (%f,%f)", kk, x / gain, y / gain);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
