// tb_cordic_sincos: self-checking testbench for the sine/cosine generator.
// Sweeps all 256 phases, then random phases with the clock enable toggling,
// and compares sin_out/cos_out with 127*sin and 127*cos (within 2 LSB) and
// eps with 0 (within 8 units). Checks that results follow their phase by
// exactly STAGES + 1 enabled cycles and that ena = 0 freezes the outputs.
module tb_cordic_sincos;
  localparam int STAGES = 8, LAT = STAGES + 1;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, ena = 0;
  logic [7:0] phase_in;
  logic signed [7:0] sin_out, cos_out, eps;
  logic out_valid;

  cordic_sincos dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // phases in the order the enabled clock edges took them
  int hist [$];
  int nen = 0;

  always @(posedge clk) if (rst_n && ena) begin
    hist.push_back(int'(phase_in));
    nen++;
    if (nen > LAT) begin
      int p;
      real es, ec;
      p  = hist[nen - 1 - LAT];
      es = 127.0 * $sin(2.0 * PI * p / 256.0);
      ec = 127.0 * $cos(2.0 * PI * p / 256.0);
      checks++;
      if (!out_valid || fabs(real'(sin_out) - es) > 2.0 || fabs(real'(cos_out) - ec) > 2.0
          || eps > 8 || eps < -8) begin
        failures++;
        if (failures < 10)
          $display("phase %0d: sin %0d cos %0d eps %0d expected %f %f", p, sin_out, cos_out, eps, es, ec);
      end
    end
  end

  initial begin
    phase_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ena = 1;
    for (int p = 0; p < 256; p++) begin
      phase_in = 8'(p);
      @(negedge clk);
    end
    for (int n = 0; n < 300; n++) begin
      logic signed [7:0] s_hold, c_hold;
      phase_in = 8'($urandom);
      ena = ($urandom % 3) != 0;
      s_hold = sin_out; c_hold = cos_out;
      @(negedge clk);
      if (!ena) begin
        checks++;
        if (sin_out != s_hold || cos_out != c_hold) begin
          failures++;
          $display("outputs changed while ena = 0");
        end
      end
    end
    // the published waveform's phase: 82/256 turn (115.3 degrees)
    ena = 1;
    phase_in = 8'd82;
    repeat (LAT + 2) @(negedge clk);
    $display("phase 82: sin %0d cos %0d eps %0d", sin_out, cos_out, eps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
