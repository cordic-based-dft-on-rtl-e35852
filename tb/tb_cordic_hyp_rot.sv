// tb_cordic_hyp_rot: self-checking testbench for the hyperbolic CORDIC.
// With x_in = y_in = a (Q3.12) and random z in [-1.1, 1.1] (Q2.13) both
// outputs must equal a * e^z; with general x, y they must equal
// x cosh z + y sinh z and y cosh z + x sinh z. Expected values are computed
// in floating point for the angle actually applied (z_in - z_out), whose
// residual must stay below 4 LSB of z; tolerance 4 LSB plus 3e-4 of the
// value (the atanh table is rounded to ZF bits). Also checks the NITER + 1 latency.
module tb_cordic_hyp_rot;
  localparam int DW = 16, ZW = 16, ZF = 13, NITER = 18, LAT = NITER + 1;
  localparam real SX = 4096.0, SZ = 8192.0;
  localparam int NVEC = 400;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] x_in, y_in, x_out, y_out;
  logic signed [ZW-1:0] z_in, z_out;
  logic out_valid;

  cordic_hyp_rot dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction
  function automatic real fexp(input real v);
    return $exp(v);
  endfunction

  real qx [$], qy [$], qz [$];
  int  qt [$];
  int  nout = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      real ex, ey, x, y, z, ch, sh;
      // the hyperbolic angle actually applied is z_in - z_out
      x = qx.pop_front(); y = qy.pop_front();
      z = (qz.pop_front() - real'(z_out)) / SZ;
      ch = (fexp(z) + fexp(-z)) / 2.0; sh = (fexp(z) - fexp(-z)) / 2.0;
      ex = x * ch + y * sh;
      ey = y * ch + x * sh;
      checks++;
      if (cycle - qt.pop_front() != LAT) begin failures++; $display("latency wrong"); end
      checks++;
      if (fabs(real'(x_out) - ex) > 4.0 + 3.0e-4 * fabs(ex) ||
          fabs(real'(y_out) - ey) > 4.0 + 3.0e-4 * fabs(ey) || z_out > 4 || z_out < -4) begin
        failures++;
        if (failures < 10) $display("got (%0d,%0d) expected (%f,%f)", x_out, y_out, ex, ey);
      end
      nout++;
    end
    if (in_valid) begin
      qx.push_back(real'(x_in));
      qy.push_back(real'(y_in));
      qz.push_back(real'(z_in));
      qt.push_back(cycle);
    end
  end

  initial begin
    x_in = 0; y_in = 0; z_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      z_in = ZW'(int'(($urandom % 18000) - 9000));          // +-1.099
      if (n < NVEC / 2) begin
        // a * e^z with x = y = a, |a| < 2.5
        x_in = DW'(int'($urandom % 20000) - 10000);
        y_in = x_in;
      end else begin
        x_in = DW'(int'($urandom % 16000) - 8000);
        y_in = DW'(int'($urandom % 16000) - 8000);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (qx.size() != 0) begin failures++; $display("%0d results missing", qx.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
