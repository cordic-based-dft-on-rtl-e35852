// tb_cordic_circ_rot: self-checking testbench for the rotation-mode CORDIC.
// Random vectors and random angles within +-99 degrees, at a 16-bit data
// and 16-bit angle size with 14 stages; expected outputs are the rotated
// vector times the CORDIC gain k_m, computed in floating point for the
// angle actually turned (z_in - z_out), within 12 LSB (rounded atan table and
// truncating shifts, no guard bits at this size), and a residual angle
// within 8 units (0.044 degree). Also checks the NSTAGE-cycle
// latency and that ena = 0 stalls the pipeline.
module tb_cordic_circ_rot;
  localparam int DW = 16, ZW = 16, NS = 14, OW = DW + 2;
  localparam int NVEC = 500;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, ena = 0, in_valid = 0;
  logic signed [DW-1:0] x_in, y_in;
  logic signed [ZW-1:0] z_in;
  logic out_valid;
  logic signed [OW-1:0] x_out, y_out;
  logic signed [ZW-1:0] z_out;

  cordic_circ_rot #(.DW(DW), .ZW(ZW), .NSTAGE(NS)) dut (.*);
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

  real km;
  real qx [$], qy [$], qz [$];
  int  qe [$];      // enabled-edge index at which each vector entered
  int  nen = 0, nout = 0;

  always @(posedge clk) if (rst_n && ena) begin
    if (out_valid) begin
      real ex, ey, xi, yi, a;
      // the angle actually turned is z_in - z_out
      xi = qx.pop_front(); yi = qy.pop_front();
      a = (qz.pop_front() - real'(z_out)) * 2.0 * PI / 65536.0;
      ex = km * (xi * $cos(a) - yi * $sin(a));
      ey = km * (yi * $cos(a) + xi * $sin(a));
      checks++;
      if (nen - qe.pop_front() != NS) begin
        failures++;
        $display("latency wrong");
      end
      checks++;
      if (fabs(real'(x_out) - ex) > 12.0 || fabs(real'(y_out) - ey) > 12.0 || z_out > 8 || z_out < -8) begin
        failures++;
        if (failures < 10) $display("got (%0d,%0d,%0d) expected (%f,%f)", x_out, y_out, z_out, ex, ey);
      end
      nout++;
    end
    if (in_valid) begin
      qx.push_back(real'(x_in));
      qy.push_back(real'(y_in));
      qz.push_back(real'(z_in));
      qe.push_back(nen);
    end
    nen++;
  end

  initial begin
    km = 1.0;
    for (int i = 0; i < NS; i++) km = km * $sqrt(1.0 + 2.0 ** (-2 * i));
    x_in = 0; y_in = 0; z_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      ena = ($urandom % 5) != 0;
      in_valid = 1;
      x_in = DW'($signed($urandom) >>> 17);
      y_in = DW'($signed($urandom) >>> 17);
      z_in = ZW'($signed($urandom % 36000) - 18000);   // within +-99 degrees
      if (!ena) begin
        @(negedge clk);
        ena = 1;
      end
    end
    @(negedge clk);
    in_valid = 0;
    ena = 1;
    repeat (NS + 3) @(negedge clk);
    checks++;
    if (nout != NVEC) begin failures++; $display("got %0d results", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
