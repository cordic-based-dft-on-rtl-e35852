// tb_cordic_pipe: self-checking testbench for the direction-steered CORDIC.
// Sends random vectors with random direction words (and every row of the
// twiddle ROM), computes the rotation angle of each word and the rotated
// vector in floating point, and compares within 3 LSB. Also checks that
// every result comes out exactly NITER + 6 cycles after its input, using
// the tag to match results to inputs.
module tb_cordic_pipe;
  localparam int DW = 21, NITER = 17, LAT = NITER + 6, OW = DW + 1;
  localparam int NVEC = 400;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [DW-1:0] in_x, in_y;
  logic [NITER:0] in_dir;
  logic [15:0] in_tag, out_tag;
  logic out_valid;
  logic signed [OW-1:0] out_x, out_y;
  logic [2:0] k;
  logic [17:0] rom_t;

  cordic_pipe #(.DW(DW), .NITER(NITER), .TAGW(16)) dut (.*);
  dir_encoder enc (.k(k), .t(rom_t));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  real exp_x [NVEC], exp_y [NVEC];
  int  sent_at [NVEC];
  int  nrecv = 0;
  real g;

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

  function automatic real dir_angle(input logic [NITER:0] d);
    real a;
    a = d[0] ? PI / 2 : -PI / 2;
    for (int i = 0; i < NITER; i++)
      a += (d[i+1] ? 1.0 : -1.0) * $atan(2.0 ** (-i));
    return a;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int t;
      real ex, ey;
      t = int'(out_tag);
      ex = exp_x[t]; ey = exp_y[t];
      checks++;
      if (fabs(real'(out_x) - ex) > 3.0 || fabs(real'(out_y) - ey) > 3.0) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH vec %0d: got (%0d,%0d) expected (%f,%f)", t, out_x, out_y, ex, ey);
      end
      checks++;
      if (cycle - sent_at[t] != LAT) begin
        failures++;
        $display("LATENCY vec %0d: %0d cycles, expected %0d", t, cycle - sent_at[t], LAT);
      end
      nrecv++;
    end
  end

  initial begin
    // overall gain: CORDIC growth times the shift-add compensation
    g = 0.5 * 1.25 * (1.0 - 1.0 / 32) * (1.0 + 1.0 / 256) * (1.0 - 1.0 / 1024);
    for (int i = 0; i < NITER; i++) g = g * $sqrt(1.0 + 2.0 ** (-2 * i));
    in_valid = 0; in_x = 0; in_y = 0; in_dir = 0; in_tag = 0; k = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < NVEC; v++) begin
      real a, xr, yr;
      @(negedge clk);
      in_x = DW'($signed($urandom) >>> (32 - DW));
      in_y = DW'($signed($urandom) >>> (32 - DW));
      if (v < 16) begin
        k = 3'(v % 8);
        #1;
        in_dir = (v < 8) ? rom_t : ~rom_t;
      end else begin
        in_dir = (NITER+1)'({$urandom, $urandom});
      end
      a = dir_angle(in_dir);
      if (v < 16) begin
        // the ROM rows must encode +-22.5 degrees * k
        checks++;
        if (fabs(a - ((v < 8) ? 1.0 : -1.0) * (v % 8) * PI / 8.0) > 2.0e-5) begin
          failures++;
          $display("ROM row %0d angle %f", v % 8, a * 180.0 / PI);
        end
      end
      xr = real'(in_x); yr = real'(in_y);
      exp_x[v] = g * (xr * $cos(a) - yr * $sin(a));
      exp_y[v] = g * (yr * $cos(a) + xr * $sin(a));
      in_tag = 16'(v);
      // random gaps between vectors
      in_valid = ($urandom % 4) != 0 || v < 16;
      sent_at[v] = cycle;
      if (!in_valid) begin
        @(negedge clk);
        in_valid = 1;
        sent_at[v] = cycle;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (nrecv != NVEC) begin
      failures++;
      $display("received %0d of %0d results", nrecv, NVEC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
