// tb_cordic_dft16: self-checking testbench for the 16-point CORDIC DFT.
// Runs forward transforms of random complex data, of a real sequence (whose
// spectrum must be conjugate-symmetric, F(16-k) = conj F(k)) and of an
// impulse and a pure tone, then inverse transforms. Every result is
// compared with a direct O(N^2) DFT computed in floating point. Also
// checks the ready/valid sequencing and the compute time: the first result
// appears 4 * (8 + NITER + 6) + 1 cycles after the last sample is taken.
module tb_cordic_dft16;
  localparam int DW = 16, MW = DW + 5, NITER = 17, N = 16;
  localparam int COMPUTE = 4 * (8 + NITER + 6) + 1;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic inverse, in_valid, in_ready, out_valid, out_last, busy;
  logic signed [DW-1:0] in_re, in_im;
  logic [3:0] out_idx;
  logic signed [MW-1:0] out_re, out_im;

  cordic_dft16 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  int xr [N], xi [N];
  real er [N], ei [N];
  int gr [N], gi [N];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic run(input bit inv, input real tol, input string name);
    int t_last, t_first, nout;
    // reference: direct DFT
    for (int k = 0; k < N; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = (inv ? 2.0 : -2.0) * PI * k * n / N;
        er[k] += xr[n] * $cos(a) - xi[n] * $sin(a);
        ei[k] += xi[n] * $cos(a) + xr[n] * $sin(a);
      end
      if (!inv) begin er[k] /= N; ei[k] /= N; end
    end
    // load
    @(negedge clk);
    check(in_ready && !busy, {name, ": ready before load"});
    for (int n = 0; n < N; n++) begin
      in_valid = 1; inverse = inv;
      in_re = DW'(xr[n]); in_im = DW'(xi[n]);
      @(posedge clk);
      t_last = cycle;
      @(negedge clk);
      inverse = !inv;   // must be ignored after the first sample
      // an idle cycle now and then
      if (n == 5) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    check(!in_ready && busy, {name, ": busy after load"});
    // collect
    nout = 0;
    t_first = -1;
    while (nout < N) begin
      @(posedge clk);
      if (out_valid) begin
        if (t_first < 0) t_first = cycle;
        check(out_idx == 4'(nout), $sformatf("%s: out_idx %0d expected %0d", name, out_idx, nout));
        check(out_last == (nout == N - 1), {name, ": out_last"});
        gr[nout] = int'(out_re); gi[nout] = int'(out_im);
        check(fabs(gr[nout] - er[nout]) <= tol && fabs(gi[nout] - ei[nout]) <= tol,
              $sformatf("%s: bin %0d got (%0d,%0d) expected (%f,%f)", name, nout,
                        gr[nout], gi[nout], er[nout], ei[nout]));
        nout++;
      end else begin
        check(!in_ready, {name, ": ready while computing"});
      end
    end
    check(t_first - t_last == COMPUTE,
          $sformatf("%s: first result %0d cycles after last sample, expected %0d",
                    name, t_first - t_last, COMPUTE));
    @(negedge clk);
    check(!out_valid && in_ready, {name, ": back to load"});
  endtask

  initial begin
    inverse = 0; in_valid = 0; in_re = 0; in_im = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: random complex data, forward
    for (int n = 0; n < N; n++) begin
      xr[n] = $signed($urandom) >>> 17; xi[n] = $signed($urandom) >>> 17;
    end
    run(0, 3.0, "random fwd");
    // 2: real data, forward, with conjugate symmetry of the result
    for (int n = 0; n < N; n++) begin xr[n] = $signed($urandom) >>> 16; xi[n] = 0; end
    run(0, 3.0, "real fwd");
    for (int k = 1; k < N; k++)
      check(fabs(gr[k] - gr[N-k]) <= 4.0 && fabs(gi[k] + gi[N-k]) <= 4.0,
            $sformatf("real fwd: symmetry bin %0d", k));
    // 3: impulse at n = 3
    for (int n = 0; n < N; n++) begin xr[n] = (n == 3) ? 16000 : 0; xi[n] = 0; end
    run(0, 2.0, "impulse fwd");
    // 4: complex tone at bin 5, full scale
    for (int n = 0; n < N; n++) begin
      xr[n] = int'(32000.0 * $cos(2.0 * PI * 5 * n / N));
      xi[n] = int'(32000.0 * $sin(2.0 * PI * 5 * n / N));
    end
    run(0, 3.0, "tone fwd");
    // 5: inverse of random spectra
    for (int n = 0; n < N; n++) begin
      xr[n] = $signed($urandom) >>> 16; xi[n] = $signed($urandom) >>> 16;
    end
    run(1, 12.0, "random inv");
    // 6: round trip: inverse of the forward result returns the input
    for (int n = 0; n < N; n++) begin xr[n] = $signed($urandom) >>> 17; xi[n] = 0; end
    run(0, 3.0, "trip fwd");
    begin
      int orig [N];
      for (int n = 0; n < N; n++) orig[n] = xr[n];
      for (int n = 0; n < N; n++) begin xr[n] = gr[n]; xi[n] = gi[n]; end
      run(1, 12.0, "trip inv");
      for (int n = 0; n < N; n++)
        check(fabs(gr[n] - orig[n]) <= 40.0 && fabs(gi[n]) <= 40.0,
              $sformatf("round trip sample %0d: %0d vs %0d", n, gr[n], orig[n]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
