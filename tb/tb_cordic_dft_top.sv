// tb_cordic_dft_top: end-to-end testbench of the whole design at its
// default sizes. While the DFT unit transforms a real 16-point signal and
// then inverse-transforms the spectrum it produced (round trip back to the
// signal), the other three units run at the same time: the sine/cosine
// generator sweeps the circle with its clock enable toggling, the
// hyperbolic rotator computes a * e^z, and the butterfly processor runs the
// plain butterfly, the folding mode and the 1/sqrt(2) mode. Every result is
// compared with floating-point references. It counts how often each
// mechanism happened (forward and inverse transforms, input refused while
// busy, pipeline drain between stages, clock-enable stall, all four sine
// quadrants, each butterfly mode) and fails if any never did. The DFT
// timing (results 4 * (8 + 23) + 1 cycles after the last sample) is checked.
module tb_cordic_dft_top;
  localparam real PI = 3.14159265358979323846;
  localparam int N = 16, COMPUTE = 4 * (8 + 23) + 1;

  logic clk = 0, rst_n = 0;
  logic dft_inverse = 0, dft_in_valid = 0, dft_in_ready, dft_out_valid, dft_out_last, dft_busy;
  logic signed [15:0] dft_in_re = 0, dft_in_im = 0;
  logic [3:0] dft_out_idx;
  logic signed [20:0] dft_out_re, dft_out_im;
  logic sc_ena = 0;
  logic [7:0] sc_phase_in = 0;
  logic signed [7:0] sc_sin_out, sc_cos_out, sc_eps;
  logic sc_out_valid;
  logic hyp_in_valid = 0, hyp_out_valid;
  logic signed [15:0] hyp_x_in = 0, hyp_y_in = 0, hyp_z_in = 0, hyp_x_out, hyp_y_out, hyp_z_out;
  logic bp_in_valid = 0, bp_g_sel = 0, bp_c1 = 0, bp_s1 = 0, bp_s2 = 0, bp_out_valid;
  logic signed [15:0] bp_u = 0, bp_x = 0, bp_y = 0, bp_v = 0, bp_c = 0, bp_s = 0;
  logic signed [18:0] bp_ar, bp_br, bp_ai, bp_bi;

  cordic_dft_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // mechanism counters
  int n_fwd = 0, n_inv = 0, n_refused = 0, n_drain = 0, n_sc_stall = 0;
  int n_quad [4] = '{0, 0, 0, 0};
  int n_bp_basic = 0, n_bp_fold = 0, n_bp_rsqrt = 0, n_hyp = 0;

  always @(posedge clk) begin
    if (dft_in_valid && !dft_in_ready) n_refused++;
    // a stage waiting for the CORDIC pipeline to drain: busy, no output
    if (dft_busy && !dft_out_valid && int'(dut.u_dft.state) == 2) n_drain++;
  end

  // ---------------- DFT unit ----------------------------------------------
  int sig [N];
  int gr [N], gi [N];

  task automatic dft_run(input bit inv, input int xr [N], input int xi [N], input real tol);
    real er [N], ei [N];
    int t_last, t_first, nout;
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
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      dft_in_valid = 1; dft_inverse = inv;
      dft_in_re = 16'(xr[n]); dft_in_im = 16'(xi[n]);
      @(posedge clk);
      t_last = cycle;
      @(negedge clk);
    end
    // keep offering a sample while the core is busy: it must be refused
    dft_in_re = 16'h7fff;
    repeat (3) @(negedge clk);
    dft_in_valid = 0;
    nout = 0;
    t_first = -1;
    while (nout < N) begin
      @(posedge clk);
      if (dft_out_valid) begin
        if (t_first < 0) t_first = cycle;
        gr[nout] = int'(dft_out_re); gi[nout] = int'(dft_out_im);
        check(dft_out_idx == 4'(nout) &&
              fabs(gr[nout] - er[nout]) <= tol && fabs(gi[nout] - ei[nout]) <= tol,
              $sformatf("dft %s bin %0d got (%0d,%0d) expected (%f,%f)", inv ? "inv" : "fwd",
                        nout, gr[nout], gi[nout], er[nout], ei[nout]));
        nout++;
      end
    end
    check(t_first - t_last == COMPUTE,
          $sformatf("dft compute took %0d cycles, expected %0d", t_first - t_last, COMPUTE));
    if (inv) n_inv++; else n_fwd++;
  endtask

  initial begin : dft_thread
    int xr [N], xi [N];
    wait (rst_n);
    // a real signal: two tones and a step
    for (int n = 0; n < N; n++) begin
      sig[n] = int'(9000.0 * $cos(2.0 * PI * 3 * n / N) + 5000.0 * $sin(2.0 * PI * 6 * n / N))
               + ((n < 4) ? 3000 : 0);
      xr[n] = sig[n]; xi[n] = 0;
    end
    dft_run(0, xr, xi, 3.0);
    // real input: F(16-k) = conj F(k)
    for (int k = 1; k < N; k++)
      check(fabs(gr[k] - gr[N-k]) <= 4.0 && fabs(gi[k] + gi[N-k]) <= 4.0,
            $sformatf("spectrum symmetry bin %0d", k));
    // inverse of the spectrum: back to the signal
    for (int k = 0; k < N; k++) begin xr[k] = gr[k]; xi[k] = gi[k]; end
    dft_run(1, xr, xi, 12.0);
    for (int n = 0; n < N; n++)
      check(fabs(gr[n] - sig[n]) <= 40.0 && fabs(gi[n]) <= 40.0,
            $sformatf("round trip sample %0d: %0d vs %0d", n, gr[n], sig[n]));
  end

  // ---------------- sine / cosine generator --------------------------------
  // outputs are read just before each enabled edge: the result for the
  // phase taken LAT = 9 enabled edges earlier must be present
  int sc_hist [$];
  int sc_nen = 0;
  logic signed [7:0] sc_hold;
  logic sc_prev_ena = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (sc_ena) begin
      sc_hist.push_back(int'(sc_phase_in));
      sc_nen++;
      if (sc_nen > 9) begin
        int p;
        p = sc_hist[sc_nen - 10];
        check(sc_out_valid &&
              fabs(real'(sc_sin_out) - 127.0 * $sin(2.0 * PI * p / 256.0)) <= 2.0 &&
              fabs(real'(sc_cos_out) - 127.0 * $cos(2.0 * PI * p / 256.0)) <= 2.0,
              $sformatf("sincos phase %0d: %0d %0d", p, sc_sin_out, sc_cos_out));
        n_quad[p / 64]++;
      end
    end
    // the previous edge was not enabled: the outputs must not have moved
    if (!sc_prev_ena && sc_nen > 9) begin
      n_sc_stall++;
      check(sc_sin_out == sc_hold, "sincos changed while ena = 0");
    end
    sc_hold <= sc_sin_out;
    sc_prev_ena <= sc_ena;
  end

  initial begin : sc_thread
    wait (rst_n);
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      sc_ena = (n % 7) != 3;
      sc_phase_in = 8'(n * 5);
    end
    @(negedge clk);
    sc_ena = 0;
  end

  // ---------------- hyperbolic rotator --------------------------------------
  initial begin : hyp_thread
    real ea [$];
    wait (rst_n);
    fork
      for (int n = 0; n < 100; n++) begin
        real a, z;
        @(negedge clk);
        hyp_in_valid = 1;
        a = real'(int'($urandom % 8000) - 4000);
        z = real'(int'($urandom % 16000) - 8000) / 8192.0;
        hyp_x_in = 16'(int'(a)); hyp_y_in = hyp_x_in;
        hyp_z_in = 16'(int'(z * 8192.0));
        ea.push_back(real'(hyp_x_in) * $exp(real'(hyp_z_in) / 8192.0));
      end
      forever begin
        @(posedge clk);
        if (hyp_out_valid) begin
          real e;
          e = ea.pop_front();
          check(fabs(real'(hyp_x_out) - e) <= 4.0 + 3.0e-4 * fabs(e) &&
                fabs(real'(hyp_y_out) - e) <= 4.0 + 3.0e-4 * fabs(e),
                $sformatf("hyp got %0d expected %f", hyp_x_out, e));
          n_hyp++;
        end
      end
    join_any
    @(negedge clk);
    hyp_in_valid = 0;
  end

  // ---------------- butterfly processor --------------------------------------
  initial begin : bp_thread
    real q0 [$], q1 [$], q2 [$], q3 [$];
    int  qm [$];
    wait (rst_n);
    fork
      for (int n = 0; n < 90; n++) begin
        real th, c, s, u, v, x, y, vm, p, q, r, i;
        int mode;
        @(negedge clk);
        mode = n % 3;
        th = 2.0 * PI * n / 90.0;
        bp_in_valid = 1;
        bp_u = 16'($urandom % 20000); bp_v = 16'($urandom % 20000);
        bp_x = 16'($urandom % 20000); bp_y = 16'($urandom % 20000);
        bp_c = 16'(int'($cos(th) * 16384.0)); bp_s = 16'(int'($sin(th) * 16384.0));
        bp_g_sel = (mode == 2); bp_c1 = (mode == 1); bp_s1 = 1; bp_s2 = 1;
        c = real'(bp_c) / 16384.0; s = real'(bp_s) / 16384.0;
        u = real'(bp_u); v = real'(bp_v); x = real'(bp_x); y = real'(bp_y);
        vm = (mode == 2) ? v / $sqrt(2.0) : v;
        p = (mode == 1) ? u + vm : u;
        q = (mode == 1) ? vm - u : vm;
        r = x * c + y * s;
        i = y * c - x * s;
        q0.push_back(p + r); q1.push_back(p - r); q2.push_back(q + i); q3.push_back(q - i);
        qm.push_back(mode);
      end
      forever begin
        @(posedge clk);
        if (bp_out_valid) begin
          real e0, e1, e2, e3;
          int m;
          e0 = q0.pop_front(); e1 = q1.pop_front(); e2 = q2.pop_front(); e3 = q3.pop_front();
          m = qm.pop_front();
          check(fabs(real'(bp_ar) - e0) <= 1.5 && fabs(real'(bp_br) - e1) <= 1.5 &&
                fabs(real'(bp_ai) - e2) <= 1.5 && fabs(real'(bp_bi) - e3) <= 1.5,
                $sformatf("butterfly mode %0d: %0d %0d %0d %0d vs %f %f %f %f",
                          m, bp_ar, bp_br, bp_ai, bp_bi, e0, e1, e2, e3));
          if (m == 0) n_bp_basic++; else if (m == 1) n_bp_fold++; else n_bp_rsqrt++;
        end
      end
    join_any
    @(negedge clk);
    bp_in_valid = 0;
  end

  // ---------------- end -----------------------------------------------------
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_inv == 1);
    repeat (700) @(posedge clk);
    $display("forward %0d inverse %0d refused %0d drain %0d sc_stall %0d quadrants %0d %0d %0d %0d",
             n_fwd, n_inv, n_refused, n_drain, n_sc_stall, n_quad[0], n_quad[1], n_quad[2], n_quad[3]);
    $display("hyperbolic %0d butterfly basic %0d fold %0d rsqrt2 %0d",
             n_hyp, n_bp_basic, n_bp_fold, n_bp_rsqrt);
    check(n_fwd > 0, "no forward DFT");
    check(n_inv > 0, "no inverse DFT");
    check(n_refused > 0, "input never refused while busy");
    check(n_drain > 0, "pipeline never drained between stages");
    check(n_sc_stall > 0, "sincos never stalled");
    for (int q = 0; q < 4; q++) check(n_quad[q] > 0, $sformatf("quadrant %0d never used", q));
    check(n_hyp == 100, "hyperbolic results missing");
    check(n_bp_basic > 0 && n_bp_fold > 0 && n_bp_rsqrt > 0, "a butterfly mode never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
