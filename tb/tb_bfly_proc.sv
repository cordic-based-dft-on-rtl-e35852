// tb_bfly_proc: self-checking testbench for the butterfly processor.
// Random data, coefficients for random angles and every combination of
// g_sel, c1, s1, s2, streamed back to back. Expected outputs are computed
// with exact integer arithmetic in the testbench and compared bit for bit;
// the basic butterfly setting is also compared with a floating-point
// A +- W B (within 1 LSB). Checks the 3-cycle latency.
module tb_bfly_proc;
  localparam int DW = 16, CW = 16, CF = CW - 2, LAT = 3, NV = 3000;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] u, x, y, v;
  logic signed [CW-1:0] c, s;
  logic g_sel, c1, s1, s2, out_valid;
  logic signed [DW+2:0] ar, br, ai, bi;

  bfly_proc dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction
  function automatic longint rnd(input longint val);
    longint t;
    t = val + (longint'(1) << (CF - 1));
    return t >>> CF;
  endfunction

  longint q_ar [$], q_br [$], q_ai [$], q_bi [$];
  real    f_ar [$], f_br [$], f_ai [$], f_bi [$];
  int     q_t [$];
  bit     q_basic [$];
  int     nbasic = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      longint e0, e1, e2, e3;
      real g0, g1, g2, g3;
      bit b;
      e0 = q_ar.pop_front(); e1 = q_br.pop_front(); e2 = q_ai.pop_front(); e3 = q_bi.pop_front();
      g0 = f_ar.pop_front(); g1 = f_br.pop_front(); g2 = f_ai.pop_front(); g3 = f_bi.pop_front();
      b = q_basic.pop_front();
      checks++;
      if (cycle - q_t.pop_front() != LAT) begin failures++; $display("latency wrong"); end
      checks++;
      if (longint'(ar) != e0 || longint'(br) != e1 || longint'(ai) != e2 || longint'(bi) != e3) begin
        failures++;
        if (failures < 10) $display("got %0d %0d %0d %0d expected %0d %0d %0d %0d",
                                    ar, br, ai, bi, e0, e1, e2, e3);
      end
      if (b) begin
        checks++;
        nbasic++;
        if (fabs(real'(ar) - g0) > 1.5 || fabs(real'(br) - g1) > 1.5 ||
            fabs(real'(ai) - g2) > 1.5 || fabs(real'(bi) - g3) > 1.5) begin
          failures++;
          if (failures < 10) $display("basic butterfly off: %0d %0d %0d %0d vs %f %f %f %f",
                                      ar, br, ai, bi, g0, g1, g2, g3);
        end
      end
    end
    if (in_valid) begin
      longint lu, lv, lx, ly, lc, ls, v1, p, q, r, i;
      real th, wr, wi;
      lu = u; lv = v; lx = x; ly = y; lc = c; ls = s;
      v1 = g_sel ? lv * longint'(int'(0.70710678118654752 * (2.0 ** CF))) : lv << CF;
      p = (lu << CF) + (c1 ? v1 : 0);
      q = v1 - (c1 ? (lu << CF) : 0);
      r = lx * lc + ly * ls;
      i = ly * lc - lx * ls;
      q_ar.push_back(rnd(p + (s2 ? r : 0)));
      q_br.push_back(rnd(p - (s2 ? r : 0)));
      q_ai.push_back(rnd(q + (s1 ? i : 0)));
      q_bi.push_back(rnd(q - (s1 ? i : 0)));
      // floating-point butterfly A +- e^(-j theta) B
      wr = real'(c) / (2.0 ** CF); wi = -real'(s) / (2.0 ** CF);
      th = real'(x) * wr - real'(y) * wi;     // Re(W B)
      f_ar.push_back(real'(u) + th);
      f_br.push_back(real'(u) - th);
      th = real'(x) * wi + real'(y) * wr;     // Im(W B)
      f_ai.push_back(real'(v) + th);
      f_bi.push_back(real'(v) - th);
      q_basic.push_back(!g_sel && !c1 && s1 && s2);
      q_t.push_back(cycle);
    end
  end

  initial begin
    u = 0; v = 0; x = 0; y = 0; c = 0; s = 0; g_sel = 0; c1 = 0; s1 = 0; s2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NV; n++) begin
      real th;
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      u = DW'($urandom); v = DW'($urandom); x = DW'($urandom); y = DW'($urandom);
      th = 2.0 * PI * ($urandom % 1000) / 1000.0;
      c = CW'(int'($cos(th) * (2.0 ** CF)));
      s = CW'(int'($sin(th) * (2.0 ** CF)));
      {g_sel, c1, s1, s2} = (n % 3 == 0) ? 4'b0011 : 4'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (q_t.size() != 0 || nbasic == 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
