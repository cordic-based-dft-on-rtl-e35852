// tb_butterfly: self-checking testbench for the radix-2 butterfly.
// Random operands, with and without halving, against integer arithmetic
// done in the testbench (floor((v + 1) / 2) for the halved case).
module tb_butterfly;
  localparam int AW = 21, BW = 22, OW = 23;
  logic half;
  logic signed [AW-1:0] a_re, a_im;
  logic signed [BW-1:0] wb_re, wb_im;
  logic signed [OW-1:0] p_re, p_im, m_re, m_im;
  int checks = 0, failures = 0;

  butterfly #(.AW(AW), .BW(BW), .OW(OW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint half_floor(input longint v);
    longint q;
    q = v + 1;
    return (q >= 0) ? q / 2 : -((-q + 1) / 2);
  endfunction

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint ar, ai, br, bi, er, ei, fr, fi;
      half  = n[0];
      a_re  = AW'($urandom); a_im = AW'($urandom);
      wb_re = BW'($urandom); wb_im = BW'($urandom);
      #1;
      ar = longint'(a_re); ai = longint'(a_im); br = longint'(wb_re); bi = longint'(wb_im);
      er = ar + br; ei = ai + bi; fr = ar - br; fi = ai - bi;
      if (half) begin
        er = half_floor(er); ei = half_floor(ei); fr = half_floor(fr); fi = half_floor(fi);
      end
      check(longint'(p_re), er, "p_re");
      check(longint'(p_im), ei, "p_im");
      check(longint'(m_re), fr, "m_re");
      check(longint'(m_im), fi, "m_im");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
