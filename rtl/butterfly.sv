// butterfly: radix-2 FFT butterfly on an already rotated operand.
//
// Given A and the rotated lower input WB = W*B (the rotation is done
// upstream by the CORDIC), it forms
//   A' = A + WB,   B' = A - WB
// on real and imaginary parts. With half = 1 both results are divided by 2
// (rounded, ties towards +infinity); four such stages give the 1/N factor
// of the forward transform of a 16-point DFT. Results are cut to OW bits;
// the caller sizes OW so that no result overflows.
//
// Interface: purely combinational. The sum/difference structure follows
// the basic FFT building block; the optional halving, rounding and the
// widths are this design's.
module butterfly #(
  parameter int AW = 21,   // width of A
  parameter int BW = 22,   // width of the rotated operand
  parameter int OW = 21    // width of the results
) (
  input  logic                 half,
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  logic signed [BW-1:0] wb_re,
  input  logic signed [BW-1:0] wb_im,
  output logic signed [OW-1:0] p_re,   // A + WB
  output logic signed [OW-1:0] p_im,
  output logic signed [OW-1:0] m_re,   // A - WB
  output logic signed [OW-1:0] m_im
);
  localparam int SW = ((AW > BW) ? AW : BW) + 1;

  function automatic logic signed [OW-1:0] scale(input logic signed [SW-1:0] v, input logic h);
    logic signed [SW-1:0] r;
    r = h ? ((v + SW'(1)) >>> 1) : v;
    return OW'(r);
  endfunction

  logic signed [SW-1:0] s_re, s_im, d_re, d_im;
  always_comb begin
    s_re = SW'(a_re) + SW'(wb_re);
    s_im = SW'(a_im) + SW'(wb_im);
    d_re = SW'(a_re) - SW'(wb_re);
    d_im = SW'(a_im) - SW'(wb_im);
    p_re = scale(s_re, half);
    p_im = scale(s_im, half);
    m_re = scale(d_re, half);
    m_im = scale(d_im, half);
  end
endmodule
