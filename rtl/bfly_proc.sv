// bfly_proc: multiplier-based butterfly processor.
//
// This is the multiplier alternative to a CORDIC rotation for one DFT
// butterfly. The lower input (x, y) = (R2, I2) is rotated by four
// multipliers with the coefficients c = cos(theta) and s = sin(theta):
//   r = x*c + y*s,   i = y*c - x*s            (rotation by -theta)
// The upper real input u = R1 passes through a delay, the upper imaginary
// input v = I1 through a multiplier by 1 or 1/sqrt(2) (g_sel), which serves
// the butterflies whose angle is pi/4. A first adder pair can fold the two
// upper inputs together (c1 = 1):
//   p = u + c1*v,    q = v - c1*u
// and a second pair forms the butterfly outputs, each rotated term gated
// by its control:
//   ar = p + s2*r,  br = p - s2*r,  ai = q + s1*i,  bi = q - s1*i.
// With c1 = 0, s1 = s2 = 1, g_sel = 0 this is the basic butterfly
//   A' = A + W B,  B' = A - W B,  W = e^(-j theta).
// Coefficients are CW-bit signed with CF = CW - 2 fraction bits (so 1.0 is
// representable); results are rounded back to the data scale and are
// DW + 3 bits wide.
//
// Interface: in_valid/out_valid, no back-pressure; three register stages
// (multipliers, first adders, second adders), latency 3 cycles. Controls
// and coefficients are taken with the data.
// The multiplier set, the delay path, the 1-or-1/sqrt(2) multiplier, the
// two adder columns and the control names c1, s1, s2 follow the published
// butterfly-processor structure; how each control gates its adder, the
// signs, widths and pipelining are this design's reading of it.
module bfly_proc #(
  parameter int DW = 16,
  parameter int CW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] u,       // R1 (delay path)
  input  logic signed [DW-1:0] x,       // R2
  input  logic signed [DW-1:0] y,       // I2
  input  logic signed [DW-1:0] v,       // I1 (multiply-or-delay path)
  input  logic signed [CW-1:0] c,       // cos(theta), Q2.(CW-2)
  input  logic signed [CW-1:0] s,       // sin(theta), Q2.(CW-2)
  input  logic                 g_sel,   // 1: scale v by 1/sqrt(2)
  input  logic                 c1,
  input  logic                 s1,
  input  logic                 s2,
  output logic                 out_valid,
  output logic signed [DW+2:0] ar,
  output logic signed [DW+2:0] br,
  output logic signed [DW+2:0] ai,
  output logic signed [DW+2:0] bi
);
  localparam int CF = CW - 2;
  localparam int PW = DW + CW;          // product width
  localparam int SW = PW + 2;           // sum width
  localparam int OW = DW + 3;
  // 1/sqrt(2) in Q2.CF, rounded
  localparam logic signed [CW-1:0] RSQRT2 = CW'(int'(0.70710678118654752 * (2.0 ** CF)));

  // stage 1: delay and multipliers
  logic signed [PW-1:0] u1, v1, xc, xs, ys, yc;
  logic                 c1_1, s1_1, s2_1;
  // stage 2: first adders
  logic signed [SW-1:0] p2, q2, r2, i2;
  logic                 s1_2, s2_2;
  logic [2:0]           vld;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};

  always_ff @(posedge clk) begin
    u1 <= PW'(u) <<< CF;
    v1 <= g_sel ? PW'(v) * PW'(RSQRT2) : PW'(v) <<< CF;
    xc <= PW'(x) * PW'(c);
    xs <= PW'(x) * PW'(s);
    ys <= PW'(y) * PW'(s);
    yc <= PW'(y) * PW'(c);
    c1_1 <= c1; s1_1 <= s1; s2_1 <= s2;

    p2 <= SW'(u1) + (c1_1 ? SW'(v1) : '0);
    q2 <= SW'(v1) - (c1_1 ? SW'(u1) : '0);
    r2 <= SW'(xc) + SW'(ys);
    i2 <= SW'(yc) - SW'(xs);
    s1_2 <= s1_1; s2_2 <= s2_1;

    ar <= rnd(p2 + (s2_2 ? r2 : '0));
    br <= rnd(p2 - (s2_2 ? r2 : '0));
    ai <= rnd(q2 + (s1_2 ? i2 : '0));
    bi <= rnd(q2 - (s1_2 ? i2 : '0));
  end

  // drop the CF coefficient fraction bits, rounding half up
  function automatic logic signed [OW-1:0] rnd(input logic signed [SW-1:0] val);
    logic signed [SW-1:0] t;
    t = (val + (SW'(1) <<< (CF - 1))) >>> CF;
    return OW'(t);
  endfunction

  assign out_valid = vld[2];
endmodule
