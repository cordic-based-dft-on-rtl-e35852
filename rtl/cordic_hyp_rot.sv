// cordic_hyp_rot: pipelined hyperbolic-rotation CORDIC.
//
// Each of NITER stages takes the sign d of the residual angle z and
// computes
//   x' = x + d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*atanh(2^-i)
// with i = 1, 2, 3, 4, 4, 5, ..., 13, 13, 14, ... (the repeated shifts make
// the hyperbolic iteration converge for |z_in| <= 1.118). A last stage
// multiplies by the inverse hyperbolic gain 1/K_h (1.2075 for 18 stages,
// a constant computed at elaboration), so that
//   x_out = x_in cosh z + y_in sinh z,  y_out = y_in cosh z + x_in sinh z.
// With x_in = y_in = a both outputs equal a * e^z and z_out -> 0.
// x and y are DW-bit signed fixed point with a binary point of the
// caller's choosing (the rotation does not depend on it); z is ZW-bit
// signed with ZF fraction bits. The caller keeps |a| e^|z| inside the x/y range.
//
// Interface: in_valid/out_valid mark data, no back-pressure; latency is
// NITER + 1 cycles. rst_n is an asynchronous active-low reset of the valid
// flags. The rotation and its e^z use follow the published hyperbolic mode;
// formats, the stage count, the guard bits and the single constant
// multiply for the gain are this design's.
module cordic_hyp_rot #(
  parameter int DW    = 16,
  parameter int ZW    = 16,
  parameter int ZF    = 13,
  parameter int NITER = 18,
  parameter int GUARD = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] y_in,
  input  logic signed [ZW-1:0] z_in,
  output logic                 out_valid,
  output logic signed [DW-1:0] x_out,
  output logic signed [DW-1:0] y_out,
  output logic signed [ZW-1:0] z_out
);
  import cordic_pkg::*;

  localparam int IW = DW + 2 + GUARD;
  localparam int KF = 16;                       // fraction bits of 1/K_h
  localparam logic signed [KF+2:0] KINV = (KF+3)'(int'(hyp_inv_gain(NITER) * (2.0 ** KF)));

  logic signed [IW-1:0] xs [NITER+1];
  logic signed [IW-1:0] ys [NITER+1];
  logic signed [ZW-1:0] zs [NITER+1];
  logic [NITER+1:0]     vs;

  assign xs[0] = IW'(x_in) <<< GUARD;
  assign ys[0] = IW'(y_in) <<< GUARD;
  assign zs[0] = z_in;
  assign vs[0] = in_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vs[NITER+1:1] <= '0;
    else        vs[NITER+1:1] <= vs[NITER:0];

  for (genvar s = 0; s < NITER; s++) begin : g_stage
    localparam int SH = hyp_shift(s);
    localparam logic signed [ZW-1:0] ATANH_I = ZW'(atanh_fix(SH, ZF));
    always_ff @(posedge clk) begin
      if (!zs[s][ZW-1]) begin
        xs[s+1] <= xs[s] + (ys[s] >>> SH);
        ys[s+1] <= ys[s] + (xs[s] >>> SH);
        zs[s+1] <= zs[s] - ATANH_I;
      end else begin
        xs[s+1] <= xs[s] - (ys[s] >>> SH);
        ys[s+1] <= ys[s] - (xs[s] >>> SH);
        zs[s+1] <= zs[s] + ATANH_I;
      end
    end
  end

  // gain compensation and rounding of the guard bits
  localparam int PW = IW + KF + 3;
  logic signed [PW-1:0] px, py;
  assign px = PW'(xs[NITER]) * PW'(KINV);
  assign py = PW'(ys[NITER]) * PW'(KINV);

  always_ff @(posedge clk) begin
    x_out <= DW'((px + (PW'(1) <<< (KF + GUARD - 1))) >>> (KF + GUARD));
    y_out <= DW'((py + (PW'(1) <<< (KF + GUARD - 1))) >>> (KF + GUARD));
    z_out <= zs[NITER];
  end

  assign out_valid = vs[NITER+1];
endmodule
