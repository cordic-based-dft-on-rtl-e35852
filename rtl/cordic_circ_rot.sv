// cordic_circ_rot: angle-driven circular-rotation CORDIC (rotation mode).
//
// Turns (x_in, y_in) by the angle z_in. Each of NSTAGE pipeline stages
// takes the sign of the residual angle z as its direction d and computes
//   x' = x - d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*atan(2^-i)
// for i = 0 .. NSTAGE-1, so that
//   x_out = k_m (x_in cos z - y_in sin z),  y_out = k_m (y_in cos z + x_in sin z),
//   z_out -> 0,
// with k_m = prod sqrt(1 + 2^-2i) (1.6468 for eight or more stages). The
// gain is left in, as in the rotation-mode definition; the caller scales.
// Angles are ZW-bit two's-complement words in which 2^ZW is one full turn;
// the input angle must lie within +-99 degrees.
//
// Interface: ena is a clock enable for the whole pipeline; in_valid and
// out_valid mark data; latency is NSTAGE enabled cycles. rst_n is an
// asynchronous active-low reset of the valid flags. Outputs are OW = DW+2
// bits, which covers the gain on a full-scale vector.
// The rotation equations follow the published rotation mode; widths,
// stage count and angle format are this design's.
module cordic_circ_rot #(
  parameter int DW     = 10,
  parameter int ZW     = 10,
  parameter int NSTAGE = 8,
  parameter int OW     = DW + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ena,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] y_in,
  input  logic signed [ZW-1:0] z_in,
  output logic                 out_valid,
  output logic signed [OW-1:0] x_out,
  output logic signed [OW-1:0] y_out,
  output logic signed [ZW-1:0] z_out
);
  import cordic_pkg::*;

  logic signed [OW-1:0] xs [NSTAGE+1];
  logic signed [OW-1:0] ys [NSTAGE+1];
  logic signed [ZW-1:0] zs [NSTAGE+1];
  logic [NSTAGE:0]      vs;

  assign xs[0] = OW'(x_in);
  assign ys[0] = OW'(y_in);
  assign zs[0] = z_in;
  assign vs[0] = in_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   vs[NSTAGE:1] <= '0;
    else if (ena) vs[NSTAGE:1] <= vs[NSTAGE-1:0];

  for (genvar i = 0; i < NSTAGE; i++) begin : g_stage
    localparam logic signed [ZW-1:0] ATAN_I = ZW'(atan_turn(i, ZW));
    always_ff @(posedge clk) begin
      if (ena) begin
        if (!zs[i][ZW-1]) begin          // z >= 0: counter-clockwise
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ATAN_I;
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ATAN_I;
        end
      end
    end
  end

  assign out_valid = vs[NSTAGE];
  assign x_out     = xs[NSTAGE];
  assign y_out     = ys[NSTAGE];
  assign z_out     = zs[NSTAGE];
endmodule
