// cordic_sincos: pipelined CORDIC sine/cosine generator, 8-bit phase.
//
// phase_in is an unsigned fraction of a turn (256 = 360 degrees). Its top
// two bits select the quadrant; the low bits, an angle in [0, 90) degrees,
// drive an eight-stage circular-rotation CORDIC (cordic_circ_rot) that
// starts from the vector (A / k_m, 0) with A = 2^(OUT_W-1) - 1, so that it
// ends on (A cos r, A sin r) with the CORDIC gain already cancelled. The
// quadrant travels beside the data in a 2-bit register per stage, and a
// final stage maps the first-quadrant pair onto the full circle:
//   q = 0: ( c,  s)   q = 1: (-s,  c)   q = 2: (-c, -s)   q = 3: ( s, -c)
// then rounds to OUT_W bits. eps is the angle the CORDIC left unrotated,
// in units of 1/4096 turn (ideally 0; a few units at most).
//
// Interface: clk, rst_n (asynchronous, active low), ena (clock enable for
// the whole pipeline), phase_in; sin_out, cos_out, eps are registered and
// follow phase_in by STAGES + 1 enabled cycles; out_valid marks them.
// Port names, the 8-bit widths and the presence of eps follow the published
// simulation of the generator; the quadrant scheme, the two guard bits in
// the datapath and the angle units are this design's.
module cordic_sincos #(
  parameter int PHASE_W = 8,
  parameter int OUT_W   = 8,
  parameter int STAGES  = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ena,
  input  logic [PHASE_W-1:0]      phase_in,
  output logic signed [OUT_W-1:0] sin_out,
  output logic signed [OUT_W-1:0] cos_out,
  output logic signed [7:0]       eps,
  output logic                    out_valid
);
  import cordic_pkg::*;

  localparam int G  = 2;               // guard bits in the datapath
  localparam int DW = OUT_W + G;
  localparam int ZW = PHASE_W + 4;     // 2^ZW per turn
  localparam int OW = DW + 2;
  // A / k_m with the guard bits: round((2^(OUT_W-1)-1) * 2^G * 0.6072529)
  localparam real KINV = 0.6072529350;
  localparam logic signed [DW-1:0] X0 =
      DW'(int'(real'((2 ** (OUT_W - 1)) - 1) * real'(2 ** G) * KINV));
  localparam int AMAX = 2 ** (OUT_W - 1) - 1;

  logic [1:0]           quad;
  logic signed [ZW-1:0] z0;
  assign quad = phase_in[PHASE_W-1 -: 2];
  assign z0   = ZW'({phase_in[PHASE_W-3:0], 4'b0000});

  logic                 cv;
  logic signed [OW-1:0] cx, cy;
  logic signed [ZW-1:0] cz;

  cordic_circ_rot #(.DW(DW), .ZW(ZW), .NSTAGE(STAGES), .OW(OW)) u_rot (
    .clk, .rst_n, .ena,
    .in_valid(1'b1), .x_in(X0), .y_in('0), .z_in(z0),
    .out_valid(cv), .x_out(cx), .y_out(cy), .z_out(cz)
  );

  // quadrant beside the pipeline, one 2-bit register per stage
  logic [1:0] qs [STAGES+1];
  assign qs[0] = quad;
  for (genvar i = 0; i < STAGES; i++) begin : g_q
    always_ff @(posedge clk) if (ena) qs[i+1] <= qs[i];
  end

  // round the guard bits off and saturate to +-AMAX
  function automatic logic signed [OUT_W-1:0] to_out(input logic signed [OW-1:0] v);
    logic signed [OW-1:0] r;
    r = (v + OW'(1 << (G - 1))) >>> G;
    if (r > OW'(AMAX))       return OUT_W'(AMAX);
    else if (r < OW'(-AMAX)) return OUT_W'(-AMAX);
    else                     return OUT_W'(r);
  endfunction

  logic signed [OUT_W-1:0] c1, s1;
  assign c1 = to_out(cx);
  assign s1 = to_out(cy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_out   <= '0;
      cos_out   <= '0;
      eps       <= '0;
      out_valid <= 1'b0;
    end else if (ena) begin
      unique case (qs[STAGES])
        2'd0: begin cos_out <= c1;  sin_out <= s1;  end
        2'd1: begin cos_out <= -s1; sin_out <= c1;  end
        2'd2: begin cos_out <= -c1; sin_out <= -s1; end
        default: begin cos_out <= s1; sin_out <= -c1; end
      endcase
      eps       <= 8'(cz);
      out_valid <= cv;
    end
  end
endmodule
