// cordic_dft_top: the CORDIC DFT design and its companion CORDIC units.
//
// Four independent units share only the clock and the reset:
//   dft_*  : cordic_dft16, a 16-point DFT/IDFT whose every twiddle
//            multiplication is a plane rotation in one direction-steered
//            CORDIC pipeline (ROM of direction bits, shift-add gain
//            compensation, no multipliers);
//   sc_*   : cordic_sincos, an 8-bit pipelined sine/cosine generator built
//            on the angle-driven circular-rotation CORDIC;
//   hyp_*  : cordic_hyp_rot, a hyperbolic-rotation CORDIC (x = y = a gives
//            a * e^z);
//   bp_*   : bfly_proc, the multiplier-based butterfly processor, the
//            alternative to a CORDIC rotation for one butterfly.
// See each unit for its protocol and timing. rst_n is asynchronous and
// active low in every unit. The grouping is this design's; the units
// follow the published design as their own headers describe.
module cordic_dft_top #(
  parameter int DFT_DW = 16,
  parameter int DFT_MW = DFT_DW + 5,
  parameter int SC_W   = 8,
  parameter int HYP_DW = 16,
  parameter int HYP_ZW = 16,
  parameter int BP_DW  = 16,
  parameter int BP_CW  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // 16-point DFT / IDFT
  input  logic                     dft_inverse,
  input  logic                     dft_in_valid,
  output logic                     dft_in_ready,
  input  logic signed [DFT_DW-1:0] dft_in_re,
  input  logic signed [DFT_DW-1:0] dft_in_im,
  output logic                     dft_out_valid,
  output logic [3:0]               dft_out_idx,
  output logic                     dft_out_last,
  output logic signed [DFT_MW-1:0] dft_out_re,
  output logic signed [DFT_MW-1:0] dft_out_im,
  output logic                     dft_busy,
  // sine / cosine generator
  input  logic                     sc_ena,
  input  logic [SC_W-1:0]          sc_phase_in,
  output logic signed [SC_W-1:0]   sc_sin_out,
  output logic signed [SC_W-1:0]   sc_cos_out,
  output logic signed [7:0]        sc_eps,
  output logic                     sc_out_valid,
  // hyperbolic rotator
  input  logic                     hyp_in_valid,
  input  logic signed [HYP_DW-1:0] hyp_x_in,
  input  logic signed [HYP_DW-1:0] hyp_y_in,
  input  logic signed [HYP_ZW-1:0] hyp_z_in,
  output logic                     hyp_out_valid,
  output logic signed [HYP_DW-1:0] hyp_x_out,
  output logic signed [HYP_DW-1:0] hyp_y_out,
  output logic signed [HYP_ZW-1:0] hyp_z_out,
  // butterfly processor
  input  logic                     bp_in_valid,
  input  logic signed [BP_DW-1:0]  bp_u,
  input  logic signed [BP_DW-1:0]  bp_x,
  input  logic signed [BP_DW-1:0]  bp_y,
  input  logic signed [BP_DW-1:0]  bp_v,
  input  logic signed [BP_CW-1:0]  bp_c,
  input  logic signed [BP_CW-1:0]  bp_s,
  input  logic                     bp_g_sel,
  input  logic                     bp_c1,
  input  logic                     bp_s1,
  input  logic                     bp_s2,
  output logic                     bp_out_valid,
  output logic signed [BP_DW+2:0]  bp_ar,
  output logic signed [BP_DW+2:0]  bp_br,
  output logic signed [BP_DW+2:0]  bp_ai,
  output logic signed [BP_DW+2:0]  bp_bi
);

  cordic_dft16 #(.DW(DFT_DW), .MW(DFT_MW)) u_dft (
    .clk, .rst_n,
    .inverse  (dft_inverse),
    .in_valid (dft_in_valid),
    .in_ready (dft_in_ready),
    .in_re    (dft_in_re),
    .in_im    (dft_in_im),
    .out_valid(dft_out_valid),
    .out_idx  (dft_out_idx),
    .out_last (dft_out_last),
    .out_re   (dft_out_re),
    .out_im   (dft_out_im),
    .busy     (dft_busy)
  );

  cordic_sincos #(.PHASE_W(SC_W), .OUT_W(SC_W)) u_sincos (
    .clk, .rst_n,
    .ena      (sc_ena),
    .phase_in (sc_phase_in),
    .sin_out  (sc_sin_out),
    .cos_out  (sc_cos_out),
    .eps      (sc_eps),
    .out_valid(sc_out_valid)
  );

  cordic_hyp_rot #(.DW(HYP_DW), .ZW(HYP_ZW)) u_hyp (
    .clk, .rst_n,
    .in_valid (hyp_in_valid),
    .x_in     (hyp_x_in),
    .y_in     (hyp_y_in),
    .z_in     (hyp_z_in),
    .out_valid(hyp_out_valid),
    .x_out    (hyp_x_out),
    .y_out    (hyp_y_out),
    .z_out    (hyp_z_out)
  );

  bfly_proc #(.DW(BP_DW), .CW(BP_CW)) u_bp (
    .clk, .rst_n,
    .in_valid (bp_in_valid),
    .u(bp_u), .x(bp_x), .y(bp_y), .v(bp_v), .c(bp_c), .s(bp_s),
    .g_sel(bp_g_sel), .c1(bp_c1), .s1(bp_s1), .s2(bp_s2),
    .out_valid(bp_out_valid),
    .ar(bp_ar), .br(bp_br), .ai(bp_ai), .bi(bp_bi)
  );
endmodule
