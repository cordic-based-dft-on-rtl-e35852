// cordic_pipe: pipelined CORDIC rotator steered by precomputed directions.
//
// The rotation angle is not computed on the fly: the caller supplies the
// direction bit of every step (in_dir, from a ROM such as dir_encoder), so
// there is no angle accumulator. Step 0 turns the vector by +/-90 degrees
// (exact, no gain); steps 1..NITER are the micro-rotations
//   x' = x -/+ (y >>> i),  y' = y +/- (x >>> i),  i = step - 1,
// with in_dir[step] = 1 meaning counter-clockwise. The direction word
// travels with the data, one register per stage, which equals delaying
// direction bit j by j cycles. The CORDIC gain (1.6467603 for 17
// micro-rotations) is removed by five shift-add stages that multiply by
//   1/2 * (1 + 1/4) * (1 - 1/32) * (1 + 1/256) * (1 - 1/1024) = 0.607240,
// within 2.2e-5 of 1/1.6467603, and the last of them rounds away the
// GUARD extra fraction bits.
//
// Interface: in_valid/in_x/in_y/in_dir/in_tag enter every cycle (no
// back-pressure); out_* appear exactly LAT = NITER + 6 cycles later.
// in_tag is carried along unchanged, so the caller can send the operands
// that must meet the rotated vector (the delay path of a butterfly).
// Output width OW = DW + 1 holds a full-scale vector turned by 45 degrees.
// The stage structure and the compensation shifts follow the published
// pipelined CORDIC; widths, guard bits, tag and reset are this design's.
module cordic_pipe #(
  parameter int DW    = 21,   // input component width
  parameter int NITER = 17,   // micro-rotations 2^0 .. 2^-(NITER-1)
  parameter int GUARD = 4,    // extra fraction bits inside the pipeline
  parameter int TAGW  = 1,    // side-band bits carried along
  parameter int OW    = DW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_x,
  input  logic signed [DW-1:0] in_y,
  input  logic [NITER:0]       in_dir,
  input  logic [TAGW-1:0]      in_tag,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_x,
  output logic signed [OW-1:0] out_y,
  output logic [TAGW-1:0]      out_tag
);
  localparam int IW   = DW + 2 + GUARD;   // internal width
  localparam int NROT = NITER + 1;        // 90-degree step + micro-rotations
  localparam int NCMP = 5;                // gain-compensation stages
  localparam int NS   = NROT + NCMP;
  localparam int LAT  = NS;               // one register per stage

  logic signed [IW-1:0] xs  [NS+1];
  logic signed [IW-1:0] ys  [NS+1];
  logic [NITER:0]       ds  [NROT+1];
  logic [TAGW-1:0]      tg  [NS+1];
  logic [NS:0]          vs;

  assign xs[0] = IW'(in_x) <<< GUARD;
  assign ys[0] = IW'(in_y) <<< GUARD;
  assign ds[0] = in_dir;
  assign tg[0] = in_tag;
  assign vs[0] = in_valid;

  // valid chain, reset so that no stale result is ever flagged
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vs[NS:1] <= '0;
    else        vs[NS:1] <= vs[NS-1:0];

  // step 0: exact quarter turn
  always_ff @(posedge clk) begin
    if (ds[0][0]) begin xs[1] <= -ys[0]; ys[1] <= xs[0]; end
    else          begin xs[1] <= ys[0];  ys[1] <= -xs[0]; end
    ds[1] <= ds[0];
    tg[1] <= tg[0];
  end

  // micro-rotations
  for (genvar s = 1; s < NROT; s++) begin : g_rot
    always_ff @(posedge clk) begin
      if (ds[s][s]) begin
        xs[s+1] <= xs[s] - (ys[s] >>> (s - 1));
        ys[s+1] <= ys[s] + (xs[s] >>> (s - 1));
      end else begin
        xs[s+1] <= xs[s] + (ys[s] >>> (s - 1));
        ys[s+1] <= ys[s] - (xs[s] >>> (s - 1));
      end
      ds[s+1] <= ds[s];
      tg[s+1] <= tg[s];
    end
  end

  // gain compensation: v/2, v(1+2^-2), v(1-2^-5), v(1+2^-8), v(1-2^-10)
  localparam int CSH [NCMP] = '{1, 2, 5, 8, 10};
  for (genvar c = 0; c < NCMP; c++) begin : g_cmp
    localparam int S = NROT + c;
    always_ff @(posedge clk) begin
      if (c == 0) begin
        xs[S+1] <= xs[S] >>> 1;
        ys[S+1] <= ys[S] >>> 1;
      end else if (c == 2 || c == 4) begin
        xs[S+1] <= xs[S] - (xs[S] >>> CSH[c]);
        ys[S+1] <= ys[S] - (ys[S] >>> CSH[c]);
      end else begin
        xs[S+1] <= xs[S] + (xs[S] >>> CSH[c]);
        ys[S+1] <= ys[S] + (ys[S] >>> CSH[c]);
      end
      tg[S+1] <= tg[S];
    end
  end

  // round off the guard bits
  logic signed [IW-1:0] xr, yr;
  assign xr = (xs[NS] + IW'(1 << (GUARD - 1))) >>> GUARD;
  assign yr = (ys[NS] + IW'(1 << (GUARD - 1))) >>> GUARD;

  assign out_valid = vs[NS];
  assign out_x     = OW'(xr);
  assign out_y     = OW'(yr);
  assign out_tag   = tg[NS];

  // a result leaves exactly LAT cycles after its operands entered
  if (LAT != NITER + 6) begin : g_bad_lat
    $error("cordic_pipe: unexpected latency");
  end
endmodule
