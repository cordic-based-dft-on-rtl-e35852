// cordic_dft16: 16-point DFT / IDFT built around one pipelined CORDIC.
//
// The transform is a radix-2 decimation-in-time FFT computed in place in a
// 16-word complex register file. Every twiddle multiplication W^k * B is a
// plane rotation by 22.5*k degrees and is done by a single direction-
// steered CORDIC pipeline (cordic_pipe) whose direction bits come from the
// twiddle ROM (dir_encoder); there is no multiplier. A counter walks the
// four stages, issuing one butterfly per cycle: in stage s (s = 0..3)
// butterfly j (j = 0..7) pairs
//   top = (j >> s) * 2^(s+1) + (j mod 2^s),  bot = top + 2^s,
// with twiddle index k = (j mod 2^s) * 2^(3-s). Operand A rides through
// the CORDIC as side-band data and meets W*B at the butterfly, whose two
// results are written back over A and B. A stage only starts when the
// previous one has fully drained from the pipeline.
//
//   forward (inverse = 0): F(k) = 1/16 * sum f(n) e^(-j 2 pi k n / 16);
//     rotations by -22.5*k degrees (all ROM bits inverted), results
//     halved in each of the four stages.
//   inverse (inverse = 1): f(n) = sum F(k) e^(+j 2 pi k n / 16);
//     rotations by +22.5*k degrees, no halving.
//
// Interface: while in_ready is high, 16 samples in natural order are taken
// on in_valid (inverse is sampled with the first one); they are stored at
// bit-reversed addresses. Then in_ready falls, the core computes for
// 4 * (8 + LAT) cycles (LAT = NITER + 6 = 23, so 124 cycles), and streams
// the 16 results in natural order, one per cycle with out_valid, out_idx
// and out_last; there is no output back-pressure. Samples are DW-bit
// signed; results are MW = DW + 5 bits wide, which holds the 16-fold
// growth of the inverse transform.
// The CORDIC twiddles, the direction table, the 1/N and no-1/N scaling of
// the two directions and the single pipeline follow the published design;
// the in-place radix-2 schedule, the register file, complex (not only
// real) input and the streaming interface are this design's own.
module cordic_dft16 #(
  parameter int DW    = 16,        // input sample width
  parameter int NITER = 17,        // CORDIC micro-rotations (ROM has 17)
  parameter int GUARD = 4,         // CORDIC guard bits
  parameter int MW    = DW + 5     // working and output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inverse,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic [3:0]           out_idx,
  output logic                 out_last,
  output logic signed [MW-1:0] out_re,
  output logic signed [MW-1:0] out_im,
  output logic                 busy
);
  localparam int N     = 16;
  localparam int LOGN  = 4;
  localparam int OWC   = MW + 1;             // CORDIC output width
  localparam int TAGW  = 2 * MW + 2 * LOGN;

  typedef enum logic [1:0] {S_LOAD, S_ISSUE, S_DRAIN, S_UNLOAD} state_t;
  state_t state;

  logic signed [MW-1:0] mem_re [N];
  logic signed [MW-1:0] mem_im [N];

  logic [LOGN-1:0] cnt;        // load / unload index
  logic [1:0]      stage;
  logic [2:0]      bfly;       // butterfly within the stage
  logic [3:0]      nwritten;   // write-backs seen in this stage
  logic            inv_q;

  // ---------------- issue side: addresses and twiddle -------------------
  logic [LOGN-1:0] top, bot;
  logic [2:0]      kidx;
  logic [2:0]      pos;
  always_comb begin
    pos  = bfly & 3'((4'd1 << stage) - 4'd1);
    top  = ((4'(bfly) >> stage) << (stage + 2'd1)) | 4'(pos);
    bot  = top | 4'(4'd1 << stage);
    kidx = 3'(pos << (2'd3 - stage));
  end

  logic [17:0]     rom_t;
  dir_encoder u_enc (.k(kidx), .t(rom_t));

  logic issue;
  assign issue = (state == S_ISSUE);

  logic [NITER:0] dir;
  assign dir = (NITER+1)'(inv_q ? rom_t : ~rom_t);

  logic [TAGW-1:0] tag_in, tag_out;
  assign tag_in = {mem_re[top], mem_im[top], top, bot};

  logic                  rv;
  logic signed [OWC-1:0] wb_re, wb_im;

  cordic_pipe #(.DW(MW), .NITER(NITER), .GUARD(GUARD), .TAGW(TAGW), .OW(OWC)) u_cordic (
    .clk, .rst_n,
    .in_valid (issue),
    .in_x     (mem_re[bot]),
    .in_y     (mem_im[bot]),
    .in_dir   (dir),
    .in_tag   (tag_in),
    .out_valid(rv),
    .out_x    (wb_re),
    .out_y    (wb_im),
    .out_tag  (tag_out)
  );

  // ---------------- write-back side: butterfly --------------------------
  logic signed [MW-1:0]  a_re, a_im;
  logic [LOGN-1:0]       w_top, w_bot;
  assign {a_re, a_im, w_top, w_bot} = tag_out;

  logic signed [MW-1:0] p_re, p_im, m_re, m_im;
  butterfly #(.AW(MW), .BW(OWC), .OW(MW)) u_bfly (
    .half(~inv_q), .a_re, .a_im, .wb_re, .wb_im, .p_re, .p_im, .m_re, .m_im
  );

  // bit reversal of the load address
  logic [LOGN-1:0] cnt_rev;
  always_comb for (int b = 0; b < LOGN; b++) cnt_rev[b] = cnt[LOGN-1-b];

  // ---------------- register file ----------------------------------------
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem_re[cnt_rev] <= MW'(in_re);
      mem_im[cnt_rev] <= MW'(in_im);
    end else if (rv) begin
      mem_re[w_top] <= p_re;
      mem_im[w_top] <= p_im;
      mem_re[w_bot] <= m_re;
      mem_im[w_bot] <= m_im;
    end
  end

  // ---------------- control ------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      cnt      <= '0;
      stage    <= '0;
      bfly     <= '0;
      nwritten <= '0;
      inv_q    <= 1'b0;
    end else begin
      if (rv) nwritten <= nwritten + 4'd1;
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == '0) inv_q <= inverse;
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state    <= S_ISSUE;
            stage    <= '0;
            bfly     <= '0;
            nwritten <= '0;
          end
        end
        S_ISSUE: begin
          bfly <= bfly + 3'd1;
          if (bfly == 3'd7) state <= S_DRAIN;
        end
        S_DRAIN: if (rv && nwritten == 4'd7) begin
          nwritten <= '0;
          if (stage == 2'd3) begin
            state <= S_UNLOAD;
            cnt   <= '0;
          end else begin
            stage <= stage + 2'd1;
            state <= S_ISSUE;
          end
        end
        S_UNLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  assign in_ready  = (state == S_LOAD);
  assign busy      = (state != S_LOAD);
  assign out_valid = (state == S_UNLOAD);
  assign out_idx   = cnt;
  assign out_last  = (state == S_UNLOAD) && (cnt == LOGN'(N - 1));
  assign out_re    = mem_re[cnt];
  assign out_im    = mem_im[cnt];

  // the pipeline never returns a result outside the compute phase
  a_no_stray_result: assert property (@(posedge clk) disable iff (!rst_n)
    rv |-> (state == S_ISSUE || state == S_DRAIN));
endmodule
