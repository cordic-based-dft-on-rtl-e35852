// cordic_pkg: constants and constant functions shared by the CORDIC blocks.
//
// ATAN_TURN holds atan(2^-i) for i = 0..23 as a fraction of a full turn,
// scaled so that 2^32 is 360 degrees. A block whose angle word is ZW bits
// wide (2^ZW = one turn) takes the top ZW bits, rounded (atan_turn()).
// ATANH_Q30 holds atanh(2^-i) for i = 1..23 in Q2.30 fixed point.
// hyp_shift() gives the shift of each hyperbolic iteration, with the usual
// repeated iterations at i = 4, 13 and 40 that make the hyperbolic CORDIC
// converge. The tables are values of the closed-form functions above; the
// choice of 32-bit precision is this design's own.
package cordic_pkg;

  localparam int ATAN_ENTRIES = 24;

  localparam logic [31:0] ATAN_TURN [ATAN_ENTRIES] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81
  };

  // index 0 is unused (atanh(1) is infinite)
  localparam logic [31:0] ATANH_Q30 [ATAN_ENTRIES] = '{
    32'd0,
    32'd589812981, 32'd274247419, 32'd134923406, 32'd67196451,
    32'd33565361,  32'd16778582,  32'd8388779,   32'd4194325,
    32'd2097155,   32'd1048576,   32'd524288,    32'd262144,
    32'd131072,    32'd65536,     32'd32768,     32'd16384,
    32'd8192,      32'd4096,      32'd2048,      32'd1024,
    32'd512,       32'd256,       32'd128
  };

  // atan(2^-i) in an angle word of zw bits (2^zw = one turn), rounded
  function automatic logic [31:0] atan_turn(input int i, input int zw);
    logic [32:0] t;
    t = {1'b0, ATAN_TURN[i]} + (33'd1 << (31 - zw));
    return 32'(t >> (32 - zw));
  endfunction

  // atanh(2^-i) with zf fractional bits, rounded
  function automatic logic [31:0] atanh_fix(input int i, input int zf);
    logic [32:0] t;
    t = {1'b0, ATANH_Q30[i]} + (33'd1 << (29 - zf));
    return 32'(t >> (30 - zf));
  endfunction

  // shift amount of hyperbolic iteration number s (s = 0, 1, ...):
  // 1, 2, 3, 4, 4, 5, ..., 13, 13, 14, ...
  function automatic int hyp_shift(input int s);
    int sh;
    int k;
    sh = 1;
    k = 0;
    while (k < s) begin
      if ((sh == 4 || sh == 13 || sh == 40) && k + 1 <= s) begin
        k = k + 1;          // the repeated copy of this shift
        if (k == s) return sh;
      end
      sh = sh + 1;
      k = k + 1;
    end
    return sh;
  endfunction

  // 1 / product(sqrt(1 - 2^-2i)) over the first n hyperbolic iterations
  function automatic real hyp_inv_gain(input int n);
    real p;
    real r;
    p = 1.0;
    for (int s = 0; s < n; s++) p = p * (1.0 - 2.0 ** (-2.0 * hyp_shift(s)));
    r = 1.0;
    for (int k = 0; k < 40; k++) r = 0.5 * (r + p / r);
    return 1.0 / r;
  endfunction

endpackage
