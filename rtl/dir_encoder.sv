// dir_encoder: rotation-direction ROM for the 16-point twiddle factors.
//
// For twiddle index k (0..7, angle 22.5 degrees * k) it returns the direction
// bit of every CORDIC step: t[0] for the fixed 90-degree step and t[i+1] for
// the micro-rotation by atan(2^-i), i = 0..16. A 1 rotates counter-clockwise
// (adds the step's angle), a 0 clockwise; the signed angles of each row sum
// to 22.5*k degrees within 0.001 degree. The bits are the published
// direction table for W0..W7. The rows for 45, 90 and 135 degrees are
// valid alternatives to the greedy sequence. Every row starts with the
// counter-clockwise 90-degree step, so t[0] is constant 1. To rotate by
// -22.5*k degrees, as a forward-DFT twiddle needs, the caller inverts
// every bit.
//
// Interface: k in, t out, purely combinational. The ROM contents follow the
// published table; the bit order of t and the polarity are this design's.
module dir_encoder (
  input  logic [2:0]  k,
  output logic [17:0] t
);
  // rows as printed: leftmost column (90 deg) is the MSB of the literal
  logic [17:0] row;

  always_comb begin
    unique case (k)
      3'd0: row = 18'b1_00001011000011001;
      3'd1: row = 18'b1_00100100110100001;
      3'd2: row = 18'b1_00111110000010101;
      3'd3: row = 18'b1_01011011001011110;
      3'd4: row = 18'b1_01110100111100110;
      3'd5: row = 18'b1_10100100110100001;
      3'd6: row = 18'b1_10111110000010101;
      default: row = 18'b1_11011011001011110;
    endcase
    // t[0] = 90-degree step, t[i+1] = step i
    for (int j = 0; j < 18; j++) t[j] = row[17 - j];
  end
endmodule
