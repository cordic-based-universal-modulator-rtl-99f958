// um_pkg: constants and helpers shared by the CORDIC universal modulator.
//
// Angles are binary angles: an angle word of W bits covers one full turn, so
// 2^W corresponds to 360 degrees and the two most significant bits give the
// quadrant. The rotation stage constants atan(2^-i) are kept here at 32-bit
// precision and rounded to the angle width a module uses, so the angle width
// can change without a new table. Each constant is round(atan(2^-i) / (2*pi) * 2^32).
//
// The CORDIC has eight micro-rotation stages (stage k shifts by k-1), as in
// the source design. Its gain after eight stages is
// R = prod_{i=0..7} sqrt(1 + 2^-2i) = 1.646744; the start vector is scaled by
// 1/R so the outputs carry the amplitude of the input. 1/R is held as the Q1.15
// constant INV_GAIN_Q15 = round(2^15 / R) = 19899. The number of stages, the
// use of 1/R and the 16-bit default word width follow the source design; the
// binary angle format and the constant formats are choices of this design.
package um_pkg;

  // Number of micro-rotation stages of the CORDIC.
  localparam int unsigned CORDIC_STAGES = 8;


  // 1/R in Q1.15.
  localparam logic [15:0] INV_GAIN_Q15 = 16'd19899;
  localparam int unsigned INV_GAIN_FRAC = 15;

  // atan(2^-i) as a fraction of a full turn, scaled by 2^32.
  localparam logic [31:0] ATAN_TURN32 [CORDIC_STAGES] = '{
    32'h2000_0000, 32'h12E4_051E, 32'h09FB_385B, 32'h0511_11D4,
    32'h028B_0D43, 32'h0145_D7E1, 32'h00A2_F61E, 32'h0051_7C55
  };

  // atan(2^-i) rounded to an angle word of aw bits (2^aw = one full turn).
  function automatic logic [31:0] atan_const(input int unsigned i, input int unsigned aw);
    logic [32:0] v;
    if (aw >= 32) return ATAN_TURN32[i];
    v = {1'b0, ATAN_TURN32[i]} + (33'd1 << (31 - aw));
    return 32'(v >> (32 - aw));
  endfunction

  // Rotation direction of one micro-rotation: anticlockwise when the
  // remaining angle is zero or positive.
  typedef enum logic {ROT_CW = 1'b0, ROT_ACW = 1'b1} rot_dir_e;

endpackage
