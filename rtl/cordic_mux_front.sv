// cordic_mux_front: stages 1 to 3 of the multiplexer-based CORDIC.
//
// The CORDIC always starts from the vector (a, 0). Stage 1 then always
// rotates anticlockwise by 45 degrees and gives (a, a); after stages 2 and 3
// the vector can only be one of four values, set by the directions d2 and d3
// of those stages:
//   d2 = +, d3 = + : (a/8,   13a/8)
//   d2 = -, d3 = + : (11a/8,  7a/8)
//   d2 = +, d3 = - : (7a/8,  11a/8)
//   d2 = -, d3 = - : (13a/8,  a/8)
// So the three adder stages are replaced by the four multiples a/8, 7a/8,
// 11a/8 and 13a/8 (made with shifts and adds) and two levels of
// multiplexers: the first level is steered by d2, the second by d3. The angle
// path still runs its three constant adder/subtractors to produce d2, d3 and
// the remaining angle z4 for stage 4. Purely combinational.
//
// Interface: a_in is the signed start component (already scaled by 1/R). Its
// low three bits should be fraction bits, so that a/8 loses nothing. z_in is
// the rotation angle in binary-angle units (2^ZW is one full turn) and must
// lie in [0, 90) degrees, because stage 1 is fixed to +45 degrees.
// The four multiples, the two multiplexer levels and the fixed first stage
// follow the source design; word widths are parameters of this design.
module cordic_mux_front
  import um_pkg::*;
#(
  parameter int unsigned DW = 21,
  parameter int unsigned ZW = 16
) (
  input  logic signed [DW-1:0] a_in,
  input  logic signed [ZW-1:0] z_in,
  output logic signed [DW-1:0] a_out,
  output logic signed [DW-1:0] b_out,
  output logic signed [ZW-1:0] z_out,
  output rot_dir_e             dir2,
  output rot_dir_e             dir3
);

  localparam logic signed [ZW-1:0] ATAN0 = ZW'(atan_const(0, ZW));
  localparam logic signed [ZW-1:0] ATAN1 = ZW'(atan_const(1, ZW));
  localparam logic signed [ZW-1:0] ATAN2 = ZW'(atan_const(2, ZW));
  localparam int unsigned XW = DW + 4;

  logic signed [XW-1:0] a_x;
  logic signed [DW-1:0] m1, m7, m11, m13;
  logic signed [DW-1:0] p_a, p_b, n_a, n_b;   // first multiplexer level
  logic signed [ZW-1:0] z2, z3;

  // Multiples of a/8, made with shifts and adds.
  always_comb begin
    a_x = XW'(a_in);
    m1  = DW'(a_x >>> 3);
    m7  = DW'(((a_x <<< 3) - a_x) >>> 3);
    m11 = DW'(((a_x <<< 3) + (a_x <<< 1) + a_x) >>> 3);
    m13 = DW'(((a_x <<< 3) + (a_x <<< 2) + a_x) >>> 3);
  end

  // Angle path of stages 1 to 3: stage 1 is always anticlockwise.
  always_comb begin
    z2    = z_in - ATAN0;
    dir2  = z2[ZW-1] ? ROT_CW : ROT_ACW;
    z3    = (dir2 == ROT_ACW) ? z2 - ATAN1 : z2 + ATAN1;
    dir3  = z3[ZW-1] ? ROT_CW : ROT_ACW;
    z_out = (dir3 == ROT_ACW) ? z3 - ATAN2 : z3 + ATAN2;
  end

  // First multiplexer level, steered by d2: the candidate for d3 = + (p_)
  // and for d3 = - (n_).
  always_comb begin
    if (dir2 == ROT_ACW) begin
      p_a = m1;  p_b = m13;
      n_a = m7;  n_b = m11;
    end else begin
      p_a = m11; p_b = m7;
      n_a = m13; n_b = m1;
    end
  end

  // Second multiplexer level, steered by d3.
  always_comb begin
    a_out = (dir3 == ROT_ACW) ? p_a : n_a;
    b_out = (dir3 == ROT_ACW) ? p_b : n_b;
  end

endmodule
