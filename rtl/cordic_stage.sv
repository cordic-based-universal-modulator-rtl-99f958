// cordic_stage: one shift-and-add micro-rotation of the CORDIC (rotation mode).
//
// The sign of the remaining angle z picks the direction d (anticlockwise when
// z >= 0). The stage then computes
//   a' = a - d * (b >>> SHIFT)
//   b' = b + d * (a >>> SHIFT)
//   z' = z - d * atan(2^-SHIFT)
// with two adder/subtractors, two fixed shifters and one constant
// adder/subtractor, which is one column of the unrolled CORDIC and of stages
// 4 to 8 of the multiplexer-based CORDIC in the source design. The shifts are
// arithmetic and truncate. Purely combinational.
//
// Interface: a_in/b_in are signed DW-bit vector components, z_in a signed
// ZW-bit remaining angle in binary-angle units (2^ZW is one full turn). dir
// gives the direction taken, for monitoring.
// The equations follow the source design; the word widths are parameters.
module cordic_stage
  import um_pkg::*;
#(
  parameter int unsigned DW    = 21,
  parameter int unsigned ZW    = 16,
  parameter int unsigned SHIFT = 3
) (
  input  logic signed [DW-1:0] a_in,
  input  logic signed [DW-1:0] b_in,
  input  logic signed [ZW-1:0] z_in,
  output logic signed [DW-1:0] a_out,
  output logic signed [DW-1:0] b_out,
  output logic signed [ZW-1:0] z_out,
  output rot_dir_e             dir
);

  localparam logic signed [ZW-1:0] ATAN = ZW'(atan_const(SHIFT, ZW));

  logic signed [DW-1:0] a_sh, b_sh;

  always_comb begin
    dir  = z_in[ZW-1] ? ROT_CW : ROT_ACW;
    a_sh = a_in >>> SHIFT;
    b_sh = b_in >>> SHIFT;
    if (dir == ROT_ACW) begin
      a_out = a_in - b_sh;
      b_out = b_in + a_sh;
      z_out = z_in - ATAN;
    end else begin
      a_out = a_in + b_sh;
      b_out = b_in - a_sh;
      z_out = z_in + ATAN;
    end
  end

endmodule
