// mux_cordic: 8-stage multiplexer-based CORDIC in rotation mode, with two
// levels of pipeline registers, the core of the universal modulator.
//
// It rotates the vector (x_in, 0) by the angle theta and returns
//   cos_out = x_in * cos(theta),  sin_out = x_in * sin(theta).
// How it works:
//  * Gain: the start component is a = x_in / R (R = 1.646744 is the gain of
//    eight micro-rotations), made by one constant multiplication by the Q1.15
//    word INV_GAIN_Q15 and kept with FRAC extra fraction bits.
//  * Quadrant: the multiplexer front fixes stage 1 to +45 degrees, so it
//    covers angles from 0 to 90 degrees only. The two top bits of theta pick
//    the quadrant q; the CORDIC rotates by the rest of the angle and the
//    result is then turned by q * 90 degrees by swapping and negating a and b.
//  * Stages 1-3: cordic_mux_front (four multiples of a/8 and two
//    multiplexer levels). Stages 4-8: cordic_stage with shifts 3 to 7.
//  * Pipeline registers after stage 4 and after stage 7 (PIPELINED = 1).
//    With PIPELINED = 0 the registers are left out and the core is the
//    unpipelined multiplexer-based CORDIC.
//  * The outputs are rounded back to W bits and saturated.
// Eight stages leave an angle error of up to atan(2^-7) = 0.45 degrees, so
// the outputs are within about 0.8 % of |x_in| of the exact values.
//
// Interface and timing: x_in (signed) and theta (unsigned binary angle,
// 2^W is one full turn) are taken with in_valid; cos_out, sin_out and
// out_valid follow 2 clock cycles later (0 with PIPELINED = 0). There is no
// stall: a new input can be given on every cycle. rst_n is synchronous and
// active low and clears the pipeline registers.
// What follows the source design: eight stages, the 1/R start value, the
// multiplexer front, the shift-and-add stages 4-8 and the registers after
// stages 4 and 7. This design's own choices: the quadrant folding, the
// binary-angle format, the FRAC guard bits and 2 extra integer bits inside,
// the rounding and saturation, and the valid flag.
module mux_cordic
  import um_pkg::*;
#(
  parameter int unsigned W         = 16,
  parameter int unsigned FRAC      = 3,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  input  logic        [W-1:0] theta,
  output logic                out_valid,
  output logic signed [W-1:0] cos_out,
  output logic signed [W-1:0] sin_out,
  // Directions of stages 2 and 3, i.e. the multiplexer selects, and the
  // quadrant of the current input, for monitoring.
  output rot_dir_e            mux_dir2,
  output rot_dir_e            mux_dir3,
  output logic        [1:0]   quadrant
);

  localparam int unsigned DW = W + 2 + FRAC;   // internal vector width
  localparam int unsigned ZW = W;              // remaining-angle width
  localparam int unsigned PW = W + 16;         // gain product width

  if (FRAC < 3) begin : g_bad_frac
    $error("mux_cordic: FRAC must be at least 3 so that a/8 is exact");
  end

  typedef struct packed {
    logic                 valid;
    logic [1:0]           q;
    logic signed [DW-1:0] a;
    logic signed [DW-1:0] b;
    logic signed [ZW-1:0] z;
  } pipe_t;

  // ---------------------------------------------------------------- input
  logic signed [PW-1:0] prod;
  logic signed [DW-1:0] a0;
  logic signed [ZW-1:0] z1;

  always_comb begin
    prod     = PW'(x_in) * $signed({1'b0, INV_GAIN_Q15});
    a0       = DW'(prod >>> (INV_GAIN_FRAC - FRAC));
    quadrant = theta[W-1 -: 2];
    z1       = $signed({2'b00, theta[W-3:0]});
  end

  // --------------------------------------------------------- stages 1 - 4
  logic signed [DW-1:0] a3, b3, a4, b4;
  logic signed [ZW-1:0] z4, z5;
  rot_dir_e             d4_unused;

  cordic_mux_front #(.DW(DW), .ZW(ZW)) u_front (
    .a_in(a0), .z_in(z1),
    .a_out(a3), .b_out(b3), .z_out(z4),
    .dir2(mux_dir2), .dir3(mux_dir3)
  );

  cordic_stage #(.DW(DW), .ZW(ZW), .SHIFT(3)) u_stage4 (
    .a_in(a3), .b_in(b3), .z_in(z4),
    .a_out(a4), .b_out(b4), .z_out(z5), .dir(d4_unused)
  );

  pipe_t p4, r1;
  always_comb p4 = '{valid: in_valid, q: quadrant, a: a4, b: b4, z: z5};

  // ------------------------------------------------ pipeline registers 1
  if (PIPELINED) begin : g_reg1
    always_ff @(posedge clk) begin
      if (!rst_n) r1 <= '0;
      else        r1 <= p4;
    end
  end else begin : g_wire1
    always_comb r1 = p4;
  end

  // --------------------------------------------------------- stages 5 - 7
  logic signed [DW-1:0] a5, b5, a6, b6, a7, b7;
  logic signed [ZW-1:0] z6, z7, z8;
  rot_dir_e             d5_unused, d6_unused, d7_unused;

  cordic_stage #(.DW(DW), .ZW(ZW), .SHIFT(4)) u_stage5 (
    .a_in(r1.a), .b_in(r1.b), .z_in(r1.z),
    .a_out(a5), .b_out(b5), .z_out(z6), .dir(d5_unused)
  );
  cordic_stage #(.DW(DW), .ZW(ZW), .SHIFT(5)) u_stage6 (
    .a_in(a5), .b_in(b5), .z_in(z6),
    .a_out(a6), .b_out(b6), .z_out(z7), .dir(d6_unused)
  );
  cordic_stage #(.DW(DW), .ZW(ZW), .SHIFT(6)) u_stage7 (
    .a_in(a6), .b_in(b6), .z_in(z7),
    .a_out(a7), .b_out(b7), .z_out(z8), .dir(d7_unused)
  );

  pipe_t p7, r2;
  always_comb p7 = '{valid: r1.valid, q: r1.q, a: a7, b: b7, z: z8};

  // ------------------------------------------------ pipeline registers 2
  if (PIPELINED) begin : g_reg2
    always_ff @(posedge clk) begin
      if (!rst_n) r2 <= '0;
      else        r2 <= p7;
    end
  end else begin : g_wire2
    always_comb r2 = p7;
  end

  // ------------------------------------------------------------- stage 8
  logic signed [DW-1:0] a8, b8;
  logic signed [ZW-1:0] z9_unused;
  rot_dir_e             d8_unused;

  cordic_stage #(.DW(DW), .ZW(ZW), .SHIFT(7)) u_stage8 (
    .a_in(r2.a), .b_in(r2.b), .z_in(r2.z),
    .a_out(a8), .b_out(b8), .z_out(z9_unused), .dir(d8_unused)
  );

  // ------------------------------------- quadrant rotation, round, saturate
  localparam logic signed [DW:0] MAXV = (DW+1)'(2**(W-1) - 1);
  localparam logic signed [DW:0] MINV = -(DW+1)'(2**(W-1));

  function automatic logic signed [W-1:0] round_sat(input logic signed [DW:0] v);
    logic signed [DW:0] r;
    r = (v + (DW+1)'(2**(FRAC-1))) >>> FRAC;
    if (r > MAXV)      return W'(MAXV);
    else if (r < MINV) return W'(MINV);
    else               return W'(r);
  endfunction

  logic signed [DW:0] ca, cb, c_rot, s_rot;

  always_comb begin
    ca = (DW+1)'(a8);
    cb = (DW+1)'(b8);
    unique case (r2.q)
      2'd0: begin c_rot =  ca; s_rot =  cb; end
      2'd1: begin c_rot = -cb; s_rot =  ca; end
      2'd2: begin c_rot = -ca; s_rot = -cb; end
      default: begin c_rot = cb; s_rot = -ca; end
    endcase
    cos_out   = round_sat(c_rot);
    sin_out   = round_sat(s_rot);
    out_valid = r2.valid;
  end

endmodule
