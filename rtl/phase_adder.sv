// phase_adder: Adder 2 of the universal modulator, the phase-control adder.
//
// It adds the phase-modulating word phi to the accumulated phase and gives the
// rotation angle theta of the CORDIC. Both are binary angles: 2^W is one full
// turn. The accumulator may be wider than the angle (N >= W); only its W most
// significant bits are used, which truncates the phase. The sum wraps modulo
// one turn. Purely combinational, no latency.
// The adder and its place between accumulator and CORDIC follow the source
// design; the truncation of a wider accumulator is this design's choice.
module phase_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0] phase,
  input  logic [W-1:0] phi,
  output logic [W-1:0] theta
);

  if (N < W) begin : g_bad_width
    $error("phase_adder: the accumulator width N must be at least the angle width W");
  end

  always_comb theta = phase[N-1 -: W] + phi;

endmodule
