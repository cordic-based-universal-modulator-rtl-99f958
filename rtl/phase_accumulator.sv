// phase_accumulator: the frequency-control part of the universal modulator.
//
// An N-bit register adds the frequency control word delta_f to itself on
// every sample clock (Adder 1 feeding the N-bit register, as in the source
// design), so the register content is a phase ramp that wraps around once
// every 2^N / delta_f samples. The output frequency is
// f_out = delta_f * f_s / 2^N. Changing delta_f from sample to sample gives
// frequency modulation.
//
// Interface: delta_f is read on every rising clock edge; phase is the
// register output, so it changes one cycle after the edge that adds a new
// delta_f. rst_n is synchronous and active low and clears the phase.
// The register width follows the source design's N-bit register; the default
// N = 16, the synchronous reset and the wrap flag (one cycle per wrap, used
// for monitoring) are choices of this design.
module phase_accumulator #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] delta_f,
  output logic [N-1:0] phase,
  output logic         wrap
);

  logic [N:0] sum;

  // Adder 1: carry out of the sum marks a wrap of the phase.
  always_comb sum = {1'b0, phase} + {1'b0, delta_f};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      wrap  <= 1'b0;
    end else begin
      phase <= sum[N-1:0];
      wrap  <= sum[N];
    end
  end

endmodule
