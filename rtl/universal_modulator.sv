// universal_modulator: CORDIC-based universal modulator (AM, FM and PM).
//
// A phase accumulator integrates the frequency word delta_f into the carrier
// phase, Adder 2 adds the phase-modulating word phi, and the pipelined
// multiplexer-based CORDIC rotates the vector (x_in, 0) by that angle. The
// result is
//   cos_out = x_in * cos(2*pi*(acc/2^N) + 2*pi*phi/2^W)
//   sin_out = x_in * sin(...),  acc advancing by delta_f per clock,
// the pair a(t)cos(wt + phi(t)), a(t)sin(wt + phi(t)). The cosine output
// also goes through dac_spi to an LTC2624 converter, after which an analog
// low-pass filter (outside this RTL) gives the continuous waveform.
// The kind of modulation is set only by which input is varied:
//   AM: delta_f constant, phi = 0, x_in carries the message a(t);
//   FM: x_in constant, phi = 0, delta_f = carrier word + message;
//   PM: x_in and delta_f constant, phi carries the message.
// With x_in constant, delta_f constant and phi = 0 it gives the plain carrier.
//
// Timing: the sample clock is clk (f_s = f_clk), so f_out = delta_f*f_s/2^N.
// A new delta_f is added into the phase at the next clock edge and shows in
// cos_out/sin_out 3 edges after it is applied; a change of phi or x_in
// shows after 2 edges (the two CORDIC pipeline registers). out_valid
// rises 3 cycles after reset is released and stays high. The converter is
// updated with the newest sample every 66 cycles (SCK_HALF = 1).
// rst_n is synchronous and active low.
// What follows the source design: the block structure (phase accumulator,
// Adder 2, CORDIC, DAC), the 16-bit words, the 8-stage two-level pipelined
// multiplexer CORDIC and the LTC2624 converter. This design's own choices:
// N = 16, the binary-angle phase format, y_in held at zero, and the
// converter interface details (see dac_spi).
module universal_modulator #(
  parameter int unsigned N         = 16,
  parameter int unsigned W         = 16,
  parameter bit          PIPELINED = 1'b1,
  parameter int unsigned SCK_HALF  = 1,
  parameter logic [3:0]  DAC_ADDR  = 4'b0000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic        [N-1:0] delta_f,   // frequency word (FM message)
  input  logic        [W-1:0] phi,       // phase word (PM message)
  input  logic signed [W-1:0] x_in,      // amplitude (AM message)
  output logic                out_valid,
  output logic signed [W-1:0] cos_out,
  output logic signed [W-1:0] sin_out,
  output logic                dac_sck,
  output logic                dac_mosi,
  output logic                dac_cs_n
);

  logic [N-1:0] phase;
  logic         wrap_unused;
  logic [W-1:0] theta;
  logic         run;
  um_pkg::rot_dir_e dir2_unused, dir3_unused;
  logic [1:0]   quad_unused;
  logic         dac_busy_unused, dac_done_unused;

  phase_accumulator #(.N(N)) u_acc (
    .clk, .rst_n, .delta_f, .phase, .wrap(wrap_unused)
  );

  phase_adder #(.N(N), .W(W)) u_adder2 (
    .phase, .phi, .theta
  );

  // The accumulator output is a valid phase from the first cycle after reset.
  always_ff @(posedge clk) begin
    if (!rst_n) run <= 1'b0;
    else        run <= 1'b1;
  end

  mux_cordic #(.W(W), .PIPELINED(PIPELINED)) u_cordic (
    .clk, .rst_n,
    .in_valid (run),
    .x_in,
    .theta,
    .out_valid,
    .cos_out,
    .sin_out,
    .mux_dir2 (dir2_unused),
    .mux_dir3 (dir3_unused),
    .quadrant (quad_unused)
  );

  dac_spi #(.W(W), .SCK_HALF(SCK_HALF), .ADDR(DAC_ADDR)) u_dac (
    .clk, .rst_n,
    .sample_valid (out_valid),
    .sample       (cos_out),
    .busy         (dac_busy_unused),
    .frame_done   (dac_done_unused),
    .dac_sck,
    .dac_mosi,
    .dac_cs_n
  );

endmodule
