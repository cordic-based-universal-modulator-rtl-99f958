// dac_spi: serial interface from the modulator output to a 4-channel 12-bit
// LTC2624 digital-to-analog converter.
//
// The modulator produces signed W-bit samples; the converter takes 12-bit
// unsigned codes over a serial link. When idle, the block takes a sample on
// sample_valid, keeps its 12 most significant bits and inverts the sign bit,
// which turns two's complement into offset binary (code 2048 is zero). It
// then sends one 32-bit frame, most significant bit first:
//   8 don't-care bits (0), command CMD, address ADDR, 12 data bits, 4 zero bits.
// dac_cs_n is low for the whole frame; dac_mosi changes while dac_sck is low
// and the converter samples it on the rising edge of dac_sck. The rising
// edge of dac_cs_n after the 32nd bit makes the converter act on the frame.
// The default command 0011 is "write to and update" and address 0000 is
// channel A.
//
// Timing: dac_sck has a period of 2*SCK_HALF clock cycles. A frame takes
// 64*SCK_HALF cycles with dac_cs_n low, which then stays high for at least
// SCK_HALF + 1 cycles, so frames start every 65*SCK_HALF + 1 cycles at most:
// every 66 cycles with SCK_HALF = 1 (busy is high during a frame).
// Samples offered while busy are dropped: the converter is updated with
// the newest sample once the previous frame is done. frame_done pulses for
// one cycle when a frame ends.
// What follows the source design: an onboard LTC2624, a serial 4-channel
// converter with 12-bit unsigned resolution, driven with the cosine output.
// The frame layout, command and timing are taken from the converter's own
// 32-bit serial format; the sample-dropping policy, SCK_HALF and the
// channel choice are this design's.
module dac_spi #(
  parameter int unsigned W        = 16,
  parameter int unsigned SCK_HALF = 1,
  parameter logic [3:0]  CMD      = 4'b0011,
  parameter logic [3:0]  ADDR     = 4'b0000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_valid,
  input  logic signed [W-1:0] sample,
  output logic                busy,
  output logic                frame_done,
  output logic                dac_sck,
  output logic                dac_mosi,
  output logic                dac_cs_n
);

  if (W < 12) begin : g_bad_width
    $error("dac_spi: the sample must have at least 12 bits");
  end

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_GAP} state_e;

  localparam int unsigned DIVW = (SCK_HALF > 1) ? $clog2(SCK_HALF) : 1;

  state_e          state;
  logic [31:0]     shreg;
  logic [4:0]      bit_cnt;
  logic [DIVW-1:0] div;
  logic [11:0]     code;
  logic            half_done;

  always_comb begin
    code      = {~sample[W-1], sample[W-2 -: 11]};
    half_done = (div == DIVW'(SCK_HALF - 1));
    busy      = (state != S_IDLE);
    dac_mosi  = shreg[31];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      shreg      <= '0;
      bit_cnt    <= '0;
      div        <= '0;
      dac_sck    <= 1'b0;
      dac_cs_n   <= 1'b1;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          dac_sck <= 1'b0;
          div     <= '0;
          if (sample_valid) begin
            shreg    <= {8'h00, CMD, ADDR, code, 4'h0};
            bit_cnt  <= 5'd31;
            dac_cs_n <= 1'b0;
            state    <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          if (half_done) begin
            div <= '0;
            if (!dac_sck) begin
              dac_sck <= 1'b1;
            end else begin
              dac_sck <= 1'b0;
              if (bit_cnt == 5'd0) begin
                dac_cs_n <= 1'b1;
                state    <= S_GAP;
              end else begin
                shreg   <= {shreg[30:0], 1'b0};
                bit_cnt <= bit_cnt - 5'd1;
              end
            end
          end else begin
            div <= div + DIVW'(1);
          end
        end
        S_GAP: begin
          if (half_done) begin
            div        <= '0;
            frame_done <= 1'b1;
            state      <= S_IDLE;
          end else begin
            div <= div + DIVW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The serial lines keep to the frame rules.
  a_sck_only_in_frame: assert property (@(posedge clk) disable iff (!rst_n)
                                        dac_cs_n |-> !dac_sck);

endmodule
