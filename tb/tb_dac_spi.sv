// tb_dac_spi: self-checking test of the LTC2624 serial interface.
// Two instances, one with SCK at clk/2 (channel A) and one at clk/6
// (channel C), send random signed samples that are offered on every cycle;
// ltc2624_model decodes the frames. The testbench checks the 12-bit offset
// binary code of the sample taken at the start of each frame, the command
// and address, the frame length, that sck never runs outside a frame, the
// time dac_cs_n stays low (64 * SCK_HALF cycles) and the frame period
// (65 * SCK_HALF + 1 cycles with samples always offered).
module tb_dac_spi;
  localparam int unsigned W = 16;

  logic clk = 1'b0;
  logic rst_n;
  logic sample_valid;
  logic signed [W-1:0] sample;
  logic busy1, done1, sck1, mosi1, csn1;
  logic busy3, done3, sck3, mosi3, csn3;

  logic [11:0] code1 [4], code3 [4];
  int frames1, bad1, frames3, bad3;
  logic [3:0] cmd1, addr1, cmd3, addr3;

  int checks = 0, failures = 0;

  dac_spi #(.W(W), .SCK_HALF(1)) dut1 (.clk, .rst_n, .sample_valid, .sample,
    .busy(busy1), .frame_done(done1), .dac_sck(sck1), .dac_mosi(mosi1), .dac_cs_n(csn1));
  dac_spi #(.W(W), .SCK_HALF(3), .ADDR(4'b0010)) dut3 (.clk, .rst_n, .sample_valid, .sample,
    .busy(busy3), .frame_done(done3), .dac_sck(sck3), .dac_mosi(mosi3), .dac_cs_n(csn3));

  ltc2624_model m1 (.sck(sck1), .mosi(mosi1), .cs_n(csn1), .code(code1), .frames(frames1),
    .bad_frames(bad1), .last_cmd(cmd1), .last_addr(addr1));
  ltc2624_model m3 (.sck(sck3), .mosi(mosi3), .cs_n(csn3), .code(code3), .frames(frames3),
    .bad_frames(bad3), .last_cmd(cmd3), .last_addr(addr3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected 12-bit code: sample / 16 + 2048, rounded down.
  function automatic logic [11:0] exp_code(logic signed [W-1:0] s);
    return 12'((int'(s) + 32768) / 16);
  endfunction

  // Per instance: sample taken when the frame started, cycle counters.
  logic signed [W-1:0] taken1, taken3;
  int low1 = 0, low3 = 0;
  int prev_start1 = -1, prev_start3 = -1;
  logic csn1_q = 1'b1, csn3_q = 1'b1;

  // Sample values and frame checks, done just after each clock edge.
  initial begin
    rst_n = 1'b0; sample_valid = 1'b0; sample = '0;
    repeat (3) @(posedge clk);
    #1;
    check(csn1 && csn3 && !sck1 && !sck3 && !busy1 && !busy3, "idle after reset");
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      logic signed [W-1:0] s_now;
      sample_valid = (i > 2);
      s_now = W'($urandom);
      if (i == 5)  s_now = 16'sh7FFF;
      if (i == 80) s_now = -16'sh8000;
      sample = s_now;
      @(posedge clk);
      #1;
      // Instance 1
      if (csn1_q && !csn1) begin
        taken1 = s_now;
        if (prev_start1 >= 0) check(i - prev_start1 == 66, "frame period, SCK_HALF=1");
        prev_start1 = i; low1 = 0;
      end
      if (!csn1) low1++;
      if (!csn1_q && csn1) begin
        check(low1 == 64, "cs_n low time, SCK_HALF=1");
        #1;
        check(code1[0] == exp_code(taken1), "code channel A");
        check(cmd1 == 4'b0011 && addr1 == 4'b0000, "command/address A");
        if (code1[0] != exp_code(taken1)) $display("  got %h exp %h (sample %0d)", code1[0], exp_code(taken1), taken1);
      end
      check(!(csn1 && sck1) && !(csn3 && sck3), "sck only inside a frame");
      // Instance 3
      if (csn3_q && !csn3) begin
        taken3 = s_now;
        if (prev_start3 >= 0) check(i - prev_start3 == 196, "frame period, SCK_HALF=3");
        prev_start3 = i; low3 = 0;
      end
      if (!csn3) low3++;
      if (!csn3_q && csn3) begin
        check(low3 == 192, "cs_n low time, SCK_HALF=3");
        #1;
        check(code3[2] == exp_code(taken3), "code channel C");
        check(cmd3 == 4'b0011 && addr3 == 4'b0010, "command/address C");
      end
      csn1_q = csn1; csn3_q = csn3;
    end
    check(bad1 == 0 && bad3 == 0, "no bad frames");
    check(frames1 > 50 && frames3 > 15, "frames sent");
    $display("frames: %0d (clk/2), %0d (clk/6)", frames1, frames3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
