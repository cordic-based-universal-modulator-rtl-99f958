// ltc2624_model: behavioural model of the serial input of an LTC2624
// quad 12-bit DAC, for testbenches only (not synthesizable).
// While cs_n is low it shifts in mosi on each rising edge of sck, most
// significant bit first. On the rising edge of cs_n, a frame of exactly 32
// bits is decoded as {8 don't-care, command[3:0], address[3:0], data[11:0],
// 4 don't-care}; command 0011 writes and updates the addressed channel
// (address 1111: all four). Frames of another length are counted as bad.
module ltc2624_model (
  input  logic        sck,
  input  logic        mosi,
  input  logic        cs_n,
  output logic [11:0] code [4],
  output int          frames,
  output int          bad_frames,
  output logic [3:0]  last_cmd,
  output logic [3:0]  last_addr
);
  logic [31:0] sh;
  int          nbits;

  initial begin
    frames = 0; bad_frames = 0; nbits = 0; sh = '0;
    last_cmd = '0; last_addr = '0;
    foreach (code[i]) code[i] = '0;
  end

  always @(negedge cs_n) begin
    nbits = 0;
    sh    = '0;
  end

  always @(posedge sck) begin
    if (!cs_n) begin
      sh    = {sh[30:0], mosi};
      nbits = nbits + 1;
    end
  end

  always @(posedge cs_n) begin
    if (nbits == 32) begin
      frames++;
      last_cmd  = sh[23:20];
      last_addr = sh[19:16];
      if (sh[23:20] == 4'b0011) begin
        if (sh[19:16] == 4'b1111) foreach (code[i]) code[i] = sh[15:4];
        else if (sh[19:16] < 4) code[sh[17:16]] = sh[15:4];
      end
    end else if (nbits != 0) begin
      bad_frames++;
    end
  end
endmodule
