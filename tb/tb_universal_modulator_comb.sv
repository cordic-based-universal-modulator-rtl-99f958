// tb_universal_modulator_comb: end-to-end test of the universal modulator with
// the unpipelined multiplexer CORDIC (PIPELINED = 0), otherwise at the default
// parameters. It is the same test as tb_universal_modulator, except that the
// CORDIC output belongs to the inputs of the same cycle: each sample is
// checked just before the clock edge, and delta_f shows one edge after it is
// applied, phi and x_in at once.
// It runs the modes in turn: unmodulated carrier, AM (x_in follows a
// sinusoidal message), FM (delta_f = carrier word + message), PM (phi
// follows the message), then a reset in the middle of a run and a second
// carrier. A model in the testbench keeps its own phase accumulator and
// pipeline history and checks every output sample against
//   x * cos(theta), x * sin(theta)   (within 0.8 % of |x| + 3 LSB)
// and against the angle the eight micro-rotations actually reach (within
// 2.5 LSB). The
// converter frames are decoded by ltc2624_model and compared with the cosine
// sample present when each frame started. Each mechanism (the four modes,
// mode switches, phase wraps, the four quadrants, the four multiplexer
// cases, converter frames and the mid-run reset) is counted and must occur.
// A reset cuts the converter frame in progress short; that frame is not
// checked, and the converter model must count it as its only bad frame.
module tb_universal_modulator_comb;
  localparam real PI = 3.14159265358979323846;

  logic               clk = 1'b0;
  logic               rst_n;
  logic        [15:0] delta_f;
  logic        [15:0] phi;
  logic signed [15:0] x_in;
  logic               out_valid;
  logic signed [15:0] cos_out, sin_out;
  logic               dac_sck, dac_mosi, dac_cs_n;

  universal_modulator #(.PIPELINED(1'b0)) dut (.*);

  logic [11:0] code [4];
  int frames, bad_frames;
  logic [3:0] last_cmd, last_addr;
  ltc2624_model dac (.sck(dac_sck), .mosi(dac_mosi), .cs_n(dac_cs_n), .code(code),
    .frames(frames), .bad_frames(bad_frames), .last_cmd(last_cmd), .last_addr(last_addr));

  always #10 clk = ~clk;   // 50 MHz sample clock

  int checks = 0, failures = 0;

  typedef enum int {M_CARRIER, M_AM, M_FM, M_PM} mode_e;
  int n_mode [4];
  int n_switch = 0, n_wrap = 0, n_frames_ok = 0, n_reset = 0;
  int qseen [4], muxseen [4];

  task automatic fail(input string what);
    failures++;
    if (failures < 15) $display("FAIL %s at %0t", what, $time);
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real clampr(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  function automatic longint atan_units(int k);
    return longint'($floor($atan(2.0 ** (-k)) / (2.0 * PI) * 65536.0 + 0.5));
  endfunction

  function automatic real cordic_angle(logic [15:0] th);
    longint zm;
    real    ang;
    int     s;
    zm  = longint'(th[13:0]) - atan_units(0);
    ang = PI / 4.0;
    for (int k = 1; k < 8; k++) begin
      s   = (zm >= 0) ? 1 : -1;
      ang = ang + s * $atan(2.0 ** (-k));
      zm  = zm - s * atan_units(k);
    end
    return ang + real'(th[15:14]) * PI / 2.0;
  endfunction

  // Which of the four stage-3 multiplexer outputs the angle th selects:
  // bit 0 set when stage 2 turns clockwise, bit 1 when stage 3 does.
  function automatic int mux_case(logic [15:0] th);
    longint zm;
    int     c = 0;
    zm = longint'(th[13:0]) - atan_units(0);
    if (zm < 0) begin c += 1; zm = zm + atan_units(1); end
    else        zm = zm - atan_units(1);
    if (zm < 0) c += 2;
    return c;
  endfunction

  function automatic real cordic_gain();
    real r = 1.0;
    for (int k = 0; k < 8; k++) r = r * $sqrt(1.0 + 2.0 ** (-2 * k));
    return r * 19899.0 / 32768.0;
  endfunction

  // What the model expects at the output, one entry per cycle.
  typedef struct {
    bit                 valid;
    logic        [15:0] theta;
    logic signed [15:0] x;
    mode_e              mode;
  } entry_t;

  longint unsigned acc_model;
  bit              run_model;
  mode_e           mode, prev_mode;
  logic signed [15:0] cos_prev;
  logic               csn_prev;

  task automatic check_sample(entry_t e);
    real ang, g, ec, es, tc, ts, tol;
    checks++;
    if (out_valid != e.valid) begin fail("out_valid"); return; end
    if (!e.valid) return;
    ang = cordic_angle(e.theta);
    g   = cordic_gain();
    ec  = clampr(real'(e.x) * g * $cos(ang));
    es  = clampr(real'(e.x) * g * $sin(ang));
    tc  = clampr(real'(e.x) * $cos(2.0 * PI * real'(e.theta) / 65536.0));
    ts  = clampr(real'(e.x) * $sin(2.0 * PI * real'(e.theta) / 65536.0));
    tol = 0.008 * absr(real'(e.x)) + 3.0;
    checks += 2;
    if (absr(real'(cos_out) - ec) > 2.5 || absr(real'(sin_out) - es) > 2.5) begin
      fail("sample vs micro-rotation angle");
      if (failures < 15) $display("  x=%0d theta=%0d out=(%0d,%0d) exp=(%.1f,%.1f)",
                                  e.x, e.theta, cos_out, sin_out, ec, es);
    end
    if (absr(real'(cos_out) - tc) > tol || absr(real'(sin_out) - ts) > tol)
      fail("sample vs exact cos/sin");
    n_mode[e.mode]++;
    qseen[e.theta[15:14]]++;
  endtask

  // One sample period: apply inputs, check the combinational result, clock.
  task automatic step(input logic [15:0] df, input logic [15:0] ph, input logic signed [15:0] x,
                      input bit rst);
    entry_t e;
    delta_f = df; phi = ph; x_in = x; rst_n = !rst;
    e.valid = run_model; e.theta = 16'(acc_model) + ph; e.x = x; e.mode = mode;
    #1;
    // While reset is asserted the registers are not cleared until the edge.
    if (!rst) begin
      check_sample(e);
      if (e.valid) muxseen[mux_case(e.theta)]++;
    end
    @(posedge clk);
    if (rst) begin acc_model = 0; run_model = 1'b0; end
    else begin
      if (acc_model + 64'(df) >= 65536) n_wrap++;
      acc_model = (acc_model + 64'(df)) % 65536;
      run_model = 1'b1;
    end
    #1;
    if (rst) begin
      checks++;
      if (out_valid) fail("out_valid after reset");
    end
  endtask

  // Converter frame checking runs alongside.
  logic signed [15:0] taken;
  // The CORDIC output follows the inputs within the cycle; the value the
  // converter takes at a clock edge is the one held in the middle of the cycle.
  logic signed [15:0] cos_mid = '0;
  always @(negedge clk) cos_mid = cos_out;
  bit                 aborted = 1'b0;
  logic               rst_at_edge;
  int                 n_aborted = 0;
  initial begin
    csn_prev = 1'b1; cos_prev = '0; taken = '0;
    forever begin
      @(posedge clk);
      rst_at_edge = rst_n;
      #1;
      if (csn_prev && !dac_cs_n) begin taken = cos_mid; aborted = 1'b0; end
      if (!csn_prev && !rst_at_edge) aborted = 1'b1;
      if (!csn_prev && dac_cs_n && aborted) n_aborted++;
      if (!csn_prev && dac_cs_n && !aborted) begin
        checks++;
        if (code[0] != 12'((int'(taken) + 32768) / 16) || last_cmd != 4'b0011 || last_addr != 4'b0000)
          fail("converter code");
        else n_frames_ok++;
      end
      csn_prev = dac_cs_n;
      cos_prev = cos_out;
    end
  end

  task automatic set_mode(mode_e m);
    prev_mode = mode;
    mode = m;
    if (prev_mode != m) n_switch++;
  endtask

  initial begin
    foreach (n_mode[i]) n_mode[i] = 0;
    foreach (qseen[i]) qseen[i] = 0;
    foreach (muxseen[i]) muxseen[i] = 0;
    acc_model = 0; run_model = 1'b0; mode = M_CARRIER; prev_mode = M_CARRIER;
    delta_f = '0; phi = '0; x_in = '0; rst_n = 1'b0;
    repeat (3) step(16'd0, 16'd0, 16'sd0, 1'b1);

    // Unmodulated carrier: (x, y, phi) = (A, 0, 0), fixed frequency word.
    for (int i = 0; i < 2000; i++) step(16'd655, 16'd0, 16'sd30000, 1'b0);

    // AM: a(t) = 15000 + 10000 sin(2 pi n / 400) on x_in.
    set_mode(M_AM);
    for (int i = 0; i < 4000; i++)
      step(16'd2621, 16'd0, 16'(int'(15000.0 + 10000.0 * $sin(2.0 * PI * i / 400.0))), 1'b0);

    // FM: delta_f = 1311 + 800 sin(2 pi n / 1000), x constant.
    set_mode(M_FM);
    for (int i = 0; i < 4000; i++)
      step(16'(int'(1311.0 + 800.0 * $sin(2.0 * PI * i / 1000.0))), 16'd0, 16'sd25000, 1'b0);

    // PM: phi = 8192 sin(2 pi n / 700) (up to +-45 degrees), fixed frequency.
    set_mode(M_PM);
    for (int i = 0; i < 4000; i++)
      step(16'd983, 16'(int'(8192.0 * $sin(2.0 * PI * i / 700.0))), 16'sd25000, 1'b0);

    // Reset in the middle of a run, then the carrier again.
    n_reset++;
    repeat (2) step(16'd983, 16'd0, 16'sd25000, 1'b1);
    set_mode(M_CARRIER);
    for (int i = 0; i < 1000; i++) step(16'd4000, 16'd0, -16'sd20000, 1'b0);

    // Every mechanism must have happened.
    checks++; if (n_mode[M_CARRIER] == 0) fail("carrier never checked");
    checks++; if (n_mode[M_AM] == 0) fail("AM never checked");
    checks++; if (n_mode[M_FM] == 0) fail("FM never checked");
    checks++; if (n_mode[M_PM] == 0) fail("PM never checked");
    checks++; if (n_switch < 4) fail("mode switches missing");
    checks++; if (n_wrap == 0) fail("phase never wrapped");
    checks++; if (n_frames_ok < 100) fail("too few converter frames");
    checks++; if (bad_frames != n_aborted) fail("bad converter frames");
    checks++; if (n_reset == 0) fail("no mid-run reset");
    foreach (qseen[i]) begin checks++; if (qseen[i] == 0) fail("a quadrant never used"); end
    foreach (muxseen[i]) begin checks++; if (muxseen[i] == 0) fail("a multiplexer case never used"); end
    $display("samples: carrier %0d, AM %0d, FM %0d, PM %0d; mode switches %0d; phase wraps %0d",
             n_mode[M_CARRIER], n_mode[M_AM], n_mode[M_FM], n_mode[M_PM], n_switch, n_wrap);
    $display("quadrants %0d %0d %0d %0d; multiplexer cases %0d %0d %0d %0d; converter frames %0d; resets %0d",
             qseen[0], qseen[1], qseen[2], qseen[3], muxseen[0], muxseen[1], muxseen[2], muxseen[3],
             n_frames_ok, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
