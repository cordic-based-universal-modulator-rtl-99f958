// tb_mux_cordic: self-checking test of the pipelined multiplexer CORDIC.
// A stream of random amplitudes and angles (plus corner cases: full-scale
// amplitudes, quadrant edges) enters on every cycle, with gaps in in_valid.
// For each input the testbench works out, with real arithmetic, the angle
// the eight micro-rotations reach (signs from its own angle model, constants
// from $atan) and the gain R * round(2^15/R)/2^15, and expects x*cos and
// x*sin of that angle within 2.5 LSB. It also checks against the exact
// x*cos(theta), x*sin(theta) within 0.8 % of |x| + 3 LSB, checks the
// 2-cycle latency of the pipelined core, and runs an unpipelined instance
// that must give the same values with no latency.
module tb_mux_cordic;
  localparam int unsigned W = 16;
  localparam real PI = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid;
  logic signed [W-1:0] x_in;
  logic        [W-1:0] theta;
  logic                out_valid, u_valid;
  logic signed [W-1:0] cos_out, sin_out, u_cos, u_sin;
  um_pkg::rot_dir_e    d2, d3, ud2, ud3;
  logic [1:0]          quad, uquad;

  int checks = 0, failures = 0;
  int qseen [4];
  int nvalid_out = 0;

  mux_cordic #(.W(W)) dut (.clk, .rst_n, .in_valid, .x_in, .theta, .out_valid,
    .cos_out, .sin_out, .mux_dir2(d2), .mux_dir3(d3), .quadrant(quad));

  mux_cordic #(.W(W), .PIPELINED(1'b0)) dut_comb (.clk, .rst_n, .in_valid, .x_in, .theta,
    .out_valid(u_valid), .cos_out(u_cos), .sin_out(u_sin), .mux_dir2(ud2), .mux_dir3(ud3),
    .quadrant(uquad));

  always #5 clk = ~clk;

  function automatic longint atan_units(int k);
    return longint'($floor($atan(2.0 ** (-k)) / (2.0 * PI) * 65536.0 + 0.5));
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real clampr(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  // Angle reached by the micro-rotations for the angle word th, in radians.
  function automatic real cordic_angle(logic [W-1:0] th);
    longint zm;
    real    ang;
    int     s;
    zm  = longint'(th[W-3:0]) - atan_units(0);
    ang = PI / 4.0;
    for (int k = 1; k < 8; k++) begin
      s   = (zm >= 0) ? 1 : -1;
      ang = ang + s * $atan(2.0 ** (-k));
      zm  = zm - s * atan_units(k);
    end
    return ang + real'(th[W-1:W-2]) * PI / 2.0;
  endfunction

  function automatic real cordic_gain();
    real r = 1.0;
    for (int k = 0; k < 8; k++) r = r * $sqrt(1.0 + 2.0 ** (-2 * k));
    return r * 19899.0 / 32768.0;
  endfunction

  task automatic check_out(logic signed [W-1:0] x, logic [W-1:0] th,
                           logic signed [W-1:0] co, logic signed [W-1:0] so, string tag);
    real ang, g, ec, es, tc, ts, tol;
    ang = cordic_angle(th);
    g   = cordic_gain();
    ec  = clampr(real'(x) * g * $cos(ang));
    es  = clampr(real'(x) * g * $sin(ang));
    tc  = clampr(real'(x) * $cos(2.0 * PI * real'(th) / 65536.0));
    ts  = clampr(real'(x) * $sin(2.0 * PI * real'(th) / 65536.0));
    tol = 0.008 * absr(real'(x)) + 3.0;
    checks += 2;
    if (absr(real'(co) - ec) > 2.5 || absr(real'(so) - es) > 2.5) begin
      failures++;
      if (failures < 12)
        $display("FAIL %s x=%0d th=%0d -> (%0d,%0d) exp (%.1f,%.1f)", tag, x, th, co, so, ec, es);
    end
    if (absr(real'(co) - tc) > tol || absr(real'(so) - ts) > tol) begin
      failures++;
      if (failures < 12)
        $display("FAIL %s exact x=%0d th=%0d -> (%0d,%0d) exact (%.1f,%.1f)", tag, x, th, co, so, tc, ts);
    end
  endtask

  // Input history for the latency check.
  logic signed [W-1:0] hx [3];
  logic        [W-1:0] ht [3];
  logic                hv [3];

  initial begin
    foreach (qseen[i]) qseen[i] = 0;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0; theta = '0;
    foreach (hv[i]) begin hv[i] = 1'b0; hx[i] = '0; ht[i] = '0; end
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid during reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      // New input just after a clock edge.
      in_valid = ($urandom_range(0, 9) != 0);
      x_in     = W'($signed($urandom_range(0, 65535)) - 32768);
      theta    = W'($urandom);
      case (i)
        0: begin x_in = 16'sd32767;  theta = 16'h0000; end
        1: begin x_in = -16'sd32768; theta = 16'h8000; end
        2: begin x_in = 16'sd32767;  theta = 16'h4000; end
        3: begin x_in = 16'sd20000;  theta = 16'h3FFF; end
        4: begin x_in = 16'sd20000;  theta = 16'hC000; end
        5: begin x_in = 16'sd0;      theta = 16'h1234; end
        default: ;
      endcase
      #1;
      // Unpipelined core: same values, same cycle.
      if (in_valid) begin
        check_out(x_in, theta, u_cos, u_sin, "comb");
        qseen[theta[W-1:W-2]]++;
      end
      checks++;
      if (u_valid != in_valid) begin failures++; $display("FAIL comb valid"); end
      @(posedge clk);
      hx[2] = hx[1]; ht[2] = ht[1]; hv[2] = hv[1];
      hx[1] = hx[0]; ht[1] = ht[0]; hv[1] = hv[0];
      hx[0] = x_in;  ht[0] = theta; hv[0] = in_valid;
      #1;
      // Pipelined core: the input of two edges ago.
      checks++;
      if (i >= 1 && out_valid != hv[1]) begin
        failures++; $display("FAIL latency: out_valid=%0b expected %0b", out_valid, hv[1]);
      end
      if (i >= 1 && out_valid) begin
        check_out(hx[1], ht[1], cos_out, sin_out, "pipe");
        nvalid_out++;
      end
      #1;
    end
    foreach (qseen[i]) begin
      checks++;
      if (qseen[i] == 0) begin failures++; $display("FAIL quadrant %0d never used", i); end
    end
    $display("valid outputs checked: %0d", nvalid_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
