// tb_cordic_stage: self-checking test of one CORDIC micro-rotation.
// Two instances (shift 3 and shift 7) get random vectors and angles of both
// signs; the expected outputs use real-number floor division for the shifts
// and atan(2^-k) computed with $atan, independently of the package table.
module tb_cordic_stage;
  localparam int unsigned DW = 21, ZW = 16;
  localparam real PI = 3.14159265358979323846;

  logic signed [DW-1:0] a, b, a3, b3, a7, b7;
  logic signed [ZW-1:0] z, z3, z7;
  um_pkg::rot_dir_e     d3, d7;

  int checks = 0, failures = 0, n_acw = 0, n_cw = 0;

  cordic_stage #(.DW(DW), .ZW(ZW), .SHIFT(3)) dut3 (.a_in(a), .b_in(b), .z_in(z),
    .a_out(a3), .b_out(b3), .z_out(z3), .dir(d3));
  cordic_stage #(.DW(DW), .ZW(ZW), .SHIFT(7)) dut7 (.a_in(a), .b_in(b), .z_in(z),
    .a_out(a7), .b_out(b7), .z_out(z7), .dir(d7));

  function automatic longint fl_shift(longint v, int k);
    return longint'($floor(real'(v) / real'(2.0 ** k)));
  endfunction

  function automatic longint atan_units(int k);
    return longint'($floor($atan(2.0 ** (-k)) / (2.0 * PI) * 65536.0 + 0.5));
  endfunction

  task automatic check_one(int k, logic signed [DW-1:0] ao, logic signed [DW-1:0] bo,
                           logic signed [ZW-1:0] zo, um_pkg::rot_dir_e d);
    longint ea, eb, ez;
    int s;
    s  = (z >= 0) ? 1 : -1;
    ea = longint'(a) - s * fl_shift(b, k);
    eb = longint'(b) + s * fl_shift(a, k);
    ez = longint'(z) - s * atan_units(k);
    checks++;
    if (longint'(ao) != ea || longint'(bo) != eb || longint'(zo) != ez ||
        (d == um_pkg::ROT_ACW) != (s > 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL k=%0d a=%0d b=%0d z=%0d -> %0d %0d %0d exp %0d %0d %0d",
                 k, a, b, z, ao, bo, zo, ea, eb, ez);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a = DW'($signed($urandom_range(0, 400000)) - 200000);
      b = DW'($signed($urandom_range(0, 400000)) - 200000);
      z = ZW'($signed($urandom_range(0, 8000)) - 4000);
      if (i == 0) z = 0;
      #1;
      check_one(3, a3, b3, z3, d3);
      check_one(7, a7, b7, z7, d7);
      if (d3 == um_pkg::ROT_ACW) n_acw++; else n_cw++;
    end
    checks++;
    if (n_acw == 0 || n_cw == 0) begin failures++; $display("FAIL one direction never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
