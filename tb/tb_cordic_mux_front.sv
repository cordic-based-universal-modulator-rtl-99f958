// tb_cordic_mux_front: self-checking test of CORDIC stages 1-3 built from
// multiplexers. For random start values and angles in [0, 90) degrees the
// testbench runs the three rotations itself (stage 1 fixed at +45 degrees,
// then the signs of the remaining angle, with atan constants from $atan) and
// expects the multiple of a/8 that the rotations give, rounded down as the
// shift by 3 does. All four multiplexer cases must occur.
module tb_cordic_mux_front;
  localparam int unsigned DW = 21, ZW = 16;
  localparam real PI = 3.14159265358979323846;

  logic signed [DW-1:0] a, a3, b3;
  logic signed [ZW-1:0] z, z4;
  um_pkg::rot_dir_e     d2, d3;

  int checks = 0, failures = 0;
  int seen [4];

  cordic_mux_front #(.DW(DW), .ZW(ZW)) dut (.a_in(a), .z_in(z), .a_out(a3), .b_out(b3),
    .z_out(z4), .dir2(d2), .dir3(d3));

  function automatic longint atan_units(int k);
    return longint'($floor($atan(2.0 ** (-k)) / (2.0 * PI) * 65536.0 + 0.5));
  endfunction

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 5000; i++) begin
      real ra, rb, na, nb;
      longint zm, ea, eb;
      int s2, s3;
      a = DW'($signed($urandom_range(0, 300000)) - 150000);
      z = ZW'($urandom_range(0, 16383));
      #1;
      // Reference rotations with real numbers.
      ra = real'(a); rb = real'(a);               // stage 1: (a, 0) -> (a, a)
      zm = longint'(z) - atan_units(0);
      s2 = (zm >= 0) ? 1 : -1;
      na = ra - s2 * rb / 2.0; nb = rb + s2 * ra / 2.0; ra = na; rb = nb;
      zm = zm - s2 * atan_units(1);
      s3 = (zm >= 0) ? 1 : -1;
      na = ra - s3 * rb / 4.0; nb = rb + s3 * ra / 4.0; ra = na; rb = nb;
      zm = zm - s3 * atan_units(2);
      ea = longint'($floor(ra)); eb = longint'($floor(rb));
      checks++;
      if (longint'(a3) != ea || longint'(b3) != eb || longint'(z4) != zm ||
          (d2 == um_pkg::ROT_ACW) != (s2 > 0) || (d3 == um_pkg::ROT_ACW) != (s3 > 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%0d z=%0d -> (%0d,%0d) z4=%0d exp (%0d,%0d) z4=%0d",
                   a, z, a3, b3, z4, ea, eb, zm);
      end
      seen[(s2 > 0 ? 0 : 1) + (s3 > 0 ? 0 : 2)]++;
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL multiplexer case %0d never selected", i); end
    end
    $display("mux cases: ++ %0d, -+ %0d, +- %0d, -- %0d", seen[0], seen[1], seen[2], seen[3]);
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
