// tb_phase_adder: self-checking test of Adder 2 (phase control adder).
// Checks theta = top W bits of the phase + phi, modulo one turn, for random
// and corner values, with an accumulator wider than the angle (N = 20, W = 16)
// and with equal widths.
module tb_phase_adder;
  logic [19:0] phase20;
  logic [15:0] phase16, phi, theta_a, theta_b;

  int checks = 0, failures = 0;

  phase_adder #(.N(20), .W(16)) dut_wide (.phase(phase20), .phi(phi), .theta(theta_a));
  phase_adder                   dut_eq   (.phase(phase16), .phi(phi), .theta(theta_b));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int unsigned ea, eb;
      phase20 = 20'($urandom);
      phase16 = 16'($urandom);
      phi     = 16'($urandom);
      if (i == 0) begin phase20 = 20'hFFFFF; phase16 = 16'hFFFF; phi = 16'h0001; end
      if (i == 1) begin phase20 = 20'h0000F; phase16 = 16'h0000; phi = 16'h0000; end
      #1;
      ea = ((phase20 / 16) + phi) % 65536;
      eb = (int'(phase16) + int'(phi)) % 65536;
      checks += 2;
      if (theta_a != 16'(ea)) begin failures++; $display("FAIL wide %h %h -> %h exp %h", phase20, phi, theta_a, ea); end
      if (theta_b != 16'(eb)) begin failures++; $display("FAIL eq %h %h -> %h exp %h", phase16, phi, theta_b, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
