// tb_phase_accumulator: self-checking test of the phase accumulator.
// Drives random frequency words, holds some constant, and forces wraps; a
// reference model in the testbench predicts the phase and the wrap flag one
// cycle after each edge (the register adds delta_f at every clock edge).
module tb_phase_accumulator;
  localparam int unsigned N = 16;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] delta_f;
  logic [N-1:0] phase;
  logic         wrap;

  int checks = 0, failures = 0, wraps = 0;
  longint unsigned model;      // reference phase, kept wider than N
  logic    exp_wrap;

  phase_accumulator #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: phase=%0d wrap=%0b model=%0d exp_wrap=%0b",
                                  what, phase, wrap, model, exp_wrap);
    end
  endtask

  initial begin
    rst_n   = 1'b0;
    delta_f = 16'd1234;
    repeat (3) @(posedge clk);
    #1 check(phase == 0 && wrap == 0, "reset");
    rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 3000; i++) begin
      if (i < 1000)      delta_f = 16'd300;               // constant carrier word
      else if (i < 2000) delta_f = N'($urandom);          // random words
      else               delta_f = 16'hFFF0 + N'(i % 16); // near full scale
      @(posedge clk);
      exp_wrap = ((model + delta_f) >> N) != 0;
      model    = (model + delta_f) % (64'd1 << N);
      #1;
      check(phase == N'(model) && wrap == exp_wrap, "step");
      if (wrap) wraps++;
    end
    // After 1000 steps of 300 the phase is 300000 mod 65536: 4 wraps at least.
    check(wraps > 4, "wraps seen");
    // Reset in the middle clears it again.
    rst_n = 1'b0;
    @(posedge clk); #1;
    check(phase == 0, "reset again");
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
