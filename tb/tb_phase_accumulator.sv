// tb_phase_accumulator: compares the 12-bit phase register against an
// integer model phase = (phase + tuning_word) mod 4096, updated on each
// falling edge. Tuning words include the extremes 0, 1, 2048 and 4095 and
// random values, changed at random times; the test counts the wrap-arounds
// (overflow past 2*pi) it saw and fails if there were none. It also
// checks that a tuning-word change moves the phase on the very next
// falling edge, and that the phase advances exactly once per clock.
module tb_phase_accumulator;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 1'b1, rst_n;
  logic [11:0] tw, phase;
  int unsigned model;
  int checks = 0, failures = 0, wraps = 0;

  phase_accumulator dut (.clk(clk), .rst_n(rst_n), .tuning_word(tw), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check();
    @(negedge clk);
    if (model + tw >= 4096) wraps++;
    model = (model + tw) % 4096;
    #1;
    checks++;
    if (phase !== 12'(model)) begin
      failures++;
      if (failures < 10) $display("FAIL phase=%0d want %0d tw=%0d", phase, model, tw);
    end
  endtask

  initial begin
    rst_n = 1'b0; tw = 12'd77;
    @(negedge clk); #1;
    checks++;
    if (phase !== 12'd0) begin failures++; $display("FAIL reset phase=%0d", phase); end
    rst_n = 1'b1;
    model = 0;
    tw = 12'd1;    repeat (20) step_and_check();
    tw = 12'd0;    repeat (5)  step_and_check();
    tw = 12'd4095; repeat (20) step_and_check();
    tw = 12'd2048; repeat (8)  step_and_check();
    tw = 12'd1365; repeat (20) step_and_check();
    // random tuning words switched at random intervals
    for (int k = 0; k < 300; k++) begin
      tw = 12'($urandom);
      repeat (1 + $urandom_range(0, 6)) step_and_check();
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around seen"); end
    $display("wrap-arounds seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
