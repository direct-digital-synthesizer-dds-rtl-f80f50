// tb_nedge_latch: checks that the latch loads only on the falling clock
// edge, holds across the rising edge and between edges, and clears on a
// synchronous reset. Uses the default 4-bit width.
module tb_nedge_latch;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b1, rst_n;
  logic [3:0] d, q, exp_q;
  int checks = 0, failures = 0;

  nedge_latch dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;   // falling edges at 5, 15, 25, ...

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%h want %h at %0t", what, q, want, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; d = 4'hF;
    @(negedge clk); #1;
    check(4'h0, "reset");
    rst_n = 1'b1;
    exp_q = 4'h0;
    for (int i = 0; i < 200; i++) begin
      // change d just after a rising edge: q must not follow until the
      // next falling edge
      @(posedge clk); #1;
      d = 4'($urandom);
      check(exp_q, "hold after rising edge");
      #2;
      check(exp_q, "hold while clock high");
      @(negedge clk); #1;
      exp_q = d;
      check(exp_q, "load on falling edge");
      // change d while clock low: still no effect
      d = ~d;
      #2;
      check(exp_q, "hold while clock low");
      d = ~d;
    end
    rst_n = 1'b0;
    @(negedge clk); #1;
    check(4'h0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
