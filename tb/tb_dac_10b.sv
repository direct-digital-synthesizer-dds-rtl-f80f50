// tb_dac_10b: checks the behavioural DAC's transfer function: code 0 gives
// 3.0 V, code 1023 gives 4.0 V, mid-scale gives 3.5 V, and random codes
// give 3.0 + code/1023 V within 1 uV, after the model's output delay.
module tb_dac_10b;
  timeunit 1ns; timeprecision 1ps;

  logic [9:0] code;
  real        vout;
  int checks = 0, failures = 0;

  dac_10b dut (.code(code), .vout(vout));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [9:0] c, input real want);
    code = c;
    #10ns;
    checks++;
    if (vout - want > 1.0e-6 || want - vout > 1.0e-6) begin
      failures++;
      $display("FAIL code=%0d vout=%f want %f", c, vout, want);
    end
  endtask

  initial begin
    check(10'd0,    3.0);
    check(10'd1023, 4.0);
    check(10'd512,  3.0 + 512.0 / 1023.0);
    check(10'd511,  3.0 + 511.0 / 1023.0);
    for (int i = 0; i < 200; i++) begin
      logic [9:0] c;
      c = 10'($urandom);
      check(c, 3.0 + real'(c) / 1023.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
