// tb_cla_adder4: exhaustive self-check of the 4-bit carry-lookahead adder.
// All 512 combinations of a, b and carry-in are applied; the 5-bit result
// {cout, sum} is compared with integer addition a + b + cin.
module tb_cla_adder4;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla_adder4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, sum} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d sum=%0d", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
