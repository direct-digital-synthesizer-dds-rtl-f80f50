// tb_carry_lookahead4: exhaustive check of the lookahead unit. For every
// pair of 4-bit operands and carry-in, g = a & b and p = a | b are
// applied, and each carry c[i] must equal bit i of the integer sum of
// the low i bits (a mod 2^i) + (b mod 2^i) + cin, shifted down by i;
// cout likewise for all four bits.
module tb_carry_lookahead4;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] g, p, c;
  logic       cin, cout;
  int checks = 0, failures = 0;

  carry_lookahead4 dut (.g(g), .p(p), .cin(cin), .c(c), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, want;
    for (int i = 0; i < 512; i++) begin
      a   = i % 16;
      b   = (i / 16) % 16;
      cin = 1'(i / 256);
      g   = 4'(a & b);
      p   = 4'(a | b);
      #1;
      for (int k = 0; k <= 4; k++) begin
        want = ((a % (1 << k)) + (b % (1 << k)) + int'(cin)) >> k;
        checks++;
        if ((k < 4 ? c[k] : cout) !== 1'(want)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d cin=%0d carry %0d", a, b, cin, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
