// tb_full_adder_1b: exhaustive check of the adder bit cell. For all eight
// input combinations the sum must be the low bit of a + b + c, generate
// must say that a + b alone reaches 2, and propagate that a + b + 1
// reaches 2 (an incoming carry would go out).
module tb_full_adder_1b;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, c, s, g, p;
  int checks = 0, failures = 0;

  full_adder_1b dut (.a(a), .b(b), .c(c), .s(s), .g(g), .p(p));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (s !== total[0]) begin failures++; $display("FAIL sum for %b", 3'(i)); end
      checks++;
      if (g !== (int'(a) + int'(b) >= 2)) begin failures++; $display("FAIL generate for %b", 3'(i)); end
      checks++;
      if (p !== (int'(a) + int'(b) + 1 >= 2)) begin failures++; $display("FAIL propagate for %b", 3'(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
