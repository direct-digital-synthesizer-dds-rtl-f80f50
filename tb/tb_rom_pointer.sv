// tb_rom_pointer: exhaustive check of the quadrant folding for all 4096
// phase values. The expected address is worked out from the angle: the
// position inside the quarter, counted from the nearer zero crossing for
// rising quarters (Q1, Q3) and from the peak downwards for falling
// quarters (Q2, Q4), i.e. 255 - index. Every quadrant must be visited.
module tb_rom_pointer;
  timeunit 1ns; timeprecision 1ps;

  logic [11:0] phase;
  logic [7:0]  addr;
  logic        neg;
  int checks = 0, failures = 0;
  int quad_seen [4];

  rom_pointer dut (.phase(phase), .addr(addr), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int quadrant, index, want_addr;
    bit want_neg;
    for (int p = 0; p < 4096; p++) begin
      phase = 12'(p);
      #1;
      quadrant  = p / 1024;          // 0..3 for Q1..Q4
      index     = (p % 1024) / 4;    // 0..255 inside the quarter
      want_addr = (quadrant == 1 || quadrant == 3) ? 255 - index : index;
      want_neg  = (quadrant >= 2);
      quad_seen[quadrant]++;
      checks++;
      if (addr !== 8'(want_addr) || neg !== want_neg) begin
        failures++;
        if (failures < 10)
          $display("FAIL phase=%0d addr=%0d neg=%0d want %0d %0d", p, addr, neg, want_addr, want_neg);
      end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
