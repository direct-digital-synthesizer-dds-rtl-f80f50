// tb_sine_rom: reads all 256 ROM words and compares them with
// round(255 * sin((i + 0.5) * pi / 512)) computed here in real
// arithmetic. Also checks the mirror property rom[i] vs the cosine
// sample, and that the table is monotonic non-decreasing.
module tb_sine_rom;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] addr, data;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  sine_rom dut (.addr(addr), .data(data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, prev;
    prev = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      want = $rtoi(255.0 * $sin((real'(i) + 0.5) * PI / 512.0) + 0.5);
      checks++;
      if (int'(data) != want) begin
        failures++;
        if (failures < 10) $display("FAIL rom[%0d]=%0d want %0d", i, data, want);
      end
      checks++;
      if (int'(data) < prev) begin
        failures++;
        $display("FAIL rom not monotonic at %0d", i);
      end
      prev = int'(data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
