// tb_sine_lut: drives random (address, sign) pairs into the sine look-up
// block and checks, one falling edge later, that the latched 10-bit code
// equals the offset-binary value worked out here from the sine sample:
// mag = round(255*sin((addr+0.5)*pi/512)); code = 512 + 2*mag for the
// positive half, 511 - 2*mag for the negative half. Checks that the code
// does not change before the falling edge (one-edge latency) and that
// reset clears it.
module tb_sine_lut;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b1, rst_n;
  logic [7:0] addr;
  logic       neg;
  logic [9:0] code;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  sine_lut dut (.clk(clk), .rst_n(rst_n), .addr(addr), .neg(neg), .code(code));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input int a, input bit n);
    int m;
    m = $rtoi(255.0 * $sin((real'(a) + 0.5) * PI / 512.0) + 0.5);
    return n ? 511 - 2 * m : 512 + 2 * m;
  endfunction

  initial begin
    int prev_code, want;
    rst_n = 1'b0; addr = 8'd200; neg = 1'b0;
    @(negedge clk); #1;
    checks++;
    if (code !== 10'd0) begin failures++; $display("FAIL reset code=%0d", code); end
    rst_n = 1'b1;
    @(negedge clk); #1;
    prev_code = int'(code);
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk); #1;
      if (i < 512) {neg, addr} = 9'(i);
      else         {neg, addr} = 9'($urandom);
      #1;
      checks++;
      if (int'(code) != prev_code) begin
        failures++;
        $display("FAIL code changed before falling edge");
      end
      @(negedge clk); #1;
      want = expected(int'(addr), neg);
      checks++;
      if (int'(code) != want) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d neg=%0d code=%0d want %0d", addr, neg, code, want);
      end
      prev_code = int'(code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
