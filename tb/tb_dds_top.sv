// tb_dds_top: end-to-end test of the synthesizer at its default size
// (12-bit phase, 256 x 8 ROM, 10-bit DAC).
//
// A reference model runs alongside: on each falling edge its phase takes
// phase + tuning_word mod 4096, and the DAC code takes the sine sample of
// the phase held before that edge, worked out in real arithmetic
// (quadrant, index inside the quarter, round(255*sin((idx+0.5)*pi/512)),
// offset-binary code). Every cycle the DUT code is compared with it, and
// the DAC voltage with 3 V + code/1023 V.
//
// Scenarios and the mechanisms they exercise (each is counted, and a
// mechanism that never happened counts as a failure):
//  - tuning-word hops at random times (frequency switch, phase-continuous:
//    the model never resets its phase, so any jump would mismatch);
//  - the two-clock update delay: after a hop, the first code that reflects
//    the new word appears on the second falling edge;
//  - accumulator wrap-around past 2*pi;
//  - all four quadrants, i.e. direct and mirrored ROM reads, both signs;
//  - tuning word 0 (output holds), tuning word 2048 (Nyquist, two samples
//    per period);
//  - output frequency: over 4096 clocks a tuning word T gives exactly T
//    positive-going zero crossings, checked for several T, including
//    1638 (20 MHz out of a 50 MHz clock, the stated tuning bandwidth).
module tb_dds_top;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 1'b1, rst_n;
  logic [11:0] tw;
  logic [9:0]  dac_code;
  real         vout;

  int checks = 0, failures = 0;
  int hops = 0, wraps = 0, nyquist_cycles = 0, hold_cycles = 0;
  int quad_seen [4];
  int unsigned m_phase;
  int          m_code;
  localparam real PI = 3.14159265358979323846;

  dds_top dut (.clk(clk), .rst_n(rst_n), .tuning_word(tw), .dac_code(dac_code), .vout(vout));

  always #10 clk = ~clk;  // 20 ns period = 50 MHz

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected DAC code for a phase value, from the angle.
  function automatic int code_of(input int unsigned p);
    int quadrant, idx, m;
    quadrant = int'(p / 1024);
    idx      = int'((p % 1024) / 4);
    if (quadrant == 1 || quadrant == 3) idx = 255 - idx;
    m = $rtoi(255.0 * $sin((real'(idx) + 0.5) * PI / 512.0) + 0.5);
    return (quadrant >= 2) ? 511 - 2 * m : 512 + 2 * m;
  endfunction

  // One falling edge: advance the model, then compare.
  task automatic tick();
    int unsigned old_phase;
    @(negedge clk);
    old_phase = m_phase;
    m_code    = code_of(old_phase);
    quad_seen[old_phase / 1024]++;
    if (m_phase + tw >= 4096) wraps++;
    if (tw == 12'd2048) nyquist_cycles++;
    if (tw == 12'd0)    hold_cycles++;
    m_phase = (m_phase + tw) % 4096;
    #2;
    checks++;
    if (int'(dac_code) != m_code) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t code=%0d want %0d tw=%0d", $time, dac_code, m_code, tw);
    end
    checks++;
    if (vout - (3.0 + real'(dac_code) / 1023.0) > 1.0e-6 ||
        (3.0 + real'(dac_code) / 1023.0) - vout > 1.0e-6) begin
      failures++;
      $display("FAIL vout=%f for code %0d", vout, dac_code);
    end
  endtask

  task automatic hop(input logic [11:0] new_tw);
    @(posedge clk);
    if (new_tw != tw) hops++;
    tw = new_tw;
  endtask

  // Count positive-going zero crossings over 4096 clocks.
  task automatic freq_check(input logic [11:0] t);
    int crossings;
    bit prev_pos;
    hop(t);
    tick();
    prev_pos = dac_code[9];
    crossings = 0;
    repeat (4096) begin
      tick();
      if (dac_code[9] && !prev_pos) crossings++;
      prev_pos = dac_code[9];
    end
    checks++;
    if (crossings != int'(t)) begin
      failures++;
      $display("FAIL tw=%0d gave %0d cycles in 4096 clocks", t, crossings);
    end
  endtask

  // Two-clock update delay: with the phase at 0 and word A, switch to B
  // and count the falling edges until the code departs from what A gives.
  task automatic latency_check(input logic [11:0] a, input logic [11:0] b);
    int unsigned pa;
    int edges;
    bit seen;
    rst_n = 1'b0; tw = a;
    @(negedge clk); #1;
    rst_n = 1'b1;
    m_phase = 0;
    repeat (3) tick();
    pa = m_phase;   // phase register now
    hop(b);
    edges = 0; seen = 0;
    for (int e = 1; e <= 4 && !seen; e++) begin
      tick();
      // code the old word would give at this edge
      if (int'(dac_code) != code_of((pa + (e - 1) * a) % 4096)) begin
        edges = e; seen = 1;
      end
    end
    checks++;
    if (edges != 2) begin
      failures++;
      $display("FAIL update delay %0d edges, want 2", edges);
    end
  endtask

  initial begin
    rst_n = 1'b0; tw = 12'd0;
    @(negedge clk); #1;
    checks++;
    if (dac_code !== 10'd0) begin failures++; $display("FAIL reset code"); end
    rst_n = 1'b1;
    m_phase = 0;

    // update delay after a frequency hop
    latency_check(12'd16, 12'd200);

    // steady tones and their frequencies
    freq_check(12'd1);
    freq_check(12'd37);
    freq_check(12'd1000);
    freq_check(12'd1638);

    // Nyquist and hold
    hop(12'd2048); repeat (50) tick();
    hop(12'd0);    repeat (20) tick();

    // random phase-continuous hops
    for (int k = 0; k < 400; k++) begin
      hop(12'($urandom));
      repeat (1 + $urandom_range(0, 20)) tick();
    end

    // every mechanism must have happened
    checks++; if (hops == 0)           begin failures++; $display("FAIL no frequency hop"); end
    checks++; if (wraps == 0)          begin failures++; $display("FAIL no wrap-around"); end
    checks++; if (nyquist_cycles == 0) begin failures++; $display("FAIL no Nyquist run"); end
    checks++; if (hold_cycles == 0)    begin failures++; $display("FAIL no hold run"); end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) begin failures++; $display("FAIL quadrant %0d never seen", q + 1); end
    end
    $display("hops=%0d wraps=%0d nyquist=%0d hold=%0d quadrants=%0d/%0d/%0d/%0d",
             hops, wraps, nyquist_cycles, hold_cycles,
             quad_seen[0], quad_seen[1], quad_seen[2], quad_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
