// tb_dll_phase_detector: self-checking test of the DLL phase detector.
//
// A 32 MHz reference is delayed by a chosen amount to form the feedback clock.
// After a few reference cycles the detector output must read 1 for a delay
// between half a period and a full period (line too short: decrement), 0 for
// a delay longer than a period (increment), and 0 again for a delay below
// half a period (the known false reading of a sampling detector). A sweep
// of delays up to two periods then checks the sampled level against the
// reference waveform, which also shows the false lock on two periods. Reset
// must clear the output.
`timescale 1ns / 1ps
module tb_dll_phase_detector;
  localparam real T = 31.25;
  logic clk_ref = 1'b0, ck_fb, rst_n = 1'b1, decr;
  real  fb_dly = 20.0;
  int   checks = 0, failures = 0;

  always #(T/2) clk_ref = ~clk_ref;
  // Transport delay, so that delays longer than a half period pass the clock.
  initial ck_fb = 1'b0;
  always @(clk_ref) begin
    automatic logic v = clk_ref;
    automatic real dd = fb_dly;
    fork
      begin #(dd) ck_fb = v; end
    join_none
  end

  dll_phase_detector dut (.clk_ref, .ck_fb, .rst_n, .decr);

  task automatic check_delay(input real d, input logic exp);
    fb_dly = d;
    repeat (6) @(posedge clk_ref);
    #1;
    checks++;
    if (decr !== exp) begin
      failures++;
      $display("FAIL delay %0.2f ns: decr=%0d expected %0d", d, decr, exp);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #3 checks++;
    if (decr !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    check_delay(25.8, 1'b1);    // shorter than T: decrement
    check_delay(36.0, 1'b0);    // longer than T: increment
    check_delay(30.75, 1'b1);
    check_delay(31.75, 1'b0);
    check_delay(17.0, 1'b1);    // just above T/2
    check_delay(12.0, 1'b0);    // below T/2: misread as too long
    check_delay(45.0, 1'b0);
    check_delay(24.0, 1'b1);
    // Sweep 0.5 .. 62 ns: the detector reads the level the reference had d
    // ns earlier, high when d mod T lies in (T/2, T). Delays within 0.3 ns
    // of an edge are skipped.
    for (int i = 1; i <= 124; i++) begin
      real d, ph;
      d  = 0.5 * i;
      ph = d - T * $floor(d / T);
      if (ph > 0.3 && ph < T - 0.3 && (ph < T/2 - 0.3 || ph > T/2 + 0.3))
        check_delay(d, ph > T/2);
    end
    rst_n = 1'b0; #1 checks++;
    if (decr !== 1'b0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
