// tb_dpwm_top: end-to-end test of the hybrid DPWM.
//
// Five modulators share one 32 MHz reference, reset and duty word:
//   0 typical corner (the defaults), 1 fast corner, 2 slow corner - these
//     must produce pulses of D * T_SW / 512 within half an LSB (0.98 ns) once
//     their DLLs have locked, which is the 9-bit accuracy claim; the worst
//     error of each over the whole run must also stay below 0.4 LSB, the
//     source design's accuracy figure;
//   3 a corner too fast for the DLL range (code must stop at 0, underrun);
//   4 a corner too slow for it (code must stop at 127, overrun).
// Modulator 0 also goes through the low-power mode: its enable is dropped
// in mid-period (pulse must end, output stay low, the 1 MHz clock keep
// running, the DLL code be kept) and raised again (the very next period must
// be accurate). The words include 0 (no pulse), the ends of the coarse steps
// and 511, and each new word is written in mid-period, during a pulse when
// the pulse is long, so it must take effect only in the next period.
// Every mechanism is counted and must have happened at least once.
`timescale 1ns / 1ps
module tb_dpwm_top;
  localparam real T = 31.25, LSB = T / 16.0, TSW = 1000.0;
  localparam int NI = 5;
  localparam real XP [NI] = '{1.0, 0.8256, 1.312, 0.51, 1.49};

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NI-1:0] en = '1;
  logic [8:0] dword = 9'd0;
  logic [NI-1:0] pwm, ck_sw, ovr, und;
  logic [6:0] code [NI];
  int   checks = 0, failures = 0;
  int   n_pulse_ok = 0, n_zero = 0, n_midword = 0, n_pfm = 0, n_wake = 0, n_dither = 0,
        n_over = 0, n_under = 0, n_full = 0, n_corner = 0;

  always #(T/2) clk = ~clk;

  for (genvar k = 0; k < NI; k++) begin : g_dut
    if (k == 0) begin : g_def
      dpwm_top u (.clk, .rst_n, .en(en[k]), .dword, .itrim(2'b11), .i_bias(1.0),
                  .pwm(pwm[k]), .ck_sw(ck_sw[k]), .dll_code(code[k]),
                  .dll_overrun(ovr[k]), .dll_underrun(und[k]));
    end else begin : g_corner
      dpwm_top #(.X_PVT(XP[k])) u (.clk, .rst_n, .en(en[k]), .dword, .itrim(2'b11), .i_bias(1.0),
                  .pwm(pwm[k]), .ck_sw(ck_sw[k]), .dll_code(code[k]),
                  .dll_overrun(ovr[k]), .dll_underrun(und[k]));
    end
  end

  // Pulse edge times per modulator.
  realtime t_r [NI], t_f [NI];
  logic [NI-1:0] pwm_prev = '0;
  always @(pwm) begin
    for (int k = 0; k < NI; k++) begin
      if (pwm[k] && !pwm_prev[k]) t_r[k] = $realtime;
      if (!pwm[k] && pwm_prev[k]) t_f[k] = $realtime;
    end
    pwm_prev = pwm;
  end

  always @(posedge clk) begin
    if (ovr[4]) n_over++;
    if (und[3]) n_under++;
  end

  // Locked-loop dither: the code of modulator 0 turns around.
  int last_dir = 0;
  logic [6:0] code0_prev;
  always @(code[0]) begin
    int dir;
    dir = (code[0] > code0_prev) ? 1 : -1;
    if (last_dir != 0 && dir != last_dir && rst_n) n_dither++;
    last_dir = dir;
    code0_prev = code[0];
  end

  realtime t_sw;
  real max_err [3] = '{0.0, 0.0, 0.0};   // worst |width error| per corner, ns
  always @(posedge ck_sw[0]) t_sw = $realtime;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $realtime, msg); end
  endtask

  // Check the pulse of modulator k in the period that started at t_sw.
  task automatic check_pulse(input int k, input int d);
    real w;
    if (d == 0) begin
      chk(!(t_r[k] >= t_sw) && !pwm[k], $sformatf("dut %0d: word 0 gave a pulse", k));
      if (k == 0) n_zero++;
    end else begin
      w = t_f[k] - t_r[k];
      if ((w - d * LSB) > max_err[k])  max_err[k] = w - d * LSB;
      if ((d * LSB - w) > max_err[k])  max_err[k] = d * LSB - w;
      chk(t_r[k] >= t_sw - 0.001 && t_r[k] <= t_sw + 0.001 && !pwm[k] &&
          w > d * LSB - 0.5 * LSB && w < d * LSB + 0.5 * LSB,
          $sformatf("dut %0d word %0d: width %0.3f ns, expected %0.3f", k, d, w, d * LSB));
      if (k == 0) n_pulse_ok++; else n_corner++;
      if (d == 511) n_full++;
    end
  endtask

  int words [$];
  int cur, nxt;

  initial begin
    #1 rst_n = 1'b0;
    #40 rst_n = 1'b1;
    // Let the loops lock (slow corner needs about 45 reference periods).
    repeat (4) @(posedge ck_sw[0]);
    words = '{1, 15, 16, 17, 31, 32, 33, 255, 256, 257, 300, 0, 400, 480, 495, 496, 497,
              505, 510, 511, 2, 0, 511, 100};
    repeat (30) words.push_back($urandom % 512);
    cur = 0;
    foreach (words[i]) begin
      nxt = words[i];
      #510 dword = 9'(nxt);
      if (pwm[0] && cur > 0) n_midword++;
      #(TSW - 510.0 - 0.2);
      for (int k = 0; k < 3; k++) check_pulse(k, cur);
      cur = nxt;
      @(posedge ck_sw[0]);
    end
    chk(code[3] == 7'd0,   "too-fast corner at code 0");
    chk(code[4] == 7'd127, "too-slow corner at code 127");
    // Accuracy target of the source design: error below 0.4 LSB at the
    // typical, fast and slow corners.
    for (int k = 0; k < 3; k++) begin
      $display("dut %0d worst width error %0.3f ns = %0.3f LSB", k, max_err[k], max_err[k] / LSB);
      chk(max_err[k] < 0.4 * LSB, $sformatf("dut %0d error %0.3f LSB above 0.4 LSB", k, max_err[k] / LSB));
    end

    // Low-power mode on modulator 0, dropped in the middle of a 400-LSB pulse.
    dword = 9'd400;
    @(posedge ck_sw[0]);
    @(posedge ck_sw[0]);
    begin
      logic [6:0] held;
      int sw_edges;
      #300 en[0] = 1'b0;
      #0.1 chk(pwm[0] == 1'b0, "pulse ended on entry to low-power mode");
      #5 held = code[0];
      sw_edges = 0;
      repeat (5) begin
        @(posedge ck_sw[0]); sw_edges++;
        #500 chk(pwm[0] == 1'b0 && code[0] == held, "low-power mode: output low, code kept");
      end
      chk(sw_edges == 5, "switching clock runs in low-power mode");
      n_pfm++;
      en[0] = 1'b1;
      @(posedge ck_sw[0]);
      #(TSW - 0.2);
      check_pulse(0, 400);
      n_wake++;
    end

    chk(n_pulse_ok > 40 && n_corner > 80, "pulses checked");
    chk(n_zero > 0,    "zero word seen");
    chk(n_midword > 0, "word changed during a pulse");
    chk(n_full > 0,    "word 511 seen");
    chk(n_dither > 0,  "DLL dither in lock");
    chk(n_over > 0,    "overrun seen");
    chk(n_under > 0,   "underrun seen");
    chk(n_pfm > 0 && n_wake > 0, "low-power mode entered and left");
    $display("mechanisms: pulses=%0d corner_pulses=%0d zero=%0d midword=%0d full=%0d dither=%0d overrun=%0d underrun=%0d pfm=%0d wake=%0d",
             n_pulse_ok, n_corner, n_zero, n_midword, n_full, n_dither, n_over, n_under, n_pfm, n_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
