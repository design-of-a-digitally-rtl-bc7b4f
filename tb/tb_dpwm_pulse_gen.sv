// tb_dpwm_pulse_gen: self-checking test of the comparator and pulse flip-flops.
//
// The test bench itself provides ideal surroundings: a 32 MHz reference, a
// 5-bit count, the 1 MHz switching clock, and sixteen phases delayed by
// exactly (i+1)/16 of a reference period. For every duty word 0..511, one
// switching period each, the pulse must last D * 31.25/16 ns (to 1 ps) and a
// word of zero must give no pulse. A second pass stretches the phases so
// that tap 15 falls 125 ps after the next reference edge, and runs words
// that end in the last coarse slot followed by words that end on tap 15 of
// the first slot: the stale compare of the old period must not cut the new
// pulse short. Finally the enable is dropped during a
// pulse, which must end the pulse at once.
`timescale 1ns / 1ps
module tb_dpwm_pulse_gen;
  localparam real T = 31.25, LSB = T / 16.0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [4:0] cnt = 5'd31, end_count = '0;
  logic [3:0] end_phase = '0;
  logic ck_sw = 1'b0, pulse_en = 1'b0, ck_mux, pwm, cr, r_ff;
  logic [15:0] ph;
  logic [8:0] word, m1;
  int   checks = 0, failures = 0, n_pulses = 0;
  realtime t_rise, t_fall;
  int   seq [$] = '{200, 0, 16, 0, 32, 511, 16, 0, 24, 496, 31, 0, 1, 8, 9, 200};
  int   cur;
  real  w_exp;
  bit   rose;

  always #(T/2) clk = ~clk;
  // Transport delays (phases lag by up to a whole period). scale > 1 makes
  // the line a little longer than a period, as a DLL does while it dithers,
  // so tap 15 lands just after the next reference edge.
  logic [15:0] ph_r = '0;
  real  scale = 1.0;
  always @(clk) begin
    automatic logic v = clk;
    for (int i = 0; i < 16; i++) begin
      fork
        automatic int j = i;
        begin #((j + 1) * LSB * scale) ph_r[j] = v; end
      join_none
    end
  end
  assign ph = ph_r;
  assign ck_mux = ph[end_phase];

  // Ideal counter, divider and word register.
  always @(posedge clk) begin
    cnt   <= cnt + 1'b1;
    ck_sw <= (5'(cnt + 1'b1) < 5'd16);
    if (cnt == 5'd31) begin
      m1 = word - 9'd1;
      end_count <= m1[8:4];
      end_phase <= m1[3:0];
      pulse_en  <= (word != 0);
    end
  end

  dpwm_pulse_gen dut (.clk, .ck_sw, .ck_mux, .cnt, .end_count, .late_phase(end_phase[3]), .pulse_en, .en, .rst_n, .pwm, .cr, .r_ff);

  always @(posedge pwm) begin t_rise = $realtime; rose = 1; end
  always @(negedge pwm) begin t_fall = $realtime; n_pulses++; end

  realtime t_sw;
  always @(posedge ck_sw) t_sw = $realtime;

  initial begin
    word = 9'd0;
    t_rise = -1.0;
    #1 rst_n = 1'b0;
    #4 rst_n = 1'b1;
    // Period k runs word k; the next word is given in mid-period.
    @(posedge ck_sw);
    for (int k = 0; k < 512; k++) begin
      #510 word = (k < 511) ? 9'(k + 1) : 9'd200;
      #(1000.0 - 510.0 - 0.2);
      checks++;
      if (k == 0) begin
        if (t_rise >= t_sw || pwm) begin failures++; $display("FAIL word 0 gave a pulse"); end
      end else if (pwm || t_rise < t_sw - 0.001 || t_rise > t_sw + 0.001 ||
                   (t_fall - t_rise) > k * LSB + 0.0015 || (t_fall - t_rise) < k * LSB - 0.0015) begin
        failures++;
        $display("FAIL word %0d: width %0.4f ns, expected %0.4f", k, t_fall - t_rise, k * LSB);
      end
      @(posedge ck_sw);
    end
    // Second pass with tap 15 lagging the period edge by 125 ps. Words whose
    // pulse ends in the last slot (0 included, which ends its compare there)
    // are followed by words ending on tap 15 of slot 0; the late edge of
    // the old period must not end the new pulse. Word 200 runs first.
    scale = 1.004;
    for (int k = 0; k < seq.size() - 1; k++) begin
      cur = seq[k];
      #510 word = 9'(seq[k + 1]);
      #(1000.0 - 510.0 - 0.4);
      w_exp = real'((cur - 1) / 16) * T + real'((cur - 1) % 16 + 1) * LSB * scale;
      checks++;
      if (cur == 0) begin
        if (t_rise >= t_sw || pwm) begin failures++; $display("FAIL skewed: word 0 gave a pulse"); end
      end else if (pwm || t_rise < t_sw - 0.001 || t_rise > t_sw + 0.001 ||
                   (t_fall - t_rise) > w_exp + 0.0015 || (t_fall - t_rise) < w_exp - 0.0015) begin
        failures++;
        $display("FAIL skewed word %0d: width %0.4f ns, expected %0.4f", cur, t_fall - t_rise, w_exp);
      end
      @(posedge ck_sw);
    end
    // Word 200 now runs; drop the enable during the pulse.
    #100;
    #3 en = 1'b0;
    #0.01;
    checks++;
    if (pwm !== 1'b0) begin failures++; $display("FAIL disable did not end the pulse"); end
    @(posedge ck_sw);
    #2;
    checks++;
    if (pwm !== 1'b0) begin failures++; $display("FAIL pulse while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
