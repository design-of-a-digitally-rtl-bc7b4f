// tb_dpwm_full: one complete operation of the modulator at its default size.
//
// Reset, wait for the DLL to lock from code 64, then run 40 switching
// periods with a fixed list of duty words and random ones. Each pulse must
// start on the rising edge of the 1 MHz switching clock and last
// D * 1000/512 ns within half an LSB; word 0 must give no pulse.
`timescale 1ns / 1ps
module tb_dpwm_full;
  localparam real T = 31.25, LSB = T / 16.0, TSW = 1000.0;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b1;
  logic [8:0] dword = 9'd0;
  logic pwm, ck_sw, ovr, und;
  logic [6:0] code;
  int   checks = 0, failures = 0, cur, nxt;
  realtime t_r = -1.0, t_f = -1.0, t_sw;
  int   words [$];

  always #(T/2) clk = ~clk;

  dpwm_top dut (.clk, .rst_n, .en, .dword, .itrim(2'b11), .i_bias(1.0),
                .pwm, .ck_sw, .dll_code(code), .dll_overrun(ovr), .dll_underrun(und));

  always @(posedge pwm) t_r = $realtime;
  always @(negedge pwm) t_f = $realtime;
  always @(posedge ck_sw) t_sw = $realtime;

  initial begin
    real w;
    #1 rst_n = 1'b0;
    #40 rst_n = 1'b1;
    repeat (3) @(posedge ck_sw);
    checks++;
    if (code < 7'd60 || code > 7'd68 || ovr || und) begin
      failures++; $display("FAIL DLL code %0d after lock time", code);
    end
    words = '{0, 1, 8, 16, 100, 256, 300, 460, 511, 0, 255};
    repeat (29) words.push_back($urandom % 512);
    cur = 0;
    foreach (words[i]) begin
      nxt = words[i];
      #510 dword = 9'(nxt);
      #(TSW - 510.0 - 0.2);
      checks++;
      w = t_f - t_r;
      if (cur == 0) begin
        if (t_r >= t_sw || pwm) begin failures++; $display("FAIL word 0 gave a pulse"); end
      end else if (pwm || t_r < t_sw - 0.001 || t_r > t_sw + 0.001 ||
                   w < (cur - 0.5) * LSB || w > (cur + 0.5) * LSB) begin
        failures++;
        $display("FAIL word %0d: width %0.3f ns, expected %0.3f", cur, w, cur * LSB);
      end
      cur = nxt;
      @(posedge ck_sw);
    end
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
