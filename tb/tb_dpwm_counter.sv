// tb_dpwm_counter: self-checking test of the coarse counter and divider.
//
// Checks after reset that the count runs 0..31 and wraps, that the switching
// clock is high for counts 0..15 and so has a period of exactly 32 reference
// periods (1 us), and that a duty word changed in mid-period is taken only at
// the wrap, stored as D-1 split into bits [8:4] and [3:0], with the non-zero
// flag.
`timescale 1ns / 1ps
module tb_dpwm_counter;
  localparam real T = 31.25;
  logic clk = 1'b0, rst_n = 1'b1, ck_sw, pulse_en;
  logic [8:0] dword = 9'd0;
  logic [4:0] cnt, end_count;
  logic [3:0] end_phase;
  int   checks = 0, failures = 0, exp_cnt = 0;
  logic [8:0] cur_word = 9'd0, exp_m1;
  realtime t_last_sw = 0;
  int   n_sw = 0;

  always #(T/2) clk = ~clk;

  dpwm_counter dut (.clk, .rst_n, .dword, .cnt, .ck_sw, .end_count, .end_phase, .pulse_en);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $realtime, msg); end
  endtask

  always @(posedge ck_sw) begin
    if (n_sw > 0) chk($realtime - t_last_sw > 999.9 && $realtime - t_last_sw < 1000.1, "ck_sw period 1 us");
    t_last_sw = $realtime;
    n_sw++;
  end

  initial begin
    #1 rst_n = 1'b0;
    #10;
    chk(cnt == 5'd31 && ck_sw == 1'b0 && pulse_en == 1'b0, "reset state");
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 32 * 40; c++) begin
      @(posedge clk);
      if (exp_cnt == 0) cur_word = dword;  // taken on the wrap edge
      #1;
      exp_m1 = cur_word - 9'd1;
      chk(int'(cnt) == exp_cnt, $sformatf("cnt %0d expected %0d", cnt, exp_cnt));
      chk(ck_sw == (exp_cnt < 16), "ck_sw level");
      chk(end_count == exp_m1[8:4] && end_phase == exp_m1[3:0] && pulse_en == (cur_word != 0),
          $sformatf("word register for %0d", cur_word));
      exp_cnt = (exp_cnt + 1) % 32;
      // New word at a random point of the period, away from the edges.
      if (($urandom % 7) == 0) begin
        #5 dword = 9'($urandom);
        if (($urandom % 6) == 0) dword = 9'd0;
      end
    end
    chk(n_sw >= 39, "switching clock ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
