// tb_dll_updn_counter: self-checking test of the DLL's 7-bit up/down counter.
//
// Checks the reset code 64, single steps up and down, hold while disabled,
// the complement output, and the roll-over protection: a run of increments
// must stop at 127 with overrun flagged, a run of decrements stop at 0 with
// underrun flagged. Random traffic is compared against a saturating model.
`timescale 1ns / 1ps
module tb_dll_updn_counter;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, up_bar_dn = 1'b0;
  logic [6:0] q, qn;
  logic overrun, underrun;
  int   model, checks = 0, failures = 0;
  int   n_over = 0, n_under = 0;
  bit   exp_over, exp_under;

  always #5 clk = ~clk;

  dll_updn_counter dut (.clk, .rst_n, .en, .up_bar_dn, .q, .qn, .overrun, .underrun);

  task automatic step(input logic e, input logic dn);
    en = e; up_bar_dn = dn;
    @(posedge clk);
    exp_over = 0; exp_under = 0;
    if (e) begin
      if (dn) begin if (model == 0) exp_under = 1; else model--; end
      else    begin if (model == 127) exp_over = 1; else model++; end
    end
    #1;
    checks++;
    if (q !== 7'(model) || qn !== ~7'(model) || overrun !== exp_over || underrun !== exp_under) begin
      failures++;
      $display("FAIL t=%0t q=%0d qn=%0d ov=%0d un=%0d expected %0d ov=%0d un=%0d",
               $time, q, qn, overrun, underrun, model, exp_over, exp_under);
    end
    if (overrun)  n_over++;
    if (underrun) n_under++;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #12;
    checks++;
    if (q !== 7'd64) begin failures++; $display("FAIL reset value %0d", q); end
    model = 64;
    @(negedge clk) rst_n = 1'b1;
    repeat (5)  step(1'b0, 1'b0);            // disabled: hold
    repeat (80) step(1'b1, 1'b0);            // up to 127 and beyond
    repeat (140) step(1'b1, 1'b1);           // down to 0 and beyond
    repeat (10) step(1'b1, 1'b0);
    repeat (2000) step(($urandom % 8) != 0, ($urandom % 2) == 1);
    checks++;
    if (n_over < 10 || n_under < 10) begin
      failures++; $display("FAIL limits not exercised: %0d %0d", n_over, n_under);
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
