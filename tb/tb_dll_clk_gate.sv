// tb_dll_clk_gate: self-checking test of the DLL clock gate.
//
// The enable is toggled at random times, also while the clock is high. The
// gated clock must never be high while the input clock is low, must not
// change during a high phase of the input clock, and at each rising input
// edge must pass the pulse exactly when the enable was 1 just before it.
`timescale 1ns / 1ps
module tb_dll_clk_gate;
  logic clk_in = 1'b0, en = 1'b0, clk_out;
  logic en_before_edge, out_at_edge;
  int   checks = 0, failures = 0, n_pass = 0, n_block = 0, n_change_high = 0;

  always #5 clk_in = ~clk_in;

  dll_clk_gate dut (.clk_in, .en, .clk_out);

  // Random enable changes at times not aligned to the clock.
  initial begin
    #2.35;
    repeat (600) begin
      #(0.7 + ($urandom % 90) / 10.0);
      en = ~en;
      if (clk_in) n_change_high++;
    end
  end

  always @(posedge clk_in) begin
    en_before_edge = en;
    #0.01;
    out_at_edge = clk_out;
    checks++;
    if (clk_out !== en_before_edge) begin
      failures++; $display("FAIL t=%0t out=%0d en=%0d", $realtime, clk_out, en_before_edge);
    end
    if (clk_out) n_pass++; else n_block++;
  end

  // No change of the gated clock inside a high phase, none while clk_in low.
  always @(clk_out) begin
    #0;
    if (clk_in === 1'b0 && clk_out === 1'b1) begin
      checks++; failures++; $display("FAIL high while clock low t=%0t", $realtime);
    end
  end
  always @(negedge clk_in) begin
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL not low after falling edge"); end
  end
  initial begin
    forever begin
      @(posedge clk_in); #2.5;
      checks++;
      if (clk_out !== out_at_edge) begin failures++; $display("FAIL glitch in high phase t=%0t", $realtime); end
    end
  end

  initial begin
    #3500;
    checks++;
    if (n_pass == 0 || n_block == 0 || n_change_high == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", n_pass, n_block, n_change_high);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
