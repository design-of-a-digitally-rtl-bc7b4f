// dll_phase_detector: bang-bang phase detector of the delay-locked loop.
//
// A single D flip-flop samples the feedback clock (the reference clock after
// all 16 delay cells) on the rising edge of the reference clock. If the delay
// line is shorter than one reference period, the feedback clock has already
// risen when the reference edge arrives and the flop captures 1: "decrement",
// i.e. ask for less control current and so more delay. If the line is longer,
// it captures 0: "increment". The flop-as-detector and the sense of the output
// follow the source design; it also shows that a line shorter than half a
// period is misread as too long, which this circuit reproduces faithfully
// (the DLL is sized so that it never happens). The reset value 0 is this
// design's choice.
//
// Interface: clk_ref (gated reference clock), ck_fb (delay line output),
// rst_n (asynchronous, active low), decr (1 = decrement the control code).
// Timing: decr changes one clock-to-output after each rising edge of clk_ref.
`timescale 1ns / 1ps
module dll_phase_detector (
  input  logic clk_ref,
  input  logic ck_fb,
  input  logic rst_n,
  output logic decr
);

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) decr <= 1'b0;
    else        decr <= ck_fb;
  end

endmodule
