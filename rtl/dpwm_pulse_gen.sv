// dpwm_pulse_gen: comparator and the two pulse flip-flops of the modulator.
//
// DFF_02 makes the output: the rising edge of the switching clock sets it,
// unless the duty word is zero (the output then stays low all period) or the
// modulator is disabled. The comparator is high while the coarse count equals
// the end count, i.e. for one reference period starting at a rising edge. A
// copy of it, re-timed on the falling reference edge, is high for the same
// length starting half a period later. CR is the direct compare when the end
// phase is one of the early phases 0..7 (they lag the reference edge by 1/16
// to 8/16 of a period) and the re-timed one for the late phases 8..15 (9/16 to
// 16/16). Either way the selected phase edge falls at least 1/16 period
// inside the window, never on a counter edge. The re-timed window of the
// last slot is cut at the period boundary, so that a phase-15 edge of the
// previous period, which may lag just past the boundary, cannot end the new
// pulse. DFF_01 samples CR on the
// selected DLL phase, ck_mux; when it captures a 1 its output R_FF clears
// DFF_02, which ends the pulse.
// With the pulse low, DFF_01 is held in reset, so R_FF is a short pulse and
// the next period's set is never blocked. Disabling the modulator (the
// low-power mode, in which the DLL phases stop) or the global reset clears
// the output at once.
//
// The set/compare/sample/reset sequence and the names CR, R_FF, DFF_01 and
// DFF_02 follow the source design; the half-period re-timed compare,
// clearing DFF_01 from the output, and the enable input are this design's
// choices. The reset loop R_FF -> DFF_02 ->
// DFF_01 is intended and is a short self-timed pulse, as in a phase-frequency
// detector.
//
// Interface: clk (32 MHz reference, ungated), ck_sw (period start), ck_mux
// (selected phase), cnt (coarse count), end_count, late_phase (end phase is
// 8..15), pulse_en (duty word not zero), en (1 = PWM mode), rst_n,
// pwm (output), cr, r_ff (internal strobes, for observation).
// Timing: pwm rises with ck_sw and falls on the first ck_mux edge while
// cnt == end_count; for the word D the pulse lasts D * T_REF / 16.
`timescale 1ns / 1ps
module dpwm_pulse_gen
  import dpwm_pkg::*;
(
  input  logic                clk,
  input  logic                ck_sw,
  input  logic                ck_mux,
  input  logic [N_COARSE-1:0] cnt,
  input  logic [N_COARSE-1:0] end_count,
  input  logic                late_phase,
  input  logic                pulse_en,
  input  logic                en,
  input  logic                rst_n,
  output logic                pwm,
  output logic                cr,
  output logic                r_ff
);

  localparam logic [N_COARSE-1:0] LAST = '1;

  logic clr, cr_early, cr_late, late_from_last;

  assign cr_early = (cnt == end_count);

  // The compare, delayed by half a reference period. A late compare taken in
  // the last slot of a period would reach into the first half of the next
  // one; late_from_last masks it there.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_late        <= 1'b0;
      late_from_last <= 1'b0;
    end else begin
      cr_late        <= cr_early;
      late_from_last <= (cnt == LAST);
    end
  end

  assign cr  = late_phase ? (cr_late && !(late_from_last && cnt == '0)) : cr_early;
  assign clr = r_ff || !en || !rst_n;

  // DFF_01: samples CR on the selected DLL phase; idle while the pulse is low.
  always_ff @(posedge ck_mux or negedge pwm) begin
    if (!pwm) r_ff <= 1'b0;
    else      r_ff <= cr;
  end

  // DFF_02: set by the switching clock, cleared by R_FF.
  always_ff @(posedge ck_sw or posedge clr) begin
    if (clr) pwm <= 1'b0;
    else     pwm <= pulse_en;
  end

endmodule
