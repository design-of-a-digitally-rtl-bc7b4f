// dll: the 16-phase, mixed-signal delay-locked loop of the modulator.
//
// The loop makes sixteen delay cells together exactly one period of the
// 32 MHz reference long, so that their outputs split each reference period
// into sixteen equal steps whatever the process, supply and temperature.
// A flip-flop phase detector samples the line output on each reference edge;
// a 7-bit up/down counter, clocked by a slightly delayed copy of the
// reference, steps the code by one per cycle towards lock; a current DAC
// turns the code (plus two trim legs) into the control current; and the
// current-starved line's delay falls as that current rises. Locked, the code
// dithers over three neighbouring values (bang-bang loop; an edge needs a
// whole period to cross the line and sees the code change on the way). The
// single-flop detector misreads a line shorter than half a period (the code
// then runs to 127) and cannot tell two periods from one; the cell sizing
// and trims must keep the line between those limits. A clock gate in
// front of everything stops the loop in the low-power mode while the
// counter keeps the code, so the loop is at once back in lock on wake-up.
//
// Structure, pin names and the loop's sense follow the source design's
// block diagram and schematic. The schematic's CY_CHG counter pin has no
// described function and is left out. The DAC, delay line and skew buffer
// are behavioural models with real-valued currents.
//
// Interface: clk (32 MHz), rst_n (asynchronous, loads code 64), en
// (1 = run, 0 = gated), itrim (trim legs), i_bias (DAC unit current, uA);
// outputs ck_ref (gated reference), phases[15:0] (phase i lags ck_ref by
// (i+1)/16 of a period when locked), ck_fb, decr (detector output), code
// (DAC code), overrun / underrun (blocked requests at the code limits).
// Timing: the code moves at most one step per reference period.
`timescale 1ns / 1ps
module dll
  import dpwm_pkg::*;
#(
  parameter real X_PVT   = 1.0,
  parameter real CL_FF   = 286.458,
  parameter real SKEW_NS = 1.0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [N_TRIM-1:0]   itrim,
  input  real                 i_bias,
  output logic                ck_ref,
  output logic [N_PHASES-1:0] phases,
  output logic                ck_fb,
  output logic                decr,
  output logic [N_DAC-1:0]    code,
  output logic                overrun,
  output logic                underrun
);

  logic             clk1;
  logic [N_DAC-1:0] code_n;
  real              vp, vn;

  dll_clk_gate u_gate (
    .clk_in  (clk),
    .en      (en),
    .clk_out (ck_ref)
  );

  dll_skew_buf #(.SKEW_NS(SKEW_NS)) u_skew (
    .in  (ck_ref),
    .out (clk1)
  );

  dll_phase_detector u_pd (
    .clk_ref (ck_ref),
    .ck_fb   (ck_fb),
    .rst_n   (rst_n),
    .decr    (decr)
  );

  dll_updn_counter u_cnt (
    .clk       (clk1),
    .rst_n     (rst_n),
    .en        (en),
    .up_bar_dn (decr),
    .q         (code),
    .qn        (code_n),
    .overrun   (overrun),
    .underrun  (underrun)
  );

  dll_idac u_idac (
    .dac_in (code),
    .trim   (itrim),
    .i_bias (i_bias),
    .vp     (vp),
    .vn     (vn)
  );

  dll_icdl #(.X_PVT(X_PVT), .CL_FF(CL_FF)) u_icdl (
    .vp    (vp),
    .vn    (vn),
    .ck_in (ck_ref),
    .d     (phases),
    .ck_fb (ck_fb)
  );

endmodule
