// dll_icdl: behavioural model of the current-controlled delay line (an analog
// block: a chain of current-starved, pseudo-symmetric buffers).
//
// Sixteen equal cells delay the reference clock; the output of cell i is
// phase d[i], so d[i] lags ck_in by (i+1) cell delays, and the last cell's
// output is also the feedback clock ck_fb for the phase detector. When the
// loop is locked, 16 cell delays equal one reference period and the phases
// are spaced T_REF/16 apart.
//
// The cell delay follows the current-starved buffer law of the source design,
// T_D = (VDD/2) * C_L / I_CTRL, scaled by X_PVT for the process, supply and
// temperature corner. With I_CTRL in uA and C_L in fF the result is in ns.
// The default load C_L = 286.458 fF is this design's calibration: it makes
// the typical line 31.25 ns long at the start code 64 with both trim legs on.
// The source design's fast-corner example (25.8 ns at code 64, settling near
// code 41) matches X_PVT = 0.8256 with the same law, and its slow corner
// (41 ns at code 64) matches X_PVT = 1.312. Rising and falling edges get the
// same delay: the pseudo-symmetric cells keep the two within about 18 ps,
// which is not modelled. The delay of an edge is set by the control current
// at the moment the edge enters a cell. The delay is inertial: a cell starved
// so far that its delay exceeds the clock's half period swallows the pulses,
// as a real starved cell does. A current below I_MIN_UA is clamped, so a zero
// code gives a long but finite delay.
//
// Interface: vp / vn (control current in uA, from the current DAC), ck_in,
// d[N_STAGES-1:0] (phases), ck_fb (last phase).
`timescale 1ns / 1ps
module dll_icdl
  import dpwm_pkg::*;
#(
  parameter int unsigned N_STAGES = N_PHASES,
  parameter real VDD_V    = 1.8,
  parameter real CL_FF    = 286.458,
  parameter real X_PVT    = 1.0,
  parameter real I_MIN_UA = 0.5
) (
  input  real                 vp,
  input  real                 vn,
  input  logic                ck_in,
  output logic [N_STAGES-1:0] d,
  output logic                ck_fb
);

  // Cell delay in ns for the present control current.
  function automatic real cell_delay(input real i_p, input real i_n);
    real i_ctrl;
    i_ctrl = 0.5 * (i_p + i_n);
    if (i_ctrl < I_MIN_UA) i_ctrl = I_MIN_UA;
    return X_PVT * 0.5 * VDD_V * CL_FF / i_ctrl;
  endfunction

  for (genvar i = 0; i < N_STAGES; i++) begin : g_cell
    logic cell_in;
    logic cell_out;
    if (i == 0) begin : g_first
      assign cell_in = ck_in;
    end else begin : g_next
      assign cell_in = g_cell[i-1].cell_out;
    end

    // The delay is re-evaluated from the present control current at every
    // input change.
    real dly;
    always_comb dly = cell_delay(vp, vn);
    assign #(dly) cell_out = cell_in;

    assign d[i] = cell_out;
  end

  assign ck_fb = d[N_STAGES-1];

endmodule
