// dpwm_phase_mux: 16-to-1 multiplexer that picks the DLL phase ending the pulse.
//
// The selected phase, ck_mux, clocks the flip-flop that samples the counter
// comparison; its rising edge inside the last counted reference period marks
// the end of the pulse. The source design names the multiplexer and its
// 16 inputs; the select comes from the duty-word register and only changes
// at the start of a switching period, while the pulse flip-flops are still
// idle, so a glitch of ck_mux at that instant is harmless.
//
// Interface: phases[15:0] (DLL phases), sel[3:0], ck_mux.
// Timing: combinational, no delay in simulation.
`timescale 1ns / 1ps
module dpwm_phase_mux
  import dpwm_pkg::*;
(
  input  logic [N_PHASES-1:0] phases,
  input  logic [N_FINE-1:0]   sel,
  output logic                ck_mux
);

  assign ck_mux = phases[sel];

endmodule
