// dll_skew_buf: behavioural model of the DLL's skew buffer (not synthesizable
// logic; an analog delay element).
//
// The buffer delays the gated reference clock by a fixed time and clocks the
// DLL's up/down counter with the result, so that the counter samples the
// phase detector after the detector has settled on the same reference edge.
// The source design shows the buffer and its place in the loop but gives no
// delay value; SKEW_NS = 1.0 ns is this design's choice, well under a DLL
// phase step (about 1.95 ns) and well over a flop's clock-to-output time.
//
// Interface: in (clock), out (the same clock, delayed by SKEW_NS).
// Timing: both edges delayed by SKEW_NS (an inertial delay: pulses shorter
// than SKEW_NS are swallowed, as by a real buffer).
`timescale 1ns / 1ps
module dll_skew_buf #(
  parameter real SKEW_NS = 1.0
) (
  input  logic in,
  output logic out
);

  assign #(SKEW_NS) out = in;

endmodule
