// dll_clk_gate: glitch-free clock gate for the DLL.
//
// In the pulse-frequency (low-load) mode the converter does not use the
// modulator, and the whole DLL is stopped by gating its reference clock;
// its counter keeps the lock code meanwhile. The source design names the
// gate and its pins (CLK_IN, EN, CLK_OUT) but not its circuit. This one is
// the usual latch-and-AND cell: a latch that is open while the clock is low
// takes the enable, and the clock is ANDed with the latched enable, so the
// output only ever carries whole clock pulses. The latch is intended and is
// the reason for the latch warning a linter reports on this file.
//
// Interface: clk_in (32 MHz reference), en (1 = run, 0 = stop), clk_out.
// Timing: en is taken while clk_in is low; a change of en takes effect from
// the next rising edge of clk_in. clk_out has no delay in simulation.
`timescale 1ns / 1ps
module dll_clk_gate (
  input  logic clk_in,
  input  logic en,
  output logic clk_out
);

  logic en_lat;

  always_latch begin
    if (!clk_in) en_lat = en;
  end

  assign clk_out = clk_in & en_lat;

endmodule
