// dpwm_pkg: constants shared by the hybrid digital pulse width modulator.
//
// The modulator turns a 9-bit duty word into a pulse of DWORD * T_SW / 512
// inside each 1 MHz switching period. The five upper bits are counted in
// whole periods of the 32 MHz reference clock; the four lower bits pick one
// of the 16 phases of a delay-locked loop. The DLL trims its delay line with a
// 7-bit up/down counter that drives a current DAC with two trim legs.
// The bit split, the 32 MHz / 1 MHz clocks, the 7-bit counter with its
// start value of 64 and its limits 0 and 127, and the trim leg weights
// (28 and 40 unit currents) follow the source design. Nothing here is timing
// or state; the package only names the numbers.
`timescale 1ns / 1ps
package dpwm_pkg;

  // Duty word and its split into counter bits and DLL-phase bits.
  localparam int unsigned N_DPWM   = 9;
  localparam int unsigned N_COARSE = 5;
  localparam int unsigned N_FINE   = N_DPWM - N_COARSE;   // 4
  localparam int unsigned N_PHASES = 1 << N_FINE;          // 16 DLL phases

  // Reference periods per switching period (32 MHz / 1 MHz).
  localparam int unsigned REF_PER_SW = 1 << N_COARSE;      // 32

  // DLL control counter and current DAC.
  localparam int unsigned N_DAC     = 7;
  localparam int unsigned DAC_MAX   = (1 << N_DAC) - 1;    // 127
  localparam int unsigned DAC_RESET = 64;                  // start code
  localparam int unsigned N_TRIM    = 2;
  localparam int unsigned TRIM0_WEIGHT = 28;               // ITRIM[0] leg, unit currents
  localparam int unsigned TRIM1_WEIGHT = 40;               // ITRIM[1] leg, unit currents

  // Nominal clock periods in ns.
  localparam real T_REF_NS = 31.25;                        // 32 MHz
  localparam real T_SW_NS  = T_REF_NS * REF_PER_SW;        // 1000 ns

  typedef logic [N_DPWM-1:0]   dword_t;
  typedef logic [N_COARSE-1:0] coarse_t;
  typedef logic [N_FINE-1:0]   fine_t;
  typedef logic [N_DAC-1:0]    dac_code_t;
  typedef logic [N_TRIM-1:0]   trim_t;

endpackage
