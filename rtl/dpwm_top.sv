// dpwm_top: 9-bit hybrid digital pulse width modulator for a 1 MHz buck
// converter.
//
// Each switching period the output pwm is high for DWORD/512 of the period,
// in steps of 1.953 ns, without any clock faster than 32 MHz. A 5-bit
// counter on the 32 MHz reference counts whole reference periods (the upper
// five bits of the word); a delay-locked loop splits each reference period
// into 16 equal phases, and a multiplexer picks the phase for the lower
// four bits. The counter also divides the reference down to the 1 MHz
// switching clock ck_sw, whose rising edge starts each pulse.
//
// In the converter's low-load pulse-frequency mode (en = 0) the DLL clock is
// gated, the DLL keeps its code, and pwm is held low; ck_sw keeps running.
// Blocks, bit split, clock rates and mode behaviour follow the source design;
// how the counter and phase select are aligned (through D-1, see
// dpwm_counter) and the capture of the word once per period are this
// design's choices. The DLL's analog parts are behavioural models, so this
// top simulates with real-valued delays (verilator --timing).
//
// Interface: clk (32 MHz reference), rst_n (asynchronous, active low),
// en (1 = PWM mode, 0 = PFM / low-power), dword[8:0] (duty word, taken at the
// start of each period), itrim[1:0] (DAC trim legs), i_bias (DAC unit
// current, uA); pwm (to the power-stage driver), ck_sw (1 MHz), dll_code
// (DLL control code), dll_overrun / dll_underrun (code limit reached with a
// request beyond it).
// Timing: a word set before the counter wraps is output in the next period;
// after reset the DLL needs about 45 reference periods to lock at the
// slow corner, fewer at the others.
`timescale 1ns / 1ps
module dpwm_top
  import dpwm_pkg::*;
#(
  parameter real X_PVT   = 1.0,
  parameter real CL_FF   = 286.458,
  parameter real SKEW_NS = 1.0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [N_DPWM-1:0] dword,
  input  logic [N_TRIM-1:0] itrim,
  input  real               i_bias,
  output logic              pwm,
  output logic              ck_sw,
  output logic [N_DAC-1:0]  dll_code,
  output logic              dll_overrun,
  output logic              dll_underrun
);

  logic                ck_mux, pulse_en;
  // Internal strobes of the DLL and the pulse generator, kept as named nets
  // for waveform debugging; nothing in the top reads them.
  logic                ck_ref, ck_fb, decr, cr, r_ff;
  logic [N_PHASES-1:0] phases;
  logic [N_COARSE-1:0] cnt, end_count;
  logic [N_FINE-1:0]   end_phase;

  dll #(.X_PVT(X_PVT), .CL_FF(CL_FF), .SKEW_NS(SKEW_NS)) u_dll (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .itrim    (itrim),
    .i_bias   (i_bias),
    .ck_ref   (ck_ref),
    .phases   (phases),
    .ck_fb    (ck_fb),
    .decr     (decr),
    .code     (dll_code),
    .overrun  (dll_overrun),
    .underrun (dll_underrun)
  );

  dpwm_counter u_counter (
    .clk       (clk),
    .rst_n     (rst_n),
    .dword     (dword),
    .cnt       (cnt),
    .ck_sw     (ck_sw),
    .end_count (end_count),
    .end_phase (end_phase),
    .pulse_en  (pulse_en)
  );

  dpwm_phase_mux u_mux (
    .phases (phases),
    .sel    (end_phase),
    .ck_mux (ck_mux)
  );

  dpwm_pulse_gen u_pulse (
    .clk       (clk),
    .ck_sw     (ck_sw),
    .ck_mux    (ck_mux),
    .cnt       (cnt),
    .end_count (end_count),
    .late_phase(end_phase[N_FINE-1]),
    .pulse_en  (pulse_en),
    .en        (en),
    .rst_n     (rst_n),
    .pwm       (pwm),
    .cr        (cr),
    .r_ff      (r_ff)
  );

endmodule
