// dll_updn_counter: 7-bit up/down counter that holds the state of the DLL.
//
// Each enabled clock it moves the code by one step: down when the phase
// detector reports decr = 1 (line too short), up when decr = 0 (line too
// long). The code drives the current DAC, so it is the whole memory of the
// loop; holding it while the clock is gated keeps the lock through the
// low-power pulse-frequency mode.
//
// Roll-over protection: at 127 an increment request and at 0 a decrement
// request are ignored, so the code saturates instead of wrapping. Such a
// blocked request is flagged for one clock on overrun or underrun. The
// saturation rule, the 7-bit width and the start code 64 follow the source
// design; the two flag outputs and the reset being asynchronous are this
// design's choices. Q and its complement QN are both brought out, as in the
// source schematic.
//
// Interface: clk (the skewed reference clock, so that decr is settled),
// rst_n (asynchronous, active low, loads 64), en (count enable),
// up_bar_dn (1 = count down), q / qn (code and its complement),
// overrun / underrun (a blocked request at the upper / lower limit).
// Timing: q changes one clock-to-output after each rising edge of clk.
`timescale 1ns / 1ps
module dll_updn_counter
  import dpwm_pkg::*;
#(
  parameter int unsigned WIDTH     = N_DAC,
  parameter int unsigned RESET_VAL = DAC_RESET
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             up_bar_dn,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] qn,
  output logic             overrun,
  output logic             underrun
);

  localparam logic [WIDTH-1:0] MAXV  = '1;
  localparam logic [WIDTH-1:0] MINV  = '0;
  localparam logic [WIDTH-1:0] RESETV = WIDTH'(RESET_VAL);

  logic at_max, at_min;
  assign at_max = (q == MAXV);
  assign at_min = (q == MINV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= RESETV;
      overrun  <= 1'b0;
      underrun <= 1'b0;
    end else if (en) begin
      overrun  <= !up_bar_dn && at_max;
      underrun <=  up_bar_dn && at_min;
      if (up_bar_dn) begin
        if (!at_min) q <= q - 1'b1;
      end else begin
        if (!at_max) q <= q + 1'b1;
      end
    end else begin
      overrun  <= 1'b0;
      underrun <= 1'b0;
    end
  end

  assign qn = ~q;

endmodule
