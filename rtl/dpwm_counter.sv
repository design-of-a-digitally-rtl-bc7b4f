// dpwm_counter: coarse counter, switching-clock divider and duty-word
// register of the modulator.
//
// A free-running 5-bit counter on the 32 MHz reference divides it by 32. Its
// wrap from 31 to 0 starts each switching period: on that edge the 1 MHz
// switching clock ck_sw rises (it is high for counts 0..15, a 50 % clock) and
// the duty word is captured, so a word written in mid-period acts from the
// next period on and the pulse is never cut by a change of input.
//
// The captured word is stored as D-1 split into its upper five bits (the
// count at which the pulse ends) and its lower four bits (the DLL phase that
// ends it), plus a flag that the word is not zero. Storing D-1 is this
// design's choice: its phase i lags the reference by (i+1)/16 of a period, so
// D = 16*k + j ends at count (D-1)>>4 on phase (D-1)&15. (Phase 15 lags a
// whole period and so meets the next counter edge; the pulse generator
// handles that with a half-period re-timed compare.) The source
// design compares the count with D[8:4] and selects the phase with D[3:0];
// the arithmetic here gives the same pulse length, D * T_SW / 512.
// The reset values (count 31, ck_sw low, word 0) are this design's choices.
//
// Interface: clk (32 MHz, ungated, so ck_sw runs on in the low-power mode),
// rst_n (asynchronous), dword (duty word, any time), cnt (count), ck_sw,
// end_count / end_phase (D-1 split), pulse_en (captured word is not zero).
// Timing: everything changes on rising edges of clk; a word is taken on the
// edge where cnt wraps to 0.
`timescale 1ns / 1ps
module dpwm_counter
  import dpwm_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_DPWM-1:0]   dword,
  output logic [N_COARSE-1:0] cnt,
  output logic                ck_sw,
  output logic [N_COARSE-1:0] end_count,
  output logic [N_FINE-1:0]   end_phase,
  output logic                pulse_en
);

  localparam logic [N_COARSE-1:0] LAST = '1;

  logic [N_COARSE-1:0] cnt_next;
  logic [N_DPWM-1:0]   dword_m1;

  assign cnt_next = cnt + 1'b1;
  assign dword_m1 = dword - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= LAST;
      ck_sw     <= 1'b0;
      end_count <= '0;
      end_phase <= '0;
      pulse_en  <= 1'b0;
    end else begin
      cnt   <= cnt_next;
      ck_sw <= !cnt_next[N_COARSE-1];
      if (cnt == LAST) begin
        end_count <= dword_m1[N_DPWM-1:N_FINE];
        end_phase <= dword_m1[N_FINE-1:0];
        pulse_en  <= (dword != '0);
      end
    end
  end

endmodule
