// dll_idac: behavioural model of the DLL's current DAC (an analog block).
//
// The DAC is a current summer: binary-weighted legs of 1, 2, 4 ... 64 unit
// currents switched by the 7-bit DLL code, plus two trim legs of 28 and 40
// unit currents switched by ITRIM. Its output current I_CTRL is mirrored
// into every delay cell through the bias voltages VP and VN. The leg weights
// follow the source schematic; which trim bit switches which leg is not
// printed there, and ITRIM[0] -> 28, ITRIM[1] -> 40 is this design's choice.
//
// Model: i_ctrl = i_bias * (dac_in + 28*trim[0] + 40*trim[1]). VP and VN are
// not modelled as voltages: both ports carry the mirrored control current in
// microamperes, which is all the delay line model needs. The DAC is linear
// and instantaneous, as the source design reports it to be linear.
//
// Interface: dac_in[6:0] (DLL code), trim[1:0], i_bias (unit current in uA),
// vp / vn (control current in uA, for the PMOS and NMOS starving devices).
`timescale 1ns / 1ps
module dll_idac
  import dpwm_pkg::*;
(
  input  logic [N_DAC-1:0]  dac_in,
  input  logic [N_TRIM-1:0] trim,
  input  real               i_bias,
  output real               vp,
  output real               vn
);

  real units;

  always_comb begin
    units = real'(dac_in)
          + (trim[0] ? real'(TRIM0_WEIGHT) : 0.0)
          + (trim[1] ? real'(TRIM1_WEIGHT) : 0.0);
    vp = i_bias * units;
    vn = i_bias * units;
  end

endmodule
