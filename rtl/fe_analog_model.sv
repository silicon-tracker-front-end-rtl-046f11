// Behavioural model (not synthesizable logic in the real chip) of the analog
// part of one FE chip: 64 amplifiers with discriminators, the 7-bit
// calibration DAC and the 7-bit threshold DAC.
//
// The silicon-strip signal of each channel is given as an 8-bit pulse
// height in threshold-DAC steps, held for as long as the shaped pulse stays
// up. A channel's discriminator output is high while its pulse height,
// plus the calibration charge (the calibration DAC value) when the
// calibration strobe is on and the channel is in the calibration mask, is
// above the threshold DAC value. The output follows its input after a small
// delay, standing for the amplifier's response. The model only has to let
// the digital logic be exercised; gain, noise and shaping are not modelled.
//
// This is a behavioural model, not synthesizable logic: the real part is
// analog. Its ports follow the FE chip block diagram (64 inputs, threshold
// and calibration DACs, calibration mask); its transfer function is this
// design's stand-in.
module fe_analog_model
  import trk_pkg::*;
(
  input  logic [NCH-1:0][7:0] amp,
  input  logic                cal_strobe,
  input  logic [NCH-1:0]      cal_mask,
  input  logic [DAC_W-1:0]    cal_dac,
  input  logic [DAC_W-1:0]    thr_dac,
  output logic [NCH-1:0]      disc
);

  logic [NCH-1:0] d;

  always_comb
    for (int i = 0; i < NCH; i++)
      d[i] = (9'(amp[i]) + ((cal_strobe && cal_mask[i]) ? 9'(cal_dac) : 9'd0))
             > 9'(thr_dac);

  assign #1 disc = d;

endmodule
