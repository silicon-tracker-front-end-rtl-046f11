// Trigger logic of one FE chip.
//
// The discriminator outputs of the 64 channels, each enabled by its bit of
// the trigger mask, are combined in a 64-input OR into the chip's own fast
// trigger. Two 2-input ORs add it to the trigger arriving from each
// neighbour and pass the result on to the other neighbour, so that the
// triggers of all chips of a layer reach both controller chips as one wide
// logical OR (up to 25 x 64 = 1600 inputs). The gate structure is that of
// the FE chip block diagram; the logic is purely combinational, as the
// trigger must reach the controller without waiting for a clock.
module fe_trigger
  import trk_pkg::*;
(
  input  logic [NCH-1:0] disc,
  input  logic [NCH-1:0] trig_mask,
  input  logic           trig_in_l,   // from the chip on the left
  input  logic           trig_in_r,   // from the chip on the right
  output logic           trig_local,
  output logic           trig_out_l,  // to the chip on the left
  output logic           trig_out_r   // to the chip on the right
);

  assign trig_local = |(disc & trig_mask);
  assign trig_out_r = trig_in_l | trig_local;
  assign trig_out_l = trig_in_r | trig_local;

endmodule
