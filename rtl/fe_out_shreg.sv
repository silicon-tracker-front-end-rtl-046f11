// Output register of one FE chip: a variable-length stage of the long shift
// register that runs through all FE chips of a layer.
//
// On load the chip's event is placed in the register. A chip with at least
// one hit presents 65 bits: a 1 followed by its 64 hit bits, channel 63
// first. A chip without hits presents a single 0, so the register collapses
// to one flip-flop. While en is high the register shifts by one bit per
// clock: dout is the bit at its head and din, the stream of the chips
// further away, enters at its tail. The stream seen by the controller is
// therefore the concatenation of all chips' frames, nearest chip first.
// clr returns the register to its idle state, a one-bit stage holding 0.
// Which neighbour feeds din and which receives dout is chosen outside, by
// the left/right bit of the control register. The 1-bit and 65-bit frame
// lengths follow the tracker's readout description; bit order and the
// collapsing register are this design's way of building it.
module fe_out_shreg
  import trk_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           load,
  input  logic [NCH-1:0] hits,
  input  logic           en,
  input  logic           din,
  output logic           dout
);

  logic [NCH:0] sr;      // 65-bit stage, sr[NCH] is its head
  logic         single;  // 1: the register is one flip-flop long
  logic         q1;      // the one-flip-flop stage

  assign dout = single ? q1 : sr[NCH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr     <= '0;
      single <= 1'b1;
      q1     <= 1'b0;
    end else if (clr) begin
      sr     <= '0;
      single <= 1'b1;
      q1     <= 1'b0;
    end else if (load) begin
      single <= (hits == '0);
      q1     <= 1'b0;
      sr     <= {1'b1, hits};
    end else if (en) begin
      if (single) q1 <= din;
      else        sr <= {sr[NCH-1:0], din};
    end
  end

endmodule
