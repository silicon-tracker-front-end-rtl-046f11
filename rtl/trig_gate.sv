// Trigger gate of the controller chip.
//
// The fast trigger of a layer is the OR of all its FE chips' discriminators
// and arrives without reference to the controller clock. The gate brings it
// into the clock domain with a two-flip-flop synchronizer, passes it on as
// the layer's trigger output to the tower controller while enable is high,
// and marks its rising edge for the time-over-threshold counter. The
// document names the gate but not its contents; synchronising and enabling
// is this design's reading of it. Latency: two clocks from trig_in to
// trig_out, three to trig_rise.
module trig_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic trig_in,
  output logic trig_out,
  output logic trig_rise
);

  logic s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else begin
      s1 <= trig_in & enable;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign trig_out  = s2;
  assign trig_rise = s2 & ~s3;

endmodule
