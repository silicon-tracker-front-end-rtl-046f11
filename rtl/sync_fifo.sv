// Synchronous first-in first-out buffer with a show-ahead head.
//
// Used twice: as the FE chip's event buffer (eight 64-bit hit maps, written
// when a trigger is acknowledged and emptied by read-event or clear-event
// commands) and as the controller's FIFO of time-over-threshold values.
// The memory is a plain array (a RAM in silicon). dout always shows the
// oldest entry; pop removes it, push appends din. A push into a full FIFO
// and a pop from an empty one are ignored and flagged for one clock on ovf
// and unf. clr empties the buffer. All actions take place on the rising
// edge when en is high.
//
// The depth of 8 follows the tracker description; the show-ahead array
// structure and the ovf/unf flags are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     clr,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     ovf,
  output logic                     unf
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      ovf   <= 1'b0;
      unf   <= 1'b0;
    end else if (en) begin
      ovf <= push && !do_push;
      unf <= pop && empty;
      if (clr) begin
        wp    <= '0;
        rp    <= '0;
        count <= '0;
      end else begin
        if (do_push) wp <= inc(wp);
        if (do_pop)  rp <= inc(rp);
        count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
      end
    end else begin
      ovf <= 1'b0;
      unf <= 1'b0;
    end
  end

  always_ff @(posedge clk)
    if (en && !clr && do_push) mem[wp] <= din;

  // memory starts cleared so that a read of an unwritten entry is defined
  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

endmodule
