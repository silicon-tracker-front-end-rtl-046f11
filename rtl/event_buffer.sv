// One event buffer of the controller chip.
//
// The controller holds two of these and fills them alternately, so that one
// event can be sent up the token chain while the next is being clocked in
// from the FE chips. A buffer stores up to MAX_HITS 11-bit hit addresses in
// a small RAM, written one per clock by the hit counter, and the event's
// header (hit count, ToT and the two control bits), written by commit, which
// also marks the buffer full. The I/O controller reads hits by address
// (combinational read) and frees the buffer with release. clr empties it.
// The depth follows from the 6-bit hit-count field of the packet.
//
// The two buffers follow the tracker description; depth 63 (not the 64 hits
// the description also mentions) is this design's choice, forced by the
// 6-bit count.
module event_buffer
  import trk_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_HITS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     wr_en,
  input  logic [NHIT_W-1:0]        wr_addr,
  input  logic [WORD_W-1:0]        wr_data,
  input  logic                     commit,
  input  evt_hdr_t                 commit_hdr,
  input  logic [NHIT_W-1:0]        rd_addr,
  output logic [WORD_W-1:0]        rd_data,
  output evt_hdr_t                 hdr,
  output logic                     full,
  input  logic                     release_buf
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (wr_en && 32'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;

  assign rd_data = (32'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      hdr  <= '0;
    end else if (clr) begin
      full <= 1'b0;
    end else if (commit) begin
      full <= 1'b1;
      hdr  <= commit_hdr;
    end else if (release_buf) begin
      full <= 1'b0;
    end
  end

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

endmodule
