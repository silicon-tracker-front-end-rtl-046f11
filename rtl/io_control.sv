// I/O controller of the controller chip: token-controlled packet readout.
//
// The controller chips of one side of a tower form a daisy chain. The tower
// controller sends a token up the chain; data come back down it. A
// controller that holds the token sends one packet from its oldest full
// event buffer towards the tower controller and then passes the token up to
// the next layer. A token that arrives before an event is ready is kept
// until one is. At all other times the controller forwards, with one clock
// of delay, the bits arriving from the layer above, so that the packets of
// all layers reach the tower controller one after the other with arbitrary
// gaps between them.
//
// Packet: a start bit (1) and then 11-bit words, most significant bit first:
//   word 0  layer address (5 bits), number of hits n (6 bits)
//   word 1  control bits (2), time over threshold (9 bits); control bit 1
//           marks a control-register packet, control bit 2 a truncated event
//   n words hit addresses
//   check-sum, only when cksum_en is set
// The packet layout follows the document. The check-sum algorithm is not
// given there; this design sends the XOR of all preceding 11-bit words. A
// control-register packet (one word holding the 10-bit controller register
// after it has been loaded) is this design's use of control bit 1; it is
// sent ahead of pending events and uses a token like any packet.
//
// Interface: token_in and token_out are one-clock pulses; data_out is
// registered. release pulses for the buffer just sent.
module io_control
  import trk_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [ADDR_W-1:0] layer_addr,
  input  logic              cksum_en,
  // token chain
  input  logic              token_in,   // from the previous layer
  output logic              token_out,  // to the next layer
  input  logic              data_in,    // from the next layer
  output logic              data_out,   // to the previous layer
  // event buffers
  input  logic [1:0]        buf_full,
  input  evt_hdr_t          buf_hdr [2],
  input  logic [WORD_W-1:0] buf_rd_data [2],
  output logic [NHIT_W-1:0] buf_rd_addr,
  output logic [1:0]        buf_release,
  // control-register packet
  input  logic              ctrl_req,
  input  logic [CC_CR_W-1:0] ctrl_word,
  // status
  output logic              sending,
  output logic              holding_token
);

  typedef enum logic [1:0] {O_IDLE, O_START, O_WORDS} state_e;
  state_e state;

  logic              rd_sel;     // oldest full buffer
  logic              is_ctrl;    // the packet being sent is a control packet
  logic              ctrl_pend;
  logic [CC_CR_W-1:0] ctrl_q;
  evt_hdr_t          hdr;
  logic [6:0]        widx;       // word being sent
  logic [3:0]        bidx;       // bit of that word
  logic [6:0]        nwords;
  logic [WORD_W-1:0] word, cks;

  assign sending     = (state != O_IDLE);
  assign buf_rd_addr = NHIT_W'(widx - 7'd2);

  // word number widx of the packet being sent
  always_comb begin
    if (widx == 7'd0)
      word = {layer_addr, hdr.nhits};
    else if (widx == 7'd1)
      word = {hdr.ctrl, hdr.trunc, hdr.tot};
    else if (widx < 7'd2 + 7'(hdr.nhits))
      word = is_ctrl ? WORD_W'(ctrl_q) : buf_rd_data[rd_sel];
    else
      word = cks;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= O_IDLE;
      rd_sel        <= 1'b0;
      is_ctrl       <= 1'b0;
      ctrl_pend     <= 1'b0;
      ctrl_q        <= '0;
      hdr           <= '0;
      widx          <= '0;
      bidx          <= '0;
      nwords        <= '0;
      cks           <= '0;
      data_out      <= 1'b0;
      token_out     <= 1'b0;
      holding_token <= 1'b0;
      buf_release   <= '0;
    end else begin
      token_out   <= 1'b0;
      buf_release <= '0;
      if (ctrl_req) begin
        ctrl_pend <= 1'b1;
        ctrl_q    <= ctrl_word;
      end
      if (token_in) holding_token <= 1'b1;
      if (clr) begin
        state         <= O_IDLE;
        rd_sel        <= 1'b0;
        ctrl_pend     <= 1'b0;
        holding_token <= 1'b0;
        data_out      <= 1'b0;
      end else begin
        case (state)
          O_IDLE: begin
            data_out <= data_in;
            if (holding_token && (ctrl_pend || buf_full[rd_sel])) begin
              state   <= O_START;
              is_ctrl <= ctrl_pend;
              if (ctrl_pend) begin
                hdr       <= '{ctrl: 1'b1, trunc: 1'b0, nhits: NHIT_W'(1), tot: '0};
                nwords    <= 7'd3 + 7'(cksum_en);
                ctrl_pend <= ctrl_req;
              end else begin
                hdr    <= buf_hdr[rd_sel];
                nwords <= 7'd2 + 7'(buf_hdr[rd_sel].nhits) + 7'(cksum_en);
              end
            end
          end
          O_START: begin
            data_out <= 1'b1;
            widx     <= '0;
            bidx     <= 4'(WORD_W - 1);
            cks      <= '0;
            state    <= O_WORDS;
          end
          O_WORDS: begin
            data_out <= word[bidx];
            if (bidx == 4'd0) begin
              bidx <= 4'(WORD_W - 1);
              cks  <= cks ^ word;
              widx <= widx + 1'b1;
              if (widx == nwords - 1'b1) begin
                state         <= O_IDLE;
                token_out     <= 1'b1;
                holding_token <= token_in;
                if (!is_ctrl) begin
                  buf_release[rd_sel] <= 1'b1;
                  rd_sel              <= ~rd_sel;
                end
              end
            end else begin
              bidx <= bidx - 1'b1;
            end
          end
          default: state <= O_IDLE;
        endcase
      end
    end
  end

endmodule
