// Hit counter of the controller chip: turns the serial FE data stream into
// a list of hit addresses.
//
// After a read-event command the FE chips of the layer form one long shift
// register whose stream reaches the controller one bit per clock, nearest
// chip first. Each chip contributes a single 0 when it has no hits, or a 1
// followed by its 64 hit bits (channel 63 first). The hit counter walks
// this stream for the number of chips set in the control register, and for
// every 1 among the hit bits writes the 11-bit address of the channel in the
// layer, chip x 64 + channel (25 x 64 = 1600 < 2048), into the event buffer
// chosen by the write pointer. Chips are numbered from the left end of the
// layer; a controller strapped as the right one (side = 1) counts its
// chips from the right end.
//
// An event ends when all chips are read, when MAX_HITS hits are stored (the
// readout is then cut short and marked truncated) or when truncate arrives
// (a new read-event command came first). The event's header, with the ToT
// entry taken at start, is then committed to the buffer and the write
// pointer moves to the other buffer. With req_trig set, an event this layer
// did not trigger is committed empty without reading the stream.
//
// Timing: start is a one-clock pulse in the clock before the first stream
// bit; one bit is taken per clock after that. ready tells the command
// decoder that a new readout may begin (idle and the next buffer free); the
// decoder holds read events back until then. done pulses when an event has
// been committed. Stream format and truncation follow the document; the
// address numbering and the empty event for req_trig are this design's.
module hit_counter
  import trk_pkg::*;
#(
  parameter int unsigned N_FE = NFE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              side,
  input  logic [ADDR_W-1:0] nchips,
  input  logic              req_trig,
  input  logic              start,
  input  logic              truncate,
  input  tot_entry_t        tot_in,
  input  logic              din,
  input  logic [1:0]        buf_full,
  output logic              ready,
  output logic              busy,
  output logic              done,
  output logic              wr_sel,
  output logic              wr_en,
  output logic [NHIT_W-1:0] wr_addr,
  output logic [WORD_W-1:0] wr_data,
  output logic              commit,
  output evt_hdr_t          commit_hdr
);

  typedef enum logic [1:0] {H_IDLE, H_HDR, H_BITS} state_e;
  state_e state;

  logic [ADDR_W-1:0] chip;       // chips read so far
  logic [5:0]        ch;         // channel of the bit arriving now
  logic [NHIT_W-1:0] n;
  tot_entry_t        tot_q;
  logic [ADDR_W-1:0] phys;

  assign busy  = (state != H_IDLE);
  assign ready = !busy && !buf_full[wr_sel];
  assign phys  = side ? ADDR_W'(N_FE - 1) - chip : chip;

  always_comb begin
    wr_en   = (state == H_BITS) && din && (32'(n) < MAX_HITS);
    wr_addr = n;
    wr_data = {phys, ch};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= H_IDLE;
      chip       <= '0;
      ch         <= '0;
      n          <= '0;
      tot_q      <= '0;
      wr_sel     <= 1'b0;
      commit     <= 1'b0;
      commit_hdr <= '0;
      done       <= 1'b0;
    end else begin
      commit <= 1'b0;
      done   <= 1'b0;
      if (clr) begin
        state  <= H_IDLE;
        wr_sel <= 1'b0;
      end else begin
        case (state)
          H_IDLE: if (start) begin
            chip  <= '0;
            n     <= '0;
            tot_q <= tot_in;
            if (nchips == '0 || (req_trig && !tot_in.trig)) begin
              commit     <= 1'b1;
              commit_hdr <= '{ctrl: 1'b0, trunc: 1'b0, nhits: '0, tot: tot_in.tot};
              done       <= 1'b1;
              wr_sel     <= ~wr_sel;
            end else begin
              state <= H_HDR;
            end
          end
          H_HDR: begin
            if (truncate) begin
              state      <= H_IDLE;
              commit     <= 1'b1;
              commit_hdr <= '{ctrl: 1'b0, trunc: 1'b1, nhits: n, tot: tot_q.tot};
              done       <= 1'b1;
              wr_sel     <= ~wr_sel;
            end else if (din) begin
              state <= H_BITS;
              ch    <= 6'd63;
            end else if (chip == nchips - 1'b1) begin
              state      <= H_IDLE;
              commit     <= 1'b1;
              commit_hdr <= '{ctrl: 1'b0, trunc: 1'b0, nhits: n, tot: tot_q.tot};
              done       <= 1'b1;
              wr_sel     <= ~wr_sel;
            end else begin
              chip <= chip + 1'b1;
            end
          end
          H_BITS: begin
            if (truncate || (din && 32'(n) == MAX_HITS)) begin
              // a new read event, or one hit more than the buffer holds
              state      <= H_IDLE;
              commit     <= 1'b1;
              commit_hdr <= '{ctrl: 1'b0, trunc: 1'b1, nhits: n, tot: tot_q.tot};
              done       <= 1'b1;
              wr_sel     <= ~wr_sel;
            end else begin
              if (din) n <= n + 1'b1;
              ch <= ch - 1'b1;
              if (ch == 6'd0) begin
                if (chip == nchips - 1'b1) begin
                  state      <= H_IDLE;
                  commit     <= 1'b1;
                  commit_hdr <= '{ctrl: 1'b0, trunc: 1'b0,
                                  nhits: din ? n + 1'b1 : n, tot: tot_q.tot};
                  done       <= 1'b1;
                  wr_sel     <= ~wr_sel;
                end else begin
                  chip  <= chip + 1'b1;
                  state <= H_HDR;
                end
              end
            end
          end
          default: state <= H_IDLE;
        endcase
      end
    end
  end

endmodule
