// Readout controller chip, one at each end of a tracker layer.
//
// Blocks, as in the controller block diagram:
//   trig_gate        trigger from the FE chips -> trigger out to the tower
//   tot_counter      time over threshold of each trigger
//   sync_fifo        FIFO for ToT, one entry per acknowledged trigger
//   ctrl_cmd_decode  global control, command decoding, FE commands/clock/ack
//   hit_counter      turns the FE data stream into a list of hit addresses
//   event_buffer x2  two events, filled and sent alternately
//   io_control       token-controlled packet output, data forwarding
//
// Flow of one event: a trigger from the layer starts the ToT count and goes
// out to the tower controller; the tower controller answers with a trigger
// acknowledge, which the controller passes to the FE chips (they store their
// hits) and which stores the ToT. A read-event command makes the controller
// read the FE chips' next event into a free event buffer together with the
// oldest ToT entry. When the token arrives the event leaves as a packet down
// the chain towards the tower controller and the token moves up.
//
// side is a strap: 0 for the controller at the left end of the layer, 1 at
// the right end. It only decides how chip positions are numbered in hit
// addresses. layer_addr is the layer's strapped 5-bit address. All logic is
// on one clock (20 MHz in the tracker).
//
// The block list and its connections follow the controller block diagram of
// the tracker; carrying the ToT in the event header (rather than straight to
// the I/O control), the ToT FIFO depth of 8 and the buffer stall are this
// design's choices.
module controller_chip
  import trk_pkg::*;
#(
  parameter int unsigned N_FE = NFE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] layer_addr,
  input  logic              side,
  // from the tower controller (bussed / per layer)
  input  logic              cmd_in,
  input  logic              trg_ack_in,
  output logic              trigger_out,
  // FE chips
  input  logic              fe_trig_in,
  input  logic              fe_data_in,
  output logic              fe_cmd,
  output logic              fe_clk_en,
  output logic              fe_trg_ack,
  // token chain
  input  logic              token_in,
  output logic              token_out,
  input  logic              data_in,
  output logic              data_out,
  // status
  output cc_cr_t            cr,
  output logic              stalled,
  output logic              tot_timeout,
  output logic [$clog2(TOT_FIFO_D+1)-1:0] tot_count
);

  logic soft_clr;

  // ---- trigger path ------------------------------------------------------------
  logic trig_s, trig_rise;
  trig_gate u_gate (.clk, .rst_n, .enable(1'b1), .trig_in(fe_trig_in),
                    .trig_out(trig_s), .trig_rise);
  assign trigger_out = trig_s;

  logic       tot_push;
  tot_entry_t tot_entry, tot_head;
  tot_counter u_tot (.clk, .rst_n, .clr(soft_clr), .trig(trig_s), .trig_rise,
                     .ack(trg_ack_in), .push(tot_push), .entry(tot_entry),
                     .timeout(tot_timeout));

  logic tot_pop, rd_start, tot_empty, tot_full, tot_ovf, tot_unf;
  sync_fifo #(.WIDTH($bits(tot_entry_t)), .DEPTH(TOT_FIFO_D)) u_tot_fifo (
    .clk, .rst_n, .en(1'b1), .clr(soft_clr),
    .push(tot_push), .din(tot_entry),
    .pop(tot_pop || rd_start), .dout(tot_head),
    .empty(tot_empty), .full(tot_full), .count(tot_count),
    .ovf(tot_ovf), .unf(tot_unf));

  // ---- command decoding -------------------------------------------------------
  logic ctrl_req, rd_trunc, hc_ready, hc_busy, hc_done;
  ctrl_cmd_decode u_dec (
    .clk, .rst_n, .layer_addr, .cmd_in, .trg_ack_in,
    .fe_cmd, .fe_clk_en, .fe_trg_ack,
    .cr, .soft_clr, .tot_pop, .ctrl_req, .rd_start, .rd_trunc,
    .hc_ready, .hc_busy, .hc_done, .stalled);

  // ---- hit counter and event buffers ----------------------------------------------
  logic              wr_sel, wr_en, commit;
  logic [NHIT_W-1:0] wr_addr, rd_addr;
  logic [WORD_W-1:0] wr_data;
  evt_hdr_t          commit_hdr;
  logic [1:0]        buf_full, buf_release;
  evt_hdr_t          buf_hdr [2];
  logic [WORD_W-1:0] buf_rd_data [2];

  hit_counter #(.N_FE(N_FE)) u_hc (
    .clk, .rst_n, .clr(soft_clr), .side, .nchips(cr.nchips),
    .req_trig(cr.req_trig), .start(rd_start), .truncate(rd_trunc),
    .tot_in(tot_empty ? '0 : tot_head), .din(fe_data_in), .buf_full,
    .ready(hc_ready), .busy(hc_busy), .done(hc_done),
    .wr_sel, .wr_en, .wr_addr, .wr_data, .commit, .commit_hdr);

  // commit is registered and the write pointer has already moved on: the
  // event just finished belongs to the other buffer
  for (genvar i = 0; i < 2; i++) begin : g_buf
    event_buffer u_buf (
      .clk, .rst_n, .clr(soft_clr),
      .wr_en(wr_en && wr_sel == 1'(i)), .wr_addr, .wr_data,
      .commit(commit && wr_sel != 1'(i)), .commit_hdr,
      .rd_addr, .rd_data(buf_rd_data[i]), .hdr(buf_hdr[i]),
      .full(buf_full[i]), .release_buf(buf_release[i]));
  end

  // ---- token chain --------------------------------------------------------------------
  logic sending, holding_token;
  io_control u_io (
    .clk, .rst_n, .clr(soft_clr), .layer_addr, .cksum_en(cr.cksum_en),
    .token_in, .token_out, .data_in, .data_out,
    .buf_full, .buf_hdr, .buf_rd_data, .buf_rd_addr(rd_addr),
    .buf_release, .ctrl_req, .ctrl_word(cr), .sending, .holding_token);

endmodule
