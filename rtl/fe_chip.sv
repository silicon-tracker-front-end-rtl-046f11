// Digital part of the 64-channel front-end (FE) readout chip.
//
// Every chip listens to both controller chips of its layer: each controller
// drives a command line, a clock enable and a trigger acknowledge into it.
// The left/right bit of the 207-bit control register picks the controller
// the chip works for. Either controller may load the control register or
// reset the chip, so that a failed controller or chip can be worked around;
// the event commands (read event, end read event, clear event, calibration
// strobe, reset FIFO) and the trigger acknowledge are taken only from the
// selected side, and data shift only towards that side.
//
// Event path: discriminator outputs, enabled by the data mask, are caught in
// a sticky hit latch. A trigger acknowledge writes the latched hit map into
// an 8-deep FIFO (the event buffer RAM); a latch that sees no acknowledge
// within TRG_WINDOW clocks (1.6 us at 20 MHz) is cleared. Read event moves
// the oldest event into the output shift register, which then shifts once
// per enabled clock (see fe_out_shreg) until end read event. Clear event
// drops the oldest event unread.
//
// Trigger path: fe_trigger ORs the trigger-masked discriminators and chains
// the result to both neighbours without a clock.
//
// Interface timing: the command receivers and the output register advance
// only on clocks with the selected controller's clock enable high; the hit
// latch, the FIFO and the calibration strobe run on every clock, standing
// for the parts of the chip that work while its readout clock is stopped.
// The register layout, the two shift directions, the FIFO depth and the
// command list follow the tracker's chip description; the hit latch with
// its window, the mask polarity (1 = enabled), the reset values and the
// calibration strobe length (CAL_LEN clocks) are this design's choices.
module fe_chip
  import trk_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = FE_FIFO_D,
  parameter int unsigned CAL_LEN    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] chip_addr,
  // from the left controller
  input  logic              cmd_l,
  input  logic              clk_en_l,
  input  logic              trg_ack_l,
  // from the right controller
  input  logic              cmd_r,
  input  logic              clk_en_r,
  input  logic              trg_ack_r,
  // amplifiers and discriminators
  input  logic [NCH-1:0]    disc,
  output logic              cal_strobe,
  output logic [NCH-1:0]    cal_mask,
  output logic [DAC_W-1:0]  cal_dac,
  output logic [DAC_W-1:0]  thr_dac,
  // data shift register chain
  input  logic              data_in_l,
  input  logic              data_in_r,
  output logic              data_out_l,
  output logic              data_out_r,
  // trigger OR chain
  input  logic              trig_in_l,
  input  logic              trig_in_r,
  output logic              trig_out_l,
  output logic              trig_out_r,
  // status
  output fe_cr_t            cr,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic              reading
);

  localparam fe_cr_t CR_RESET = '{cal_mask: '1, trig_mask: '1, data_mask: '1,
                                  cal_dac: '0, thr_dac: 7'd32, right: 1'b0};

  // ---- command receivers ---------------------------------------------------
  logic              v_l, v_r;
  logic [ADDR_W-1:0] a_l, a_r;
  logic [CODE_W-1:0] c_l, c_r;
  logic [FE_CR_W-1:0] d_l, d_r;

  serial_cmd_rx #(.DATA_W(FE_CR_W), .FE_SET(1'b1)) u_rx_l (
    .clk, .rst_n, .en(clk_en_l), .sin(cmd_l),
    .valid(v_l), .addr(a_l), .code(c_l), .data(d_l));
  serial_cmd_rx #(.DATA_W(FE_CR_W), .FE_SET(1'b1)) u_rx_r (
    .clk, .rst_n, .en(clk_en_r), .sin(cmd_r),
    .valid(v_r), .addr(a_r), .code(c_r), .data(d_r));

  logic hit_l, hit_r;   // a command addressed to this chip has arrived
  assign hit_l = v_l && (a_l == chip_addr || a_l == BCAST);
  assign hit_r = v_r && (a_r == chip_addr || a_r == BCAST);

  // commands from the selected side
  logic              sel_v;
  logic [CODE_W-1:0] sel_c;
  logic              en, ack;
  assign sel_v = cr.right ? hit_r : hit_l;
  assign sel_c = cr.right ? c_r   : c_l;
  assign en    = cr.right ? clk_en_r  : clk_en_l;
  assign ack   = cr.right ? trg_ack_r : trg_ack_l;

  logic do_read, do_end, do_clear, do_cal, do_rfifo, do_reset;
  assign do_read  = sel_v && sel_c == FE_READ;
  assign do_end   = sel_v && sel_c == FE_END_READ;
  assign do_clear = sel_v && sel_c == FE_CLEAR;
  assign do_cal   = sel_v && sel_c == FE_CAL;
  assign do_rfifo = sel_v && sel_c == FE_RESET_FIFO;
  assign do_reset = (hit_l && c_l == FE_RESET) || (hit_r && c_r == FE_RESET);

  // ---- control register ----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            cr <= CR_RESET;
    else if (do_reset)                     cr <= CR_RESET;
    else if (hit_l && c_l == FE_LOAD_CR)   cr <= fe_cr_t'(d_l);
    else if (hit_r && c_r == FE_LOAD_CR)   cr <= fe_cr_t'(d_r);
  end

  assign cal_mask = cr.cal_mask;
  assign cal_dac  = cr.cal_dac;
  assign thr_dac  = cr.thr_dac;

  // ---- hit latch -----------------------------------------------------------
  logic [NCH-1:0] latch, hits_now;
  logic [$clog2(TRG_WINDOW+1)-1:0] win;
  logic clr_all;
  assign clr_all  = do_reset || do_rfifo;
  assign hits_now = latch | (disc & cr.data_mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch <= '0;
      win   <= '0;
    end else if (clr_all || ack) begin
      latch <= '0;
      win   <= '0;
    end else if (latch != '0 && win == ($clog2(TRG_WINDOW+1))'(TRG_WINDOW - 1)) begin
      latch <= '0;   // no acknowledge came: the hits are forgotten
      win   <= '0;
    end else begin
      latch <= hits_now;
      if (latch != '0) win <= win + 1'b1;
    end
  end

  // ---- event FIFO ----------------------------------------------------------
  logic [NCH-1:0] head;
  logic           f_empty, f_full, f_ovf, f_unf;

  sync_fifo #(.WIDTH(NCH), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .en(1'b1), .clr(clr_all),
    .push(ack), .din(hits_now),
    .pop(do_read || do_clear), .dout(head),
    .empty(f_empty), .full(f_full), .count(fifo_count),
    .ovf(f_ovf), .unf(f_unf));

  // ---- output shift register -----------------------------------------------
  logic sh_dout, sh_din;
  assign sh_din = cr.right ? data_in_l : data_in_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           reading <= 1'b0;
    else if (do_reset || do_end)          reading <= 1'b0;
    else if (do_read)                     reading <= 1'b1;
  end

  fe_out_shreg u_out (
    .clk, .rst_n,
    .clr(do_reset || do_end),
    .load(do_read),
    .hits(f_empty ? '0 : head),
    .en(en && reading),
    .din(sh_din),
    .dout(sh_dout));

  assign data_out_l = cr.right ? 1'b0 : sh_dout;
  assign data_out_r = cr.right ? sh_dout : 1'b0;

  // ---- calibration strobe ----------------------------------------------------
  logic [$clog2(CAL_LEN+1)-1:0] cal_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              cal_cnt <= '0;
    else if (do_cal)         cal_cnt <= ($clog2(CAL_LEN+1))'(CAL_LEN);
    else if (cal_cnt != '0)  cal_cnt <= cal_cnt - 1'b1;
  end
  assign cal_strobe = (cal_cnt != '0);

  // ---- trigger OR chain ------------------------------------------------------
  logic trig_local;
  fe_trigger u_trig (
    .disc, .trig_mask(cr.trig_mask), .trig_in_l, .trig_in_r,
    .trig_local, .trig_out_l, .trig_out_r);

endmodule
