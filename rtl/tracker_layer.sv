// One tracker layer: a row of N_FE front-end chips with a readout controller
// chip at each end.
//
// Data: the FE chips form a shift register that runs to either end; each
// chip's left/right control bit decides to which controller it sends, so a
// layer can be split anywhere between the two controllers and keep working
// with a failed chip or controller. The far end of each chain is fed 0.
// Trigger: the chips' triggers are ORed along the row in both directions
// and reach both controllers. Commands, clock enable and trigger acknowledge
// of each controller go to every FE chip. FE chip i has address i; the left
// controller is strapped side 0, the right one side 1.
//
// Each FE chip comes with the behavioural model of its amplifiers; their
// inputs, amp[chip][channel], are pulse heights in threshold-DAC steps.
// The token chains of the two sides are independent (one cable per side).
//
// The layer structure (two controllers, bidirectional data and trigger
// chains, bussed command/clock/acknowledge) follows the tracker's layer
// diagram; chip addresses and tying the chain ends to 0 are this design's
// choices.
module tracker_layer
  import trk_pkg::*;
#(
  parameter int unsigned N_FE = NFE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] layer_addr,
  input  logic [N_FE-1:0][NCH-1:0][7:0] amp,
  // left side
  input  logic              cmd_l,
  input  logic              trg_ack_l,
  output logic              trigger_l,
  input  logic              token_in_l,
  output logic              token_out_l,
  input  logic              data_in_l,
  output logic              data_out_l,
  // right side
  input  logic              cmd_r,
  input  logic              trg_ack_r,
  output logic              trigger_r,
  input  logic              token_in_r,
  output logic              token_out_r,
  input  logic              data_in_r,
  output logic              data_out_r,
  // status
  output logic [1:0]        stalled,
  output logic [1:0]        tot_timeout,
  output logic [N_FE-1:0]   fe_right
);

  // controller -> FE buses
  logic fcmd_l, fclk_l, fack_l, fcmd_r, fclk_r, fack_r;

  // FE chain nets: d_lo[i] = data leaving chip i to the left, etc.
  logic [N_FE-1:0] d_lo, d_ro, t_lo, t_ro;

  for (genvar i = 0; i < N_FE; i++) begin : g_fe
    logic [NCH-1:0]   disc, cal_mask;
    logic             cal_strobe;
    logic [DAC_W-1:0] cal_dac, thr_dac;
    fe_cr_t           cr;
    logic [$clog2(FE_FIFO_D+1)-1:0] fifo_count;
    logic             reading;

    fe_analog_model u_ana (
      .amp(amp[i]), .cal_strobe, .cal_mask, .cal_dac, .thr_dac, .disc);

    fe_chip u_fe (
      .clk, .rst_n, .chip_addr(ADDR_W'(i)),
      .cmd_l(fcmd_l), .clk_en_l(fclk_l), .trg_ack_l(fack_l),
      .cmd_r(fcmd_r), .clk_en_r(fclk_r), .trg_ack_r(fack_r),
      .disc, .cal_strobe, .cal_mask, .cal_dac, .thr_dac,
      .data_in_l (i == 0        ? 1'b0 : d_ro[(i == 0) ? 0 : i-1]),
      .data_in_r (i == N_FE - 1 ? 1'b0 : d_lo[(i == N_FE-1) ? i : i+1]),
      .data_out_l(d_lo[i]), .data_out_r(d_ro[i]),
      .trig_in_l (i == 0        ? 1'b0 : t_ro[(i == 0) ? 0 : i-1]),
      .trig_in_r (i == N_FE - 1 ? 1'b0 : t_lo[(i == N_FE-1) ? i : i+1]),
      .trig_out_l(t_lo[i]), .trig_out_r(t_ro[i]),
      .cr, .fifo_count, .reading);

    assign fe_right[i] = cr.right;
  end

  cc_cr_t cr_l, cr_r;
  logic [$clog2(TOT_FIFO_D+1)-1:0] totc_l, totc_r;

  controller_chip #(.N_FE(N_FE)) u_ctrl_l (
    .clk, .rst_n, .layer_addr, .side(1'b0),
    .cmd_in(cmd_l), .trg_ack_in(trg_ack_l), .trigger_out(trigger_l),
    .fe_trig_in(t_lo[0]), .fe_data_in(d_lo[0]),
    .fe_cmd(fcmd_l), .fe_clk_en(fclk_l), .fe_trg_ack(fack_l),
    .token_in(token_in_l), .token_out(token_out_l),
    .data_in(data_in_l), .data_out(data_out_l),
    .cr(cr_l), .stalled(stalled[0]), .tot_timeout(tot_timeout[0]),
    .tot_count(totc_l));

  controller_chip #(.N_FE(N_FE)) u_ctrl_r (
    .clk, .rst_n, .layer_addr, .side(1'b1),
    .cmd_in(cmd_r), .trg_ack_in(trg_ack_r), .trigger_out(trigger_r),
    .fe_trig_in(t_ro[N_FE-1]), .fe_data_in(d_ro[N_FE-1]),
    .fe_cmd(fcmd_r), .fe_clk_en(fclk_r), .fe_trg_ack(fack_r),
    .token_in(token_in_r), .token_out(token_out_r),
    .data_in(data_in_r), .data_out(data_out_r),
    .cr(cr_r), .stalled(stalled[1]), .tot_timeout(tot_timeout[1]),
    .tot_count(totc_r));

endmodule
