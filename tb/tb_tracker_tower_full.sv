// Full-size run of the tower readout with every parameter at its default:
// 16 layers of 25 FE chips with a controller at each end. One complete
// operation: controllers configured (left reads chips 0-11, right chips
// 12-24, check-sum on the left), FE chips assigned to their side by
// commands through the left controllers, a random event in every layer,
// trigger, trigger acknowledge, read event, and one token up each side of
// the tower. The 16 packets of each side must arrive in layer order with
// exactly the hits applied.
module tb_tracker_tower_full;
  import trk_pkg::*;
  localparam int NL = 16, SPLIT = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NL-1:0][NFE-1:0][NCH-1:0][7:0] amp;
  logic cmd_l, cmd_r, token_in_l, token_in_r, data_out_l, data_out_r;
  logic token_top_l, token_top_r;
  logic [NL-1:0] trg_ack_l, trg_ack_r, trigger_l, trigger_r;
  logic [NL-1:0][1:0] stalled, tot_timeout;
  logic [NL-1:0][NFE-1:0] fe_right;

  tracker_tower dut (
    .clk, .rst_n, .amp,
    .cmd_l, .trg_ack_l, .trigger_l, .token_in_l, .data_out_l, .token_top_l, .data_top_l(1'b0),
    .cmd_r, .trg_ack_r, .trigger_r, .token_in_r, .data_out_r, .token_top_r, .data_top_r(1'b0),
    .stalled, .tot_timeout, .fe_right);

  cc_cmd_drv drv_l (.clk, .line(cmd_l));
  cc_cmd_drv drv_r (.clk, .line(cmd_r));
  pkt_mon mon_l (.clk, .line(data_out_l), .cksum_en(1'b1));
  pkt_mon mon_r (.clk, .line(data_out_r), .cksum_en(1'b0));

  int n_top_l = 0, n_top_r = 0;
  always @(negedge clk) if (rst_n) begin
    if (token_top_l) n_top_l++;
    if (token_top_r) n_top_r++;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NL-1:0][NFE-1:0][NCH-1:0] p;

  initial begin
    cc_cr_t cl, cr;
    fe_cr_t f;
    int t;
    amp = '0; trg_ack_l = '0; trg_ack_r = '0; token_in_l = 0; token_in_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);

    cl = '{nchips: 5'(SPLIT), cksum_en: 1'b1, xy_coinc: 1'b0, req_trig: 1'b0, spare: 2'b00};
    cr = '{nchips: 5'(NFE - SPLIT), cksum_en: 1'b0, xy_coinc: 1'b0, req_trig: 1'b0, spare: 2'b00};
    fork
      drv_l.send(BCAST, CC_LOAD_CR, 217'(cl));
      drv_r.send(BCAST, CC_LOAD_CR, 217'(cr));
    join
    for (int i = SPLIT; i < NFE; i++) begin
      f = '{cal_mask: '0, trig_mask: '1, data_mask: '1, cal_dac: '0, thr_dac: 7'd32, right: 1'b1};
      drv_l.send(BCAST, CC_LOAD_FE_CR, {5'(i), f});
    end
    repeat (300) @(negedge clk);
    chk(fe_right == {NL{{(NFE-SPLIT){1'b1}}, {SPLIT{1'b0}}}}, "every layer split");
    // the control-register packets of the LOAD_CR commands
    @(negedge clk); token_in_l = 1; token_in_r = 1;
    @(negedge clk); token_in_l = 0; token_in_r = 0;
    t = 0;
    while ((n_top_l < 1 || n_top_r < 1) && t < 5000) begin @(negedge clk); t++; end
    repeat (100) @(negedge clk);
    chk(mon_l.pkts.size() == NL && mon_r.pkts.size() == NL, "control packets from every layer");
    mon_l.pkts.delete(); mon_r.pkts.delete();

    // one event in every layer
    for (int k = 0; k < NL; k++)
      for (int i = 0; i < NFE; i++)
        for (int c = 0; c < NCH; c++) p[k][i][c] = ($urandom % 1000) < 6;
    @(negedge clk);
    for (int k = 0; k < NL; k++)
      for (int i = 0; i < NFE; i++)
        for (int c = 0; c < NCH; c++) amp[k][i][c] = p[k][i][c] ? 8'd90 : 8'd10;
    repeat (10) @(negedge clk);
    amp = '0;
    @(negedge clk); trg_ack_l = '1; trg_ack_r = '1;
    @(negedge clk); trg_ack_l = '0; trg_ack_r = '0;
    repeat (10) @(negedge clk);
    fork
      drv_l.send(BCAST, CC_READ);
      drv_r.send(BCAST, CC_READ);
    join
    repeat (1800) @(negedge clk);
    @(negedge clk); token_in_l = 1; token_in_r = 1;
    @(negedge clk); token_in_l = 0; token_in_r = 0;
    t = 0;
    while ((n_top_l < 2 || n_top_r < 2) && t < 50000) begin @(negedge clk); t++; end
    repeat (100) @(negedge clk);
    chk(mon_l.pkts.size() == NL && mon_r.pkts.size() == NL, "one packet per layer and side");
    for (int k = 0; k < NL && k < mon_l.pkts.size() && k < mon_r.pkts.size(); k++) begin
      logic [WORD_W-1:0] el[$], er[$];
      el.delete(); er.delete();
      for (int i = 0; i < SPLIT; i++)
        for (int c = NCH-1; c >= 0; c--) if (p[k][i][c]) el.push_back(WORD_W'(i*NCH + c));
      for (int i = NFE-1; i >= SPLIT; i--)
        for (int c = NCH-1; c >= 0; c--) if (p[k][i][c]) er.push_back(WORD_W'(i*NCH + c));
      chk(mon_l.pkts[k].layer == k && mon_r.pkts[k].layer == k, "layer order");
      chk(mon_l.pkts[k].hits == el && mon_l.pkts[k].cks_ok, $sformatf("left layer %0d", k));
      chk(mon_r.pkts[k].hits == er, $sformatf("right layer %0d", k));
      chk(mon_l.pkts[k].tot == 10 && mon_r.pkts[k].tot == 10 || p[k] == '0, "ToT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
