// Self-checking test of one full-size tracker layer (25 FE chips, two
// controllers). The layer is split: chips 0-11 send to the left controller,
// chips 12-24 to the right one, set through FE control-register commands
// issued by both controllers. Random hit patterns are applied to the
// amplifier models; the trigger must reach both ends, and after trigger
// acknowledges, read events and tokens on both sides each controller's
// packet must hold exactly the hits of its chips, with left-end addresses
// chip x 64 + channel, in stream order. A calibration strobe sent by both
// controllers must produce hits on exactly the calibration-masked channels.
module tb_tracker_layer;
  import trk_pkg::*;
  localparam int SPLIT = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NFE-1:0][NCH-1:0][7:0] amp;
  logic cmd_l, cmd_r, trg_ack_l, trg_ack_r, trigger_l, trigger_r;
  logic token_in_l, token_out_l, data_in_l, data_out_l;
  logic token_in_r, token_out_r, data_in_r, data_out_r;
  logic [1:0] stalled, tot_timeout;
  logic [NFE-1:0] fe_right;

  tracker_layer dut (.clk, .rst_n, .layer_addr(5'd9), .amp,
    .cmd_l, .trg_ack_l, .trigger_l, .token_in_l, .token_out_l, .data_in_l, .data_out_l,
    .cmd_r, .trg_ack_r, .trigger_r, .token_in_r, .token_out_r, .data_in_r, .data_out_r,
    .stalled, .tot_timeout, .fe_right);

  cc_cmd_drv drv_l (.clk, .line(cmd_l));
  cc_cmd_drv drv_r (.clk, .line(cmd_r));
  pkt_mon mon_l (.clk, .line(data_out_l), .cksum_en(1'b1));
  pkt_mon mon_r (.clk, .line(data_out_r), .cksum_en(1'b0));

  int n_tok_l = 0, n_tok_r = 0;
  always @(negedge clk) if (rst_n) begin
    if (token_out_l) n_tok_l++;
    if (token_out_r) n_tok_r++;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic readout(int n);
    int t;
    fork
      drv_l.send(5'd9, CC_READ);
      drv_r.send(5'd9, CC_READ);
    join
    repeat (2000) @(negedge clk);
    @(negedge clk); token_in_l = 1; token_in_r = 1;
    @(negedge clk); token_in_l = 0; token_in_r = 0;
    t = 0;
    while ((n_tok_l < n || n_tok_r < n) && t < 5000) begin @(negedge clk); t++; end
    chk(n_tok_l == n && n_tok_r == n, "tokens passed on");
    repeat (5) @(negedge clk);
  endtask

  task automatic compare(logic [NFE-1:0][NCH-1:0] p, string tag);
    logic [WORD_W-1:0] el[$], er[$];
    for (int i = 0; i < SPLIT; i++)
      for (int c = NCH-1; c >= 0; c--) if (p[i][c]) el.push_back(WORD_W'(i*NCH + c));
    for (int i = NFE-1; i >= SPLIT; i--)
      for (int c = NCH-1; c >= 0; c--) if (p[i][c]) er.push_back(WORD_W'(i*NCH + c));
    chk(mon_l.pkts.size() == 1 && mon_r.pkts.size() == 1, {tag, ": one packet per side"});
    if (mon_l.pkts.size() == 1)
      chk(mon_l.pkts[0].hits == el && mon_l.pkts[0].cks_ok && mon_l.pkts[0].layer == 9,
          $sformatf("%s: left hits %0d vs %0d", tag, mon_l.pkts[0].nhits, el.size()));
    if (mon_r.pkts.size() == 1)
      chk(mon_r.pkts[0].hits == er && mon_r.pkts[0].layer == 9,
          $sformatf("%s: right hits %0d vs %0d", tag, mon_r.pkts[0].nhits, er.size()));
    mon_l.pkts.delete(); mon_r.pkts.delete();
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NFE-1:0][NCH-1:0] calm;

  initial begin
    cc_cr_t cl, cr;
    fe_cr_t f;
    amp = '0; trg_ack_l = 0; trg_ack_r = 0;
    token_in_l = 0; token_in_r = 0; data_in_l = 0; data_in_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);

    cl = '{nchips: 5'(SPLIT), cksum_en: 1'b1, xy_coinc: 1'b0, req_trig: 1'b0, spare: 2'b00};
    cr = '{nchips: 5'(NFE - SPLIT), cksum_en: 1'b0, xy_coinc: 1'b0, req_trig: 1'b0, spare: 2'b00};
    fork
      drv_l.send(5'd9, CC_LOAD_CR, 217'(cl));
      drv_r.send(5'd9, CC_LOAD_CR, 217'(cr));
    join
    // program every chip: masks, calibration charge above threshold,
    // direction by position; chips 0-11 through the left controller,
    // the others through the right one
    for (int i = 0; i < NFE; i++) begin
      calm[i] = NCH'(1) << (i % NCH) | NCH'(1) << ((5 * i + 3) % NCH);
      f = '{cal_mask: calm[i], trig_mask: '1, data_mask: '1, cal_dac: 7'd60,
            thr_dac: 7'd32, right: (i >= SPLIT)};
      if (i < SPLIT) drv_l.send(5'd9, CC_LOAD_FE_CR, {5'(i), f});
      else           drv_r.send(5'd9, CC_LOAD_FE_CR, {5'(i), f});
      repeat (5) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    chk(fe_right == {{(NFE-SPLIT){1'b1}}, {SPLIT{1'b0}}}, "layer split");
    // two control-register packets, one per side
    @(negedge clk); token_in_l = 1; token_in_r = 1;
    @(negedge clk); token_in_l = 0; token_in_r = 0;
    repeat (100) @(negedge clk);
    chk(mon_l.pkts.size() == 1 && mon_r.pkts.size() == 1 && mon_l.pkts[0].ctrl, "control packets");
    mon_l.pkts.delete(); mon_r.pkts.delete();

    for (int r = 0; r < 5; r++) begin
      logic [NFE-1:0][NCH-1:0] p;
      for (int i = 0; i < NFE; i++)
        for (int c = 0; c < NCH; c++) p[i][c] = ($urandom % 1000) < 8;
      if (r == 0) begin p = '0; p[NFE-1][0] = 1'b1; end   // far end of the right side
      if (r == 1) begin p = '0; p[0][63] = 1'b1; end      // far end of the left side
      @(negedge clk);
      for (int i = 0; i < NFE; i++)
        for (int c = 0; c < NCH; c++) amp[i][c] = p[i][c] ? 8'(40 + $urandom % 100) : 8'($urandom % 30);
      repeat (6) @(negedge clk);
      chk(trigger_l && trigger_r, "trigger at both ends");
      amp = '0;
      trg_ack_l = 1; trg_ack_r = 1;
      @(negedge clk); trg_ack_l = 0; trg_ack_r = 0;
      repeat (40) @(negedge clk);
      readout(2 + r);
      compare(p, $sformatf("event %0d", r));
    end

    // calibration strobe from both sides
    fork
      drv_l.send(5'd9, CC_CAL);
      drv_r.send(5'd9, CC_CAL);
    join
    repeat (20) @(negedge clk);
    chk(trigger_l && trigger_r, "calibration fires the trigger");
    trg_ack_l = 1; trg_ack_r = 1;
    @(negedge clk); trg_ack_l = 0; trg_ack_r = 0;
    repeat (40) @(negedge clk);
    readout(7);
    compare(calm, "calibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
