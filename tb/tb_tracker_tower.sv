// End-to-end test of the tower readout at reduced size (3 layers of 4 FE
// chips per side) with both token chains. It plays the tower controller:
// it sends commands, answers triggers with trigger acknowledges, sends read
// events and tokens, decodes the packet stream of each side and compares
// every packet with the hits applied to the amplifier models.
// Each mechanism of the design is made to happen and counted; one that
// never happens is a failure: trigger, ToT measurement, ToT timeout,
// acknowledge of an event other layers triggered, left/right split of a
// layer, calibration strobe, data forwarding through lower layers, a token
// that waits for its event, the stall with both event buffers full,
// truncation by a new read event, truncation at 63 hits, check-sum,
// control-register packet, clear event, FE clock command and controller reset.
module tb_tracker_tower;
  import trk_pkg::*;
  localparam int NL = 3, NF = 4, SPLIT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NL-1:0][NF-1:0][NCH-1:0][7:0] amp;
  logic cmd_l, cmd_r, token_in_l, token_in_r, data_out_l, data_out_r;
  logic token_top_l, token_top_r;
  logic [NL-1:0] trg_ack_l, trg_ack_r, trigger_l, trigger_r;
  logic [NL-1:0][1:0] stalled, tot_timeout;
  logic [NL-1:0][NF-1:0] fe_right;
  logic cks_l;

  tracker_tower #(.N_LAYERS(NL), .N_FE(NF)) dut (
    .clk, .rst_n, .amp,
    .cmd_l, .trg_ack_l, .trigger_l, .token_in_l, .data_out_l, .token_top_l, .data_top_l(1'b0),
    .cmd_r, .trg_ack_r, .trigger_r, .token_in_r, .data_out_r, .token_top_r, .data_top_r(1'b0),
    .stalled, .tot_timeout, .fe_right);

  cc_cmd_drv drv_l (.clk, .line(cmd_l));
  cc_cmd_drv drv_r (.clk, .line(cmd_r));
  pkt_mon mon_l (.clk, .line(data_out_l), .cksum_en(cks_l));
  pkt_mon mon_r (.clk, .line(data_out_r), .cksum_en(1'b0));

  // mechanism counters
  int n_trig = 0, n_tot = 0, n_timeout = 0, n_foreign = 0, n_split = 0, n_cal = 0;
  int n_fwd = 0, n_tokwait = 0, n_stall = 0, n_trunc_new = 0, n_trunc_63 = 0;
  int n_cks = 0, n_ctrl = 0, n_clear = 0, n_fe_clk = 0, n_reset = 0;
  int n_top_l = 0, n_top_r = 0;

  always @(negedge clk) if (rst_n) begin
    if (|trigger_l) n_trig++;
    if (|tot_timeout) n_timeout++;
    if (|stalled) n_stall++;
    if (token_top_l) n_top_l++;
    if (token_top_r) n_top_r++;
    if (dut.g_layer[0].u_layer.u_ctrl_l.u_io.holding_token &&
        !dut.g_layer[0].u_layer.u_ctrl_l.u_io.sending &&
        dut.g_layer[0].u_layer.u_ctrl_l.u_io.buf_full == 2'b00) n_tokwait++;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic both(logic [ADDR_W-1:0] a, logic [CODE_W-1:0] c,
                      logic [ADDR_W+FE_CR_W-1:0] dl = '0,
                      logic [ADDR_W+FE_CR_W-1:0] dr = '0);
    fork
      drv_l.send(a, c, dl);
      drv_r.send(a, c, dr);
    join
  endtask

  task automatic ack(logic [NL-1:0] m);
    @(negedge clk); trg_ack_l = m; trg_ack_r = m;
    @(negedge clk); trg_ack_l = '0; trg_ack_r = '0;
  endtask

  task automatic tokens_and_wait(int timeout = 20000);
    int t, l0, r0;
    l0 = n_top_l; r0 = n_top_r;
    @(negedge clk); token_in_l = 1; token_in_r = 1;
    @(negedge clk); token_in_l = 0; token_in_r = 0;
    t = 0;
    while ((n_top_l == l0 || n_top_r == r0) && t < timeout) begin @(negedge clk); t++; end
    chk(n_top_l == l0 + 1 && n_top_r == r0 + 1, "token through the tower");
    repeat (20) @(negedge clk);
  endtask

  // expected hit lists of one event per layer and side
  typedef logic [WORD_W-1:0] wq_t[$];
  wq_t exp_l [NL][$];
  wq_t exp_r [NL][$];
  int  exp_tot [NL][$];

  // apply pattern p (per layer) for len clocks
  task automatic apply(logic [NL-1:0][NF-1:0][NCH-1:0] p, int len, logic [NL-1:0] acked);
    @(negedge clk);
    for (int k = 0; k < NL; k++)
      for (int i = 0; i < NF; i++)
        for (int c = 0; c < NCH; c++)
          amp[k][i][c] = p[k][i][c] ? 8'(40 + $urandom % 100) : 8'($urandom % 30);
    repeat (len) @(negedge clk);
    amp = '0;
    repeat (4) @(negedge clk);
    if (acked != '0) ack(acked);
    for (int k = 0; k < NL; k++) if (acked[k]) begin
      wq_t el, er;
      for (int i = 0; i < SPLIT; i++)
        for (int c = NCH-1; c >= 0; c--) if (p[k][i][c]) el.push_back(WORD_W'(i*NCH + c));
      for (int i = NF-1; i >= SPLIT; i--)
        for (int c = NCH-1; c >= 0; c--) if (p[k][i][c]) er.push_back(WORD_W'(i*NCH + c));
      exp_l[k].push_back(el);
      exp_r[k].push_back(er);
      exp_tot[k].push_back(p[k] != '0 ? len : 0);
      if (p[k] == '0) n_foreign++;
    end
    repeat (TRG_WINDOW + 8) @(negedge clk);
  endtask

  // compare the packets of one read-out round (one per layer and side)
  task automatic check_round(string tag, bit allow_trunc = 0);
    chk(mon_l.pkts.size() == NL && mon_r.pkts.size() == NL, {tag, ": one packet per layer and side"});
    for (int k = 0; k < NL && k < mon_l.pkts.size() && k < mon_r.pkts.size(); k++) begin
      wq_t el, er;
      int  tt;
      el = exp_l[k].pop_front(); er = exp_r[k].pop_front(); tt = exp_tot[k].pop_front();
      chk(mon_l.pkts[k].layer == k && mon_r.pkts[k].layer == k, {tag, ": layer order"});
      if (k > 0) n_fwd++;
      chk(mon_l.pkts[k].tot == tt && mon_r.pkts[k].tot == tt, $sformatf("%s: ToT layer %0d", tag, k));
      if (mon_l.pkts[k].trunc) begin
        if (el.size() > MAX_HITS && mon_l.pkts[k].nhits == MAX_HITS) n_trunc_63++;
        else if (allow_trunc) n_trunc_new++;
        while (el.size() > mon_l.pkts[k].nhits) void'(el.pop_back());
      end
      chk(mon_l.pkts[k].hits == el, $sformatf("%s: left hits layer %0d (%0d vs %0d)", tag, k, mon_l.pkts[k].nhits, el.size()));
      if (mon_r.pkts[k].trunc) begin
        if (allow_trunc) n_trunc_new++;
        while (er.size() > mon_r.pkts[k].nhits) void'(er.pop_back());
      end
      chk(mon_r.pkts[k].hits == er, $sformatf("%s: right hits layer %0d", tag, k));
      chk(mon_l.pkts[k].cks_ok, {tag, ": check-sum"});
      if (cks_l) n_cks++;
      if (el.size() > 0 && er.size() > 0) n_split++;
    end
    mon_l.pkts.delete(); mon_r.pkts.delete();
  endtask

  function automatic logic [NL-1:0][NF-1:0][NCH-1:0] rnd(int permille, logic [NL-1:0] lay);
    logic [NL-1:0][NF-1:0][NCH-1:0] p;
    p = '0;
    for (int k = 0; k < NL; k++) if (lay[k]) begin
      for (int i = 0; i < NF; i++)
        for (int c = 0; c < NCH; c++) p[k][i][c] = ($urandom % 1000) < permille;
      p[k][0][7] = 1'b1; p[k][NF-1][9] = 1'b1;   // both sides hit
    end
    return p;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cc_cr_t cl, cr;
    fe_cr_t f;
    amp = '0; trg_ack_l = '0; trg_ack_r = '0; token_in_l = 0; token_in_r = 0; cks_l = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);

    // configuration: each layer split after chip SPLIT-1
    cl = '{nchips: 5'(SPLIT), cksum_en: 1'b1, xy_coinc: 1'b0, req_trig: 1'b0, spare: 2'b00};
    cr = '{nchips: 5'(NF - SPLIT), cksum_en: 1'b0, xy_coinc: 1'b0, req_trig: 1'b0, spare: 2'b00};
    cks_l = 1;
    both(BCAST, CC_LOAD_CR, 217'(cl), 217'(cr));
    repeat (5) @(negedge clk);
    tokens_and_wait();
    chk(mon_l.pkts.size() == NL && mon_l.pkts[NL-1].ctrl && mon_l.pkts[NL-1].hits[0] == 11'(cl),
        "control-register packets");
    if (mon_l.pkts.size() == NL && mon_l.pkts[0].ctrl) n_ctrl++;
    mon_l.pkts.delete(); mon_r.pkts.delete();
    for (int i = 0; i < NF; i++) begin
      f = '{cal_mask: NCH'(1) << (3 * i + 1), trig_mask: '1, data_mask: '1, cal_dac: 7'd70,
            thr_dac: 7'd32, right: (i >= SPLIT)};
      drv_l.send(BCAST, CC_LOAD_FE_CR, {5'(i), f});   // every layer, chip i
      repeat (5) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    chk(fe_right == {NL{{(NF-SPLIT){1'b1}}, {SPLIT{1'b0}}}}, "layers split");

    // plain events in all layers, one round each
    for (int r = 0; r < 3; r++) begin
      apply(rnd(10, '1), 5 + r * 7, '1);
      n_tot++;
      both(BCAST, CC_READ);
      repeat (600) @(negedge clk);
      tokens_and_wait();
      check_round($sformatf("round %0d", r));
    end

    // token before the event is ready (sent right after read event)
    apply(rnd(10, '1), 6, '1);
    both(BCAST, CC_READ);
    tokens_and_wait();
    check_round("early token");

    // trigger with no acknowledge: timeout, nothing stored
    apply(rnd(10, 3'b010), 8, '0);
    // event triggered only in layer 1, acknowledged everywhere
    apply(rnd(10, 3'b010), 8, '1);
    both(BCAST, CC_READ);
    repeat (600) @(negedge clk);
    tokens_and_wait();
    check_round("acknowledge for other layers");

    // over 63 hits on the left of layer 2
    begin
      logic [NL-1:0][NF-1:0][NCH-1:0] p;
      p = rnd(10, '1);
      p[2][0] = '1; p[2][1] = 64'hFFFF_0000_FFFF_0000;
      apply(p, 6, '1);
    end
    both(BCAST, CC_READ);
    repeat (600) @(negedge clk);
    tokens_and_wait();
    check_round("63 hits");

    // three events, three reads without tokens: stall
    for (int r = 0; r < 3; r++) apply(rnd(10, '1), 6, '1);
    for (int r = 0; r < 3; r++) begin both(BCAST, CC_READ); repeat (400) @(negedge clk); end
    for (int r = 0; r < 3; r++) begin
      tokens_and_wait();
      check_round($sformatf("after stall %0d", r));
      repeat (300) @(negedge clk);
    end

    // new read event during a readout: truncation
    begin
      logic [NL-1:0][NF-1:0][NCH-1:0] p;
      p = rnd(10, '1);
      p[0][0] = 64'hFFFF_FFFF_0000_0000 >> 30; p[0][1] = 64'h0FFF_0000_0000_0000;
      apply(p, 6, '1);
    end
    apply(rnd(10, '1), 6, '1);
    both(BCAST, CC_READ);
    repeat (20) @(negedge clk);
    both(BCAST, CC_READ);
    repeat (600) @(negedge clk);
    tokens_and_wait();
    check_round("truncated by new read", 1);
    tokens_and_wait();
    check_round("read after truncation");

    // calibration strobe on both sides
    both(BCAST, CC_CAL);
    for (int t = 0; t < 30 && !(&trigger_l && &trigger_r); t++) @(negedge clk);
    chk(&trigger_l && &trigger_r, "calibration fires every layer");
    if (&trigger_l) n_cal++;
    ack('1);
    for (int k = 0; k < NL; k++) begin
      wq_t el, er;
      el.delete(); er.delete();
      for (int i = 0; i < SPLIT; i++) el.push_back(WORD_W'(i*NCH + 3*i + 1));
      for (int i = NF-1; i >= SPLIT; i--) er.push_back(WORD_W'(i*NCH + 3*i + 1));
      exp_l[k].push_back(el); exp_r[k].push_back(er);
      exp_tot[k].push_back(-1);
    end
    repeat (50) @(negedge clk);
    both(BCAST, CC_READ);
    repeat (600) @(negedge clk);
    tokens_and_wait();
    for (int k = 0; k < NL && k < mon_l.pkts.size(); k++) begin
      exp_tot[k][0] = mon_l.pkts[k].tot;   // ToT of the calibration pulse: not checked
      chk(mon_l.pkts[k].tot >= 7, "calibration ToT");
    end
    check_round("calibration");

    // clear event: an acknowledged event is dropped unread
    apply(rnd(10, '1), 6, '1);
    both(BCAST, CC_CLEAR);
    repeat (30) @(negedge clk);
    chk(dut.g_layer[0].u_layer.u_ctrl_l.tot_count == 0 &&
        dut.g_layer[0].u_layer.g_fe[0].fifo_count == 0, "clear event");
    n_clear++;
    for (int k = 0; k < NL; k++) begin
      void'(exp_l[k].pop_back()); void'(exp_r[k].pop_back()); void'(exp_tot[k].pop_back());
    end

    // FE clock command
    drv_l.send(5'd1, CC_FE_CLK, 217'(1));
    repeat (3) @(negedge clk);
    chk(dut.g_layer[1].u_layer.fclk_l && !dut.g_layer[0].u_layer.fclk_l, "FE clock on in layer 1 only");
    if (dut.g_layer[1].u_layer.fclk_l) n_fe_clk++;
    drv_l.send(5'd1, CC_FE_CLK, 217'(0));
    repeat (3) @(negedge clk);
    chk(!dut.g_layer[1].u_layer.fclk_l, "FE clock off");

    // controller reset: back to 25 chips, pending ToT dropped
    apply(rnd(10, '1), 6, '1);
    both(BCAST, CC_RESET);
    repeat (30) @(negedge clk);
    chk(dut.g_layer[2].u_layer.u_ctrl_r.cr.nchips == 5'(NFE) &&
        dut.g_layer[2].u_layer.u_ctrl_r.tot_count == 0 &&
        dut.g_layer[2].u_layer.g_fe[3].fifo_count == 0, "controller reset");
    n_reset++;

    // every mechanism seen
    chk(n_trig > 0, "mechanism: trigger");
    chk(n_tot > 0, "mechanism: ToT measurement");
    chk(n_timeout > 0, "mechanism: ToT timeout");
    chk(n_foreign > 0, "mechanism: acknowledge of an event triggered elsewhere");
    chk(n_split > 0, "mechanism: layer split between controllers");
    chk(n_cal > 0, "mechanism: calibration strobe");
    chk(n_fwd > 0, "mechanism: forwarding through lower layers");
    chk(n_tokwait > 0, "mechanism: token waiting for its event");
    chk(n_stall > 0, "mechanism: stall with both buffers full");
    chk(n_trunc_new > 0, "mechanism: truncation by a new read event");
    chk(n_trunc_63 > 0, "mechanism: truncation at 63 hits");
    chk(n_cks > 0, "mechanism: check-sum");
    chk(n_ctrl > 0, "mechanism: control-register packet");
    chk(n_clear > 0 && n_fe_clk > 0 && n_reset > 0, "mechanism: clear, FE clock, reset");
    $display("mechanisms: trig=%0d tot=%0d timeout=%0d foreign=%0d split=%0d cal=%0d fwd=%0d tokwait=%0d stall=%0d trunc_new=%0d trunc_63=%0d cks=%0d ctrl=%0d",
             n_trig, n_tot, n_timeout, n_foreign, n_split, n_cal, n_fwd, n_tokwait, n_stall,
             n_trunc_new, n_trunc_63, n_cks, n_ctrl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
