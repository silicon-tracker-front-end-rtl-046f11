// Self-checking test of controller_chip with four real FE chips (all sending
// to this controller) whose discriminators are driven directly. Events are
// made by raising hit patterns for a random time, acknowledging them and
// reading them out with read-event commands and tokens. Each packet is
// decoded and compared with the hits, ToT (pulse length in clocks), trigger
// and truncation bits and check-sum worked out here. Also exercised: a
// trigger with no acknowledge (ToT timeout), an acknowledge for an event
// the layer did not trigger, a stall with both event buffers full, a read
// event that truncates the readout in progress, an event of more than 63
// hits, an FE control register loaded through the controller, and the
// require-trigger option.
module tb_controller_chip;
  import trk_pkg::*;
  localparam int NF = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_in, trg_ack_in, trigger_out, token_in, token_out, data_in, data_out;
  logic fe_cmd, fe_clk_en, fe_trg_ack;
  cc_cr_t cr;
  logic stalled, tot_timeout;
  logic [3:0] tot_count;
  logic [ADDR_W-1:0] layer_addr;

  logic [NF-1:0][NCH-1:0] disc;
  logic [NF-1:0] d_lo, d_ro, t_lo, t_ro;

  controller_chip #(.N_FE(NF)) dut (
    .clk, .rst_n, .layer_addr, .side(1'b0), .cmd_in, .trg_ack_in, .trigger_out,
    .fe_trig_in(t_lo[0]), .fe_data_in(d_lo[0]), .fe_cmd, .fe_clk_en, .fe_trg_ack,
    .token_in, .token_out, .data_in, .data_out,
    .cr, .stalled, .tot_timeout, .tot_count);

  for (genvar i = 0; i < NF; i++) begin : g_fe
    fe_cr_t fcr;
    logic [3:0] fc;
    logic rd, cs;
    logic [NCH-1:0] cm;
    logic [DAC_W-1:0] cd, td;
    fe_chip u_fe (
      .clk, .rst_n, .chip_addr(ADDR_W'(i)),
      .cmd_l(fe_cmd), .clk_en_l(fe_clk_en), .trg_ack_l(fe_trg_ack),
      .cmd_r(1'b0), .clk_en_r(1'b0), .trg_ack_r(1'b0),
      .disc(disc[i]), .cal_strobe(cs), .cal_mask(cm), .cal_dac(cd), .thr_dac(td),
      .data_in_l(i == 0 ? 1'b0 : d_ro[(i == 0) ? 0 : i-1]),
      .data_in_r(i == NF-1 ? 1'b0 : d_lo[(i == NF-1) ? i : i+1]),
      .data_out_l(d_lo[i]), .data_out_r(d_ro[i]),
      .trig_in_l(i == 0 ? 1'b0 : t_ro[(i == 0) ? 0 : i-1]),
      .trig_in_r(i == NF-1 ? 1'b0 : t_lo[(i == NF-1) ? i : i+1]),
      .trig_out_l(t_lo[i]), .trig_out_r(t_ro[i]),
      .cr(fcr), .fifo_count(fc), .reading(rd));
  end

  cc_cmd_drv drv (.clk, .line(cmd_in));
  pkt_mon mon (.clk, .line(data_out), .cksum_en(cr.cksum_en));

  // expected events
  typedef struct {
    logic [WORD_W-1:0] hits[$];
    int  tot;
    bit  trunc;
  } ev_t;
  ev_t exp_q[$];
  logic [NF-1:0][NCH-1:0] dmask;

  int n_tok = 0, n_stall = 0, n_timeout = 0;
  always @(negedge clk) if (rst_n) begin
    if (token_out) n_tok++;
    if (stalled) n_stall++;
    if (tot_timeout) n_timeout++;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // raise a hit pattern for len clocks; acknowledge it unless noack
  task automatic event_in(int dens, int len, bit noack, bit trig_expected = 1);
    logic [NF-1:0][NCH-1:0] p;
    ev_t e;
    for (int i = 0; i < NF; i++)
      for (int c = 0; c < NCH; c++) p[i][c] = ($urandom % 100) < dens;
    if (p == '0) p[0][5] = 1'b1;
    @(negedge clk); disc = p;
    repeat (len) @(negedge clk);
    disc = '0;
    if (!noack) begin
      repeat (3) @(negedge clk);
      trg_ack_in = 1;
      @(negedge clk); trg_ack_in = 0;
      for (int i = 0; i < NF; i++)
        for (int c = NCH-1; c >= 0; c--)
          if (p[i][c] && dmask[i][c]) e.hits.push_back(WORD_W'(i * NCH + c));
      e.tot = trig_expected ? len : 0;
      e.trunc = (e.hits.size() > MAX_HITS);
      while (e.hits.size() > MAX_HITS) void'(e.hits.pop_back());
      exp_q.push_back(e);
    end
    repeat (TRG_WINDOW + 8) @(negedge clk);
  endtask

  task automatic token();
    @(negedge clk); token_in = 1;
    @(negedge clk); token_in = 0;
  endtask

  task automatic wait_tokens(int n);
    int t;
    t = 0;
    while (n_tok < n && t < 20000) begin @(negedge clk); t++; end
    repeat (4) @(negedge clk);
  endtask

  // compare packet k with the expected event
  task automatic cmp(int k, ev_t e, string tag, bit trunc_any = 0);
    chk(mon.pkts[k].layer == int'(layer_addr) && !mon.pkts[k].ctrl, {tag, ": layer"});
    chk(mon.pkts[k].tot == e.tot, $sformatf("%s: tot %0d vs %0d", tag, mon.pkts[k].tot, e.tot));
    chk(mon.pkts[k].cks_ok, {tag, ": check-sum"});
    if (trunc_any) begin
      chk(mon.pkts[k].trunc, {tag, ": truncated"});
      for (int i = 0; i < mon.pkts[k].nhits; i++)
        chk(mon.pkts[k].hits[i] == e.hits[i], {tag, ": hit prefix"});
    end else begin
      chk(mon.pkts[k].trunc == e.trunc, {tag, ": trunc bit"});
      chk(mon.pkts[k].nhits == e.hits.size(), $sformatf("%s: nhits %0d vs %0d", tag, mon.pkts[k].nhits, e.hits.size()));
      chk(mon.pkts[k].hits == e.hits, {tag, ": hits"});
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cc_cr_t c;
    fe_cr_t f;
    layer_addr = 5'd6; trg_ack_in = 0; token_in = 0; data_in = 0; disc = '0;
    dmask = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);

    c = '{nchips: 5'(NF), cksum_en: 1'b1, xy_coinc: 1'b0, req_trig: 1'b0, spare: 2'b00};
    drv.send(5'd6, CC_LOAD_CR, 217'(c));
    repeat (5) @(negedge clk);
    token(); wait_tokens(1);                 // control-register packet
    chk(mon.pkts.size() == 1 && mon.pkts[0].ctrl && mon.pkts[0].hits[0] == 11'(c), "control packet");
    mon.pkts.delete();

    // FE control register of chip 2 through the controller: mask channels
    f = '{cal_mask: '0, trig_mask: '1, data_mask: ~64'hFF00, cal_dac: '0, thr_dac: 7'd32, right: 1'b0};
    drv.send(5'd6, CC_LOAD_FE_CR, {5'd2, f});
    repeat (240) @(negedge clk);
    chk(g_fe[2].fcr == f, "FE control register passed on");
    dmask[2] = f.data_mask;

    // plain events
    for (int r = 0; r < 6; r++) begin
      event_in(3, 4 + $urandom % 20, 0);
      chk(tot_count == 1, "ToT stored");
      drv.send(5'd6, CC_READ);
      repeat (300) @(negedge clk);
      token(); wait_tokens(2 + r);
      chk(mon.pkts.size() == 1, $sformatf("packet %0d", r));
      if (mon.pkts.size() == 1) cmp(0, exp_q[0], $sformatf("event %0d", r));
      void'(exp_q.pop_front()); mon.pkts.delete();
    end

    // trigger without acknowledge: timeout, nothing stored
    event_in(3, 10, 1);
    chk(n_timeout == 1 && tot_count == 0, "ToT timeout");

    // more than 63 hits
    event_in(40, 8, 0);
    drv.send(BCAST, CC_READ);
    repeat (400) @(negedge clk);
    token(); wait_tokens(8);
    if (mon.pkts.size() == 1) cmp(0, exp_q[0], "dense event");
    chk(mon.pkts.size() == 1 && mon.pkts[0].trunc && mon.pkts[0].nhits == MAX_HITS, "63-hit truncation");
    void'(exp_q.pop_front()); mon.pkts.delete();

    // three events, three reads, no token yet: third read stalls
    for (int r = 0; r < 3; r++) event_in(3, 5, 0);
    for (int r = 0; r < 3; r++) begin
      drv.send(5'd6, CC_READ);
      repeat (300) @(negedge clk);
    end
    chk(n_stall > 100, "stall with both buffers full");
    for (int r = 0; r < 3; r++) begin
      token(); wait_tokens(9 + r);
      repeat (300) @(negedge clk);
    end
    chk(mon.pkts.size() == 3, "three packets after stall");
    for (int k = 0; k < 3 && k < mon.pkts.size(); k++) cmp(k, exp_q[k], $sformatf("stalled event %0d", k));
    repeat (3) void'(exp_q.pop_front());
    mon.pkts.delete();

    // read event during a readout: first event truncated
    event_in(25, 5, 0);
    event_in(3, 5, 0);
    drv.send(5'd6, CC_READ);
    repeat (30) @(negedge clk);
    drv.send(5'd6, CC_READ);
    repeat (400) @(negedge clk);
    token(); wait_tokens(12);
    token(); wait_tokens(13);
    chk(mon.pkts.size() == 2, "two packets after truncation");
    if (mon.pkts.size() == 2) begin
      cmp(0, exp_q[0], "truncated by new read", 1);
      cmp(1, exp_q[1], "event after truncation");
    end
    repeat (2) void'(exp_q.pop_front());
    mon.pkts.delete();

    // require a trigger from this layer: an event triggered elsewhere
    c.req_trig = 1'b1;
    drv.send(5'd6, CC_LOAD_CR, 217'(c));
    repeat (5) @(negedge clk);
    token(); wait_tokens(14);
    mon.pkts.delete();
    repeat (3) @(negedge clk);
    trg_ack_in = 1;
    @(negedge clk); trg_ack_in = 0;
    repeat (10) @(negedge clk);
    drv.send(5'd6, CC_READ);
    repeat (300) @(negedge clk);
    token(); wait_tokens(15);
    chk(mon.pkts.size() == 1 && mon.pkts[0].nhits == 0 && mon.pkts[0].tot == 0,
        "event not triggered here reported empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
