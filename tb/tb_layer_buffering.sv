// Buffering and truncation test of one full-size tracker layer (25 FE
// chips, two controllers, default parameters), read entirely from the left
// end, which is the reset setting of every chip.
//
// Eight triggers are acknowledged before any readout begins: each one must
// be held in the 8-deep FE event FIFOs and the 8-deep ToT FIFO. A ninth
// acknowledged trigger finds every FIFO full and must be lost in all of them
// alike. Then eight read events, each followed by a token, must return the
// eight events in order, each with the ToT of its trigger pulse (the pulse
// of event k lasts 4 + k clocks), and a ninth read must return an empty
// event. Event 3 carries 80 hits: its packet must stop at the 63 hits the
// 6-bit count can hold and carry the truncation bit, with the first 63
// addresses in stream order. Each packet's check-sum is verified.
module tb_layer_buffering;
  import trk_pkg::*;
  localparam int LAYER = 4, NEV = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NFE-1:0][NCH-1:0][7:0] amp;
  logic cmd_l, trg_ack_l, trigger_l, trigger_r, token_in_l, token_out_l, data_out_l;
  logic token_out_r, data_out_r;
  logic [1:0] stalled, tot_timeout;
  logic [NFE-1:0] fe_right;

  tracker_layer dut (.clk, .rst_n, .layer_addr(5'(LAYER)), .amp,
    .cmd_l, .trg_ack_l, .trigger_l, .token_in_l, .token_out_l, .data_in_l(1'b0), .data_out_l,
    .cmd_r(1'b0), .trg_ack_r(1'b0), .trigger_r, .token_in_r(1'b0), .token_out_r,
    .data_in_r(1'b0), .data_out_r, .stalled, .tot_timeout, .fe_right);

  cc_cmd_drv drv_l (.clk, .line(cmd_l));
  pkt_mon mon_l (.clk, .line(data_out_l), .cksum_en(1'b1));

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NEV:0][NFE-1:0][NCH-1:0] p;

  initial begin
    cc_cr_t cl;
    int t;
    amp = '0; trg_ack_l = 0; token_in_l = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    cl = '{nchips: 5'(NFE), cksum_en: 1'b1, xy_coinc: 1'b0, req_trig: 1'b0, spare: 2'b00};
    drv_l.send(5'(LAYER), CC_LOAD_CR, 217'(cl));
    repeat (20) @(negedge clk);
    @(negedge clk); token_in_l = 1;
    @(negedge clk); token_in_l = 0;
    repeat (100) @(negedge clk);
    chk(mon_l.pkts.size() == 1 && mon_l.pkts[0].ctrl, "control-register packet");
    mon_l.pkts.delete();

    // nine triggers, each acknowledged, no readout yet
    for (int k = 0; k <= NEV; k++) begin
      for (int i = 0; i < NFE; i++)
        for (int c = 0; c < NCH; c++) p[k][i][c] = ($urandom % 1000) < 10;
      p[k][k][k] = 1'b1;                            // never empty
      if (k == 3) p[k][1] = '1;                     // 64 + more hits
      if (k == 3) p[k][2][15:0] = '1;
      @(negedge clk);
      for (int i = 0; i < NFE; i++)
        for (int c = 0; c < NCH; c++) amp[i][c] = p[k][i][c] ? 8'd100 : 8'd0;
      repeat (4 + k) @(negedge clk);
      amp = '0;
      repeat (3) @(negedge clk);
      trg_ack_l = 1;
      @(negedge clk); trg_ack_l = 0;
      repeat (60) @(negedge clk);
    end
    chk(dut.g_fe[0].fifo_count == 4'(NEV) && dut.u_ctrl_l.tot_count == 4'(NEV),
        "eight events held in the FE and ToT FIFOs");

    // eight readouts, one token each
    for (int k = 0; k <= NEV; k++) begin
      logic [WORD_W-1:0] e[$];
      e.delete();
      if (k < NEV)
        for (int i = 0; i < NFE; i++)
          for (int c = NCH-1; c >= 0; c--) if (p[k][i][c]) e.push_back(WORD_W'(i*NCH + c));
      drv_l.send(5'(LAYER), CC_READ);
      repeat (1800) @(negedge clk);
      @(negedge clk); token_in_l = 1;
      @(negedge clk); token_in_l = 0;
      t = 0;
      while (mon_l.pkts.size() == 0 && t < 3000) begin @(negedge clk); t++; end
      repeat (5) @(negedge clk);
      chk(mon_l.pkts.size() == 1, $sformatf("event %0d: one packet", k));
      if (mon_l.pkts.size() == 1) begin
        if (e.size() > MAX_HITS) begin
          chk(mon_l.pkts[0].trunc && mon_l.pkts[0].nhits == MAX_HITS &&
              mon_l.pkts[0].hits == e[0:MAX_HITS-1], $sformatf("event %0d: truncated at 63", k));
        end else begin
          chk(!mon_l.pkts[0].trunc && mon_l.pkts[0].hits == e,
              $sformatf("event %0d: %0d hits vs %0d", k, mon_l.pkts[0].nhits, e.size()));
        end
        chk(mon_l.pkts[0].tot == (k < NEV ? 4 + k : 0),
            $sformatf("event %0d: ToT %0d", k, mon_l.pkts[0].tot));
        chk(mon_l.pkts[0].cks_ok && mon_l.pkts[0].layer == LAYER, "check-sum and layer");
      end
      mon_l.pkts.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
