// Workload test of the largest tower side the 5-bit layer address allows:
// 31 layers, addresses 0 to 30, with address 31 left as the broadcast
// address. Each layer is cut down to 2 FE chips to keep the run short; the
// chain logic between layers does not depend on the chip count.
//
// A command addressed to layer 30 alone (FE clock on) must reach that layer
// and no other, while broadcast commands reach all 31. Then a random event in every layer is acknowledged and read
// with broadcast read events on both sides, and one token per side must
// return 31 packets in layer order, each with exactly its layer's hits.
module tb_tower_31_layers;
  import trk_pkg::*;
  localparam int NL = 31, NF = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NL-1:0][NF-1:0][NCH-1:0][7:0] amp;
  logic cmd_l, cmd_r, token_in_l, token_in_r, data_out_l, data_out_r;
  logic token_top_l, token_top_r;
  logic [NL-1:0] trg_ack_l, trg_ack_r, trigger_l, trigger_r;
  logic [NL-1:0][1:0] stalled, tot_timeout;
  logic [NL-1:0][NF-1:0] fe_right;

  tracker_tower #(.N_LAYERS(NL), .N_FE(NF)) dut (
    .clk, .rst_n, .amp,
    .cmd_l, .trg_ack_l, .trigger_l, .token_in_l, .data_out_l, .token_top_l, .data_top_l(1'b0),
    .cmd_r, .trg_ack_r, .trigger_r, .token_in_r, .data_out_r, .token_top_r, .data_top_r(1'b0),
    .stalled, .tot_timeout, .fe_right);

  cc_cmd_drv drv_l (.clk, .line(cmd_l));
  cc_cmd_drv drv_r (.clk, .line(cmd_r));
  pkt_mon mon_l (.clk, .line(data_out_l), .cksum_en(1'b0));
  pkt_mon mon_r (.clk, .line(data_out_r), .cksum_en(1'b0));

  // FE clock enable of each layer's left controller, for the address check
  logic [NL-1:0] fclk;
  for (genvar k = 0; k < NL; k++) begin : g_probe
    assign fclk[k] = dut.g_layer[k].u_layer.fclk_l;
  end

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NL-1:0][NF-1:0][NCH-1:0] p;

  initial begin
    cc_cr_t c1;
    fe_cr_t f;
    int t;
    amp = '0; trg_ack_l = '0; trg_ack_r = '0; token_in_l = 0; token_in_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);

    // every layer reads one chip per side; chip 1 is switched to the right
    c1 = '{nchips: 5'd1, cksum_en: 1'b0, xy_coinc: 1'b0, req_trig: 1'b0, spare: 2'b00};
    fork
      drv_l.send(BCAST, CC_LOAD_CR, 217'(c1));
      drv_r.send(BCAST, CC_LOAD_CR, 217'(c1));
    join
    f = '{cal_mask: '0, trig_mask: '1, data_mask: '1, cal_dac: '0, thr_dac: 7'd32, right: 1'b1};
    drv_r.send(BCAST, CC_LOAD_FE_CR, {5'd1, f});
    repeat (300) @(negedge clk);
    chk(fe_right == {NL{2'b10}}, "chip 1 of every layer sends right");
    // drain the broadcast control packets
    @(negedge clk); token_in_l = 1; token_in_r = 1;
    @(negedge clk); token_in_l = 0; token_in_r = 0;
    t = 0;
    while ((n_top_l < 1 || n_top_r < 1) && t < 5000) begin @(negedge clk); t++; end
    repeat (200) @(negedge clk);
    chk(mon_l.pkts.size() == NL && mon_r.pkts.size() == NL, $sformatf("broadcast reached all 31 layers %0d %0d", mon_l.pkts.size(), mon_r.pkts.size()));
    mon_l.pkts.delete(); mon_r.pkts.delete();

    // a command to layer 30 only: FE clock on, seen on that layer alone
    drv_l.send(5'd30, CC_FE_CLK, 217'(1));
    repeat (10) @(negedge clk);
    chk(fclk == NL'(1) << 30, $sformatf("FE clock on in layer 30 only: %b", fclk));
    drv_l.send(5'd30, CC_FE_CLK, 217'(0));
    repeat (10) @(negedge clk);
    chk(fclk == '0, "FE clock of layer 30 off again");

    for (int k = 0; k < NL; k++)
      for (int i = 0; i < NF; i++)
        for (int c = 0; c < NCH; c++) p[k][i][c] = ($urandom % 100) < 5;
    @(negedge clk);
    for (int k = 0; k < NL; k++)
      for (int i = 0; i < NF; i++)
        for (int c = 0; c < NCH; c++) amp[k][i][c] = p[k][i][c] ? 8'd90 : 8'd0;
    repeat (6) @(negedge clk);
    amp = '0;
    @(negedge clk); trg_ack_l = '1; trg_ack_r = '1;
    @(negedge clk); trg_ack_l = '0; trg_ack_r = '0;
    repeat (10) @(negedge clk);
    fork
      drv_l.send(BCAST, CC_READ);
      drv_r.send(BCAST, CC_READ);
    join
    repeat (200) @(negedge clk);
    @(negedge clk); token_in_l = 1; token_in_r = 1;
    @(negedge clk); token_in_l = 0; token_in_r = 0;
    t = 0;
    while ((n_top_l < 2 || n_top_r < 2) && t < 20000) begin @(negedge clk); t++; end
    repeat (200) @(negedge clk);
    chk(mon_l.pkts.size() == NL && mon_r.pkts.size() == NL, $sformatf("31 packets per side %0d %0d", mon_l.pkts.size(), mon_r.pkts.size()));
    for (int k = 0; k < NL && k < mon_l.pkts.size() && k < mon_r.pkts.size(); k++) begin
      logic [WORD_W-1:0] el[$], er[$];
      el.delete(); er.delete();
      for (int c = NCH-1; c >= 0; c--) if (p[k][0][c]) el.push_back(WORD_W'(c));
      for (int c = NCH-1; c >= 0; c--) if (p[k][1][c]) er.push_back(WORD_W'(NCH + c));
      chk(mon_l.pkts[k].layer == k && mon_r.pkts[k].layer == k, $sformatf("layer order %0d", k));
      chk(mon_l.pkts[k].hits == el && mon_r.pkts[k].hits == er, $sformatf("hits of layer %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
