// Self-checking test of io_control. Events are placed in two modelled
// event buffers; tokens are sent in, sometimes before an event is ready.
// Every packet on data_out is decoded and compared with the event (layer,
// hit count, control bits, ToT, hits, check-sum with and without cksum_en),
// the token must leave only after the packet, buffers must be released in
// order, a control-register packet must be sent when requested, and bits
// from the layer above must be forwarded while no packet is being sent.
module tb_io_control;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, cksum_en, token_in, token_out, data_in, data_out, ctrl_req;
  logic sending, holding_token;
  logic [ADDR_W-1:0] layer_addr;
  logic [1:0] buf_full, buf_release;
  evt_hdr_t buf_hdr [2];
  logic [WORD_W-1:0] buf_rd_data [2];
  logic [NHIT_W-1:0] buf_rd_addr;
  logic [CC_CR_W-1:0] ctrl_word;

  io_control dut (.*);
  pkt_mon mon (.clk, .line(data_out), .cksum_en);

  logic [WORD_W-1:0] mem [2][MAX_HITS];
  always_comb for (int b = 0; b < 2; b++) buf_rd_data[b] = mem[b][buf_rd_addr];

  int n_tok = 0, n_rel[2] = '{0, 0};
  always @(negedge clk) begin
    if (token_out && rst_n) n_tok++;
    for (int b = 0; b < 2; b++) if (buf_release[b] && rst_n) begin
      n_rel[b]++;
      buf_full[b] = 1'b0;
    end
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic fill(int b, int n, bit tr);
    for (int i = 0; i < n; i++) mem[b][i] = WORD_W'($urandom);
    buf_hdr[b] = '{ctrl: 1'b0, trunc: tr, nhits: NHIT_W'(n), tot: TOT_W'($urandom)};
    buf_full[b] = 1'b1;
  endtask

  task automatic token();
    @(negedge clk); token_in = 1;
    @(negedge clk); token_in = 0;
  endtask

  task automatic wait_tok(int n);
    int t;
    t = 0;
    while (n_tok < n && t < 3000) begin @(negedge clk); t++; end
    repeat (3) @(negedge clk);
  endtask

  task automatic cmp(int k, int b, string tag);
    if (mon.pkts[k].nhits != int'(buf_hdr[b].nhits) || mon.pkts[k].tot != int'(buf_hdr[b].tot)) $display("%s got n=%0d tot=%0d layer=%0d exp n=%0d tot=%0d", tag, mon.pkts[k].nhits, mon.pkts[k].tot, mon.pkts[k].layer, buf_hdr[b].nhits, buf_hdr[b].tot);
    chk(mon.pkts[k].layer == int'(layer_addr) && mon.pkts[k].nhits == int'(buf_hdr[b].nhits), {tag, " header"});
    chk(mon.pkts[k].ctrl == 1'b0 && mon.pkts[k].trunc == buf_hdr[b].trunc && mon.pkts[k].tot == int'(buf_hdr[b].tot), {tag, " control"});
    for (int i = 0; i < mon.pkts[k].nhits; i++) chk(mon.pkts[k].hits[i] == mem[b][i], {tag, " hit"});
    chk(mon.pkts[k].cks_ok, {tag, " check-sum"});
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; cksum_en = 0; token_in = 0; data_in = 0; ctrl_req = 0; ctrl_word = 0;
    layer_addr = 5'd19; buf_full = 0;
    buf_hdr[0] = '0; buf_hdr[1] = '0;
    for (int b = 0; b < 2; b++) for (int i = 0; i < MAX_HITS; i++) mem[b][i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);   // let the monitor settle after reset

    for (int r = 0; r < 12; r++) begin
      int b;
      cksum_en = r[1];
      b = r % 2;
      mon.pkts.delete();
      if (r % 3 == 0) begin
        token();                          // token first: it must wait
        repeat (20) @(negedge clk);
        chk(holding_token && n_tok == r && !sending, "token held");
        fill(b, $urandom % (MAX_HITS + 1), r[2]);
      end else begin
        fill(b, $urandom % (MAX_HITS + 1), r[2]);
        token();
      end
      wait_tok(r + 1);
      chk(n_tok == r + 1 && mon.pkts.size() == 1, $sformatf("one packet, one token %0d", r));
      if (mon.pkts.size() == 1) cmp(0, b, $sformatf("packet %0d", r));
      chk(n_rel[b] == r / 2 + 1 && !buf_full[b], "release");
    end

    // two events queued, two tokens
    mon.pkts.delete();
    fill(0, 5, 0); fill(1, 9, 1);
    token(); wait_tok(13);
    token(); wait_tok(14);
    chk(mon.pkts.size() == 2, "two packets");
    if (mon.pkts.size() == 2) begin
      cmp(0, 0, "first of two");
      cmp(1, 1, "second of two");
    end

    // control-register packet
    mon.pkts.delete();
    @(negedge clk); ctrl_word = 10'h2B5; ctrl_req = 1;
    @(negedge clk); ctrl_req = 0;
    token(); wait_tok(15);
    chk(mon.pkts.size() == 1, "control packet");
    if (mon.pkts.size() == 1)
      chk(mon.pkts[0].ctrl && mon.pkts[0].nhits == 1 && mon.pkts[0].hits[0] == 11'h2B5,
          "control packet contents");
    // forwarding while idle: data_out is data_in one clock later
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); data_in = 1'($urandom);
      @(posedge clk); #1;
      chk(data_out == data_in, "forwarding");
    end
    @(negedge clk); data_in = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
