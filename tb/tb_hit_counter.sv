// Self-checking test of hit_counter. Random events for a row of chips are
// turned into the FE stream here (0 for an empty chip, 1 + 64 bits channel
// 63 first otherwise) and fed one bit per clock after start. The addresses
// written, the buffer they go to, the committed header and the number of
// clocks the readout takes are compared with values worked out here, for
// the left and the right controller, for events above 63 hits (truncated),
// for a new read event arriving mid-way (truncated), for req_trig without
// a trigger of the layer, and for the ready/stall rule.
module tb_hit_counter;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, side, req_trig, start, truncate, din;
  logic [ADDR_W-1:0] nchips;
  tot_entry_t tot_in;
  logic [1:0] buf_full;
  logic ready, busy, done, wr_sel, wr_en, commit;
  logic [NHIT_W-1:0] wr_addr;
  logic [WORD_W-1:0] wr_data;
  evt_hdr_t commit_hdr;

  hit_counter dut (.*);

  logic [WORD_W-1:0] wr_got[$];
  int wr_buf[$];
  evt_hdr_t hdr_got[$];
  always @(posedge clk) begin
    if (wr_en) begin wr_got.push_back(wr_data); wr_buf.push_back(int'(wr_sel)); end
    if (commit) hdr_got.push_back(commit_hdr);
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // one readout; density in percent; cut_at >= 0 raises truncate then
  task automatic run(int n, bit s, int dens, bit rt, bit trg, int cut_at);
    logic [NCH-1:0] map [NFE];
    bit stream[$];
    logic [WORD_W-1:0] exp[$];
    bit exp_trunc;
    int nbits, cyc, sel0;
    tot_entry_t t;
    for (int k = 0; k < n; k++) begin
      int phys;
      phys = s ? NFE - 1 - k : k;
      map[k] = '0;
      if ($urandom % 100 < 60)
        for (int c = 0; c < NCH; c++) map[k][c] = ($urandom % 100) < dens;
      if (map[k] == '0) stream.push_back(1'b0);
      else begin
        stream.push_back(1'b1);
        for (int c = NCH-1; c >= 0; c--) begin
          stream.push_back(map[k][c]);
          if (map[k][c]) exp.push_back(WORD_W'(phys * NCH + c));
        end
      end
    end
    t = '{trig: trg, tot: TOT_W'($urandom)};
    exp_trunc = 1'b0;
    if (rt && !trg) begin exp.delete(); stream.delete(); end
    // expected cut: after MAX_HITS hits, the next hit ends the readout
    nbits = stream.size();
    if (exp.size() > MAX_HITS) begin
      exp_trunc = 1'b1;
      while (exp.size() > MAX_HITS) void'(exp.pop_back());
    end
    if (cut_at >= 0 && cut_at < nbits) begin
      // count the hits among the first cut_at bits
      int pos, hits;
      pos = 0; hits = 0;
      for (int k = 0; k < n && pos < cut_at; k++) begin
        pos++;
        if (map[k] != '0)
          for (int c = NCH-1; c >= 0 && pos < cut_at; c--) begin
            if (map[k][c]) hits++;
            pos++;
          end
      end
      if (hits < exp.size()) begin
        while (exp.size() > hits) void'(exp.pop_back());
        exp_trunc = 1'b1;
      end else if (!exp_trunc) cut_at = -1;
    end
    wr_got.delete(); wr_buf.delete(); hdr_got.delete();
    sel0 = int'(wr_sel);
    @(negedge clk);
    nchips = ADDR_W'(n); side = s; req_trig = rt; tot_in = t;
    chk(ready, "ready before start");
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done && cyc < 2000) begin
      din = (cyc < stream.size()) ? stream[cyc] : 1'b0;
      truncate = (cyc == cut_at);
      @(negedge clk);
      truncate = 0;
      cyc++;
    end
    @(posedge clk); #1;
    chk(hdr_got.size() == 1, "one commit");
    if (hdr_got.size() == 1) begin
      chk(hdr_got[0].nhits == NHIT_W'(exp.size()), $sformatf("nhits %0d vs %0d", hdr_got[0].nhits, exp.size()));
      chk(hdr_got[0].trunc == exp_trunc, "trunc bit");
      chk(hdr_got[0].tot == t.tot && !hdr_got[0].ctrl, "tot and ctrl bit");
    end
    chk(wr_got == exp, "hit addresses");
    foreach (wr_buf[i]) chk(wr_buf[i] == sel0, "buffer written");
    chk(int'(wr_sel) != sel0, "write pointer moved");
    // readout time: one clock per stream bit unless cut short
    if (!exp_trunc && !(rt && !trg) && n > 0)
      chk(cyc == stream.size(), $sformatf("clocks %0d for %0d bits", cyc, stream.size()));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; side = 0; req_trig = 0; start = 0; truncate = 0; din = 0;
    nchips = NFE; tot_in = '0; buf_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      run(1 + $urandom % NFE, r[0], 2, 0, 1, -1);          // sparse
    end
    for (int r = 0; r < 6; r++) run(NFE, r[0], 30, 0, 1, -1);       // > 63 hits
    for (int r = 0; r < 6; r++) run(NFE, 0, 3, 0, 1, 40 + 30 * r);  // new read
    run(NFE, 0, 5, 1, 0, -1);    // req_trig, layer did not trigger
    run(NFE, 1, 5, 1, 1, -1);    // req_trig, layer triggered
    run(0, 0, 5, 0, 1, -1);      // no chips
    // stall rule: ready follows the next buffer's full flag
    @(negedge clk);
    buf_full = 2'b11;
    #1 chk(!ready, "not ready with both buffers full");
    buf_full[wr_sel] = 1'b0;
    #1 chk(ready, "ready with the next buffer free");
    buf_full = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
