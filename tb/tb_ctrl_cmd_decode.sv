// Self-checking test of ctrl_cmd_decode. Controller commands are sent on
// cmd_in; the FE command frames it produces are decoded by fe_cmd_mon and
// compared with the translation worked out here. The hit counter is
// modelled by the test (ready, busy, done). Checked: the control register,
// address match and broadcast, passing on an FE control register, calibration
// and reset commands, clear event with its ToT pop, read event with rd_start
// in the clock after the FE frame, the stall while the hit counter is not
// ready, truncation by a read event during a readout, end read event after
// done, the FE clock enable, the trigger acknowledge and the reset command.
module tb_ctrl_cmd_decode;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] layer_addr;
  logic cmd_in, trg_ack_in, fe_cmd, fe_clk_en, fe_trg_ack;
  cc_cr_t cr;
  logic soft_clr, tot_pop, ctrl_req, rd_start, rd_trunc;
  logic hc_ready, hc_busy, hc_done, stalled;

  ctrl_cmd_decode dut (.*);
  fe_cmd_mon mon (.clk, .rst_n, .line(fe_cmd));

  int n_rd = 0, n_trunc = 0, n_pop = 0, n_creq = 0, n_clr = 0, n_stall = 0;
  longint rd_at;
  bit clk_ok = 1;
  always @(negedge clk) if (rst_n) begin
    if (rd_start) begin n_rd++; rd_at = mon.cyc; end
    if (rd_trunc) n_trunc++;
    if (tot_pop) n_pop++;
    if (ctrl_req) n_creq++;
    if (soft_clr) n_clr++;
    if (stalled) n_stall++;
    if (fe_cmd && !fe_clk_en) clk_ok = 0;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic send(logic [ADDR_W-1:0] a, logic [CODE_W-1:0] c,
                      logic [ADDR_W+FE_CR_W-1:0] d = '0);
    bit b[$];
    b.push_back(1'b1);
    for (int i = ADDR_W-1; i >= 0; i--) b.push_back(a[i]);
    for (int i = CODE_W-1; i >= 0; i--) b.push_back(c[i]);
    for (int i = cc_data_len(c)-1; i >= 0; i--) b.push_back(d[i]);
    foreach (b[i]) begin @(negedge clk); cmd_in = b[i]; end
    @(negedge clk); cmd_in = 0;
  endtask

  task automatic settle();
    repeat (260) @(negedge clk);
  endtask

  task automatic expect_frame(logic [ADDR_W-1:0] a, logic [CODE_W-1:0] c,
                              logic [FE_CR_W-1:0] d, string tag);
    chk(mon.frames.size() == 1, {tag, ": one FE frame"});
    if (mon.frames.size() >= 1)
      chk(mon.frames[0].addr == a && mon.frames[0].code == c && mon.frames[0].data == d, {tag, ": frame"});
    mon.frames.delete();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cc_cr_t c;
    logic [FE_CR_W-1:0] fd;
    layer_addr = 5'd3; cmd_in = 0; trg_ack_in = 0;
    hc_ready = 1; hc_busy = 0; hc_done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    chk(cr.nchips == 5'(NFE), "reset value");

    c = '{nchips: 5'd12, cksum_en: 1'b1, xy_coinc: 1'b1, req_trig: 1'b0, spare: 2'b10};
    send(5'd3, CC_LOAD_CR, 217'(c));
    settle();
    chk(cr == c && n_creq == 1, "load control register");
    send(5'd4, CC_LOAD_CR, 217'(0));
    settle();
    chk(cr == c, "other layer ignored");
    c.nchips = 5'd25;
    send(BCAST, CC_LOAD_CR, 217'(c));
    settle();
    chk(cr == c, "broadcast");

    for (int i = 0; i < FE_CR_W; i += 32) fd[i +: 32] = $urandom;
    send(5'd3, CC_LOAD_FE_CR, {5'd17, fd});
    settle();
    expect_frame(5'd17, FE_LOAD_CR, fd, "FE control register");
    send(5'd3, CC_CAL);
    settle();
    expect_frame(BCAST, FE_CAL, '0, "calibration");
    send(5'd3, CC_FE_RESET);
    settle();
    expect_frame(BCAST, FE_RESET, '0, "FE reset");
    send(5'd3, CC_CLEAR);
    settle();
    expect_frame(BCAST, FE_CLEAR, '0, "clear event");
    chk(n_pop == 1, "ToT pop on clear");

    // read event, hit counter ready
    send(5'd3, CC_READ);
    repeat (16) @(negedge clk);
    expect_frame(BCAST, FE_READ, '0, "read event");
    chk(n_rd == 1, "rd_start once");
    hc_busy = 1; hc_ready = 0;
    repeat (50) @(negedge clk);
    chk(fe_clk_en, "FE clock on during readout");
    hc_busy = 0; hc_done = 1;
    @(negedge clk); hc_done = 0; hc_ready = 1;
    settle();
    expect_frame(BCAST, FE_END_READ, '0, "end read after done");
    chk(!fe_clk_en, "FE clock off when idle");

    // stall: read event while both buffers are full
    hc_ready = 0;
    send(5'd3, CC_READ);
    repeat (100) @(negedge clk);
    chk(mon.frames.size() == 0 && n_stall > 50, "read held back while not ready");
    hc_ready = 1;
    repeat (20) @(negedge clk);
    expect_frame(BCAST, FE_READ, '0, "read after stall");
    chk(n_rd == 2, "second rd_start");

    // read event during a readout: truncation, end read, new read
    hc_busy = 1; hc_ready = 0;
    send(5'd3, CC_READ);
    repeat (3) @(negedge clk);
    chk(n_trunc == 1, "truncate");
    hc_busy = 0; hc_done = 1;
    @(negedge clk); hc_done = 0; hc_ready = 1;
    settle();
    chk(mon.frames.size() == 2, "end read and read");
    if (mon.frames.size() == 2)
      chk(mon.frames[0].code == FE_END_READ && mon.frames[1].code == FE_READ, "order");
    mon.frames.delete();
    chk(n_rd == 3, "third rd_start");

    // rd_start timing: high in the clock after the one in which the last
    // bit of the read frame is on the line
    begin
      longint last;
      send(5'd3, CC_READ);
      repeat (15) @(negedge clk);
      last = mon.frames.size() > 0 ? mon.frames[0].at : -1;
      chk(rd_at == last + 1, $sformatf("rd_start at %0d, frame end %0d", rd_at, last));
      mon.frames.delete();
      hc_done = 1; @(negedge clk); hc_done = 0;
      settle(); mon.frames.delete();
    end

    // FE clock command, trigger acknowledge
    send(5'd3, CC_FE_CLK, 217'(1));
    settle();
    chk(fe_clk_en, "FE clock on by command");
    send(5'd3, CC_FE_CLK, 217'(0));
    settle();
    chk(!fe_clk_en, "FE clock off by command");
    @(negedge clk); trg_ack_in = 1;
    @(negedge clk); trg_ack_in = 0;
    chk(fe_trg_ack, "acknowledge passed on");
    @(negedge clk);
    chk(!fe_trg_ack, "acknowledge one clock");

    // reset
    send(5'd3, CC_RESET);
    settle();
    chk(n_clr == 1 && cr.nchips == 5'(NFE) && !cr.cksum_en, "reset");
    expect_frame(BCAST, FE_RESET_FIFO, '0, "reset FIFO");
    chk(clk_ok, "FE clock on during every frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
