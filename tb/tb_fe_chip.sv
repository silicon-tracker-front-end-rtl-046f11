// Self-checking test of fe_chip, driven through its two command lines as the
// controllers would drive it. It loads the control register, stores events
// with trigger acknowledges (data mask applied, hits seen before the
// acknowledge kept, hits without acknowledge forgotten after the window),
// reads them out as a 1 + 64-bit frame followed by the downstream bits,
// checks empty frames, clear event, reset FIFO, the calibration strobe,
// the trigger OR chain, address matching, and the switch of the chip to the
// right-hand controller (commands of the other side ignored).
module tb_fe_chip;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] chip_addr;
  logic cmd_l, clk_en_l, trg_ack_l, cmd_r, clk_en_r, trg_ack_r;
  logic [NCH-1:0] disc, cal_mask;
  logic cal_strobe;
  logic [DAC_W-1:0] cal_dac, thr_dac;
  logic data_in_l, data_in_r, data_out_l, data_out_r;
  logic trig_in_l, trig_in_r, trig_out_l, trig_out_r;
  fe_cr_t cr;
  logic [3:0] fifo_count;
  logic reading;

  fe_chip dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // send one FE command frame on the left (r=0) or right (r=1) line
  task automatic send(bit r, logic [ADDR_W-1:0] a, logic [CODE_W-1:0] c,
                      logic [FE_CR_W-1:0] d = '0);
    bit b[$];
    b.push_back(1'b1);
    for (int i = ADDR_W-1; i >= 0; i--) b.push_back(a[i]);
    for (int i = CODE_W-1; i >= 0; i--) b.push_back(c[i]);
    for (int i = fe_data_len(c)-1; i >= 0; i--) b.push_back(d[i]);
    foreach (b[i]) begin
      @(negedge clk);
      if (r) cmd_r = b[i]; else cmd_l = b[i];
    end
    @(negedge clk);
    cmd_l = 0; cmd_r = 0;
  endtask

  task automatic ack(bit r);
    @(negedge clk);
    if (r) trg_ack_r = 1; else trg_ack_l = 1;
    @(negedge clk);
    trg_ack_l = 0; trg_ack_r = 0;
  endtask

  // read one event towards side r and compare with hit map m
  task automatic read_check(bit r, logic [NCH-1:0] m, string tag);
    bit exp[$];
    if (m == '0) exp.push_back(1'b0);
    else begin
      exp.push_back(1'b1);
      for (int c = NCH-1; c >= 0; c--) exp.push_back(m[c]);
    end
    for (int i = 0; i < 6; i++) exp.push_back(1'b1);   // downstream feed
    send(r, chip_addr, FE_READ);
    if (r) data_in_l = 1; else data_in_r = 1;
    foreach (exp[i]) begin
      @(negedge clk);
      if ((r ? data_out_r : data_out_l) != exp[i]) begin
        chk(0, $sformatf("%s bit %0d", tag, i));
        break;
      end
    end
    chk(1, tag);
    chk((r ? data_out_l : data_out_r) == 1'b0, "other side quiet");
    send(r, BCAST, FE_END_READ);
    data_in_l = 0; data_in_r = 0;
    @(negedge clk);
    chk(!reading && (r ? data_out_r : data_out_l) == 1'b0, "end read");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_cr_t c;
    logic [NCH-1:0] ev [4];
    chip_addr = 5'd7;
    cmd_l = 0; cmd_r = 0; clk_en_l = 1; clk_en_r = 1; trg_ack_l = 0; trg_ack_r = 0;
    disc = 0; data_in_l = 0; data_in_r = 0; trig_in_l = 0; trig_in_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(cr.right == 1'b0 && cr.data_mask == '1, "reset value");

    // control register from the right controller, left readout
    c.cal_mask  = {$urandom, $urandom};
    c.trig_mask = {$urandom, $urandom} | 64'h1;
    c.data_mask = ~64'h00F0_0000_0000_000F;
    c.cal_dac   = 7'd45;
    c.thr_dac   = 7'd20;
    c.right     = 1'b0;
    send(1, 5'd7, FE_LOAD_CR, c);
    @(negedge clk);
    chk(cr == c && cal_dac == 7'd45 && thr_dac == 7'd20 && cal_mask == c.cal_mask, "load CR");
    send(0, 5'd8, FE_LOAD_CR, '0);          // other chip: ignored
    @(negedge clk);
    chk(cr == c, "address match");

    // three events; the second one's hits come before the acknowledge
    ev[0] = {$urandom, $urandom};
    ev[1] = 64'h8000_0000_0000_0001;
    ev[2] = 64'h0;
    @(negedge clk); disc = ev[0];
    ack(0);
    disc = 0;
    @(negedge clk); disc = ev[1];
    @(negedge clk); disc = 0;
    repeat (10) @(negedge clk);
    ack(0);
    ack(0);                                 // empty event
    // hits never acknowledged: forgotten after the window
    @(negedge clk); disc = 64'hFFFF;
    @(negedge clk); disc = 0;
    repeat (TRG_WINDOW + 4) @(negedge clk);
    ev[3] = 64'h0000_0F00_0000_0000;
    disc = ev[3];
    ack(0);
    disc = 0;
    @(negedge clk);
    chk(fifo_count == 4, "four events stored");
    // acknowledge from the side not selected: ignored
    ack(1);
    @(negedge clk);
    chk(fifo_count == 4, "other side's acknowledge ignored");

    read_check(0, ev[0] & c.data_mask, "event 0");
    read_check(0, ev[1] & c.data_mask, "event 1 (latched hits)");
    send(1, BCAST, FE_READ);                // other side: ignored
    repeat (2) @(negedge clk);
    chk(!reading && fifo_count == 2, "read from other side ignored");
    read_check(0, '0, "empty event");
    read_check(0, ev[3] & c.data_mask, "event 3 (window)");
    read_check(0, '0, "read of an empty FIFO");

    // clear event and reset FIFO
    ack(0); ack(0); ack(0);
    send(0, BCAST, FE_CLEAR);
    @(negedge clk);
    chk(fifo_count == 2, "clear event");
    send(0, BCAST, FE_RESET_FIFO);
    @(negedge clk);
    chk(fifo_count == 0, "reset FIFO");

    // calibration strobe
    send(0, chip_addr, FE_CAL);
    begin
      int n;
      n = 0;
      repeat (20) begin @(negedge clk); if (cal_strobe) n++; end
      chk(n == 8, $sformatf("calibration strobe %0d clocks", n));
    end

    // trigger chain
    disc = 64'h1; trig_in_l = 0; trig_in_r = 0; #1;
    chk(trig_out_l && trig_out_r, "local trigger both ways");
    disc = 0; trig_in_l = 1; #1;
    chk(trig_out_r && !trig_out_l, "left trigger passed right");
    trig_in_l = 0; trig_in_r = 1; #1;
    chk(trig_out_l && !trig_out_r, "right trigger passed left");
    trig_in_r = 0;

    // switch to the right controller
    c.right = 1'b1;
    send(0, chip_addr, FE_LOAD_CR, c);
    @(negedge clk);
    chk(cr.right, "now right");
    @(negedge clk); disc = 64'hA5A5_0000_0000_5A5A;
    ack(0);                                 // left acknowledge ignored now
    @(negedge clk);
    chk(fifo_count == 0, "left acknowledge ignored when right");
    ack(1);
    disc = 0;
    @(negedge clk);
    chk(fifo_count == 1, "right acknowledge taken");
    read_check(1, 64'hA5A5_0000_0000_5A5A & c.data_mask, "right readout");

    // reset from either side restores the reset value
    send(1, BCAST, FE_RESET);
    @(negedge clk);
    chk(cr.right == 1'b0 && cr.data_mask == '1, "reset chip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
