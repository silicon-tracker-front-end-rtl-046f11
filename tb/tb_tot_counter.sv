// Self-checking test of tot_counter. Scenarios, each repeated with random
// lengths: a trigger acknowledged while high (ToT = pulse length, pushed
// when it falls), a short trigger acknowledged after it fell but inside the
// 32-clock window, a trigger never acknowledged (timeout, nothing pushed,
// also for a pulse longer than the window), an acknowledge without a
// trigger (entry with ToT 0 and no trigger flag) and a pulse longer than
// 511 clocks (ToT saturates).
module tb_tot_counter;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, trig, trig_rise, ack, push, timeout;
  tot_entry_t entry;
  logic trig_d;

  tot_counter dut (.*);

  assign trig_rise = trig & ~trig_d;
  always_ff @(posedge clk) trig_d <= trig;

  tot_entry_t got[$];
  int n_timeout = 0;
  always @(posedge clk) begin
    if (push) got.push_back(entry);
    if (timeout) n_timeout++;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // pulse of len clocks; ack at clock ack_at after the rise (-1: none)
  task automatic pulse(int len, int ack_at);
    for (int i = 0; i < len + 40; i++) begin
      @(negedge clk);
      trig = (i < len);
      ack  = (i == ack_at);
    end
    @(negedge clk); trig = 0; ack = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; trig = 0; ack = 0; trig_d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int r = 0; r < 20; r++) begin
      int len, at, to;
      // acknowledged while high
      len = 5 + $urandom % 40; at = $urandom % 5;
      got.delete();
      pulse(len, at);
      chk(got.size() == 1 && got[0].trig && got[0].tot == TOT_W'(len), $sformatf("acked len %0d", len));
      // short pulse, acknowledge after it fell, inside the window
      len = 3 + $urandom % 10; at = len + 2 + $urandom % (TRG_WINDOW - len - 4);
      got.delete();
      pulse(len, at);
      chk(got.size() == 1 && got[0].trig && got[0].tot == TOT_W'(len), $sformatf("late ack len %0d at %0d", len, at));
      // never acknowledged
      len = 2 + $urandom % 80;
      got.delete(); to = n_timeout;
      pulse(len, -1);
      chk(got.size() == 0 && n_timeout == to + 1, $sformatf("timeout len %0d", len));
      // acknowledge of a trigger elsewhere
      got.delete();
      pulse(0, 3);
      chk(got.size() == 1 && !got[0].trig && got[0].tot == '0, "ack without trigger");
    end
    got.delete();
    pulse(600, 4);
    chk(got.size() == 1 && got[0].tot == '1, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
