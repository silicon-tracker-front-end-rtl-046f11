// Self-checking test of trig_gate: random trigger pulses; trig_out must
// follow trig_in two clocks later while enabled, and trig_rise must mark
// each rising edge exactly once.
module tb_trig_gate;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic enable, trig_in, trig_out, trig_rise;

  trig_gate dut (.*);

  logic [2:0] hist;   // input seen at the last three edges (enabled)

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rises = 0;
    enable = 1; trig_in = 0; hist = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom % 6 == 0) trig_in = ~trig_in;
      enable = (i % 1000) < 900;
      @(posedge clk);
      hist = {hist[1:0], trig_in & enable};
      #1;
      checks += 2;
      if (trig_out != hist[1]) begin failures++; $display("FAIL out at %0d", i); end
      if (trig_rise != (hist[1] && !hist[2])) begin failures++; $display("FAIL rise at %0d", i); end
      if (trig_rise) rises++;
    end
    checks++;
    if (rises < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
