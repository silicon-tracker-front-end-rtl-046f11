// Self-checking test of sync_fifo: random pushes and pops compared with a
// queue model, including pushes into a full and pops from an empty FIFO,
// the clear input and the overflow/underflow flags.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, clr, push, pop, empty, full, ovf, unf;
  logic [W-1:0] din, dout;
  logic [3:0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  logic [W-1:0] q[$];
  int n_full = 0, n_empty = 0;

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; clr = 0; push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      push = ($urandom % 100) < (i < 1500 ? 60 : 35);
      pop  = ($urandom % 100) < (i < 1500 ? 35 : 60);
      clr  = ($urandom % 500) == 0;
      din  = W'($urandom);
      chk(empty == (q.size() == 0), "empty flag");
      chk(full == (q.size() == D), "full flag");
      chk(32'(count) == q.size(), "count");
      if (q.size() > 0) chk(dout == q[0], $sformatf("head %h vs %h", dout, q[0]));
      if (full) n_full++;
      if (empty) n_empty++;
      @(posedge clk);
      #1;
      if (clr) q.delete();
      else begin
        bit dp;
        dp = pop && q.size() > 0;
        chk(ovf == (push && q.size() == D && !dp), "overflow flag");
        chk(unf == (pop && q.size() == 0), "underflow flag");
        if (dp) void'(q.pop_front());
        if (push && (q.size() < D)) q.push_back(din);
      end
    end
    chk(n_full > 0 && n_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
