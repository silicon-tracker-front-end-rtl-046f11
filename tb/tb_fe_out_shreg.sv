// Self-checking test of fe_out_shreg: three registers are chained as in a
// layer and loaded with random events, some empty. The stream leaving the
// first one must be the concatenation of the frames: 1 + 64 hit bits
// (channel 63 first) for a chip with hits, a single 0 for an empty chip,
// followed by the bits fed into the far end. Clock-enable gaps must not
// lose bits, and clear must return a register to a single 0.
module tb_fe_out_shreg;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 3;
  logic clr, load, en, tail;
  logic [NCH-1:0] hits [N];
  logic [N-1:0] dout;

  for (genvar i = 0; i < N; i++) begin : g
    fe_out_shreg u (.clk, .rst_n, .clr, .load, .hits(hits[i]), .en,
                    .din(i == N-1 ? tail : dout[(i == N-1) ? i : i+1]), .dout(dout[i]));
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; load = 0; en = 0; tail = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      bit exp[$];
      int pos, tidx;
      exp.delete();
      for (int i = 0; i < N; i++) begin
        hits[i] = ($urandom % 3 == 0) ? '0 : {$urandom, $urandom} & {$urandom, $urandom};
        if (hits[i] == '0) exp.push_back(1'b0);
        else begin
          exp.push_back(1'b1);
          for (int c = NCH-1; c >= 0; c--) exp.push_back(hits[i][c]);
        end
      end
      for (int k = 0; k < 10; k++) exp.push_back(~k[0]);  // the far-end feed 1010..
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      pos = 0;
      tidx = 0;
      tail = 1'b1;
      while (pos < exp.size()) begin
        en = ($urandom % 5) != 0;
        #1;
        checks++;
        if (dout[0] != exp[pos]) begin
          failures++; $display("FAIL test %0d bit %0d", t, pos);
          break;
        end
        @(posedge clk);
        if (en) begin
          pos++;
          tidx++;
        end
        @(negedge clk);
        tail = ~tidx[0];
      end
      en = 0;
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      checks++;
      if (dout[0] != 1'b0) begin failures++; $display("FAIL clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
