// Self-checking test of event_buffer: random events are written, committed,
// read back word by word and released; full must follow commit and release,
// and clear must empty the buffer.
module tb_event_buffer;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, wr_en, commit, full, release_buf;
  logic [NHIT_W-1:0] wr_addr, rd_addr;
  logic [WORD_W-1:0] wr_data, rd_data;
  evt_hdr_t commit_hdr, hdr;

  event_buffer dut (.*);

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

  initial begin
    clr = 0; wr_en = 0; commit = 0; release_buf = 0; wr_addr = 0; rd_addr = 0;
    wr_data = 0; commit_hdr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 40; e++) begin
      logic [WORD_W-1:0] w[MAX_HITS];
      evt_hdr_t h;
      int n;
      n = $urandom % (MAX_HITS + 1);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        w[i] = WORD_W'($urandom);
        wr_en = 1; wr_addr = NHIT_W'(i); wr_data = w[i];
      end
      @(negedge clk);
      wr_en = 0;
      h = '{ctrl: 1'($urandom), trunc: 1'($urandom), nhits: NHIT_W'(n), tot: TOT_W'($urandom)};
      chk(!full, "empty before commit");
      commit = 1; commit_hdr = h;
      @(negedge clk);
      commit = 0;
      chk(full && hdr == h, "full and header after commit");
      for (int i = 0; i < n; i++) begin
        rd_addr = NHIT_W'(i);
        @(posedge clk);
        chk(rd_data == w[i], $sformatf("word %0d", i));
        @(negedge clk);
      end
      if (e % 5 == 4) clr = 1; else release_buf = 1;
      @(negedge clk);
      clr = 0; release_buf = 0;
      chk(!full, "empty after release or clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
