// Self-checking test of serial_cmd_tx: random frames of every FE command
// length; the bits on sout are collected and compared with the frame
// "1, address, code, data" built here, and done must come exactly one clock
// after the last bit, 1 + 5 + 3 + len clocks after the start clock.
module tb_serial_cmd_tx;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, sout, busy, done;
  logic [ADDR_W-1:0] addr;
  logic [CODE_W-1:0] code;
  logic [FE_CR_W-1:0] data;
  logic [8:0] len;

  serial_cmd_tx #(.DATA_W(FE_CR_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; addr = 0; code = 0; data = 0; len = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      bit exp[$], got[$];
      int cyc;
      exp.delete();
      got.delete();
      @(negedge clk);
      addr = ADDR_W'($urandom);
      code = CODE_W'(f % 7);
      len  = 9'(fe_data_len(code));
      for (int i = 0; i < FE_CR_W; i += 32) data[i +: 32] = $urandom;
      exp.push_back(1'b1);
      for (int i = ADDR_W-1; i >= 0; i--) exp.push_back(addr[i]);
      for (int i = CODE_W-1; i >= 0; i--) exp.push_back(code[i]);
      for (int i = int'(len)-1; i >= 0; i--) exp.push_back(data[i]);
      start = 1;
      @(posedge clk); #1 start = 0;
      cyc = 0;
      forever begin
        @(posedge clk); #1;
        cyc++;
        if (done || cyc > 300) break;
        got.push_back(sout);
      end
      // got holds sout after each edge that followed the start edge
      checks += 2;
      if (got != exp) begin failures++; $display("FAIL frame %0d bits", f); end
      if (cyc != 1 + ADDR_W + CODE_W + int'(len) + 1) begin
        failures++; $display("FAIL done after %0d clocks", cyc);
      end
      repeat ($urandom % 3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
