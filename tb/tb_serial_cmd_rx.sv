// Self-checking test of serial_cmd_rx (controller command set): random
// frames of every code, with idle gaps and clocks with the enable low, are
// sent bit by bit; address, code and data must come out as sent, once per
// frame, in the enabled clock after the last bit.
module tb_serial_cmd_rx;
  import trk_pkg::*;
  localparam int DW = ADDR_W + FE_CR_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, sin, valid;
  logic [ADDR_W-1:0] addr;
  logic [CODE_W-1:0] code;
  logic [DW-1:0] data;

  serial_cmd_rx #(.DATA_W(DW), .FE_SET(1'b0)) dut (.*);

  int n_valid = 0;
  always @(posedge clk) if (valid && en) n_valid++;

  task automatic send_bit(bit b);
    // one enabled clock for the bit, sometimes preceded by a stalled clock
    if ($urandom % 4 == 0) begin
      @(negedge clk); en = 0; sin = ~b;
      @(posedge clk);
    end
    @(negedge clk); en = 1; sin = b;
    @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; sin = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      logic [ADDR_W-1:0] a;
      logic [CODE_W-1:0] c;
      logic [DW-1:0] d;
      int len, n_before;
      a = ADDR_W'($urandom);
      c = CODE_W'(f % 8);
      len = cc_data_len(c);
      for (int i = 0; i < DW; i += 32) d[i +: 32] = $urandom;
      d = (len == 0) ? '0 : (d & ((DW'(1) << len) - 1));
      repeat ($urandom % 4) send_bit(0);
      n_before = n_valid;
      send_bit(1);
      for (int i = ADDR_W-1; i >= 0; i--) send_bit(a[i]);
      for (int i = CODE_W-1; i >= 0; i--) send_bit(c[i]);
      for (int i = len-1; i >= 0; i--) send_bit(d[i]);
      @(negedge clk); en = 1; sin = 0;
      #1;
      checks += 4;
      if (!valid) begin failures++; $display("FAIL no valid frame %0d", f); end
      if (addr != a) begin failures++; $display("FAIL addr"); end
      if (code != c) begin failures++; $display("FAIL code"); end
      if (data != d) begin failures++; $display("FAIL data code %0d", c); end
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (n_valid != n_before + 1) begin failures++; $display("FAIL valid count"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
