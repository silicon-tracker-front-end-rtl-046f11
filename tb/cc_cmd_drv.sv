// Test-bench driver of a controller command line: send() puts one
// "1 aaaaa ccc ddd.." frame on line, one bit per clock, changing it at
// falling edges, and returns with the line idle.
module cc_cmd_drv
  import trk_pkg::*;
(
  input  logic clk,
  output logic line
);

  initial line = 1'b0;

  task automatic send(logic [ADDR_W-1:0] a, logic [CODE_W-1:0] c,
                      logic [ADDR_W+FE_CR_W-1:0] d = '0);
    bit b[$];
    b.push_back(1'b1);
    for (int i = ADDR_W-1; i >= 0; i--) b.push_back(a[i]);
    for (int i = CODE_W-1; i >= 0; i--) b.push_back(c[i]);
    for (int i = cc_data_len(c)-1; i >= 0; i--) b.push_back(d[i]);
    foreach (b[i]) begin @(negedge clk); line = b[i]; end
    @(negedge clk); line = 1'b0;
  endtask

endmodule
