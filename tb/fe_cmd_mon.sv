// Test-bench monitor of an FE command line: decodes "1 aaaaa ccc ddd.."
// frames (data length from the FE command code) and queues address, code,
// data and the clock count at which the last bit was taken.
module fe_cmd_mon
  import trk_pkg::*;
(
  input logic clk,
  input logic rst_n,
  input logic line
);

  typedef struct {
    logic [ADDR_W-1:0]  addr;
    logic [CODE_W-1:0]  code;
    logic [FE_CR_W-1:0] data;
    longint             at;
  } frame_t;

  frame_t frames[$];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    forever begin
      @(negedge clk);
      if (line && rst_n) begin
        frame_t f;
        f.data = '0;
        for (int i = ADDR_W-1; i >= 0; i--) begin @(negedge clk); f.addr[i] = line; end
        for (int i = CODE_W-1; i >= 0; i--) begin @(negedge clk); f.code[i] = line; end
        for (int i = fe_data_len(f.code)-1; i >= 0; i--) begin @(negedge clk); f.data[i] = line; end
        f.at = cyc;
        frames.push_back(f);
      end
    end
  end

endmodule
