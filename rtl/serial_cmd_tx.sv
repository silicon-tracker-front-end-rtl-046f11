// Serial command transmitter of the controller chip towards the FE chips.
//
// The controller translates its own commands into FE commands and sends them
// on the FE command line in the same "1 aaaaa ccc ddd.." frame that the
// serial_cmd_rx block receives. A pulse on start (while busy is low) loads
// the address, the code and the first len bits of data, counted from
// data[len-1] down to data[0]; the frame then leaves one bit per clock, most
// significant first, on the registered output sout. busy stays high until
// the last bit has been on the line for one clock; done pulses in the clock
// after that, which is the same clock in which a
// receiver on the same clock reports the frame.
//
// The frame follows the tracker's command format; bit order and timing are
// this design's choices.
module serial_cmd_tx
  import trk_pkg::*;
#(
  parameter int unsigned DATA_W = FE_CR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] addr,
  input  logic [CODE_W-1:0] code,
  input  logic [DATA_W-1:0] data,
  input  logic [8:0]        len,
  output logic              sout,
  output logic              busy,
  output logic              done
);

  localparam int unsigned FRAME_W = 1 + ADDR_W + CODE_W + DATA_W;

  logic [FRAME_W-1:0] sr;
  logic [9:0]         cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      sout <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (cnt != '0) begin
          sout <= sr[FRAME_W-1];
          sr   <= sr << 1;
          cnt  <= cnt - 10'd1;
        end else begin
          // the last bit has been on the line for one clock
          sout <= 1'b0;
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else begin
        sout <= 1'b0;
        if (start) begin
          // data is left-aligned so that its bit len-1 follows the code
          sr   <= {1'b1, addr, code, data << (DATA_W - 32'(len))};
          cnt  <= 10'(1 + ADDR_W + CODE_W) + 10'(len);
          busy <= 1'b1;
        end
      end
    end
  end

endmodule
