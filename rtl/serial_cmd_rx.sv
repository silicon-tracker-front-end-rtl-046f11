// Serial command receiver, used in the FE chips and the controller chips.
//
// Commands arrive on one line as "1 aaaaa ccc ddd..": a start bit, a 5-bit
// address, a 3-bit command code and then as many data bits as the code
// calls for (given by the package functions fe_data_len / cc_data_len,
// chosen with FE_SET). All fields are sent most significant bit first; the
// line idles at 0. The frame layout follows the controller command format of
// the tracker; using the same frame for the FE chips, and the idle level, are
// this design's choices.
//
// Interface: one bit is taken on each rising clock edge with en high (en is
// the chip clock enable). valid pulses for one enabled cycle after the last
// bit of a frame, with addr, code and data (right-aligned, data[0] is the
// last bit received) held until the next frame ends. Address matching is
// left to the user of the block.
module serial_cmd_rx
  import trk_pkg::*;
#(
  parameter int unsigned DATA_W = FE_CR_W,
  parameter bit          FE_SET = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                sin,
  output logic                valid,
  output logic [ADDR_W-1:0]   addr,
  output logic [CODE_W-1:0]   code,
  output logic [DATA_W-1:0]   data
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} state_e;
  state_e state;
  logic [ADDR_W+CODE_W-1:0] hdr;
  logic [8:0]               cnt;
  logic [8:0]               len;

  // The length of the data field is latched with the code.
  logic [8:0] len_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) len_q <= '0;
    else if (en && state == S_HDR && cnt == 9'(ADDR_W + CODE_W - 1)) len_q <= len;


  // Data length of the code whose last bit is arriving now.
  always_comb begin
    logic [CODE_W-1:0] c;
    c   = {hdr[CODE_W-2:0], sin};
    len = 9'(FE_SET ? fe_data_len(c) : cc_data_len(c));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      hdr   <= '0;
      cnt   <= '0;
      valid <= 1'b0;
      addr  <= '0;
      code  <= '0;
      data  <= '0;
    end else if (en) begin
      valid <= 1'b0;
      case (state)
        S_IDLE: if (sin) begin
          state <= S_HDR;
          cnt   <= '0;
        end
        S_HDR: begin
          hdr <= {hdr[ADDR_W+CODE_W-2:0], sin};
          cnt <= cnt + 9'd1;
          if (cnt == 9'(ADDR_W + CODE_W - 1)) begin
            addr <= hdr[ADDR_W+CODE_W-2:CODE_W-1];
            code <= {hdr[CODE_W-2:0], sin};
            data <= '0;
            cnt  <= '0;
            if (len == 9'd0) begin
              valid <= 1'b1;
              state <= S_IDLE;
            end else begin
              state <= S_DATA;
            end
          end
        end
        S_DATA: begin
          data <= {data[DATA_W-2:0], sin};
          cnt  <= cnt + 9'd1;
          if (cnt == len_q - 9'd1) begin
            valid <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end else begin
      valid <= 1'b0;
    end
  end

endmodule
