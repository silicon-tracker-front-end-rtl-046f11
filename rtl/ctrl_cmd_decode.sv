// Global control and command decoding of the controller chip.
//
// Receives the serial commands bussed to all layers ("1 aaaaa ccc ddd..",
// address = layer address or 31 for all layers), keeps the 10-bit control
// register and drives the FE chips of its layer: their command line, their
// clock enable and their trigger acknowledge. The eight commands are
//   0 load control register      10 data bits
//   1 clear event                FE clear event; drops the oldest ToT entry
//   2 read event                 FE read event, then the FE stream is read
//   3 load FE control register   5-bit FE address + 207 data bits, passed on
//   4 turn on the FE clock       1 data bit: keep the FE clock running
//   5 calibration strobe         FE calibration strobe to all chips
//   6 send reset to FE chips     FE reset chip to all chips
//   7 reset                      clears this controller; FE reset FIFO
// The command list, the frame and the register contents follow the
// document; the code numbers, data lengths and the FE command each one is
// translated to are this design's choices.
//
// Read sequencing: a read event is held until the hit counter is ready
// (idle, next event buffer free), which stalls the readout when both event
// buffers still wait for the token. A read event that arrives while the
// previous event is still being clocked in truncates it (document: "the
// readout is truncated and clocking out of the new event begins"). When an
// event has been read the FE chips get end read event. Commands to the FE
// chips leave one at a time through serial_cmd_tx; order of service is:
// pending pass-on command, end read event, read event.
//
// FE clock: the FE chips see fe_clk_en high whenever a frame is on their
// command line, an event is being read, or the FE clock has been turned on
// by command; otherwise their readout logic stands still, keeping digital
// activity away from the amplifiers.
module ctrl_cmd_decode
  import trk_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] layer_addr,
  input  logic              cmd_in,
  input  logic              trg_ack_in,
  // to the FE chips
  output logic              fe_cmd,
  output logic              fe_clk_en,
  output logic              fe_trg_ack,
  // to the rest of the controller
  output cc_cr_t            cr,
  output logic              soft_clr,
  output logic              tot_pop,
  output logic              ctrl_req,
  output logic              rd_start,
  output logic              rd_trunc,
  input  logic              hc_ready,
  input  logic              hc_busy,
  input  logic              hc_done,
  output logic              stalled
);

  localparam int unsigned RX_W = ADDR_W + FE_CR_W;   // 212
  localparam cc_cr_t CR_RESET = '{nchips: ADDR_W'(NFE), cksum_en: 1'b0,
                                  xy_coinc: 1'b0, req_trig: 1'b0, spare: '0};

  // ---- command receiver ------------------------------------------------------
  logic              v;
  logic [ADDR_W-1:0] a;
  logic [CODE_W-1:0] c;
  logic [RX_W-1:0]   d;
  logic              mine;

  serial_cmd_rx #(.DATA_W(RX_W), .FE_SET(1'b0)) u_rx (
    .clk, .rst_n, .en(1'b1), .sin(cmd_in),
    .valid(v), .addr(a), .code(c), .data(d));

  assign mine = v && (a == layer_addr || a == BCAST);

  // ---- FE command transmitter ------------------------------------------------
  logic              tx_start, tx_busy, tx_done;
  logic [ADDR_W-1:0] tx_addr;
  logic [CODE_W-1:0] tx_code;
  logic [FE_CR_W-1:0] tx_data;
  logic [8:0]        tx_len;

  serial_cmd_tx #(.DATA_W(FE_CR_W)) u_tx (
    .clk, .rst_n, .start(tx_start), .addr(tx_addr), .code(tx_code),
    .data(tx_data), .len(tx_len), .sout(fe_cmd), .busy(tx_busy), .done(tx_done));

  // one pending pass-on command, plus end-read and read requests
  logic              p_cmd, p_end, p_read;
  logic [ADDR_W-1:0] p_addr;
  logic [CODE_W-1:0] p_code;
  logic [FE_CR_W-1:0] p_data;
  logic              clk_on;
  logic              cur_read;   // the frame on the line is a read event

  always_comb begin
    tx_start = 1'b0;
    tx_addr  = BCAST;
    tx_code  = FE_READ;
    tx_data  = '0;
    tx_len   = '0;
    if (!tx_busy) begin
      if (p_cmd) begin
        tx_start = 1'b1;
        tx_addr  = p_addr;
        tx_code  = p_code;
        tx_data  = p_data;
        tx_len   = 9'(fe_data_len(p_code));
      end else if (p_end) begin
        tx_start = 1'b1;
        tx_code  = FE_END_READ;
      end else if (p_read && hc_ready && !hc_done) begin
        tx_start = 1'b1;
        tx_code  = FE_READ;
      end
    end
  end

  assign rd_start  = tx_done && cur_read;
  assign stalled   = p_read && !hc_ready && !tx_busy && !p_cmd && !p_end;
  assign fe_clk_en = clk_on || tx_busy || tx_done || hc_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr         <= CR_RESET;
      p_cmd      <= 1'b0;
      p_end      <= 1'b0;
      p_read     <= 1'b0;
      p_addr     <= '0;
      p_code     <= '0;
      p_data     <= '0;
      clk_on     <= 1'b0;
      cur_read   <= 1'b0;
      soft_clr   <= 1'b0;
      tot_pop    <= 1'b0;
      ctrl_req   <= 1'b0;
      rd_trunc   <= 1'b0;
      fe_trg_ack <= 1'b0;
    end else begin
      soft_clr   <= 1'b0;
      tot_pop    <= 1'b0;
      ctrl_req   <= 1'b0;
      rd_trunc   <= 1'b0;
      fe_trg_ack <= trg_ack_in;

      // bookkeeping of the transmitter
      if (tx_start) begin
        cur_read <= (tx_code == FE_READ) && !p_cmd && !p_end;
        if (p_cmd)      p_cmd  <= 1'b0;
        else if (p_end) p_end  <= 1'b0;
        else            p_read <= 1'b0;
      end
      if (hc_done) p_end <= 1'b1;

      if (mine) begin
        case (cc_cmd_e'(c))
          CC_LOAD_CR: begin
            cr       <= cc_cr_t'(d[CC_CR_W-1:0]);
            ctrl_req <= 1'b1;
          end
          CC_CLEAR: begin
            p_cmd   <= 1'b1;
            p_addr  <= BCAST;
            p_code  <= FE_CLEAR;
            tot_pop <= 1'b1;
          end
          CC_READ: begin
            p_read <= 1'b1;
            if (hc_busy) rd_trunc <= 1'b1;
          end
          CC_LOAD_FE_CR: begin
            p_cmd  <= 1'b1;
            p_addr <= d[RX_W-1 -: ADDR_W];
            p_code <= FE_LOAD_CR;
            p_data <= d[FE_CR_W-1:0];
          end
          CC_FE_CLK: clk_on <= d[0];
          CC_CAL: begin
            p_cmd  <= 1'b1;
            p_addr <= BCAST;
            p_code <= FE_CAL;
          end
          CC_FE_RESET: begin
            p_cmd  <= 1'b1;
            p_addr <= BCAST;
            p_code <= FE_RESET;
          end
          CC_RESET: begin
            cr       <= CR_RESET;
            soft_clr <= 1'b1;
            clk_on   <= 1'b0;
            p_end    <= 1'b0;
            p_read   <= 1'b0;
            p_cmd    <= 1'b1;
            p_addr   <= BCAST;
            p_code   <= FE_RESET_FIFO;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
