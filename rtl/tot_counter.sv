// Time-over-threshold (ToT) counter of the controller chip.
//
// When the layer's trigger rises the counter starts counting clocks while
// the trigger stays high (saturating at 511, the 9-bit ToT field of the
// readout packet). A trigger acknowledge from the tower controller marks
// the measurement as wanted: the ToT, flagged as coming from a trigger of
// this layer, is pushed into the ToT FIFO once the trigger has fallen. If no
// acknowledge arrives within WINDOW clocks of the trigger rising (1.6 us at
// 20 MHz) the measurement is abandoned and counting stops until the trigger
// falls. An acknowledge that finds no measurement running (another layer
// triggered) pushes an entry with ToT 0 and the trigger flag clear, so that
// the FIFO keeps one entry per acknowledged event.
//
// Timing: push is a one-clock pulse with entry valid in the same clock. The
// 1.6 us window, the 9-bit field and the counting on trigger start follow
// the document; counting in clock periods and the entry for events this
// layer did not trigger are this design's choices.
module tot_counter
  import trk_pkg::*;
#(
  parameter int unsigned WINDOW = TRG_WINDOW
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       trig,       // synchronised trigger level
  input  logic       trig_rise,
  input  logic       ack,        // trigger acknowledge
  output logic       push,
  output tot_entry_t entry,
  output logic       timeout     // one-clock pulse: measurement abandoned
);

  typedef enum logic [1:0] {T_IDLE, T_RUN, T_WAIT, T_DEAD} state_e;
  state_e state;

  logic [TOT_W-1:0]                tot;
  logic [$clog2(WINDOW+1)-1:0]     timer;
  logic                            acked;
  localparam logic [$clog2(WINDOW+1)-1:0] LAST = ($clog2(WINDOW+1))'(WINDOW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      tot     <= '0;
      timer   <= '0;
      acked   <= 1'b0;
      push    <= 1'b0;
      entry   <= '0;
      timeout <= 1'b0;
    end else begin
      push    <= 1'b0;
      timeout <= 1'b0;
      if (clr) begin
        state <= T_IDLE;
        acked <= 1'b0;
      end else begin
        case (state)
          T_IDLE: begin
            if (trig_rise) begin
              state <= T_RUN;
              tot   <= TOT_W'(1);
              timer <= '0;
              acked <= ack;
            end else if (ack) begin
              push  <= 1'b1;
              entry <= '{trig: 1'b0, tot: '0};
            end
          end
          T_RUN: begin
            if (trig && tot != '1) tot <= tot + 1'b1;
            if (timer != LAST) timer <= timer + 1'b1;
            if (ack) acked <= 1'b1;
            if (!trig) begin
              if (acked || ack) begin
                push  <= 1'b1;
                entry <= '{trig: 1'b1, tot: tot};
                state <= T_IDLE;
              end else if (timer == LAST) begin
                timeout <= 1'b1;
                state   <= T_IDLE;
              end else begin
                state <= T_WAIT;
              end
            end else if (!acked && !ack && timer == LAST) begin
              timeout <= 1'b1;
              state   <= T_DEAD;
            end
          end
          T_WAIT: begin
            if (timer != LAST) timer <= timer + 1'b1;
            if (ack) begin
              push  <= 1'b1;
              entry <= '{trig: 1'b1, tot: tot};
              state <= T_IDLE;
            end else if (timer == LAST) begin
              timeout <= 1'b1;
              state   <= T_IDLE;
            end
          end
          T_DEAD: if (!trig) state <= T_IDLE;
          default: state <= T_IDLE;
        endcase
      end
    end
  end

endmodule
