// Test-bench monitor of a controller data line. It waits for a start bit,
// reads the two header words, the hit words and, when cksum_en is set, the
// check-sum word (11 bits each, most significant first), and appends the
// decoded packet to the queue pkts. The check-sum is recomputed here as the
// XOR of all preceding words. The line is sampled at
// falling edges, where it is stable.
module pkt_mon
  import trk_pkg::*;
(
  input logic clk,
  input logic line,
  input logic cksum_en
);

  class packet;
    int                layer;
    int                nhits;
    bit                ctrl;
    bit                trunc;
    int                tot;
    logic [WORD_W-1:0] hits[$];
    logic [WORD_W-1:0] cks;
    bit                cks_ok;
  endclass

  packet pkts[$];
  int    bits_seen = 0;

  task automatic get_word(output logic [WORD_W-1:0] w);
    for (int i = WORD_W-1; i >= 0; i--) begin
      @(negedge clk);
      w[i] = line;
    end
  endtask

  initial begin
    forever begin
      @(negedge clk);
      if (line) begin
        packet p;
        logic [WORD_W-1:0] w, x;
        p = new();
        get_word(w); x = w;
        p.layer = int'(w[10:6]);
        p.nhits = int'(w[5:0]);
        get_word(w); x ^= w;
        p.ctrl  = w[10];
        p.trunc = w[9];
        p.tot   = int'(w[8:0]);
        for (int i = 0; i < p.nhits; i++) begin
          get_word(w); x ^= w;
          p.hits.push_back(w);
        end
        p.cks_ok = 1'b1;
        if (cksum_en) begin
          get_word(w);
          p.cks    = w;
          p.cks_ok = (w == x);
        end
        pkts.push_back(p);
      end
    end
  end

endmodule
