// One side's readout of a tracker tower: N_LAYERS layers, each with N_FE
// front-end chips and two controller chips, and the two token chains that
// connect the controllers of all layers to the tower controller.
//
// The tower controller itself is outside this design; its signals are the
// ports of this module. Commands (one line per controller side) are bussed
// to all layers; trigger and trigger acknowledge have one line per layer and
// side; token and data are daisy-chained from layer to layer. Layer 0 is the
// one next to the tower controller: the token enters there and moves up,
// and the packets of all layers leave there, one after the other.
// Layer k has address k. The unused top ends of the chains are ports too.
//
// Bussed commands, per-layer trigger lines and daisy-chained token and data
// follow the tracker's cabling description; layer numbering is this
// design's choice.
module tracker_tower
  import trk_pkg::*;
#(
  parameter int unsigned N_LAYERS = 16,
  parameter int unsigned N_FE     = NFE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_LAYERS-1:0][N_FE-1:0][NCH-1:0][7:0] amp,
  // left side
  input  logic                  cmd_l,
  input  logic [N_LAYERS-1:0]   trg_ack_l,
  output logic [N_LAYERS-1:0]   trigger_l,
  input  logic                  token_in_l,    // from the tower controller
  output logic                  data_out_l,    // to the tower controller
  output logic                  token_top_l,   // token leaving the top layer
  input  logic                  data_top_l,    // data into the top layer
  // right side
  input  logic                  cmd_r,
  input  logic [N_LAYERS-1:0]   trg_ack_r,
  output logic [N_LAYERS-1:0]   trigger_r,
  input  logic                  token_in_r,
  output logic                  data_out_r,
  output logic                  token_top_r,
  input  logic                  data_top_r,
  // status
  output logic [N_LAYERS-1:0][1:0] stalled,
  output logic [N_LAYERS-1:0][1:0] tot_timeout,
  output logic [N_LAYERS-1:0][N_FE-1:0] fe_right
);

  // chain nets: index k is the link between layer k-1 and layer k
  logic [N_LAYERS:0] tok_l, dat_l, tok_r, dat_r;

  assign tok_l[0]        = token_in_l;
  assign data_out_l      = dat_l[0];
  assign token_top_l     = tok_l[N_LAYERS];
  assign dat_l[N_LAYERS] = data_top_l;
  assign tok_r[0]        = token_in_r;
  assign data_out_r      = dat_r[0];
  assign token_top_r     = tok_r[N_LAYERS];
  assign dat_r[N_LAYERS] = data_top_r;

  for (genvar k = 0; k < N_LAYERS; k++) begin : g_layer
    tracker_layer #(.N_FE(N_FE)) u_layer (
      .clk, .rst_n, .layer_addr(ADDR_W'(k)), .amp(amp[k]),
      .cmd_l, .trg_ack_l(trg_ack_l[k]), .trigger_l(trigger_l[k]),
      .token_in_l(tok_l[k]), .token_out_l(tok_l[k+1]),
      .data_in_l(dat_l[k+1]), .data_out_l(dat_l[k]),
      .cmd_r, .trg_ack_r(trg_ack_r[k]), .trigger_r(trigger_r[k]),
      .token_in_r(tok_r[k]), .token_out_r(tok_r[k+1]),
      .data_in_r(dat_r[k+1]), .data_out_r(dat_r[k]),
      .stalled(stalled[k]), .tot_timeout(tot_timeout[k]),
      .fe_right(fe_right[k]));
  end

endmodule
