// hirise_local_switch: first stage of one Hi-Rise layer.
//
// NL = N/L local inputs arbitrate for NL intermediate outputs (one per final
// output of this layer) and for NCH = C*(L-1) outgoing layer-to-layer
// channels (L2LCs). Channel allocation is input binned: channel k towards a
// given layer serves the NL/C local inputs i with i mod C == k (interleaved).
// Every output column holds an LRG arbiter (the cross-point priority
// vectors): NL-wide for an intermediate output, NL/C-wide for an L2LC.
//
// Arbitration and the inter-layer decision happen in the same cycle. A local
// winner is forwarded on its output with the index of the winning input
// (`*_pid`) and, for an L2LC, the requested port on the destination layer.
// The sub-block at the far end answers with `*_win`; only then is the
// connection bit set and the local LRG priority updated (priority update
// back-propagated from the final winner). A connected input streams flits
// (`in_valid`/`in_data`) until it raises `in_release`, which frees the path at
// the end of that cycle. Requests from a connected input are ignored.
//
// Follows the document: the output counts, input binning, LRG per output,
// update only on a final win. Own choices: the req/release handshake, the
// registered connection bits, the interleaving rule i mod C.
module hirise_local_switch
  import hirise_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter int unsigned L        = 4,
  parameter int unsigned C        = 4,
  parameter int unsigned W        = 128,
  parameter int unsigned LAYER_ID = 0,
  localparam int unsigned NL  = N / L,
  localparam int unsigned NCH = C * (L - 1),
  localparam int unsigned BIN = NL / C,
  localparam int unsigned PW  = (NL > 1) ? $clog2(NL) : 1,
  localparam int unsigned LW  = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned BW  = (BIN > 1) ? $clog2(BIN) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // local inputs
  input  logic [NL-1:0]           in_req,
  input  logic [NL-1:0][LW-1:0]   in_dest_layer,
  input  logic [NL-1:0][PW-1:0]   in_dest_port,
  input  logic [NL-1:0]           in_valid,
  input  logic [NL-1:0]           in_release,
  input  logic [NL-1:0][W-1:0]    in_data,
  output logic [NL-1:0]           in_grant,      // connection made this cycle
  output logic [NL-1:0]           in_connected,
  // intermediate outputs, one per sub-block of this layer
  output logic [NL-1:0]           im_req,
  output logic [NL-1:0][PW-1:0]   im_pid,
  output logic [NL-1:0]           im_valid,
  output logic [NL-1:0]           im_release,
  output logic [NL-1:0][W-1:0]    im_data,
  input  logic [NL-1:0]           im_win,
  // outgoing L2LCs: index rank_of(LAYER_ID, dest)*C + k
  output logic [NCH-1:0]          ch_req,
  output logic [NCH-1:0][PW-1:0]  ch_port,
  output logic [NCH-1:0][BW-1:0]  ch_pid,
  output logic [NCH-1:0]          ch_valid,
  output logic [NCH-1:0]          ch_release,
  output logic [NCH-1:0][W-1:0]   ch_data,
  input  logic [NCH-1:0]          ch_win
);

  logic [NL-1:0]           im_busy;
  logic [NL-1:0][PW-1:0]   im_src;
  logic [NCH-1:0]          ch_busy;
  logic [NCH-1:0][BW-1:0]  ch_src;

  logic [NL-1:0]           im_gnt  [NL];   // per intermediate output, per input
  logic [BIN-1:0]          ch_gnt  [NCH];  // per channel, per binned input
  logic [NL-1:0]           im_rq   [NL];
  logic [BIN-1:0]          ch_rq   [NCH];

  // requests into each output column
  always_comb begin
    for (int o = 0; o < NL; o++)
      for (int i = 0; i < NL; i++)
        im_rq[o][i] = in_req[i] && !in_connected[i] && !im_busy[o] &&
                      (int'(in_dest_layer[i]) == LAYER_ID) && (int'(in_dest_port[i]) == o);
    for (int ch = 0; ch < NCH; ch++)
      for (int b = 0; b < BIN; b++) begin
        ch_rq[ch][b] = in_req[b*C + ch%C] && !in_connected[b*C + ch%C] && !ch_busy[ch] &&
                       (int'(in_dest_layer[b*C + ch%C]) == layer_of(LAYER_ID, ch/C));
      end
  end

  for (genvar o = 0; o < NL; o++) begin : g_im
    lrg_arbiter #(.N(NL)) u_arb (
      .clk, .rst_n, .req(im_rq[o]), .upd(im_win[o]), .gnt(im_gnt[o]));
  end
  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    lrg_arbiter #(.N(BIN)) u_arb (
      .clk, .rst_n, .req(ch_rq[ch]), .upd(ch_win[ch]), .gnt(ch_gnt[ch]));
  end

  // forward requests and connected data
  always_comb begin
    for (int o = 0; o < NL; o++) begin
      im_req[o] = |im_gnt[o];
      im_pid[o] = im_busy[o] ? im_src[o] : '0;
      for (int i = 0; i < NL; i++)
        if (!im_busy[o] && im_gnt[o][i]) im_pid[o] = PW'(i);
      im_valid[o]   = im_busy[o] && in_valid[im_src[o]];
      im_release[o] = im_busy[o] && in_release[im_src[o]];
      im_data[o]    = im_busy[o] ? in_data[im_src[o]] : '0;
    end
    for (int ch = 0; ch < NCH; ch++) begin
      int unsigned sel;
      ch_req[ch] = |ch_gnt[ch];
      ch_pid[ch] = ch_busy[ch] ? ch_src[ch] : '0;
      for (int b = 0; b < BIN; b++)
        if (!ch_busy[ch] && ch_gnt[ch][b]) ch_pid[ch] = BW'(b);
      sel            = int'(ch_pid[ch]) * C + ch % C;
      ch_port[ch]    = ch_req[ch] ? in_dest_port[sel] : '0;
      ch_valid[ch]   = ch_busy[ch] && in_valid[sel];
      ch_release[ch] = ch_busy[ch] && in_release[sel];
      ch_data[ch]    = ch_busy[ch] ? in_data[sel] : '0;
    end
  end

  // connection status seen by the inputs
  always_comb begin
    in_connected = '0;
    in_grant     = '0;
    for (int o = 0; o < NL; o++) begin
      if (im_busy[o]) in_connected[im_src[o]] = 1'b1;
      if (im_win[o])  in_grant |= im_gnt[o];
    end
    for (int ch = 0; ch < NCH; ch++) begin
      if (ch_busy[ch]) in_connected[int'(ch_src[ch]) * C + ch % C] = 1'b1;
      for (int b = 0; b < BIN; b++)
        if (ch_win[ch] && ch_gnt[ch][b]) in_grant[b*C + ch%C] = 1'b1;
    end
  end

  // connectivity bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      im_busy <= '0;
      im_src  <= '0;
      ch_busy <= '0;
      ch_src  <= '0;
    end else begin
      for (int o = 0; o < NL; o++) begin
        if (im_release[o])                   im_busy[o] <= 1'b0;
        else if (im_win[o] && im_req[o]) begin
          im_busy[o] <= 1'b1;
          im_src[o]  <= im_pid[o];
        end
      end
      for (int ch = 0; ch < NCH; ch++) begin
        if (ch_release[ch])                  ch_busy[ch] <= 1'b0;
        else if (ch_win[ch] && ch_req[ch]) begin
          ch_busy[ch] <= 1'b1;
          ch_src[ch]  <= ch_pid[ch];
        end
      end
    end
  end


endmodule
