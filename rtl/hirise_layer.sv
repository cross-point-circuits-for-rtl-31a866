// hirise_layer: one silicon layer of the Hi-Rise switch.
//
// Holds the local switch and the NL inter-layer CLRG sub-blocks, one per
// final output of the layer. Sub-block j takes intermediate output j of the
// local switch plus all NCH incoming L2LCs; an incoming L2LC requests
// sub-block j when the port it carries equals j. The sub-block grants are
// sent back: to the local switch of this layer for the intermediate outputs,
// and out through `rx_win` to the layer that owns each incoming L2LC.
// Incoming L2LC index = rank_of(LAYER_ID, source layer)*C + k; outgoing
// index = rank_of(LAYER_ID, destination layer)*C + k.
// `out_src` gives the global number of the input connected to each output.
// Intermediate outputs are not registered: the local and inter-layer
// decisions take one clock cycle together, as in the document's two-phase
// evaluation.
//
// The split into a local switch and per-output sub-blocks follows the
// published switch; the wiring order of the channel bundles is this design's
// own.
module hirise_layer
  import hirise_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter int unsigned L        = 4,
  parameter int unsigned C        = 4,
  parameter int unsigned W        = 128,
  parameter int unsigned LAYER_ID = 0,
  localparam int unsigned NL  = N / L,
  localparam int unsigned NCH = C * (L - 1),
  localparam int unsigned NS  = NCH + 1,
  localparam int unsigned BIN = NL / C,
  localparam int unsigned PW  = (NL > 1) ? $clog2(NL) : 1,
  localparam int unsigned LW  = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned BW  = (BIN > 1) ? $clog2(BIN) : 1,
  localparam int unsigned NW  = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NL-1:0]           in_req,
  input  logic [NL-1:0][LW-1:0]   in_dest_layer,
  input  logic [NL-1:0][PW-1:0]   in_dest_port,
  input  logic [NL-1:0]           in_valid,
  input  logic [NL-1:0]           in_release,
  input  logic [NL-1:0][W-1:0]    in_data,
  output logic [NL-1:0]           in_grant,
  output logic [NL-1:0]           in_connected,
  output logic [NL-1:0]           out_busy,
  output logic [NL-1:0]           out_valid,
  output logic [NL-1:0][W-1:0]    out_data,
  output logic [NL-1:0][NW-1:0]   out_src,
  output logic [NL-1:0]           out_class_win,
  // outgoing L2LCs
  output logic [NCH-1:0]          tx_req,
  output logic [NCH-1:0][PW-1:0]  tx_port,
  output logic [NCH-1:0][BW-1:0]  tx_pid,
  output logic [NCH-1:0]          tx_valid,
  output logic [NCH-1:0]          tx_release,
  output logic [NCH-1:0][W-1:0]   tx_data,
  input  logic [NCH-1:0]          tx_win,
  // incoming L2LCs
  input  logic [NCH-1:0]          rx_req,
  input  logic [NCH-1:0][PW-1:0]  rx_port,
  input  logic [NCH-1:0][BW-1:0]  rx_pid,
  input  logic [NCH-1:0]          rx_valid,
  input  logic [NCH-1:0]          rx_release,
  input  logic [NCH-1:0][W-1:0]   rx_data,
  output logic [NCH-1:0]          rx_win
);

  localparam int unsigned SW = $clog2(NS);

  logic [NL-1:0]          im_req, im_valid, im_release, im_win;
  logic [NL-1:0][PW-1:0]  im_pid;
  logic [NL-1:0][W-1:0]   im_data;
  logic [NS-1:0]          sb_win [NL];
  logic [NL-1:0][SW-1:0]  sb_sel;
  logic [NL-1:0][PW-1:0]  sb_pid;

  hirise_local_switch #(.N(N), .L(L), .C(C), .W(W), .LAYER_ID(LAYER_ID)) u_local (
    .clk, .rst_n,
    .in_req, .in_dest_layer, .in_dest_port, .in_valid, .in_release, .in_data,
    .in_grant, .in_connected,
    .im_req, .im_pid, .im_valid, .im_release, .im_data, .im_win,
    .ch_req(tx_req), .ch_port(tx_port), .ch_pid(tx_pid), .ch_valid(tx_valid),
    .ch_release(tx_release), .ch_data(tx_data), .ch_win(tx_win));

  for (genvar j = 0; j < NL; j++) begin : g_sb
    logic [NS-1:0]          s_req, s_valid, s_release;
    logic [NS-1:0][PW-1:0]  s_pid;
    logic [NS-1:0][W-1:0]   s_data;
    always_comb begin
      for (int s = 0; s < NCH; s++) begin
        s_req[s]     = rx_req[s] && (int'(rx_port[s]) == j);
        s_pid[s]     = PW'(rx_pid[s]);
        s_valid[s]   = rx_valid[s];
        s_release[s] = rx_release[s];
        s_data[s]    = rx_data[s];
      end
      s_req[NCH]     = im_req[j];
      s_pid[NCH]     = im_pid[j];
      s_valid[NCH]   = im_valid[j];
      s_release[NCH] = im_release[j];
      s_data[NCH]    = im_data[j];
    end
    hirise_clrg_subblock #(.N(N), .L(L), .C(C), .W(W)) u_sb (
      .clk, .rst_n,
      .src_req(s_req), .src_pid(s_pid), .src_valid(s_valid), .src_release(s_release),
      .src_data(s_data), .win(sb_win[j]), .out_busy(out_busy[j]), .out_src_sel(sb_sel[j]),
      .out_pid(sb_pid[j]), .out_valid(out_valid[j]), .out_data(out_data[j]),
      .class_win(out_class_win[j]));
  end

  always_comb begin
    rx_win = '0;
    for (int j = 0; j < NL; j++) begin
      im_win[j] = sb_win[j][NCH];
      rx_win   |= sb_win[j][NCH-1:0];
      // global number of the connected primary input
      if (int'(sb_sel[j]) == NCH)
        out_src[j] = NW'(LAYER_ID * NL + int'(sb_pid[j]));
      else
        out_src[j] = NW'(layer_of(LAYER_ID, int'(sb_sel[j]) / C) * NL +
                         int'(sb_pid[j]) * C + int'(sb_sel[j]) % C);
    end
  end

endmodule
