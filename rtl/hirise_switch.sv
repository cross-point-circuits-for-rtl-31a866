// hirise_switch: Hi-Rise, a high-radix switch for 3D integration.
//
// N inputs and N outputs are spread evenly over L layers (NL = N/L each).
// Every ordered pair of layers is joined by C dedicated layer-to-layer
// channels (L2LCs), so each layer sends and receives C*(L-1) of them. The
// default is the document's chosen configuration: radix 64, 4 layers, 4
// channels, 128-bit data, i.e. a 16x28 local switch and 16 sub-blocks of
// 13x1 per layer with CLRG arbitration.
//
// Interface, per input p (global number, layer = p / NL):
//   in_req + in_dest   request a connection to output in_dest (held until
//                      in_connected); arbitration takes one cycle;
//   in_grant           the connection was made at the end of this cycle;
//   in_valid/in_data   flits, passed combinationally to the connected output;
//   in_release         last cycle of the connection; the path is free next
//                      cycle.
// Per output q: out_busy (connected), out_src (connected input), out_valid and
// out_data (the flit), out_class_win (a grant this cycle was decided by the
// CLRG class rather than by LRG order). Output q lies on layer q / NL.
//
// Structure, sizes, input-binned channels and CLRG follow the published
// switch; the request/release handshake, the port numbering and the
// departure in the class-halving rule (see the sub-block) are this design's
// own.
module hirise_switch
  import hirise_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned L = 4,
  parameter int unsigned C = 4,
  parameter int unsigned W = 128,
  localparam int unsigned NL  = N / L,
  localparam int unsigned NCH = C * (L - 1),
  localparam int unsigned BIN = NL / C,
  localparam int unsigned PW  = (NL > 1) ? $clog2(NL) : 1,
  localparam int unsigned LW  = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned BW  = (BIN > 1) ? $clog2(BIN) : 1,
  localparam int unsigned NW  = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          in_req,
  input  logic [N-1:0][NW-1:0]  in_dest,
  input  logic [N-1:0]          in_valid,
  input  logic [N-1:0]          in_release,
  input  logic [N-1:0][W-1:0]   in_data,
  output logic [N-1:0]          in_grant,
  output logic [N-1:0]          in_connected,
  output logic [N-1:0]          out_busy,
  output logic [N-1:0]          out_valid,
  output logic [N-1:0][W-1:0]   out_data,
  output logic [N-1:0][NW-1:0]  out_src,
  output logic [N-1:0]          out_class_win
);

  // L2LC bundles, indexed by the owning layer
  logic [NCH-1:0]          tx_req     [L];
  logic [NCH-1:0][PW-1:0]  tx_port    [L];
  logic [NCH-1:0][BW-1:0]  tx_pid     [L];
  logic [NCH-1:0]          tx_valid   [L];
  logic [NCH-1:0]          tx_release [L];
  logic [NCH-1:0][W-1:0]   tx_data    [L];
  logic [NCH-1:0]          tx_win     [L];
  logic [NCH-1:0]          rx_req     [L];
  logic [NCH-1:0][PW-1:0]  rx_port    [L];
  logic [NCH-1:0][BW-1:0]  rx_pid     [L];
  logic [NCH-1:0]          rx_valid   [L];
  logic [NCH-1:0]          rx_release [L];
  logic [NCH-1:0][W-1:0]   rx_data    [L];
  logic [NCH-1:0]          rx_win     [L];

  // vertical wiring (the TSVs): channel k from layer a to layer d
  always_comb begin
    for (int d = 0; d < L; d++)
      for (int r = 0; r < L - 1; r++)
        for (int k = 0; k < C; k++) begin
          int unsigned a, ti, ri;
          a  = layer_of(d, r);              // source layer
          ti = rank_of(a, d) * C + k;       // index at the source
          ri = r * C + k;                   // index at the destination
          rx_req[d][ri]     = tx_req[a][ti];
          rx_port[d][ri]    = tx_port[a][ti];
          rx_pid[d][ri]     = tx_pid[a][ti];
          rx_valid[d][ri]   = tx_valid[a][ti];
          rx_release[d][ri] = tx_release[a][ti];
          rx_data[d][ri]    = tx_data[a][ti];
          tx_win[a][ti]     = rx_win[d][ri];
        end
  end

  for (genvar l = 0; l < L; l++) begin : g_layer
    logic [NL-1:0][LW-1:0] dl;
    logic [NL-1:0][PW-1:0] dp;
    always_comb
      for (int i = 0; i < NL; i++) begin
        dl[i] = LW'(int'(in_dest[l*NL + i]) / NL);
        dp[i] = PW'(int'(in_dest[l*NL + i]) % NL);
      end
    hirise_layer #(.N(N), .L(L), .C(C), .W(W), .LAYER_ID(l)) u_layer (
      .clk, .rst_n,
      .in_req(in_req[l*NL +: NL]), .in_dest_layer(dl), .in_dest_port(dp),
      .in_valid(in_valid[l*NL +: NL]), .in_release(in_release[l*NL +: NL]),
      .in_data(in_data[l*NL +: NL]),
      .in_grant(in_grant[l*NL +: NL]), .in_connected(in_connected[l*NL +: NL]),
      .out_busy(out_busy[l*NL +: NL]), .out_valid(out_valid[l*NL +: NL]),
      .out_data(out_data[l*NL +: NL]), .out_src(out_src[l*NL +: NL]),
      .out_class_win(out_class_win[l*NL +: NL]),
      .tx_req(tx_req[l]), .tx_port(tx_port[l]), .tx_pid(tx_pid[l]), .tx_valid(tx_valid[l]),
      .tx_release(tx_release[l]), .tx_data(tx_data[l]), .tx_win(tx_win[l]),
      .rx_req(rx_req[l]), .rx_port(rx_port[l]), .rx_pid(rx_pid[l]), .rx_valid(rx_valid[l]),
      .rx_release(rx_release[l]), .rx_data(rx_data[l]), .rx_win(rx_win[l]));
  end

endmodule
