// hirise_clrg_subblock: one inter-layer sub-block of Hi-Rise, the second
// stage that drives one final output, with Class-based Least Recently Granted
// (CLRG) arbitration.
//
// Sources 0..NCH-1 are the incoming L2LCs (index rank*C + k of the source
// layer); source NCH is this layer's intermediate output for this final
// output. Every source carries the index (`src_pid`) of the primary input
// that won it in its local switch. The sub-block keeps one class counter per
// primary input that can reach it: BIN per L2LC plus NL for the local source,
// N in all. A counter is a 2-bit thermometer 00 -> 01 -> 11, i.e. three
// priority classes. In one cycle the requesting sources whose primary input
// has the lowest class compete, and an LRG arbiter across the sources breaks
// the tie (the priority select multiplexers and priority lines of the
// cross-point). The LRG priority is updated on every grant, whether or not it
// decided it. The winner's counter is incremented. When the winner is
// already at 11 it would overflow: then all other counters are halved
// (11 -> 01, 01 -> 00) and the winner stays at 11, behind every input it
// has just beaten, which keeps the class order.
//
// The connection is held (`out_busy`) until the connected source raises
// `src_release`. `out_src_sel` and `out_pid` identify the connected source.
// Follows the document: the counters per primary input, three classes, LRG
// tie-break, halving on saturation. Own choices: a win at 11 as the point of
// saturation, the winner kept at 11, reset values, the handshake.
module hirise_clrg_subblock
  import hirise_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter int unsigned L   = 4,
  parameter int unsigned C   = 4,
  parameter int unsigned W   = 128,
  localparam int unsigned NL  = N / L,
  localparam int unsigned NCH = C * (L - 1),
  localparam int unsigned NS  = NCH + 1,
  localparam int unsigned BIN = NL / C,
  localparam int unsigned PW  = (NL > 1) ? $clog2(NL) : 1,
  localparam int unsigned SW  = $clog2(NS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NS-1:0]         src_req,      // requesting this output now
  input  logic [NS-1:0][PW-1:0] src_pid,      // primary input behind the source
  input  logic [NS-1:0]         src_valid,
  input  logic [NS-1:0]         src_release,
  input  logic [NS-1:0][W-1:0]  src_data,
  output logic [NS-1:0]         win,          // grant, back to the local switches
  output logic                  out_busy,
  output logic [SW-1:0]         out_src_sel,
  output logic [PW-1:0]         out_pid,
  output logic                  out_valid,
  output logic [W-1:0]          out_data,
  output logic                  class_win     // this grant was decided by class
);

  logic [1:0] ch_cnt  [NCH][BIN];
  logic [1:0] loc_cnt [NL];
  logic [1:0] cls     [NS];
  logic [NS-1:0] rq, rq0, rq1, rq2, lrg_rq, gnt;

  // Mux1: counter of the primary input that won each source
  always_comb begin
    for (int s = 0; s < NCH; s++) cls[s] = ch_cnt[s][int'(src_pid[s]) % BIN];
    cls[NCH] = loc_cnt[src_pid[NCH]];
  end

  // priority select: only the best class that is requesting competes
  always_comb begin
    rq = out_busy ? '0 : src_req;
    for (int s = 0; s < NS; s++) begin
      rq0[s] = rq[s] && (cls[s] == CLS0);
      rq1[s] = rq[s] && (cls[s] == CLS1);
      rq2[s] = rq[s] && (cls[s] != CLS0) && (cls[s] != CLS1);
    end
    if (rq0 != '0)      lrg_rq = rq0;
    else if (rq1 != '0) lrg_rq = rq1;
    else                lrg_rq = rq2;
  end

  lrg_arbiter #(.N(NS)) u_lrg (.clk, .rst_n, .req(lrg_rq), .upd(1'b1), .gnt(gnt));

  assign win = gnt;
  // the grant went against LRG order if a higher-priority class existed
  assign class_win = (gnt != '0) && (lrg_rq != rq);

  // data path
  always_comb begin
    out_pid   = src_pid[out_src_sel];
    out_valid = out_busy && src_valid[out_src_sel];
    out_data  = out_busy ? src_data[out_src_sel] : '0;
  end

  logic [SW-1:0] gnt_idx;
  logic [1:0]    gnt_cls;
  always_comb begin
    gnt_idx = '0;
    for (int s = 0; s < NS; s++) if (gnt[s]) gnt_idx = SW'(s);
    gnt_cls = cls[gnt_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_busy    <= 1'b0;
      out_src_sel <= '0;
      for (int s = 0; s < NCH; s++)
        for (int b = 0; b < BIN; b++) ch_cnt[s][b] <= CLS0;
      for (int i = 0; i < NL; i++) loc_cnt[i] <= CLS0;
    end else begin
      if (out_busy && src_release[out_src_sel]) out_busy <= 1'b0;
      if (gnt != '0) begin
        out_busy    <= 1'b1;
        out_src_sel <= gnt_idx;
        if (gnt_cls == CLS2) begin
          // saturation: halve every other counter, the winner stays at 11
          for (int s = 0; s < NCH; s++)
            for (int b = 0; b < BIN; b++) ch_cnt[s][b] <= therm_half(ch_cnt[s][b]);
          for (int i = 0; i < NL; i++) loc_cnt[i] <= therm_half(loc_cnt[i]);
          if (gnt_idx == SW'(NCH)) loc_cnt[src_pid[NCH]] <= CLS2;
          else ch_cnt[gnt_idx][int'(src_pid[gnt_idx]) % BIN] <= CLS2;
        end else begin
          if (gnt_idx == SW'(NCH)) loc_cnt[src_pid[NCH]] <= therm_inc(gnt_cls);
          else ch_cnt[gnt_idx][int'(src_pid[gnt_idx]) % BIN] <= therm_inc(gnt_cls);
        end
      end
    end
  end

  always_comb
    if (rst_n) a_no_grant_when_busy: assert (!out_busy || (gnt == '0));

endmodule
