// tb_hirise_clrg_subblock: checks one 13x1 inter-layer sub-block of the
// 64-port Hi-Rise switch against a model of CLRG arbitration. 12 L2LC sources
// and the local intermediate source request with random primary-input
// indices. The model keeps one thermometer class counter per primary input
// and an LRG order across the 13 sources. In every free cycle the grant must
// be the first source in LRG order among those whose primary input is in the
// lowest requesting class, decided in the same cycle. class_win must flag
// grants where class overrode LRG. On a grant the winner's counter goes up
// one class; a win at class 11 halves every other counter. The connection
// must carry the source's flits until it releases, and the output must not
// grant while held. A final hotspot phase has all 13 sources
// requesting for many packets. Each primary input must then get
// its share: no input may be served more than once per 4 packets of
// another input that keeps requesting.
//
// The classes, the adversarial pattern and its 1-in-5 fairness follow the
// published arbiter. The saturation rule checked here (others halved, winner
// kept at 11) is this design's own departure from halving every counter.
module tb_hirise_clrg_subblock;
  import hirise_pkg::*;
  localparam int N = 64, L = 4, C = 4, W = 128;
  localparam int NL = N / L, NCH = C * (L - 1), NS = NCH + 1, BIN = NL / C;
  localparam int PW = $clog2(NL), SW = $clog2(NS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NS-1:0] src_req = '0, src_valid = '0, src_release = '0, win;
  logic [NS-1:0][PW-1:0] src_pid = '0;
  logic [NS-1:0][W-1:0] src_data = '0;
  logic out_busy, out_valid, class_win;
  logic [SW-1:0] out_src_sel;
  logic [PW-1:0] out_pid;
  logic [W-1:0] out_data;

  hirise_clrg_subblock dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  logic [1:0] chc [NCH][BIN];
  logic [1:0] lcc [NL];
  int ord[$];
  bit busy_m;
  int conn, flits_left, class_wins, halvings;

  function automatic logic [1:0] cls_of(int s);
    if (s < NCH) return chc[s][int'(src_pid[s]) % BIN];
    return lcc[src_pid[NCH]];
  endfunction

  task automatic model_grant(output int p, output bit cw);
    logic [1:0] best;
    bit any;
    p = -1; cw = 0; any = 0; best = 2'b11;
    if (busy_m) return;
    for (int s = 0; s < NS; s++)
      if (src_req[s] && (!any || therm_lt(cls_of(s), best))) begin best = cls_of(s); any = 1; end
    if (!any) return;
    foreach (ord[k])
      if (src_req[ord[k]] && cls_of(ord[k]) == best) begin p = ord[k]; break; end
    for (int s = 0; s < NS; s++) if (src_req[s] && cls_of(s) != best) cw = 1;
  endtask

  function automatic bit therm_lt(logic [1:0] a, logic [1:0] b);
    return $countones(a) < $countones(b);
  endfunction

  task automatic model_update(int p);
    logic [1:0] c;
    c = cls_of(p);
    if (c == CLS2) begin
      halvings++;
      for (int s = 0; s < NCH; s++) for (int b = 0; b < BIN; b++) chc[s][b] = therm_half(chc[s][b]);
      for (int i = 0; i < NL; i++) lcc[i] = therm_half(lcc[i]);
    end
    if (p < NCH) chc[p][int'(src_pid[p]) % BIN] = (c == CLS2) ? CLS2 : therm_inc(c);
    else lcc[src_pid[NCH]] = (c == CLS2) ? CLS2 : therm_inc(c);
    foreach (ord[k]) if (ord[k] == p) begin ord.delete(k); break; end
    ord.push_back(p);
  endtask

  // one cycle: drive at negedge, check combinational grant, update at posedge
  task automatic cycle(bit hot);
    int p; bit cw;
    @(negedge clk);
    src_release = '0;
    if (clr >= 0) src_req[clr] = 0;     // the winner's request is served
    clr = -1;
    if (!busy_m) begin
      for (int s = 0; s < NS; s++) begin
        if (hot) begin
          src_req[s] = 1;
          src_pid[s] = PW'((s < NCH) ? s % BIN : s % NL);
        end else if (!src_req[s] || $urandom_range(0, 3) == 0) begin
          src_req[s] = $urandom_range(0, 1);
          src_pid[s] = PW'((s < NCH) ? $urandom_range(0, BIN - 1) : $urandom_range(0, NL - 1));
        end
      end
    end
    for (int s = 0; s < NS; s++) begin
      src_valid[s] = $urandom_range(0, 1);
      src_data[s]  = {4{$urandom}};
    end
    if (busy_m) begin
      if (flits_left == 0) src_release[conn] = 1;
      else flits_left--;
    end
    #1;
    model_grant(p, cw);
    check(win == ((p < 0) ? '0 : NS'(1) << p), $sformatf("grant %b exp %0d", win, p));
    if (p >= 0) check(class_win == cw, "class_win flag");
    if (busy_m) begin
      check(out_busy && out_src_sel == SW'(conn), "connection held");
      check(out_valid == src_valid[conn], "valid follows source");
      check(out_data == src_data[conn], "data follows source");
      check(win == '0, "no grant while held");
    end
    @(posedge clk);
    if (busy_m && src_release[conn]) busy_m = 0;
    if (p >= 0) begin
      if (cw) class_wins++;
      model_update(p);
      busy_m = 1;
      conn = p;
      flits_left = $urandom_range(0, 3);
      served[hot ? p : 0]++;
      clr = p;
    end
  endtask

  int served[NS];
  int clr = -1;
  initial begin
    for (int s = 0; s < NCH; s++) for (int b = 0; b < BIN; b++) chc[s][b] = CLS0;
    for (int i = 0; i < NL; i++) lcc[i] = CLS0;
    for (int s = 0; s < NS; s++) begin ord.push_back(s); served[s] = 0; end
    busy_m = 0; class_wins = 0; halvings = 0; conn = 0; flits_left = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (4000) cycle(0);
    check(class_wins > 0, "class decided some grants");
    check(halvings > 0, "counter halving exercised");
    for (int s = 0; s < NS; s++) served[s] = 0;
    repeat (3000) cycle(1);
    // hotspot: every source keeps requesting, so every source is served
    // within a constant factor of the others
    begin
      int mn, mx;
      mn = served[0]; mx = served[0];
      for (int s = 0; s < NS; s++) begin
        if (served[s] < mn) mn = served[s];
        if (served[s] > mx) mx = served[s];
      end
      check(mn > 0 && mx - mn <= 2, $sformatf("hotspot service spread %0d..%0d", mn, mx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
