// tb_hirise_switch: end-to-end test of the Hi-Rise switch at its default size
// (radix 64, 4 layers, 4 channels, 128-bit flits).
//
// Each input owns a list of packets (destination). A packet is one request
// followed by 4 flits; the 4th flit carries the release. Every flit is tagged
// with its source, packet number and flit number, and the monitor checks at
// each output that the tag matches the connected input and arrives in order.
// Phases:
//   1. an isolated request is granted in the cycle it is made;
//   2. the adversarial pattern: inputs 3, 7, 11, 15 (layer 0) and 20
//      (layer 1) all send to output 63 (layer 3). With CLRG every group of 5
//      consecutive grants must serve each of the five inputs once;
//   3. hotspot: all 64 inputs send 3 packets to output 63; every aligned
//      group of 64 grants must serve each input exactly once;
//   4. uniform random traffic: all packets must arrive intact.
//
// The 64-port, 4-layer, 4-channel configuration and the hotspot and
// adversarial patterns follow the published switch; the connection protocol
// and the per-cycle checks are this design's own.
module tb_hirise_switch;
  localparam int N = 64, L = 4, C = 4, W = 128, NW = $clog2(N), FLITS = 4, MAXP = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]          in_req, in_valid, in_release, in_grant, in_connected;
  logic [N-1:0][NW-1:0]  in_dest;
  logic [N-1:0][W-1:0]   in_data;
  logic [N-1:0]          out_busy, out_valid, out_class_win;
  logic [N-1:0][W-1:0]   out_data;
  logic [N-1:0][NW-1:0]  out_src;

  hirise_switch #(.N(N), .L(L), .C(C), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // per-input packet queues
  int pk_dest [N][MAXP];
  int pk_n [N], pk_i [N], flit [N];
  int sent_flits = 0, recv_flits = 0, class_wins = 0;
  int grant_log [$];          // grants to output 63, in order

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0d: %s", cyc, msg);
    end
  endtask

  // driver
  always_comb begin
    for (int p = 0; p < N; p++) begin
      in_req[p]     = !in_connected[p] && pk_i[p] < pk_n[p];
      in_dest[p]    = NW'(pk_i[p] < pk_n[p] ? pk_dest[p][pk_i[p]] : 0);
      in_valid[p]   = in_connected[p];
      in_release[p] = in_connected[p] && flit[p] == FLITS - 1;
      in_data[p]    = {8'(p), 8'(pk_i[p]), 8'(flit[p]), {(W-24){1'b0}}} ^ W'(p * 7919);
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N; p++) begin
      if (in_grant[p] && int'(in_dest[p]) == N - 1) grant_log.push_back(p);
      if (in_connected[p]) begin
        sent_flits++;
        if (flit[p] == FLITS - 1) begin
          flit[p] <= 0;
          pk_i[p] <= pk_i[p] + 1;
        end else flit[p] <= flit[p] + 1;
      end
    end
    for (int q = 0; q < N; q++) begin
      if (out_class_win[q]) class_wins++;
      if (out_valid[q]) begin
        logic [W-1:0] d;
        int s;
        s = int'(out_src[q]);
        d = out_data[q] ^ W'(s * 7919);
        recv_flits++;
        check(d[W-1 -: 8] == 8'(s), $sformatf("output %0d flit from %0d tagged %0d", q, s, d[W-1 -: 8]));
        check(d[W-17 -: 8] == 8'(flit[s]), $sformatf("output %0d flit order", q));
        check(pk_dest[s][pk_i[s]] == q, $sformatf("input %0d delivered to wrong output %0d", s, q));
      end
    end
  end

  task automatic clear_queues();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < N; p++) begin pk_n[p] = 0; pk_i[p] = 0; flit[p] = 0; end
    grant_log.delete();
  endtask

  task automatic wait_idle(int limit);
    int t = 0;
    do begin
      @(posedge clk); t++;
    end while (t < limit && ((in_req | in_connected) != '0));
    check(t < limit, "traffic did not drain");
  endtask

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    clear_queues();

    // 1: single-cycle arbitration, input 5 (layer 0) to output 40 (layer 2)
    pk_dest[5][0] = 40; pk_n[5] = 1;
    #1;
    check(in_grant[5] === 1'b1, "isolated request not granted in its own cycle");
    wait_idle(50);
    check(recv_flits == FLITS, $sformatf("single packet: %0d flits received", recv_flits));

    // 2: adversarial pattern from the document
    clear_queues();
    begin
      int ins[5] = '{3, 7, 11, 15, 20};
      foreach (ins[k]) begin
        pk_n[ins[k]] = 4;
        for (int j = 0; j < 4; j++) pk_dest[ins[k]][j] = 63;
      end
      @(negedge clk);
      wait_idle(400);
      check(grant_log.size() == 20, $sformatf("adversarial: %0d grants", grant_log.size()));
      for (int g = 0; g + 5 <= grant_log.size(); g += 5) begin
        int seen = 0;
        for (int j = 0; j < 5; j++)
          foreach (ins[k]) if (grant_log[g + j] == ins[k]) seen |= 1 << k;
        check(seen == 31, $sformatf("adversarial: window at %0d not fair (%b)", g, seen));
      end
      $write("adversarial grant order:");
      foreach (grant_log[g]) $write(" %0d", grant_log[g]);
      $display("");
    end

    // 3: hotspot, every input to output 63, 3 packets each
    clear_queues();
    for (int p = 0; p < N; p++) begin
      pk_n[p] = 3;
      for (int j = 0; j < 3; j++) pk_dest[p][j] = 63;
    end
    @(negedge clk);
    t0 = cyc;
    wait_idle(3 * N * (FLITS + 1) + 50);
    check(grant_log.size() == 3 * N, $sformatf("hotspot: %0d grants", grant_log.size()));
    // one grant then 4 flits per packet: 5 cycles per packet at the output
    check(cyc - t0 <= 3 * N * (FLITS + 1) + 2, $sformatf("hotspot took %0d cycles", cyc - t0));
    for (int g = 0; g + N <= grant_log.size(); g += N) begin
      logic [N-1:0] seen = '0;
      for (int j = 0; j < N; j++) seen[grant_log[g + j]] = 1'b1;
      check(seen == '1, $sformatf("hotspot: round at %0d misses inputs", g));
    end
    check(class_wins > 0, "no grant was decided by class");

    // 4: uniform random
    clear_queues();
    for (int p = 0; p < N; p++) begin
      pk_n[p] = MAXP;
      for (int j = 0; j < MAXP; j++) pk_dest[p][j] = $urandom_range(N - 1);
    end
    sent_flits = 0; recv_flits = 0;
    @(negedge clk);
    wait_idle(8000);
    check(recv_flits == N * MAXP * FLITS, $sformatf("uniform: %0d flits received", recv_flits));
    check(sent_flits == recv_flits, "uniform: flits lost");

    $display("class-decided grants: %0d", class_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
