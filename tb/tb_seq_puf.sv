// tb_seq_puf: tests the sequence-dependent PUF with its controller.
// Rows 1..4 are initialised, the two sequences of the document's example,
// (1,2)(2,3)(3,4) and (4,3)(3,2)(2,1), are applied, and row 2 is read.
// The expected response is worked out in the testbench by replaying the
// pairs on a copy of the initial data, using the array model's hidden cell
// strengths. Checks: responses equal that replay, the two orders give
// different responses, a repeat gives the same response, the pre-charge /
// equalise / word-line order of every pair, and the cycles per pair.
//
// The example sequences follow the published PUF; the release-point cycle
// counts and the strength model are this design's own.
module tb_seq_puf;
  localparam int R = 64, C = 64, MS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, rdata_valid, preb, eqb, sa_en;
  logic [1:0] cmd;
  logic [5:0] row_a;
  logic [C-1:0] wdata, rdata;
  logic [2:0] seq_len;
  logic [MS-1:0][5:0] seq_a, seq_b;
  logic [3:0] cfg_pre, cfg_eq;
  logic [R-1:0] wl;

  seq_puf #(.ROWS(R), .COLS(C), .MAXSEQ(MS), .CHIP_SEED(32'hABCD_0001)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // waveform monitor: while two word-lines are up, preb must rise no later
  // than eqb, and the word-lines must rise while pre-charge is still on
  int wl_up_cycles = 0, pairs_seen = 0;
  logic [R-1:0] wl_d = '0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(wl) == 2 && $countones(wl_d) != 2) begin
      pairs_seen++;
      check(!preb && !eqb, "word-lines rose after pre-charge was released");
    end
    if ($countones(wl) == 2) check(!(eqb && !preb), "eqb released before preb");
    wl_d <= wl;
  end

  task automatic do_cmd(logic [1:0] c, int r, logic [C-1:0] d);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; row_a = 6'(r); wdata = d;
    @(negedge clk);
    cmd_valid = 0;
    while (!cmd_ready) @(negedge clk);
  endtask

  logic [C-1:0] model [5];
  task automatic replay(int a, int b);
    for (int c = 0; c < C; c++)
      if (model[a][c] != model[b][c]) begin
        logic w;
        w = (dut.u_array.strength(a, c, model[a][c]) >= dut.u_array.strength(b, c, model[b][c])) ? model[a][c] : model[b][c];
        // the model resolves with the lower-numbered row first
        if (a > b) w = (dut.u_array.strength(b, c, model[b][c]) >= dut.u_array.strength(a, c, model[a][c])) ? model[b][c] : model[a][c];
        model[a][c] = w; model[b][c] = w;
      end
  endtask

  task automatic run(int order, logic [C-1:0] init [5], output logic [C-1:0] resp, output int cycles);
    int t0;
    for (int r = 1; r <= 4; r++) do_cmd(2'd0, r, init[r]);
    if (order == 0) begin
      seq_a = {6'd3, 6'd2, 6'd1, 6'd0}; seq_b = {6'd4, 6'd3, 6'd2, 6'd0};
      seq_a[0] = 1; seq_b[0] = 2; seq_a[1] = 2; seq_b[1] = 3; seq_a[2] = 3; seq_b[2] = 4;
    end else begin
      seq_a[0] = 4; seq_b[0] = 3; seq_a[1] = 3; seq_b[1] = 2; seq_a[2] = 2; seq_b[2] = 1;
    end
    seq_len = 3;
    @(negedge clk);
    cmd_valid = 1; cmd = 2'd1;
    t0 = $time;
    @(negedge clk);
    cmd_valid = 0;
    while (!cmd_ready) @(negedge clk);
    cycles = ($time - t0) / 10;
    do_cmd(2'd2, 2, '0);
    resp = rdata;
  endtask

  initial begin
    logic [C-1:0] init [5], r0, r1, r2;
    int cyc0, cyc1, hd_total = 0;
    cmd_valid = 0; cmd = 0; row_a = 0; wdata = 0; seq_len = 0; seq_a = '0; seq_b = '0;
    cfg_pre = 4'd1; cfg_eq = 4'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      for (int r = 1; r <= 4; r++) init[r] = {$urandom, $urandom};
      init[0] = '0;
      run(0, init, r0, cyc0);
      model = init; replay(1, 2); replay(2, 3); replay(3, 4);
      check(r0 == model[2], "forward sequence response differs from replay");
      run(1, init, r1, cyc1);
      model = init; replay(4, 3); replay(3, 2); replay(2, 1);
      check(r1 == model[2], "reverse sequence response differs from replay");
      run(0, init, r2, cyc0);
      check(r2 == r0, "response not repeatable");
      // one command cycle, then per pair: 1 pre-charge + (cfg_eq + 2) fight cycles
      check(cyc0 == 1 + 3 * (1 + int'(cfg_eq) + 2), $sformatf("sequence took %0d cycles", cyc0));
      hd_total += $countones(r0 ^ r1);
    end
    check(hd_total > 0, "sequence order never changed the response");
    check(pairs_seen == 6 * 9, $sformatf("%0d pair assertions seen", pairs_seen));
    $display("inter-sequence HD over 6 trials: %0d bits", hd_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
