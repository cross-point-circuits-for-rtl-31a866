// tb_sonos_program_ctrl: checks the SONOS write state machine at its default
// parameters (1000-cycle program and erase). The pump comparator `pump_ok`
// is driven low for a random number of cycles at every step. The test
// checks the transition steps 1-4 in order, that no step moves on while
// pump_ok is low, rail shorting only in step 3, recycling only in step 4,
// the program word-line pulse of exactly PROG_CYCLES, one commit and one
// done per program, the erase pulse length, and the total program time:
// 1 load + 4 steps + settle + pump waits + PROG_CYCLES + 1 done cycle.
//
// The four transition steps, pump-comparator waits, charge sharing and
// recycling follow the published flash; the step-by-step cycle counts and
// the 1000-cycle program pulse are this design's own.
module tb_sonos_program_ctrl;
  import sonos_pkg::*;
  localparam int NBL = 1024, ROWS = 260, PROG = 1000, ERASE = 1000;
  localparam int RW = $clog2(ROWS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, erase = 0, pump_ok = 0;
  logic [RW-1:0] row = '0, row_q;
  logic [NBL-1:0] data = '0, data_q;
  logic busy, done, commit, tp_en, rail_short, rail_recycle, wl_prog, wl_erase;
  phase_e phase;
  logic [2:0] tp_step;

  sonos_program_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pump model: after each change of the requested step/phase the rails need
  // a random settling time
  int settle;
  logic [2:0] last_step;
  phase_e last_phase;
  always @(negedge clk) begin
    if (tp_step != last_step || phase != last_phase) settle = $urandom_range(0, 6);
    else if (settle > 0) settle--;
    pump_ok = (settle == 0);
    last_step = tp_step;
    last_phase = phase;
  end

  // monitors
  int prog_len, commits, dones, steps_seen[5], wait_low;
  logic [2:0] prev_step;
  always @(posedge clk) if (rst_n) begin
    if (wl_prog) prog_len++;
    if (commit) commits++;
    if (done) dones++;
    if (tp_step != 0) steps_seen[tp_step]++;
    check(rail_short == (tp_step == 3), "short only in step 3");
    check(rail_recycle == (tp_step == 4), "recycle only in step 4");
    check(tp_en == (tp_step != 0), "transition pump only during steps");
    if (!pump_ok && tp_step != 0) wait_low++;
  end
  always @(posedge clk) begin
    #1;
    if (rst_n && tp_step != prev_step && prev_step != 0 && tp_step != 0)
      check(tp_step == prev_step + 1, "steps in order");
    prev_step = tp_step;
  end
  // a step may only advance on a cycle where pump_ok was high
  logic [2:0] s_before; logic ok_before;
  always @(posedge clk) begin
    s_before = tp_step; ok_before = pump_ok;
    #1;
    if (rst_n && s_before != 0 && !ok_before) check(tp_step == s_before, "held while pump not ok");
  end

  int t0, cyc, waits;
  initial begin
    settle = 0; last_step = 0; last_phase = PH_HOLD; prev_step = 0;
    prog_len = 0; commits = 0; dones = 0; wait_low = 0;
    for (int i = 0; i < 5; i++) steps_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      @(negedge clk);
      row = RW'($urandom_range(0, ROWS - 1));
      for (int w = 0; w < NBL / 32; w++) data[w*32 +: 32] = $urandom;
      start = 1;
      @(negedge clk); start = 0;
      data = ~data;                         // must have been latched
      prog_len = 0; commits = 0; dones = 0;
      for (int i = 0; i < 5; i++) steps_seen[i] = 0;
      waits = 0;
      cyc = 0;
      // sample between edges: state and the pump_ok the next edge will use
      forever begin
        @(negedge clk); #1;
        cyc++;
        if (done) break;
        if (!pump_ok && (tp_step != 0 || (phase == PH_PROGRAM && !wl_prog))) waits++;
      end
      @(negedge clk);
      check(row_q == row, "row latched");
      check(data_q == ~data, "data latched at start");
      check(prog_len == PROG, $sformatf("program pulse %0d cycles", prog_len));
      check(commits == 1 && dones == 1, "one commit and done");
      for (int s = 1; s <= 4; s++) check(steps_seen[s] >= 1, $sformatf("step %0d seen", s));
      // after the load cycle: 4 steps + settle + waits + program + done
      check(cyc == 4 + 1 + waits + PROG + 1,
            $sformatf("program time %0d exp %0d", cyc, 4 + 1 + waits + PROG + 1));
      check(!busy, "idle after done");
    end
    // erase
    @(negedge clk); erase = 1;
    @(negedge clk); erase = 0;
    t0 = $time / 10;
    begin
      int el;
      el = 0;
      while (busy) begin @(posedge clk); #1; if (wl_erase) el++; end
      check(el == ERASE - 1 || el == ERASE, $sformatf("erase pulse %0d", el));
    end
    check(wait_low > 0, "pump waits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
