// tb_fram_ctrl: checks the adiabatic FRAM sequencer at full size (256 rows,
// 160 bit-lines) against a cell-level model.
//
// PL is modelled by its peak/trough strobes, alternating every HALF clock
// cycles. At every event the model works out each bit-line's level: it
// follows PL with PLEN, sits at bl_d with WREN, or floats during a read. It
// writes a cell when the word-line is on, the line is clamped and its level
// differs from PL: clamp high over a trough writes 1, clamp low under a peak
// writes 0. A read peak destroys the enabled cells, which must be restored
// by the write-back. Checks:
//  * a bit-line is only clamped, or handed back to PL, at the level PL has
//    at that moment (no abrupt swings), except for floating lines after sensing;
//  * columns that are not enabled never change;
//  * written and read-back data match a reference memory;
//  * a row write spans exactly 3 events (1.5 PL periods) from start to
//    row_done, back-to-back writes start on alternate peak/trough, and N
//    queued writes take 3N events;
//  * reads start on a trough and return data at the following peak.
//
// The adiabatic rules and the 1.5-period row write with alternating order
// follow the published FRAM; the exact event schedule and read timing
// checked here are this design's own.
module tb_fram_ctrl;
  localparam int ROWS = 256, NCOL = 160, HALF = 5;
  localparam int RW = $clog2(ROWS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pu = 0, pd = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [RW-1:0] req_row = '0, row;
  logic [NCOL-1:0] req_col_en = '0, req_col_d = '0;
  logic rvalid;
  logic [NCOL-1:0] rdata, plen, wren, bl_d, sense_d;
  logic wl, pre, sa_en, busy, row_done;

  fram_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PL resonance strobes: peak, HALF cycles, trough, HALF cycles, ...
  int ph = 0, nev = 0;
  logic next_is_pu = 1;
  always @(negedge clk) begin
    pu <= 0; pd <= 0;
    if (rst_n) begin
      ph++;
      if (ph == HALF) begin
        ph = 0;
        if (next_is_pu) pu <= 1; else pd <= 1;
        next_is_pu = !next_is_pu;
      end
    end
  end

  // cell model
  logic [NCOL-1:0] cellm [ROWS];
  logic [NCOL-1:0] ref_mem [ROWS];
  logic [NCOL-1:0] bl_lvl, floating;
  logic [NCOL-1:0] read_en;
  assign sense_d = sa_en ? cellm[row] : '0;

  int events_since_start, last_start_pu, row_start_ev, rows_done;
  always @(posedge clk) if (rst_n && (pu || pd)) begin
    logic pl;
    logic [NCOL-1:0] o_plen, o_wren, o_bld;
    logic o_wl, o_pre, o_sa;
    pl = pu;
    nev++;
    o_plen = plen; o_wren = wren; o_bld = bl_d; o_wl = wl; o_pre = pre;
    // line levels at this event, from the drive of the interval before it
    for (int c = 0; c < NCOL; c++) begin
      if (o_plen[c])      begin bl_lvl[c] = pl;       floating[c] = 0; end
      else if (o_wren[c]) begin bl_lvl[c] = o_bld[c]; floating[c] = 0; end
      else                floating[c] = 1;
      check(!(o_plen[c] && o_wren[c]), "PLEN and WREN never together");
    end
    // field across cells of the open row
    if (o_wl)
      for (int c = 0; c < NCOL; c++)
        if (o_wren[c] && o_bld[c] != pl) cellm[row][c] = o_bld[c];
    // sensing at a peak destroys the enabled cells (PL high, BL near 0),
    // after the sequencer has taken the sensed data
    o_sa = sa_en;
    #1;
    if (o_sa) begin
      check(pl, "sense at a peak");
      for (int c = 0; c < NCOL; c++) if (read_en[c]) cellm[row][c] = 1'b0;
    end
    // new drive after this event: must start only at PL's level
    for (int c = 0; c < NCOL; c++) begin
      if (wren[c] && !floating[c] && (!o_wren[c] || o_bld[c] != bl_d[c]))
        check(bl_lvl[c] == bl_d[c], $sformatf("clamp col %0d at %0b, line at %0b", c, bl_d[c], bl_lvl[c]));
      if (plen[c] && !o_plen[c] && !floating[c])
        check(bl_lvl[c] == pl, $sformatf("col %0d rejoins PL at other level", c));
    end
  end

  // count events per row write
  always @(posedge clk) if (rst_n) begin
    if (pu || pd) events_since_start++;
    #1;
    if (row_done) begin
      rows_done++;
      check(events_since_start == 3, $sformatf("row write took %0d events", events_since_start));
    end
  end
  // detect starts of row writes (write or write-back): state enters S_WR with k == 0
  logic first_pol, have_prev;
  always @(posedge clk) begin
    logic ev;
    ev = pu | pd;
    #1;
    if (rst_n && ev && dut.state == 2 && dut.k == 0) begin
      events_since_start = 0;
      if (have_prev && dut.x == first_pol) alt_same++;
      if (have_prev) alt_total++;
      first_pol = dut.x;
      have_prev = 1;
    end
  end
  int alt_same = 0, alt_total = 0;

  task automatic send(bit we, int r, logic [NCOL-1:0] en, logic [NCOL-1:0] d);
    @(negedge clk);
    req_valid = 1; req_we = we; req_row = RW'(r); req_col_en = en; req_col_d = d;
    do @(posedge clk); while (!req_ready);
    @(negedge clk); req_valid = 0;
  endtask

  task automatic wr(int r, logic [NCOL-1:0] en, logic [NCOL-1:0] d);
    send(1, r, en, d);
    ref_mem[r] = (ref_mem[r] & ~en) | (d & en);
  endtask

  task automatic rd(int r, logic [NCOL-1:0] en);
    int e0;
    e0 = nev;
    send(0, r, en, '0);
    read_en = en;
    while (!rvalid) @(posedge clk);
    #1;
    check(rdata == (ref_mem[r] & en), $sformatf("read row %0d", r));
    wait_idle();
  endtask

  task automatic wait_idle();
    while (busy) @(posedge clk);
    @(negedge clk);
  endtask

  function automatic logic [NCOL-1:0] rnd();
    logic [NCOL-1:0] v;
    for (int i = 0; i < NCOL; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [NCOL-1:0] half_en(bit odd);
    logic [NCOL-1:0] v;
    for (int i = 0; i < NCOL; i++) v[i] = (i % 2) == int'(odd);
    return v;
  endfunction

  initial begin
    bl_lvl = '0; floating = '0; read_en = '0;
    events_since_start = 0; rows_done = 0; have_prev = 0; first_pol = 0;
    for (int r = 0; r < ROWS; r++) begin
      cellm[r] = rnd();
      ref_mem[r] = cellm[r];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single writes with full rows (2T-2C style: all columns) and checks by reads
    for (int n = 0; n < 12; n++) begin
      int r;
      r = $urandom_range(0, ROWS - 1);
      wr(r, '1, rnd());
      wait_idle();
      check(cellm[r] == ref_mem[r], $sformatf("cells of row %0d after write", r));
      rd(r, '1);
      check(cellm[r] == ref_mem[r], "cells restored after read");
    end
    // half-row writes (1T-1C style: every other column), other half untouched
    for (int n = 0; n < 12; n++) begin
      int r; bit odd;
      r = $urandom_range(0, ROWS - 1);
      odd = n % 2;
      wr(r, half_en(odd), rnd());
      wait_idle();
      check(cellm[r] == ref_mem[r], "half-row write leaves other columns");
      rd(r, half_en(odd));
      check(cellm[r] == ref_mem[r], "half-row read restores");
    end
    // back-to-back writes: 3 events per row, alternating polarity
    begin
      int e0, rd0, nrows;
      nrows = 16;
      wait_idle();
      alt_same = 0; alt_total = 0; have_prev = 0;
      e0 = -1; rd0 = rows_done;
      for (int n = 0; n < nrows; n++) begin
        int r;
        r = $urandom_range(0, ROWS - 1);
        send(1, r, '1, rnd());
        ref_mem[r] = dut.p_d;
        if (e0 < 0) e0 = nev;
      end
      wait_idle();
      check(rows_done - rd0 == nrows, "all rows done");
      check(nev - e0 <= 3 * nrows + 2, $sformatf("%0d rows in %0d events", nrows, nev - e0));
      check(alt_same == 0 && alt_total == nrows - 1,
            $sformatf("start polarity alternates (%0d same of %0d)", alt_same, alt_total));
      for (int r = 0; r < ROWS; r++) check(cellm[r] == ref_mem[r], "memory after burst");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
