// tb_crosspoint_top: end-to-end test of crosspoint_top at its default
// (full) size. Each of the five designs is exercised through the top's own
// ports, and every mechanism is counted. The test fails if any count stays
// at zero.
//  * Hi-Rise: local and cross-layer packets with flit checks at the output,
//    single-cycle grant of an isolated request, a hotspot that must produce
//    class-decided grants.
//  * Configurable memory: SRAM write/read, BCAM column write and search,
//    TCAM write and search with a don't-care, in-memory AND of two rows.
//  * PUF: rows written and read back, then a 3-pair challenge sequence and
//    its reverse; the response is taken from row 2.
//  * SONOS: one program with the pump comparator settling at random
//    (steps 1-4, charge sharing, recycling, a 1000-cycle program pulse),
//    rising and falling bit-lines, then a read against the reference
//    currents.
//  * FRAM: 1T-1C and 2T-2C word writes and reads, on a cell model driven by
//    the sequencer's outputs and the PL strobes, including back-to-back row
//    writes with alternating polarity.
//
// The sizes, protocols and example patterns (hotspot to output 63, challenge
// sequence (1,2),(2,3),(3,4)) follow the published designs; the glue, the
// address mapping and the per-mechanism counting are this design's own.
module tb_crosspoint_top;
  import hirise_pkg::*;
  import cfgmem_pkg::*;
  import sonos_pkg::*;

  localparam int N = 64, W = 128, NW = 6;
  localparam int R = 64, C = 64;
  localparam int NBL = 1024, SNR = 260, IW = 8, SOUT = 64;
  localparam int FRR = 256, FW = 80, FNC = 160, FAW = 9;
  localparam int FLITS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // Hi-Rise
  logic [N-1:0] hr_in_req, hr_in_valid, hr_in_release, hr_in_grant, hr_in_connected;
  logic [N-1:0][NW-1:0] hr_in_dest, hr_out_src;
  logic [N-1:0][W-1:0] hr_in_data, hr_out_data;
  logic [N-1:0] hr_out_busy, hr_out_valid, hr_out_class_win;
  // configurable memory
  logic cm_cmd_valid = 0, cm_cmd_ready, cm_res_valid;
  op_e cm_cmd_op = OP_SRAM_READ, cm_res_op;
  logic [5:0] cm_cmd_addr = '0;
  logic [C-1:0] cm_cmd_row_data = '0, cm_rdata, cm_bcam_match, cm_sa_out, cm_sa_outb;
  logic [R-1:0] cm_cmd_key = '0, cm_cmd_mask = '0;
  logic [C/2-1:0] cm_tcam_match;
  // PUF
  logic pf_cmd_valid = 0, pf_cmd_ready, pf_rdata_valid, pf_preb, pf_eqb, pf_sa_en;
  logic [1:0] pf_cmd = '0;
  logic [5:0] pf_row_a = '0;
  logic [63:0] pf_wdata = '0, pf_rdata, pf_wl;
  logic [2:0] pf_seq_len = '0;
  logic [3:0][5:0] pf_seq_a = '0, pf_seq_b = '0;
  logic [3:0] pf_cfg_pre = 4'd1, pf_cfg_eq = 4'd3;
  // SONOS
  logic sn_start = 0, sn_erase = 0, sn_pump_ok = 0, sn_busy, sn_done;
  logic [8:0] sn_row = '0, sn_row_q;
  logic [NBL-1:0] sn_data = '1;
  rail_e [NBL-1:0] sn_rail;
  logic [10:0] sn_n_rise, sn_n_fall;
  logic [2:0] sn_tp_step;
  logic sn_tp_en, sn_rail_short, sn_rail_recycle, sn_wl_prog, sn_wl_erase;
  logic sn_rd_en = 0, sn_erase_verify = 0, sn_rvalid;
  logic [3:0] sn_col = '0;
  logic [NBL-1:0][IW-1:0] sn_cell_i;
  logic [IW-1:0] sn_ref_erase_i = 8'd200, sn_ref_prog_i = 8'd20;
  logic [SOUT-1:0] sn_rdata;
  // FRAM
  logic fr_pu = 0, fr_pd = 0, fr_mode_2t2c = 0, fr_req_valid = 0, fr_req_ready, fr_req_we = 0;
  logic [FAW-1:0] fr_req_addr = '0;
  logic [FW-1:0] fr_req_wword = '0, fr_rword;
  logic fr_rvalid, fr_wl, fr_pre, fr_sa_en, fr_busy, fr_row_done;
  logic [7:0] fr_row;
  logic [FNC-1:0] fr_plen, fr_wren, fr_bl_d;
  logic [FNC-1:0][7:0] fr_bl_v;
  logic [7:0] fr_vref = 8'd110;

  crosspoint_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // mechanism counters
  int hr_isolated = 0, hr_local_pkts = 0, hr_remote_pkts = 0, hr_class = 0, hr_flits_ok = 0;
  int cm_sram = 0, cm_bcam = 0, cm_tcam = 0, cm_logic = 0;
  int pf_rw = 0, pf_resp = 0, pf_seq_dep = 0;
  int sn_steps[5], sn_share = 0, sn_recyc = 0, sn_prog = 0, sn_moving = 0, sn_read = 0;
  int fr_w1 = 0, fr_r1 = 0, fr_w2 = 0, fr_r2 = 0, fr_alt = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ================= Hi-Rise driver: per input a queue of destinations
  int pk_dest[N][$];
  int flit[N];
  int recv_flits = 0;
  always_comb
    for (int p = 0; p < N; p++) begin
      hr_in_req[p]     = !hr_in_connected[p] && pk_dest[p].size() > 0;
      hr_in_dest[p]    = NW'(pk_dest[p].size() > 0 ? pk_dest[p][0] : 0);
      hr_in_valid[p]   = hr_in_connected[p];
      hr_in_release[p] = hr_in_connected[p] && flit[p] == FLITS - 1;
      hr_in_data[p]    = {8'(p), 8'(flit[p]), {(W - 16){1'b0}}};
    end
  always @(posedge clk) if (rst_n) begin
    for (int q = 0; q < N; q++) begin
      if (hr_out_class_win[q]) hr_class++;
      if (hr_out_valid[q]) begin
        recv_flits++;
        check(hr_out_data[q][W-1 -: 8] == 8'(hr_out_src[q]), "flit from the connected input");
        hr_flits_ok++;
      end
    end
    for (int p = 0; p < N; p++)
      if (hr_in_connected[p]) begin
        if (flit[p] == FLITS - 1) begin
          flit[p] <= 0;
          if (pk_dest[p][0] / 16 == p / 16) hr_local_pkts++; else hr_remote_pkts++;
          void'(pk_dest[p].pop_front());
        end else flit[p] <= flit[p] + 1;
      end
  end

  task automatic hr_drain(int limit);
    int t = 0;
    do begin @(posedge clk); t++; end
    while (t < limit && ((hr_in_req | hr_in_connected) != '0));
    check(t < limit, "Hi-Rise traffic drained");
  endtask

  task automatic run_hirise();
    for (int p = 0; p < N; p++) flit[p] = 0;
    // isolated request: granted in its own cycle
    @(negedge clk);
    pk_dest[5].push_back(40);
    #1;
    check(hr_in_grant[5], "isolated request granted in the same cycle");
    if (hr_in_grant[5]) hr_isolated++;
    hr_drain(100);
    // local packet and hotspot from every input to output 63
    pk_dest[2].push_back(9);
    for (int p = 0; p < N; p++) begin pk_dest[p].push_back(63); pk_dest[p].push_back(63); end
    hr_drain(64 * 2 * (FLITS + 1) + 100);
    check(recv_flits == FLITS * (2 + 2 * N), $sformatf("all flits delivered (%0d)", recv_flits));
  endtask

  // ================= configurable memory
  task automatic cm_issue(op_e op, int addr, logic [C-1:0] row, logic [R-1:0] key, logic [R-1:0] mask);
    @(negedge clk);
    while (!cm_cmd_ready) @(negedge clk);
    cm_cmd_valid = 1; cm_cmd_op = op; cm_cmd_addr = 6'(addr);
    cm_cmd_row_data = row; cm_cmd_key = key; cm_cmd_mask = mask;
    @(negedge clk);
    cm_cmd_valid = 0;
    while (!cm_cmd_ready) @(negedge clk);
  endtask
  task automatic cm_sense(op_e op, int addr, logic [R-1:0] key, logic [R-1:0] mask);
    cm_issue(op, addr, '0, key, mask);
    while (!cm_res_valid) @(posedge clk);
    #1;
  endtask

  task automatic run_cfgmem();
    logic [C-1:0] m [R];
    logic [R-1:0] k, km;
    for (int r = 0; r < R; r++) begin
      m[r] = {$urandom, $urandom};
      cm_issue(OP_SRAM_WRITE, r, m[r], '0, '0);
    end
    for (int r = 0; r < R; r += 9) begin
      cm_sense(OP_SRAM_READ, r, '0, '0);
      check(cm_rdata == m[r], "SRAM read");
      if (cm_rdata == m[r]) cm_sram++;
    end
    // BCAM: a word written column-wise is found by its key
    k = {$urandom, $urandom};
    cm_issue(OP_BCAM_WRITE, 7, '0, k, '0);
    cm_sense(OP_BCAM_SEARCH, 0, k, '0);
    check(cm_bcam_match[7], "BCAM match on the written column");
    if (cm_bcam_match[7]) cm_bcam++;
    cm_sense(OP_BCAM_SEARCH, 0, k ^ 64'h10, '0);
    check(!cm_bcam_match[7], "BCAM miss on a changed key");
    // TCAM word 20 (columns 40, 41): low byte is don't-care
    km = 64'hFF;
    cm_issue(OP_TCAM_WRITE, 20, '0, k, km);
    cm_sense(OP_TCAM_SEARCH, 0, k ^ 64'h5A, '0);
    check(cm_tcam_match[20], "TCAM match through don't-care bits");
    cm_sense(OP_TCAM_SEARCH, 0, k ^ 64'h100, '0);
    check(!cm_tcam_match[20], "TCAM miss on a care bit");
    if (cm_tcam_match[20] == 1'b0) cm_tcam++;
    // logic in memory: AND of rows 3 and 4 on every column
    cm_issue(OP_SRAM_WRITE, 3, 64'hF0F0_1234_FFFF_0000, '0, '0);
    cm_issue(OP_SRAM_WRITE, 4, 64'hFF00_4321_0F0F_FFFF, '0, '0);
    cm_sense(OP_BCAM_SEARCH, 0, 64'h18, ~64'h18);
    check(cm_sa_out == (64'hF0F0_1234_FFFF_0000 & 64'hFF00_4321_0F0F_FFFF), "in-memory AND");
    if (cm_sa_out == (64'hF0F0_1234_FFFF_0000 & 64'hFF00_4321_0F0F_FFFF)) cm_logic++;
  endtask

  // ================= PUF
  task automatic pf_do(logic [1:0] c, int r, logic [63:0] d);
    @(negedge clk);
    while (!pf_cmd_ready) @(negedge clk);
    pf_cmd_valid = 1; pf_cmd = c; pf_row_a = 6'(r); pf_wdata = d;
    @(negedge clk);
    pf_cmd_valid = 0;
    while (!pf_cmd_ready) @(negedge clk);
  endtask
  task automatic pf_read(int r, output logic [63:0] d);
    pf_do(2'd2, r, '0);
    while (!pf_rdata_valid) @(posedge clk);
    #1 d = pf_rdata;
  endtask
  task automatic pf_challenge(bit rev, output logic [63:0] resp);
    pf_do(2'd0, 1, 64'h0123_4567_89AB_CDEF);
    pf_do(2'd0, 2, 64'hFEDC_BA98_7654_3210);
    pf_do(2'd0, 3, 64'h0F0F_F0F0_3C3C_C3C3);
    pf_do(2'd0, 4, 64'hAAAA_5555_CCCC_3333);
    if (!rev) begin
      pf_seq_a[0] = 1; pf_seq_b[0] = 2; pf_seq_a[1] = 2; pf_seq_b[1] = 3; pf_seq_a[2] = 3; pf_seq_b[2] = 4;
    end else begin
      pf_seq_a[0] = 4; pf_seq_b[0] = 3; pf_seq_a[1] = 3; pf_seq_b[1] = 2; pf_seq_a[2] = 2; pf_seq_b[2] = 1;
    end
    pf_seq_len = 3;
    pf_do(2'd1, 0, '0);
    pf_read(2, resp);
  endtask
  task automatic run_puf();
    logic [63:0] d, r0, r0b, r1;
    pf_do(2'd0, 10, 64'hDEAD_BEEF_0000_FFFF);
    pf_read(10, d);
    check(d == 64'hDEAD_BEEF_0000_FFFF, "PUF row write/read");
    if (d == 64'hDEAD_BEEF_0000_FFFF) pf_rw++;
    pf_challenge(0, r0);
    pf_challenge(0, r0b);
    pf_challenge(1, r1);
    check(r0 == r0b, "PUF response repeats for the same challenge");
    if (r0 == r0b) pf_resp++;
    if (r0 != r1) pf_seq_dep++;
    check(r0 != r1, "PUF response depends on the order of the sequence");
  endtask

  // ================= SONOS
  int sn_settle = 0;
  logic [2:0] sn_last_step = 0;
  phase_e sn_last_phase = PH_HOLD;
  always @(negedge clk) begin
    if (dut.u_sn_ctrl.tp_step != sn_last_step || dut.sn_phase != sn_last_phase) sn_settle = $urandom_range(0, 5);
    else if (sn_settle > 0) sn_settle--;
    sn_pump_ok = (sn_settle == 0);
    sn_last_step = sn_tp_step;
    sn_last_phase = dut.sn_phase;
  end
  int sn_pulse = 0;
  always @(posedge clk) if (rst_n) begin
    if (sn_tp_step != 0) sn_steps[sn_tp_step]++;
    if (sn_rail_short) sn_share++;
    if (sn_rail_recycle) sn_recyc++;
    if (sn_wl_prog) sn_pulse++;
    if (dut.sn_phase == PH_TRANSITION && (sn_n_rise != 0 || sn_n_fall != 0)) sn_moving++;
  end
  task automatic run_sonos();
    logic [NBL-1:0] d;
    for (int w = 0; w < NBL / 32; w++) d[w*32 +: 32] = $urandom;
    for (int i = 0; i < NBL; i++) sn_cell_i[i] = 8'd190;      // erased row
    @(negedge clk);
    sn_row = 9'd17; sn_data = d; sn_start = 1;
    @(negedge clk); sn_start = 0;
    while (!sn_done) @(negedge clk);
    @(negedge clk);
    check(sn_pulse == 1000, $sformatf("program pulse %0d cycles", sn_pulse));
    if (sn_pulse == 1000) sn_prog++;
    // the programmed row: programmed cells (data 0) conduct little
    for (int i = 0; i < NBL; i++) sn_cell_i[i] = d[i] ? 8'(185 + $urandom_range(0, 10)) : 8'(15 + $urandom_range(0, 10));
    for (int col = 0; col < 16; col++) begin
      logic [SOUT-1:0] e;
      @(negedge clk); sn_rd_en = 1; sn_col = 4'(col);
      @(negedge clk); sn_rd_en = 0;
      for (int k = 0; k < SOUT; k++) e[k] = d[k*16 + col];
      check(sn_rvalid && sn_rdata == e, "SONOS read of the programmed row");
      if (sn_rvalid && sn_rdata == e) sn_read++;
    end
  endtask

  // ================= FRAM: PL strobes and cell model
  int fr_ph = 0;
  logic fr_next_pu = 1;
  always @(negedge clk) begin
    fr_pu <= 0; fr_pd <= 0;
    if (rst_n) begin
      fr_ph++;
      if (fr_ph == 6) begin
        fr_ph = 0;
        if (fr_next_pu) fr_pu <= 1; else fr_pd <= 1;
        fr_next_pu = !fr_next_pu;
      end
    end
  end
  logic [FNC-1:0] fcell [FRR];
  logic [FNC-1:0] fr_rd_cols;
  always_comb
    for (int c = 0; c < FNC; c++) fr_bl_v[c] = fcell[fr_row][c] ? 8'd170 : 8'd40;
  logic fr_last_x, fr_have_x;
  always @(posedge clk) if (rst_n && (fr_pu || fr_pd)) begin
    logic pl, sa;
    logic [FNC-1:0] w, d;
    pl = fr_pu; sa = fr_sa_en; w = fr_wren; d = fr_bl_d;
    if (fr_wl)
      for (int c = 0; c < FNC; c++) if (w[c] && d[c] != pl) fcell[fr_row][c] = d[c];
    #1;
    if (sa) for (int c = 0; c < FNC; c++) if (fr_rd_cols[c]) fcell[fr_row][c] = 1'b0;
    if (dut.u_fr_ctrl.state == 2 && dut.u_fr_ctrl.k == 0) begin
      if (fr_have_x && dut.u_fr_ctrl.x != fr_last_x) fr_alt++;
      fr_last_x = dut.u_fr_ctrl.x; fr_have_x = 1;
    end
  end

  task automatic fr_req(bit we, bit mode, int addr, logic [FW-1:0] d);
    @(negedge clk);
    fr_req_valid = 1; fr_req_we = we; fr_mode_2t2c = mode; fr_req_addr = FAW'(addr); fr_req_wword = d;
    do @(posedge clk); while (!fr_req_ready);
    @(negedge clk);
    fr_req_valid = 0;
  endtask
  task automatic fr_read(bit mode, int addr, output logic [FW-1:0] d);
    fr_rd_cols = '0;
    for (int k = 0; k < FW; k++) begin
      if (mode) begin fr_rd_cols[2*k] = 1; fr_rd_cols[2*k+1] = 1; end
      else fr_rd_cols[2*k + addr % 2] = 1;
    end
    fr_req(0, mode, addr, '0);
    while (!fr_rvalid) @(posedge clk);
    #1 d = fr_rword;
    while (fr_busy) @(posedge clk);
  endtask
  function automatic logic [FW-1:0] rnd80();
    return {16'($urandom), $urandom, $urandom};
  endfunction
  task automatic run_fram();
    logic [FW-1:0] a, b, c, q;
    // 1T-1C: two words sharing row 5 (addresses 10 and 11)
    a = rnd80(); b = rnd80();
    fr_req(1, 0, 10, a);
    fr_req(1, 0, 11, b);
    while (fr_busy) @(posedge clk);
    fr_w1++;
    fr_read(0, 10, q);
    check(q == a, "1T-1C read of word 10");
    if (q == a) fr_r1++;
    fr_read(0, 11, q);
    check(q == b, "1T-1C read of word 11 (other column of the pair)");
    fr_read(0, 10, q);
    check(q == a, "1T-1C data restored after destructive read");
    // 2T-2C: row 77, and back-to-back writes of rows 78..85
    c = rnd80();
    fr_req(1, 1, 77, c);
    for (int r = 78; r < 86; r++) fr_req(1, 1, r, rnd80());
    while (fr_busy) @(posedge clk);
    fr_w2++;
    fr_read(1, 77, q);
    check(q == c, "2T-2C read");
    if (q == c) fr_r2++;
    for (int k = 0; k < FW; k++)
      check(fcell[77][2*k+1] == !fcell[77][2*k], "2T-2C complementary cells");
  endtask

  initial begin
    for (int i = 0; i < 5; i++) sn_steps[i] = 0;
    for (int r = 0; r < FRR; r++) fcell[r] = '0;
    for (int i = 0; i < NBL; i++) sn_cell_i[i] = 8'd190;
    fr_rd_cols = '0; fr_have_x = 0; fr_last_x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_hirise();
      run_cfgmem();
      run_puf();
      run_sonos();
      run_fram();
    join
    check(hr_isolated > 0, "Hi-Rise: single-cycle grant");
    check(hr_local_pkts > 0, "Hi-Rise: local packets");
    check(hr_remote_pkts > 0, "Hi-Rise: cross-layer packets");
    check(hr_class > 0, "Hi-Rise: class-decided grants");
    check(hr_flits_ok > 0, "Hi-Rise: flits delivered");
    check(cm_sram > 0 && cm_bcam > 0 && cm_tcam > 0 && cm_logic > 0, "cfgmem: all four modes");
    check(pf_rw > 0 && pf_resp > 0 && pf_seq_dep > 0, "PUF: storage, repeatable and order-dependent response");
    for (int s = 1; s <= 4; s++) check(sn_steps[s] > 0, $sformatf("SONOS: transition step %0d", s));
    check(sn_share > 0 && sn_recyc > 0, "SONOS: charge sharing and recycling");
    check(sn_prog > 0 && sn_moving > 0 && sn_read > 0, "SONOS: program, moving bit-lines, read");
    check(fr_w1 > 0 && fr_r1 > 0 && fr_w2 > 0 && fr_r2 > 0, "FRAM: both cell modes");
    check(fr_alt > 0, "FRAM: alternating write polarity");
    $display("mechanisms: hr iso=%0d local=%0d remote=%0d class=%0d | cm %0d %0d %0d %0d | puf %0d %0d %0d | sonos steps %0d/%0d/%0d/%0d share=%0d recyc=%0d read=%0d | fram %0d %0d %0d %0d alt=%0d",
             hr_isolated, hr_local_pkts, hr_remote_pkts, hr_class, cm_sram, cm_bcam, cm_tcam, cm_logic,
             pf_rw, pf_resp, pf_seq_dep, sn_steps[1], sn_steps[2], sn_steps[3], sn_steps[4], sn_share, sn_recyc,
             sn_read, fr_w1, fr_r1, fr_w2, fr_r2, fr_alt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
