// tb_cfgmem: self-checking test of the configurable memory (64x64).
// A reference bit matrix in the testbench follows every write; every read,
// search and logic result is compared with values computed from it.
// Covers: SRAM write/read, 2-cycle BCAM column write, bulk clear + ones-only
// write, BCAM search with exact and single-bit-mismatch (walk) keys, masked
// search, TCAM 3-cycle write with don't-care rows and TCAM search,
// logic-in-memory AND, NOR, NOT-A AND B (dual read). Also checks that a BCAM
// write holds cmd_ready low for one cycle, a TCAM write for two, that searches
// run one per clock and that a result arrives two cycles after its command.
//
// The modes, the 2-cycle BCAM and 3-cycle TCAM writes follow the published
// memory; the TCAM code and command timing checked here are this design's
// own.
module tb_cfgmem;
  import cfgmem_pkg::*;
  localparam int R = 64, C = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, res_valid;
  op_e cmd_op, res_op;
  logic [5:0] cmd_addr;
  logic [C-1:0] cmd_row_data, rdata, bcam_match, sa_out, sa_outb;
  logic [R-1:0] cmd_key, cmd_mask;
  logic [C/2-1:0] tcam_match;

  cfgmem #(.ROWS(R), .COLS(C)) dut (.*);

  int checks = 0, failures = 0;
  logic [C-1:0] ref_m [R];
  bit           ref_x [R][C/2];   // TCAM don't care (for documentation only)

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue one command; returns the number of cycles cmd_ready stayed low after it
  task automatic issue(op_e op, int addr, logic [C-1:0] row, logic [R-1:0] key, logic [R-1:0] mask);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = 6'(addr); cmd_row_data = row; cmd_key = key; cmd_mask = mask;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // issue a read-type command and wait for its result
  task automatic sense(op_e op, int addr, logic [R-1:0] key, logic [R-1:0] mask);
    issue(op, addr, '0, key, mask);
    // the drive cycle is now in progress; result is valid in the next cycle
    @(negedge clk);
    check(res_valid && res_op == op, "result not valid two cycles after the command");
  endtask

  function automatic logic [C-1:0] exp_bcam(logic [R-1:0] key, logic [R-1:0] mask);
    logic [C-1:0] m = '1;
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++)
        if (!mask[r] && ref_m[r][c] != key[r]) m[c] = 1'b0;
    return m;
  endfunction

  function automatic logic [C/2-1:0] exp_tcam(logic [R-1:0] key, logic [R-1:0] mask);
    logic [C/2-1:0] m = '1;
    for (int w = 0; w < C/2; w++)
      for (int r = 0; r < R; r++) begin
        logic [1:0] s;
        s = {ref_m[r][2*w+1], ref_m[r][2*w]};
        if (!mask[r] && s != 2'b10 && s[0] != key[r]) m[w] = 1'b0;  // 10 = {col1,col0} = X
      end
    return m;
  endfunction

  initial begin
    logic [C-1:0] d;
    logic [R-1:0] k;
    int lowc, t0;
    cmd_valid = 0; cmd_op = OP_SRAM_READ; cmd_addr = 0; cmd_row_data = 0; cmd_key = 0; cmd_mask = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // SRAM mode: write every row, read back
    for (int r = 0; r < R; r++) begin
      d = {$urandom, $urandom};
      issue(OP_SRAM_WRITE, r, d, '0, '0);
      ref_m[r] = d;
    end
    for (int i = 0; i < 20; i++) begin
      int r = $urandom_range(R - 1);
      sense(OP_SRAM_READ, r, '0, '0);
      check(rdata == ref_m[r], $sformatf("SRAM read row %0d", r));
    end

    // BCAM column-wise write: 2 cycles, ready low for one
    for (int c = 0; c < C; c += 3) begin
      k = {$urandom, $urandom};
      @(negedge clk);
      cmd_valid = 1; cmd_op = OP_BCAM_WRITE; cmd_addr = 6'(c); cmd_key = k; cmd_mask = '0;
      @(negedge clk);
      cmd_valid = 0;
      lowc = 0;
      while (!cmd_ready) begin lowc++; @(negedge clk); end
      check(lowc == 1, $sformatf("BCAM write held ready low %0d cycles", lowc));
      for (int r = 0; r < R; r++) ref_m[r][c] = k[r];
    end
    // SRAM read of the column-written data (transpose)
    for (int r = 0; r < 8; r++) begin
      sense(OP_SRAM_READ, r, '0, '0);
      check(rdata == ref_m[r], $sformatf("SRAM read after column write, row %0d", r));
    end

    // BCAM search: stored column, walk-mode single mismatches, masked search
    for (int c = 0; c < C; c += 9) begin
      for (int r = 0; r < R; r++) k[r] = ref_m[r][c];
      sense(OP_BCAM_SEARCH, 0, k, '0);
      check(bcam_match == exp_bcam(k, '0), "BCAM exact search");
      check(bcam_match[c], $sformatf("BCAM column %0d did not match its own data", c));
      for (int b = 0; b < R; b += 7) begin
        sense(OP_BCAM_SEARCH, 0, k ^ (64'd1 << b), '0);
        check(!bcam_match[c], $sformatf("BCAM single-bit mismatch at row %0d missed", b));
        check(bcam_match == exp_bcam(k ^ (64'd1 << b), '0), "BCAM walk search");
      end
      sense(OP_BCAM_SEARCH, 0, k ^ 64'hFF, 64'hFF);
      check(bcam_match == exp_bcam(k, 64'hFF) && bcam_match[c], "BCAM masked search");
    end

    // back-to-back searches, one per cycle
    @(negedge clk);
    t0 = 0;
    for (int i = 0; i < 4; i++) begin
      cmd_valid = 1; cmd_op = OP_BCAM_SEARCH; cmd_key = 64'(i) * 64'h0101_0101_0101_0101; cmd_mask = '0;
      check(cmd_ready, "search not accepted back to back");
      @(negedge clk);
      if (i >= 1) begin
        check(res_valid && bcam_match == exp_bcam(64'(i - 1) * 64'h0101_0101_0101_0101, '0), "pipelined search");
        t0++;
      end
    end
    cmd_valid = 0;

    // bulk write: clear all, then set the 1s of each column in one cycle
    issue(OP_CAM_CLEAR, 0, '0, '0, '0);
    for (int r = 0; r < R; r++) ref_m[r] = '0;
    for (int c = 0; c < C; c++) begin
      k = {$urandom, $urandom};
      issue(OP_BCAM_ONES, c, '0, k, '0);
      for (int r = 0; r < R; r++) ref_m[r][c] = k[r];
    end
    for (int c = 0; c < C; c += 5) begin
      for (int r = 0; r < R; r++) k[r] = ref_m[r][c];
      sense(OP_BCAM_SEARCH, 0, k, '0);
      check(bcam_match == exp_bcam(k, '0), "search after bulk write");
    end

    // TCAM: write every word with some don't-care rows, 3 cycles
    for (int w = 0; w < C/2; w++) begin
      logic [R-1:0] m;
      k = {$urandom, $urandom};
      m = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      @(negedge clk);
      cmd_valid = 1; cmd_op = OP_TCAM_WRITE; cmd_addr = 6'(w); cmd_key = k; cmd_mask = m;
      @(negedge clk);
      cmd_valid = 0;
      lowc = 0;
      while (!cmd_ready) begin lowc++; @(negedge clk); end
      check(lowc == 2, $sformatf("TCAM write held ready low %0d cycles", lowc));
      for (int r = 0; r < R; r++) begin
        ref_m[r][2*w]   = m[r] ? 1'b0 : k[r];
        ref_m[r][2*w+1] = m[r] ? 1'b1 : k[r];
      end
    end
    for (int w = 0; w < C/2; w += 3) begin
      for (int r = 0; r < R; r++) k[r] = ref_m[r][2*w];
      // a don't-care row stores 0 in the even column: flip it, must still match
      for (int r = 0; r < R; r++) if (ref_m[r][2*w] == 1'b0 && ref_m[r][2*w+1] == 1'b1) k[r] = $urandom_range(1);
      sense(OP_TCAM_SEARCH, 0, k, '0);
      check(tcam_match[w], $sformatf("TCAM word %0d did not match", w));
      check(tcam_match == exp_tcam(k, '0), "TCAM search vector");
      sense(OP_TCAM_SEARCH, 0, ~k, '0);
      check(tcam_match == exp_tcam(~k, '0), "TCAM inverted search");
    end

    // logic in memory on SRAM-written rows
    for (int r = 0; r < 8; r++) begin
      d = {$urandom, $urandom};
      issue(OP_SRAM_WRITE, r, d, '0, '0);
      ref_m[r] = d;
    end
    for (int i = 0; i < 6; i++) begin
      int a = i, b = i + 2;
      logic [R-1:0] msk;
      msk = ~((64'd1 << a) | (64'd1 << b));
      sense(OP_BCAM_SEARCH, 0, '1, msk);                  // key 11
      check(bcam_match == (ref_m[a] & ref_m[b]), "logic AND");
      sense(OP_BCAM_SEARCH, 0, '0, msk);                  // key 00
      check(bcam_match == ~(ref_m[a] | ref_m[b]), "logic NOR");
      sense(OP_BCAM_SEARCH, 0, 64'd1 << b, msk);          // A=0, B=1
      check(bcam_match == (~ref_m[a] & ref_m[b]), "logic NOT A AND B");
      check(sa_out == ref_m[b] && sa_outb == ~ref_m[a], "dual read");
    end
    begin // three-row AND
      logic [R-1:0] msk = ~64'b111;
      sense(OP_BCAM_SEARCH, 0, '1, msk);
      check(bcam_match == (ref_m[0] & ref_m[1] & ref_m[2]), "three-row AND");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
