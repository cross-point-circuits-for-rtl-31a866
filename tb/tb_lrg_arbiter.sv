// tb_lrg_arbiter: checks the least-recently-granted matrix arbiter against
// an ordered-list model, at the default width (4) and at 16 (a Hi-Rise local
// output column). Random requests and random update strobes: the grant must
// be the requester that is earliest in the list, in the same cycle (the
// arbitration is single-cycle), and an update moves the winner to the end.
//
// Least-recently-granted order follows the published arbiter; the reset
// order is this design's own.
module tb_lrg_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]  req4 = '0, gnt4;
  logic [15:0] req16 = '0, gnt16;
  logic upd4 = 0, upd16 = 0;

  lrg_arbiter dut4 (.clk, .rst_n, .req(req4), .upd(upd4), .gnt(gnt4));
  lrg_arbiter #(.N(16)) dut16 (.clk, .rst_n, .req(req16), .upd(upd16), .gnt(gnt16));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ord4[$], ord16[$];

  function automatic int pick(ref int ord[$], input logic [15:0] rq);
    foreach (ord[k]) if (rq[ord[k]]) return ord[k];
    return -1;
  endfunction

  task automatic move_last(ref int ord[$], input int w);
    foreach (ord[k]) if (ord[k] == w) begin ord.delete(k); break; end
    ord.push_back(w);
  endtask

  int grants16[16];
  initial begin
    for (int i = 0; i < 4; i++) ord4.push_back(i);
    for (int i = 0; i < 16; i++) begin ord16.push_back(i); grants16[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int p4, p16;
      @(negedge clk);
      req4  = 4'($urandom);
      req16 = (t > 2000) ? 16'hFFFF : 16'($urandom);   // saturation phase at the end
      upd4  = $urandom_range(0, 3) != 0;
      upd16 = (t > 2000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      #1;
      p4 = pick(ord4, {12'b0, req4});
      p16 = pick(ord16, req16);
      check(gnt4 == ((p4 < 0) ? 4'b0 : 4'(1 << p4)), $sformatf("N=4 grant %b exp %0d", gnt4, p4));
      check(gnt16 == ((p16 < 0) ? 16'b0 : 16'(1 << p16)), $sformatf("N=16 grant %h exp %0d", gnt16, p16));
      @(posedge clk);
      if (upd4 && p4 >= 0) move_last(ord4, p4);
      if (upd16 && p16 >= 0) move_last(ord16, p16);
      if (t > 2000 && p16 >= 0) grants16[p16]++;
    end
    // all requesting with updates every cycle: strict round robin, 999 grants
    for (int i = 0; i < 16; i++) check(grants16[i] >= 62 && grants16[i] <= 63, "round robin under saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
