// tb_sonos_bl_select: checks the bit-line rail selection at full width
// (1024 lines). For random previous/new data it compares every line's rail
// in the hold, transition and program phases with a reference table, and
// checks the rising/falling counts. `commit` must make the new data the
// previous data; after reset all lines count as inhibited (data 1). The
// selection is combinational, so results are checked in the same cycle.
//
// The four-rail rule and static unchanged lines follow the published flash;
// the data polarity (0 = program) and reset state are this design's own.
module tb_sonos_bl_select;
  import sonos_pkg::*;
  localparam int NBL = 1024;
  localparam int CW  = $clog2(NBL + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  phase_e            phase = PH_HOLD;
  logic [NBL-1:0]    new_data = '1;
  logic              commit = 0;
  rail_e [NBL-1:0]   rail;
  logic [CW-1:0]     n_rise, n_fall;

  sonos_bl_select dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NBL-1:0] prev_m;

  task automatic check_all();
    int er, ef;
    er = 0; ef = 0;
    for (int i = 0; i < NBL; i++) begin
      if (prev_m[i] != new_data[i]) begin
        if (new_data[i]) er++; else ef++;
      end
    end
    phase = PH_HOLD; #1;
    for (int i = 0; i < NBL; i++)
      check(rail[i] == (prev_m[i] ? RAIL_INH : RAIL_PRG), $sformatf("hold line %0d", i));
    phase = PH_TRANSITION; #1;
    for (int i = 0; i < NBL; i++) begin
      rail_e exp;
      if (prev_m[i] == new_data[i]) exp = prev_m[i] ? RAIL_INH : RAIL_PRG;
      else exp = new_data[i] ? RAIL_RISE : RAIL_FALL;
      check(rail[i] == exp, $sformatf("transition line %0d got %0d exp %0d", i, rail[i], exp));
    end
    phase = PH_PROGRAM; #1;
    for (int i = 0; i < NBL; i++)
      check(rail[i] == (new_data[i] ? RAIL_INH : RAIL_PRG), $sformatf("program line %0d", i));
    check(int'(n_rise) == er && int'(n_fall) == ef, $sformatf("counts %0d/%0d exp %0d/%0d", n_rise, n_fall, er, ef));
  endtask

  initial begin
    prev_m = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      for (int w = 0; w < NBL / 32; w++) new_data[w*32 +: 32] = $urandom;
      if (t == 3) new_data = prev_m;           // nothing changes: no transitions
      check_all();
      @(negedge clk); commit = 1; phase = PH_HOLD;
      @(negedge clk); commit = 0;
      prev_m = new_data;
      #1 for (int i = 0; i < NBL; i++)
        check(rail[i] == (prev_m[i] ? RAIL_INH : RAIL_PRG), "after commit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
