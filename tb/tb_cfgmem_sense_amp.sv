// tb_cfgmem_sense_amp: checks the reconfigurable sense amplifier of the
// configurable memory. Differential mode: out = BL high and BLB low, outb
// its complement. Single-ended mode: out follows BL and outb follows BLB,
// two independent results per column. Outputs change only on a cycle with
// sa_en and hold otherwise; after reset they are zero.
//
// The two modes checked follow the published amplifier; the one-cycle latch
// timing is this design's own.
module tb_cfgmem_sense_amp;
  import cfgmem_pkg::*;
  localparam int COLS = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sa_mode_e mode = SA_OFF;
  logic sa_en = 0;
  logic [COLS-1:0] bl_hi = '0, blb_hi = '0, out, outb;

  cfgmem_sense_amp dut (.*);

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

  logic [COLS-1:0] eo, eob;
  initial begin
    repeat (2) @(posedge clk);
    #1 check(out == '0 && outb == '0, "reset");
    rst_n = 1;
    eo = '0; eob = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      mode   = (t % 2) ? SA_SINGLE : SA_DIFF;
      sa_en  = $urandom_range(0, 2) != 0;
      bl_hi  = {$urandom, $urandom};
      blb_hi = {$urandom, $urandom};
      if (t % 7 == 0) blb_hi = ~bl_hi;   // proper differential swing
      if (sa_en) begin
        if (mode == SA_DIFF) begin eo = bl_hi & ~blb_hi; eob = ~(bl_hi & ~blb_hi); end
        else begin eo = bl_hi; eob = blb_hi; end
      end
      @(posedge clk); #1;
      check(out == eo && outb == eob, $sformatf("t=%0d mode %0d en %0b", t, mode, sa_en));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
