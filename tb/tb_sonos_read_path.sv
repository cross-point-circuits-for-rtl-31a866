// tb_sonos_read_path: checks the 16:1 read mux and reference sensing at full
// size (1024 bit-lines, 64 outputs). Cell currents are random codes around an
// erased level and a programmed level that drift per test, like a row that
// ages with its reference cells. Each read must return, one cycle after
// rd_en, bit k = (current of line k*16+col > (Ierase+Iprog)/2), and in erase
// verify against Ierase/2.
//
// The 16:1 mux, 64-bit read and the two reference levels follow the
// published flash; the current codes and one-cycle latency are this design's
// own.
module tb_sonos_read_path;
  localparam int NBL = 1024, MUX = 16, IW = 8, OUT = NBL / MUX;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en = 0, erase_verify = 0;
  logic [3:0] col = '0;
  logic [NBL-1:0][IW-1:0] cell_i;
  logic [IW-1:0] ref_erase_i, ref_prog_i;
  logic [OUT-1:0] rdata;
  logic rvalid;

  sonos_read_path dut (.*);

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

  logic [NBL-1:0] stored;
  initial begin
    cell_i = '0; ref_erase_i = '0; ref_prog_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int ie, ip, iref;
      ie = $urandom_range(150, 230);     // erased cell current, drifts with wear
      ip = $urandom_range(5, 60);        // programmed cell current
      @(negedge clk);
      ref_erase_i = IW'(ie); ref_prog_i = IW'(ip);
      erase_verify = (t % 5 == 4);
      for (int i = 0; i < NBL; i++) begin
        stored[i] = $urandom_range(0, 1);
        cell_i[i] = IW'(stored[i] ? ie - $urandom_range(0, 20) : ip + $urandom_range(0, 20));
      end
      col = 4'($urandom_range(0, MUX - 1));
      iref = erase_verify ? ie / 2 : (ie + ip) / 2;
      rd_en = 1;
      @(negedge clk); rd_en = 0;
      check(rvalid, "rvalid one cycle after rd_en");
      for (int k = 0; k < OUT; k++) begin
        check(rdata[k] == (int'(cell_i[k*MUX + col]) > iref), $sformatf("bit %0d", k));
        if (!erase_verify) check(rdata[k] == stored[k*MUX + col], "stored value recovered");
      end
      @(negedge clk);
      check(!rvalid, "rvalid single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
