// tb_hirise_local_switch: checks the 16x28 local switch of layer 0 of the
// 64-port, 4-layer Hi-Rise switch against a model. Inputs request random
// destinations. A destination on this layer goes to the intermediate output
// of that port. A destination on another layer goes to the L2LC (layer-to-
// layer channel) serving input i's bin, channel (dest layer - 1)*4 + i mod 4.
// The testbench plays the second stage and accepts requests at random
// (`*_win`). Checks per cycle:
//  * each output requests exactly when an unconnected input wants it and the
//    output is free, and it carries the LRG choice (least recently *won*:
//    the priority moves only when the second stage accepts);
//  * channel requests carry the bin index and the destination port;
//  * in_grant follows the wins in the same cycle;
//  * a connection forwards its input's flits until the input releases.
//
// The 16x28 shape, input binning and LRG follow the published switch; the
// request protocol checked here is this design's own.
module tb_hirise_local_switch;
  import hirise_pkg::*;
  localparam int N = 64, L = 4, C = 4, W = 128;
  localparam int NL = N / L, NCH = C * (L - 1), BIN = NL / C;
  localparam int PW = $clog2(NL), LW = $clog2(L), BW = $clog2(BIN);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NL-1:0] in_req = '0, in_valid = '0, in_release = '0, in_grant, in_connected;
  logic [NL-1:0][LW-1:0] in_dest_layer = '0;
  logic [NL-1:0][PW-1:0] in_dest_port = '0;
  logic [NL-1:0][W-1:0] in_data = '0;
  logic [NL-1:0] im_req, im_valid, im_release, im_win = '0;
  logic [NL-1:0][PW-1:0] im_pid;
  logic [NL-1:0][W-1:0] im_data;
  logic [NCH-1:0] ch_req, ch_valid, ch_release, ch_win = '0;
  logic [NCH-1:0][PW-1:0] ch_port;
  logic [NCH-1:0][BW-1:0] ch_pid;
  logic [NCH-1:0][W-1:0] ch_data;

  hirise_local_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  int im_ord[NL][$], ch_ord[NCH][$];
  bit im_busy[NL], ch_busy[NCH];
  int im_src[NL], ch_src[NCH];     // input number
  bit conn[NL];
  int hold[NL];
  int n_im_wins = 0, n_ch_wins = 0;

  function automatic int out_of(int i, output bit is_ch);
    is_ch = (in_dest_layer[i] != 0);
    if (!is_ch) return in_dest_port[i];
    return (int'(in_dest_layer[i]) - 1) * C + i % C;
  endfunction

  task automatic cycle();
    int pim[NL], pch[NCH];
    logic [NL-1:0] exp_grant;
    @(negedge clk);
    in_release = '0;
    for (int i = 0; i < NL; i++) begin
      in_valid[i] = $urandom_range(0, 1);
      in_data[i]  = {4{$urandom}};
      if (conn[i]) begin
        if (hold[i] == 0) in_release[i] = 1; else hold[i]--;
      end else if (!in_req[i] && $urandom_range(0, 2) == 0) begin
        in_req[i] = 1;
        in_dest_layer[i] = LW'($urandom_range(0, L - 1));
        in_dest_port[i]  = PW'($urandom_range(0, NL - 1));
      end
    end
    #1;
    // expected picks
    for (int o = 0; o < NL; o++) begin
      pim[o] = -1;
      if (!im_busy[o])
        foreach (im_ord[o][k]) begin
          int i; bit c;
          i = im_ord[o][k];
          if (in_req[i] && !conn[i] && out_of(i, c) == o && !c) begin pim[o] = i; break; end
        end
      check(im_req[o] == (pim[o] >= 0), $sformatf("im_req %0d", o));
      if (pim[o] >= 0) check(int'(im_pid[o]) == pim[o], $sformatf("im_pid %0d", o));
      if (im_busy[o]) begin
        check(im_valid[o] == in_valid[im_src[o]] && im_data[o] == in_data[im_src[o]], "im flits");
        check(im_release[o] == in_release[im_src[o]], "im release");
      end
    end
    for (int ch = 0; ch < NCH; ch++) begin
      pch[ch] = -1;
      if (!ch_busy[ch])
        foreach (ch_ord[ch][k]) begin
          int i; bit c;
          i = ch_ord[ch][k] * C + ch % C;
          if (in_req[i] && !conn[i] && out_of(i, c) == ch && c) begin pch[ch] = i; break; end
        end
      check(ch_req[ch] == (pch[ch] >= 0), $sformatf("ch_req %0d", ch));
      if (pch[ch] >= 0) begin
        check(int'(ch_pid[ch]) == pch[ch] / C, $sformatf("ch_pid %0d", ch));
        check(ch_port[ch] == in_dest_port[pch[ch]], "ch_port");
      end
      if (ch_busy[ch]) begin
        check(ch_valid[ch] == in_valid[ch_src[ch]] && ch_data[ch] == in_data[ch_src[ch]], "ch flits");
        check(ch_release[ch] == in_release[ch_src[ch]], "ch release");
      end
    end
    // second stage accepts at random
    exp_grant = '0;
    for (int o = 0; o < NL; o++) begin
      im_win[o] = im_req[o] && ($urandom_range(0, 2) != 0);
      if (im_win[o]) exp_grant[pim[o]] = 1;
    end
    for (int ch = 0; ch < NCH; ch++) begin
      ch_win[ch] = ch_req[ch] && ($urandom_range(0, 2) != 0);
      if (ch_win[ch]) exp_grant[pch[ch]] = 1;
    end
    #1;
    check(in_grant == exp_grant, "in_grant follows wins");
    for (int i = 0; i < NL; i++) check(in_connected[i] == conn[i], "in_connected");
    @(posedge clk);
    // model update after the edge
    for (int o = 0; o < NL; o++) begin
      if (im_busy[o] && in_release[im_src[o]]) begin im_busy[o] = 0; conn[im_src[o]] = 0; end
      else if (im_win[o]) begin
        im_busy[o] = 1; im_src[o] = pim[o]; conn[pim[o]] = 1; hold[pim[o]] = $urandom_range(0, 3);
        n_im_wins++;
        foreach (im_ord[o][k]) if (im_ord[o][k] == pim[o]) begin im_ord[o].delete(k); break; end
        im_ord[o].push_back(pim[o]);
      end
    end
    for (int ch = 0; ch < NCH; ch++) begin
      if (ch_busy[ch] && in_release[ch_src[ch]]) begin ch_busy[ch] = 0; conn[ch_src[ch]] = 0; end
      else if (ch_win[ch]) begin
        ch_busy[ch] = 1; ch_src[ch] = pch[ch]; conn[pch[ch]] = 1; hold[pch[ch]] = $urandom_range(0, 3);
        n_ch_wins++;
        foreach (ch_ord[ch][k]) if (ch_ord[ch][k] == pch[ch] / C) begin ch_ord[ch].delete(k); break; end
        ch_ord[ch].push_back(pch[ch] / C);
      end
    end
    clr = exp_grant;
  endtask

  logic [NL-1:0] clr = '0;
  always @(negedge clk) begin
    in_req = in_req & ~clr;        // a granted input drops its request
    clr = '0;
  end

  initial begin
    for (int o = 0; o < NL; o++) begin
      for (int i = 0; i < NL; i++) im_ord[o].push_back(i);
      im_busy[o] = 0; im_src[o] = 0;
    end
    for (int ch = 0; ch < NCH; ch++) begin
      for (int b = 0; b < BIN; b++) ch_ord[ch].push_back(b);
      ch_busy[ch] = 0; ch_src[ch] = 0;
    end
    for (int i = 0; i < NL; i++) begin conn[i] = 0; hold[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) cycle();
    check(n_im_wins > 100 && n_ch_wins > 100, $sformatf("connections made: %0d local, %0d L2LC", n_im_wins, n_ch_wins));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
