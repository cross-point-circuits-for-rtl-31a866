// tb_puf_array: checks the behavioural PUF array model directly. Two rows
// written with complementary data are connected; afterwards both rows must be
// equal, every column must hold one of its two original values, columns
// that were equal must not change, a repeat from the same start must give the
// same response (no bit errors in the model) and two different chip seeds
// must give different responses. The bias (ones in 64 bits) must be plausible.
//
// The fight between two opened rows follows the published PUF; the strength
// model being checked is this design's own stand-in for silicon.
module tb_puf_array;
  localparam int R = 64, C = 64;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [R-1:0] wl;
  logic preb, eqb, we, sa_en;
  logic [C-1:0] wdata, rdata0, rdata1;

  puf_array #(.ROWS(R), .COLS(C), .CHIP_SEED(32'h1111_2222)) u0 (.clk, .wl, .preb, .eqb, .we, .wdata, .sa_en, .rdata(rdata0));
  puf_array #(.ROWS(R), .COLS(C), .CHIP_SEED(32'h7777_0003)) u1 (.clk, .wl, .preb, .eqb, .we, .wdata, .sa_en, .rdata(rdata1));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int r, logic [C-1:0] d);
    @(negedge clk); wl = '0; wl[r] = 1; we = 1; wdata = d;
    @(negedge clk); wl = '0; we = 0;
  endtask
  task automatic rd(int r, output logic [C-1:0] d0, output logic [C-1:0] d1);
    @(negedge clk); wl = '0; wl[r] = 1; sa_en = 1;
    @(negedge clk); wl = '0; sa_en = 0; d0 = rdata0; d1 = rdata1;
  endtask
  task automatic fight(int a, int b);
    @(negedge clk); wl = '0; wl[a] = 1; wl[b] = 1; preb = 1; eqb = 1;
    @(negedge clk); wl = '0;
  endtask

  initial begin
    logic [C-1:0] a0, a1, b0, b1, p0, p1, init, hold;
    int hd, ones;
    wl = '0; preb = 1; eqb = 1; we = 0; sa_en = 0; wdata = '0;
    for (int pair = 0; pair < 8; pair++) begin
      int a = 2 * pair, b = 2 * pair + 1;
      init = {$urandom, $urandom};
      // half the columns equal, to check they stay
      hold = {$urandom, $urandom};
      wr(a, init); wr(b, (~init & ~hold) | (init & hold));
      fight(a, b);
      rd(a, a0, a1); rd(b, b0, b1);
      check(a0 == b0 && a1 == b1, "rows differ after the fight");
      check(((a0 ^ init) & hold) == '0, "an equal column changed");
      // repeat the same experiment
      wr(a, init); wr(b, (~init & ~hold) | (init & hold));
      fight(b, a);
      rd(a, p0, p1);
      check(p0 == a0 && p1 == a1, "response not repeatable");
      // complementary start: every column fights
      wr(a, init); wr(b, ~init);
      fight(a, b);
      rd(a, a0, a1);
      hd = $countones(a0 ^ a1);
      ones = $countones(a0);
      check(hd > 8, $sformatf("two chips too alike, HD=%0d", hd));
      check(ones > 12 && ones < 52, $sformatf("bias %0d of 64", ones));
      // without released bit-lines nothing happens
      wr(a, init); wr(b, ~init);
      @(negedge clk); wl = '0; wl[a] = 1; wl[b] = 1; preb = 0; eqb = 0;
      @(negedge clk); wl = '0; preb = 1; eqb = 1;
      rd(a, a0, a1);
      check(a0 == init, "fight happened while pre-charged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
