// puf_array: behavioural model of the 6T SRAM array used by the
// sequence-dependent PUF. It is not a circuit: it stands for the
// manufactured array and its random device mismatch.
//
// Every cell has two hidden strengths, one for holding 0 and one for holding
// 1, drawn from a hash of CHIP_SEED and the cell position (a different seed
// is a different chip). When two word-lines are open together with the
// bit-lines released (preb and eqb both high, active-low pre-charge and
// equalise), the two cells of each column share their bit-lines; where they
// hold opposite values, the stronger cell overwrites the weaker and both end
// with its value. Equal columns do not change. The fight is resolved at the
// clock edge. With one word-line open, `we` writes `wdata` into that row, and
// `sa_en` latches that row into `rdata`. Bit errors from noise are not
// modelled: the model is deterministic.
//
// Ports are those of the array macro with its word-line, pre-charge,
// equalise, sense-enable and write-data pins, at clock-cycle resolution.
//
// The row-against-row fight with both word-lines open follows the published
// PUF; the hashed strength model stands in for silicon and is this design's
// own, as is the default 64x64 size.
module puf_array #(
  parameter int unsigned ROWS      = 64,
  parameter int unsigned COLS      = 64,
  parameter logic [31:0] CHIP_SEED = 32'h1234_5678
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,
  input  logic            preb,   // 0 = bit-lines pre-charged
  input  logic            eqb,    // 0 = bit-lines equalised
  input  logic            we,
  input  logic [COLS-1:0] wdata,
  input  logic            sa_en,
  output logic [COLS-1:0] rdata
);

  logic [COLS-1:0] mem [ROWS];

  // hidden strength of cell (r, c) while it holds value v
  function automatic logic [15:0] strength(int unsigned r, int unsigned c, logic v);
    logic [31:0] h;
    h = CHIP_SEED ^ (32'(r) * 32'h9E37_79B9) ^ (32'(c) * 32'h85EB_CA6B) ^ (v ? 32'hC2B2_AE35 : 32'h27D4_EB2F);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h[15:0];
  endfunction

  int unsigned nwl, ra, rb;
  always_comb begin
    nwl = 0; ra = 0; rb = 0;
    for (int r = ROWS - 1; r >= 0; r--)
      if (wl[r]) begin
        nwl++;
        rb = ra;
        ra = r;
      end
  end

  always_ff @(posedge clk) begin
    if (nwl == 1 && we)
      mem[ra] <= wdata;
    else if (nwl == 2 && preb && eqb)
      for (int c = 0; c < COLS; c++)
        if (mem[ra][c] != mem[rb][c]) begin
          logic win;
          win = (strength(ra, c, mem[ra][c]) >= strength(rb, c, mem[rb][c])) ? mem[ra][c] : mem[rb][c];
          mem[ra][c] <= win;
          mem[rb][c] <= win;
        end
    if (nwl == 1 && sa_en)
      rdata <= mem[ra];
  end

endmodule
