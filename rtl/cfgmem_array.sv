// cfgmem_array: ROWS x COLS array of 6T SRAM cells whose word-line is split
// into WLL (access transistor on the bit-line-bar side) and WLR (bit-line
// side), so the two access transistors of a cell can be opened separately.
//
// Functional bit-line model. A column that is not driven is pre-charged and
// evaluates as a wired AND: BL is pulled low by any cell with WLR open that
// stores 0, BLB by any cell with WLL open that stores 1. `bl_hi`/`blb_hi` say
// which bit-lines stay high. A column whose write driver is enabled
// (`col_we`) forces BL/BLB to `bl_val`/`blb_val` and writes every cell whose
// word-line (WLL or WLR) is open, when BL and BLB are complementary. Cells
// of columns that are not driven keep their data: the under-driven
// word-lines and the raised cell supply of the real design prevent search
// and write disturb, which this model takes as given. Writes take effect at
// the clock edge; bit-line evaluation is combinational within the cycle.
// Cell contents are not reset, as in an SRAM.
//
// Split word-lines and wired-AND bit-line discharge follow the published
// cell array; abstracting disturb-free under-driven word-lines into logic
// levels is this design's own simplification.
module cfgmem_array #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wll,
  input  logic [ROWS-1:0] wlr,
  input  logic [COLS-1:0] col_we,
  input  logic [COLS-1:0] bl_val,
  input  logic [COLS-1:0] blb_val,
  output logic [COLS-1:0] bl_hi,
  output logic [COLS-1:0] blb_hi
);

  logic [COLS-1:0] mem [ROWS];

  for (genvar c = 0; c < COLS; c++) begin : g_col
    // per column: row-wise pull-downs on BL and BLB
    logic [ROWS-1:0] pd_bl, pd_blb;
    for (genvar r = 0; r < ROWS; r++) begin : g_cell
      assign pd_bl[r]  = wlr[r] && !mem[r][c];
      assign pd_blb[r] = wll[r] &&  mem[r][c];
    end
    assign bl_hi[c]  = col_we[c] ? bl_val[c]  : (pd_bl  == '0);
    assign blb_hi[c] = col_we[c] ? blb_val[c] : (pd_blb == '0);
  end

  // every cell on an open word-line takes the data of a driven column
  logic [COLS-1:0] wmask;
  assign wmask = col_we & (bl_val ^ blb_val);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    always_ff @(posedge clk)
      if (wll[r] || wlr[r]) mem[r] <= (mem[r] & ~wmask) | (bl_val & wmask);
  end

endmodule
