// cfgmem: configurable memory on a push-rule 6T SRAM array (default 64x64,
// 4 kb) that works as an SRAM, a binary CAM, a ternary CAM, or computes
// bit-wise logic between stored rows.
//
// SRAM mode stores words row-wise and reads them with differential sensing.
// In CAM modes words are stored column-wise (64 BCAM words of 64 bits, or 32
// TCAM words using two columns each), the key is applied to the split
// word-lines (WLR = key, WLL = ~key) and every column evaluates its match on
// its own bit-lines in parallel: a column matches when neither BL nor BLB
// discharges. TCAM codes a stored bit in two adjacent columns, 0 = 00,
// 1 = 11, X = 01, and a word matches when BL of its odd column and BLB of its
// even column both stay high. Logic-in-memory opens only the operand rows
// through the search mask: key bits 1 give the AND of the rows, key bits 0
// their NOR, and a 1/0 pair reads B on `sa_out` and NOT A on `sa_outb` (two
// reads at once).
//
// Outputs, valid while `res_valid` (one cycle after the drive cycle, two after
// the command): `rdata` (SRAM read), `bcam_match` = per column
// SA_BL & SA_BLB (BCAM match lines, also the logic result), `tcam_match`
// (per TCAM word), and the raw single-ended amplifier outputs.
//
// The operating modes, the split word-lines, the column-wise CAM layout and
// the 64x64 size follow the published configurable-memory design. The TCAM
// don't-care code (01) follows its write sequence table; the command
// interface and the two-cycle pipeline are this design's own.
module cfgmem
  import cfgmem_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64,
  localparam int unsigned AW = $clog2((ROWS > COLS) ? ROWS : COLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  op_e               cmd_op,
  input  logic [AW-1:0]     cmd_addr,
  input  logic [COLS-1:0]   cmd_row_data,
  input  logic [ROWS-1:0]   cmd_key,
  input  logic [ROWS-1:0]   cmd_mask,
  output logic              res_valid,
  output op_e               res_op,
  output logic [COLS-1:0]   rdata,
  output logic [COLS-1:0]   bcam_match,
  output logic [COLS/2-1:0] tcam_match,
  output logic [COLS-1:0]   sa_out,
  output logic [COLS-1:0]   sa_outb
);

  logic [ROWS-1:0] wll, wlr;
  logic [COLS-1:0] col_we, bl_val, blb_val, bl_hi, blb_hi;
  sa_mode_e        sa_mode;
  logic            sa_en;

  cfgmem_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_row_data,
    .cmd_key, .cmd_mask, .wll, .wlr, .col_we, .bl_val, .blb_val, .sa_mode,
    .sa_en, .res_valid, .res_op);

  cfgmem_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .wll, .wlr, .col_we, .bl_val, .blb_val, .bl_hi, .blb_hi);

  cfgmem_sense_amp #(.COLS(COLS)) u_sa (
    .clk, .rst_n, .mode(sa_mode), .sa_en, .bl_hi, .blb_hi, .out(sa_out), .outb(sa_outb));

  assign rdata      = sa_out;
  assign bcam_match = sa_out & sa_outb;
  always_comb
    for (int w = 0; w < COLS / 2; w++)
      tcam_match[w] = sa_out[2*w + 1] & sa_outb[2*w];

endmodule
