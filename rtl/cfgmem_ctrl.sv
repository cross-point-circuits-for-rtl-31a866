// cfgmem_ctrl: mode controller of the configurable memory. It drives the
// word-lines, the column decoder / write drivers and the sense amplifier
// configuration for each operation, following the mode configuration table
// of the design:
//
//   op            cycles  WLL            WLR            driven columns
//   SRAM read     1       row decode     row decode     none, SA differential
//   SRAM write    1       row decode     row decode     all: BL=D, BLB=~D
//   BCAM search   1       ~key & ~mask   key & ~mask    none, SA single-ended
//   BCAM write    2       c1: D, c2: ~D  same           addr: c1 1/0, c2 0/1
//   TCAM search   1       as BCAM search                none, SA single-ended
//   TCAM write    3       c1 D&~M, c2 ~D&~M, c3 M       2*addr, 2*addr+1:
//                                                       c1 11, c2 00, c3 01
//
// Logic-in-memory is a BCAM search whose key/mask open only the operand rows
// (key 1 = AND, key 0 = NOR, mixed = A AND NOT B). OP_CAM_CLEAR opens every
// row and drives 0 into every column (first step of a bulk CAM write), and
// OP_BCAM_ONES is the first cycle of a BCAM write alone, so a bulk write costs
// one cycle per column.
//
// Timing: a command is taken when cmd_valid && cmd_ready. Its drive cycles
// follow from the next clock cycle on; a read's sense amplifiers latch at the
// end of its (single) drive cycle and `res_valid` with `res_op` marks the next
// cycle, when the sensed result is on the amplifier outputs. cmd_ready is high
// in the last drive cycle of an operation, so single-cycle operations
// (searches, SRAM accesses) run back to back at one per clock.
// The per-mode drive levels and cycle counts follow the document; the
// command interface, the one-cycle pipelining and the 2*addr column pairing
// of TCAM words are this design's choices.
module cfgmem_ctrl
  import cfgmem_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64,
  localparam int unsigned AW = $clog2((ROWS > COLS) ? ROWS : COLS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  op_e             cmd_op,
  input  logic [AW-1:0]   cmd_addr,
  input  logic [COLS-1:0] cmd_row_data,  // SRAM write data
  input  logic [ROWS-1:0] cmd_key,       // search key / CAM column data
  input  logic [ROWS-1:0] cmd_mask,      // masked search rows / TCAM X rows
  // to the array
  output logic [ROWS-1:0] wll,
  output logic [ROWS-1:0] wlr,
  output logic [COLS-1:0] col_we,
  output logic [COLS-1:0] bl_val,
  output logic [COLS-1:0] blb_val,
  // to the sense amplifiers
  output sa_mode_e        sa_mode,
  output logic            sa_en,
  // sensed result status
  output logic            res_valid,
  output op_e             res_op
);

  op_e             op_q;
  logic [AW-1:0]   addr_q;
  logic [COLS-1:0] row_q;
  logic [ROWS-1:0] key_q, mask_q;
  logic            act_q;      // a drive cycle is in progress
  logic [1:0]      cyc_q;      // drive cycle number, 0-based

  function automatic logic [1:0] last_cycle(op_e op);
    case (op)
      OP_BCAM_WRITE: return 2'd1;
      OP_TCAM_WRITE: return 2'd2;
      default:       return 2'd0;
    endcase
  endfunction

  assign cmd_ready = !act_q || (cyc_q == last_cycle(op_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q     <= 1'b0;
      cyc_q     <= '0;
      op_q      <= OP_SRAM_READ;
      addr_q    <= '0;
      row_q     <= '0;
      key_q     <= '0;
      mask_q    <= '0;
      res_valid <= 1'b0;
      res_op    <= OP_SRAM_READ;
    end else begin
      res_valid <= act_q && sa_en;
      res_op    <= op_q;
      if (cmd_valid && cmd_ready) begin
        act_q  <= 1'b1;
        cyc_q  <= '0;
        op_q   <= cmd_op;
        addr_q <= cmd_addr;
        row_q  <= cmd_row_data;
        key_q  <= cmd_key;
        mask_q <= cmd_mask;
      end else if (act_q && cyc_q == last_cycle(op_q)) begin
        act_q <= 1'b0;
      end else if (act_q) begin
        cyc_q <= cyc_q + 2'd1;
      end
    end
  end

  // first column of the TCAM word addressed by a TCAM write
  int unsigned c0;
  assign c0 = (2 * int'(addr_q)) % COLS;

  // drive levels for the current cycle
  always_comb begin
    wll     = '0;
    wlr     = '0;
    col_we  = '0;
    bl_val  = '0;
    blb_val = '0;
    sa_mode = SA_OFF;
    sa_en   = 1'b0;
    if (act_q) begin
      unique case (op_q)
        OP_SRAM_READ: begin
          wll[int'(addr_q) % ROWS] = 1'b1;
          wlr[int'(addr_q) % ROWS] = 1'b1;
          sa_mode = SA_DIFF;
          sa_en   = 1'b1;
        end
        OP_SRAM_WRITE: begin
          wll[int'(addr_q) % ROWS] = 1'b1;
          wlr[int'(addr_q) % ROWS] = 1'b1;
          col_we  = '1;
          bl_val  = row_q;
          blb_val = ~row_q;
        end
        OP_BCAM_SEARCH, OP_TCAM_SEARCH: begin
          wlr     = key_q & ~mask_q;
          wll     = ~key_q & ~mask_q;
          sa_mode = SA_SINGLE;
          sa_en   = 1'b1;
        end
        OP_BCAM_WRITE, OP_BCAM_ONES: begin
          wll = (cyc_q == 2'd0) ? key_q : ~key_q;
          wlr = wll;
          col_we[int'(addr_q) % COLS]  = 1'b1;
          bl_val[int'(addr_q) % COLS]  = (cyc_q == 2'd0);
          blb_val[int'(addr_q) % COLS] = (cyc_q != 2'd0);
        end
        OP_CAM_CLEAR: begin
          wll     = '1;
          wlr     = '1;
          col_we  = '1;
          blb_val = '1;
        end
        OP_TCAM_WRITE: begin
          col_we[c0]     = 1'b1;
          col_we[c0 + 1] = 1'b1;
          case (cyc_q)
            2'd0: begin                          // 11 where D = 1
              wll = key_q & ~mask_q;
              bl_val[c0] = 1'b1;  bl_val[c0 + 1] = 1'b1;
            end
            2'd1: begin                          // 00 where D = 0
              wll = ~key_q;
              blb_val[c0] = 1'b1; blb_val[c0 + 1] = 1'b1;
            end
            default: begin                       // 01 (X) where masked
              wll = mask_q;
              blb_val[c0] = 1'b1; bl_val[c0 + 1] = 1'b1;
            end
          endcase
          wlr = wll;
        end
        default: ;
      endcase
    end
  end

endmodule
