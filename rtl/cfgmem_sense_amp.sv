// cfgmem_sense_amp: the reconfigurable column sense amplifiers.
//
// The cross-couple of a conventional differential amplifier is split in two.
// In SA_DIFF (SRAM) mode the halves work together as one differential
// amplifier and resolve BL against BLB: `out` = 1 when BL is the high side,
// `outb` its complement. In SA_SINGLE (CAM and logic) mode each half compares
// one bit-line with vref on its own: `out` senses BL, `outb` senses BLB.
// Sensing happens when `sa_en` is high; the results are latched at that clock
// edge and held until the next enable. Bit-lines are given as logic levels
// (high = above vref / did not discharge).
//
// The split of one differential amplifier into two single-ended ones follows
// the published design; latching at the enable edge and reset to zero are
// this design's own choices.
module cfgmem_sense_amp
  import cfgmem_pkg::*;
#(
  parameter int unsigned COLS = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  sa_mode_e        mode,
  input  logic            sa_en,
  input  logic [COLS-1:0] bl_hi,
  input  logic [COLS-1:0] blb_hi,
  output logic [COLS-1:0] out,
  output logic [COLS-1:0] outb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out  <= '0;
      outb <= '0;
    end else if (sa_en) begin
      unique case (mode)
        SA_DIFF: begin
          out  <= bl_hi & ~blb_hi;
          outb <= ~(bl_hi & ~blb_hi);
        end
        SA_SINGLE: begin
          out  <= bl_hi;
          outb <= blb_hi;
        end
        default: ;
      endcase
    end
  end

endmodule
