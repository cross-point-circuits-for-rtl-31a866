// fram_colmux: 2:1 column mux and reconfigurable sense amplifiers of the
// FRAM array, for 1T-1C and 2T-2C operation.
//
// The physical row has NCOL = 2*W bit-lines, taken in pairs (2k, 2k+1).
//  * 1T-1C (mode_2t2c = 0): each pair holds two different words; word
//    address bit 0 (`sel`) picks the even or odd column of every pair. The
//    selected bit-line is compared against the reference `vref`.
//  * 2T-2C (mode_2t2c = 1): both columns of a pair store one bit, true in
//    the even column and complement in the odd one, and the sense amplifier
//    compares the two bit-lines directly (no reference needed).
// Write path (combinational): the W-bit word becomes per-column enables
// and data for fram_ctrl. Read path: `sense_d` holds the per-column bits the
// sense amplifiers resolve from the bit-line voltages `bl_v` (unsigned
// codes; behavioural stand-in for the analog levels). These bits are what
// fram_ctrl writes back. `rword` gathers the word from fram_ctrl's captured
// read data. Pairing, 2:1 muxing and the two sensing modes follow the
// document; column ordering, polarity and voltage codes are this design's.
module fram_colmux #(
  parameter int unsigned W  = 80,
  parameter int unsigned VW = 8,
  localparam int unsigned NCOL = 2 * W
) (
  input  logic                    mode_2t2c,
  input  logic                    sel,          // word address bit 0 in 1T-1C mode
  // write side
  input  logic [W-1:0]            wword,
  output logic [NCOL-1:0]         col_en,
  output logic [NCOL-1:0]         col_d,
  // sense side
  input  logic [NCOL-1:0][VW-1:0] bl_v,
  input  logic [VW-1:0]           vref,
  output logic [NCOL-1:0]         sense_d,
  input  logic [NCOL-1:0]         rdata_phys,
  output logic [W-1:0]            rword
);

  always_comb begin
    for (int k = 0; k < W; k++) begin
      if (mode_2t2c) begin
        col_en[2*k]    = 1'b1;
        col_en[2*k+1]  = 1'b1;
        col_d[2*k]     = wword[k];
        col_d[2*k+1]   = ~wword[k];
        sense_d[2*k]   = bl_v[2*k] > bl_v[2*k+1];
        sense_d[2*k+1] = ~(bl_v[2*k] > bl_v[2*k+1]);
        rword[k]       = rdata_phys[2*k];
      end else begin
        col_en[2*k]    = !sel;
        col_en[2*k+1]  = sel;
        col_d[2*k]     = wword[k] & !sel;
        col_d[2*k+1]   = wword[k] & sel;
        sense_d[2*k]   = bl_v[2*k] > vref;
        sense_d[2*k+1] = bl_v[2*k+1] > vref;
        rword[k]       = sel ? rdata_phys[2*k+1] : rdata_phys[2*k];
      end
    end
  end

endmodule
