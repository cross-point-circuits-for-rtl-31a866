// sonos_read_path: read path of the SONOS flash row: 16:1 column mux in
// front of 64 current sense amplifiers with a row-tracking reference.
//
// Behavioural model for the analog part: cell and reference-cell currents
// arrive as unsigned codes. Each row carries one programmed and one erased
// reference cell that age with the row; the reference current is the mean
// (I_erase + I_program) / 2 in normal reads and I_erase / 2 in erase verify,
// when every cell of the row should be erased. A sense amplifier reads 1
// (erased, conducting) when the selected cell's current exceeds the
// reference. `col` selects bit-lines col, col+MUX, col+2*MUX, ... for the
// OUT outputs. Mux ratio, output width and reference formulas follow the
// document; current codes and the bit-line interleaving are this design's.
module sonos_read_path #(
  parameter int unsigned NBL = 1024,
  parameter int unsigned MUX = 16,
  parameter int unsigned IW  = 8,
  localparam int unsigned OUT = NBL / MUX,
  localparam int unsigned SW  = $clog2(MUX)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rd_en,
  input  logic                     erase_verify,
  input  logic [SW-1:0]            col,
  input  logic [NBL-1:0][IW-1:0]   cell_i,
  input  logic [IW-1:0]            ref_erase_i,
  input  logic [IW-1:0]            ref_prog_i,
  output logic [OUT-1:0]           rdata,
  output logic                     rvalid
);

  logic [IW:0] iref;

  always_comb
    iref = erase_verify ? {1'b0, ref_erase_i} >> 1
                        : ({1'b0, ref_erase_i} + {1'b0, ref_prog_i}) >> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= rd_en;
      if (rd_en)
        for (int k = 0; k < OUT; k++)
          rdata[k] <= ({1'b0, cell_i[k*MUX + int'(col)]} > iref);
    end
  end

endmodule
