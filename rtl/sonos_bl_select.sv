// sonos_bl_select: bit-line rail selection of the wide-write SONOS flash.
//
// For each of the NBL bit-line/source-line pairs of a row it chooses one of
// four rails from the previous write's data and the new data. A programmed
// bit (data 0) needs -3.8 V, an inhibited bit (data 1) +1 V. In PH_HOLD
// every line stays on the stable rail of the previous data. In
// PH_TRANSITION lines whose value is unchanged stay on their stable rail,
// lines going from -3.8 V to 1 V go to the rising rail and lines going from
// 1 V to -3.8 V to the falling rail, so only lines that must move are
// charged. In PH_PROGRAM every line is on the stable rail of the new data.
// `commit` (end of a program) makes the new data the previous data. After
// reset all lines are taken as inhibited. `n_rise`/`n_fall` count the moving
// lines. The four rails and the use of previous and new data follow the
// document; the data polarity (0 = program) and the reset state are this
// design's choices.
module sonos_bl_select
  import sonos_pkg::*;
#(
  parameter int unsigned NBL = 1024,
  localparam int unsigned CW = $clog2(NBL + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  phase_e           phase,
  input  logic [NBL-1:0]   new_data,
  input  logic             commit,
  output rail_e [NBL-1:0]  rail,
  output logic  [CW-1:0]   n_rise,
  output logic  [CW-1:0]   n_fall
);

  logic [NBL-1:0] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      prev <= '1;
    else if (commit) prev <= new_data;
  end

  always_comb begin
    n_rise = '0;
    n_fall = '0;
    for (int i = 0; i < NBL; i++) begin
      unique case (phase)
        PH_TRANSITION:
          if (prev[i] == new_data[i]) rail[i] = prev[i] ? RAIL_INH : RAIL_PRG;
          else if (new_data[i])       rail[i] = RAIL_RISE;
          else                        rail[i] = RAIL_FALL;
        PH_PROGRAM: rail[i] = new_data[i] ? RAIL_INH : RAIL_PRG;
        default:    rail[i] = prev[i] ? RAIL_INH : RAIL_PRG;
      endcase
      if (prev[i] != new_data[i]) begin
        if (new_data[i]) n_rise = n_rise + 1'b1;
        else             n_fall = n_fall + 1'b1;
      end
    end
  end

endmodule
