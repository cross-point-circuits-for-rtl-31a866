// lrg_arbiter: least-recently-granted (LRG) arbiter as used in every column of
// the Hi-Rise cross-point switches.
//
// Each requester i owns a priority vector (row i of a matrix): prio[i][j] = 1
// means i currently has priority over j. This is the priority vector stored
// in a cross-point. A requester is granted when no other active requester has
// priority over it, so exactly one of the active requesters wins. The grant is
// combinational (single-cycle arbitration). When `upd` is high at a clock
// edge, the granted requester drops to the lowest priority: it loses priority
// over everyone and everyone gains priority over it. `upd` is kept separate
// from the grant so that a first-stage arbiter can update only when its
// winner also wins the second stage. After reset, a lower index has priority
// over a higher one; the reset order is this design's own choice.
module lrg_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         upd,   // move the current grant to lowest priority
  output logic [N-1:0] gnt
);

  logic [N-1:0] prio [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      gnt[i] = req[i];
      for (int j = 0; j < N; j++)
        if (j != i && req[j] && prio[j][i]) gnt[i] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          prio[i][j] <= (i < j);
    end else if (upd && (gnt != '0)) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (gnt[i] && i != j) begin
            prio[i][j] <= 1'b0;
            prio[j][i] <= 1'b1;
          end
    end
  end

  // at most one grant, and some grant whenever anyone requests
  always_comb
    if (rst_n) begin
      a_onehot: assert ($onehot0(gnt));
      a_fair:   assert ((req == '0) || (gnt != '0));
    end

endmodule
