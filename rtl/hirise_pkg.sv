// hirise_pkg: constants and helpers shared by the Hi-Rise 3D switch modules.
//
// The switch is split over L silicon layers. Each layer has a local switch
// (N/L inputs to N/L intermediate outputs plus C*(L-1) outgoing layer-to-layer
// channels, L2LCs) and an inter-layer switch made of N/L sub-blocks, one per
// final output. The helpers below map a destination layer to the index of the
// L2LC bundle that reaches it, and encode the three CLRG priority classes as
// the 2-bit thermometer codes 00, 01, 11 used by the class counters.
//
// The three classes and their thermometer codes follow the published Hi-Rise
// arbiter; the index helpers are this design's own.
package hirise_pkg;

  // Thermometer class codes of the CLRG class counters (three classes).
  localparam logic [1:0] CLS0 = 2'b00;
  localparam logic [1:0] CLS1 = 2'b01;
  localparam logic [1:0] CLS2 = 2'b11;

  // Index, among the L-1 other layers, of layer `other` as seen from `self`.
  function automatic int unsigned rank_of(int unsigned self, int unsigned other);
    return (other < self) ? other : other - 1;
  endfunction

  // Inverse of rank_of: absolute layer number of rank r seen from `self`.
  function automatic int unsigned layer_of(int unsigned self, int unsigned r);
    return (r < self) ? r : r + 1;
  endfunction

  // One step up the thermometer: 00 -> 01 -> 11 (11 stays, overflow is
  // handled by the caller).
  function automatic logic [1:0] therm_inc(logic [1:0] c);
    return c | {c[0], 1'b1};
  endfunction

  // Divide a thermometer count by two: 11 -> 01, 01 -> 00, 00 -> 00.
  function automatic logic [1:0] therm_half(logic [1:0] c);
    return {1'b0, c[1] & c[0]};
  endfunction

endpackage
