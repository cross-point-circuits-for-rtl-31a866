// sonos_pkg: rail and phase codes of the wide-write SONOS flash program path.
//
// The four rails and the three phases follow the published flash program
// path; their encodings are this design's own.
package sonos_pkg;

  // voltage rail a bit-line / source-line pair is switched to
  typedef enum logic [1:0] {
    RAIL_INH  = 2'd0,   // stable +1 V (inhibit, half-selected cell)
    RAIL_PRG  = 2'd1,   // stable -3.8 V (program, selected cell)
    RAIL_RISE = 2'd2,   // rising transition rail, stepped by the transition pump
    RAIL_FALL = 2'd3    // falling transition rail
  } rail_e;

  // bit-line phase requested by the program controller
  typedef enum logic [1:0] {
    PH_HOLD       = 2'd0,  // every line on the stable rail of the previous write
    PH_TRANSITION = 2'd1,  // changing lines on the transition rails
    PH_PROGRAM    = 2'd2   // every line on the stable rail of the new write
  } phase_e;

endpackage
