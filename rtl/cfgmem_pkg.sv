// cfgmem_pkg: operation and sensing codes of the configurable memory
// (SRAM / BCAM / TCAM / logic-in-memory on a 6T array with split word-lines).
//
// The set of modes follows the published design; the encodings are this
// design's own.
package cfgmem_pkg;

  typedef enum logic [2:0] {
    OP_SRAM_READ   = 3'd0,  // row-wise read, differential sensing
    OP_SRAM_WRITE  = 3'd1,  // row-wise write
    OP_BCAM_SEARCH = 3'd2,  // search key on the word-lines; also logic-in-memory
    OP_BCAM_WRITE  = 3'd3,  // column-wise write: 1s in cycle 1, 0s in cycle 2
    OP_BCAM_ONES   = 3'd4,  // cycle 1 only: set the 1s of a column (bulk write)
    OP_CAM_CLEAR   = 3'd5,  // write 0 into the whole array in one cycle
    OP_TCAM_SEARCH = 3'd6,  // two columns per word
    OP_TCAM_WRITE  = 3'd7   // 11 in cycle 1, 00 in cycle 2, mask 01 in cycle 3
  } op_e;

  typedef enum logic [1:0] {
    SA_OFF    = 2'd0,
    SA_DIFF   = 2'd1,       // one differential amplifier per column (SRAM)
    SA_SINGLE = 2'd2        // two single-ended amplifiers against vref (CAM, logic)
  } sa_mode_e;

endpackage
