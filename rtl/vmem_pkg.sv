// vmem_pkg: shared types of the video on-chip memory modules.
//
// The block-access memory (ba_memory) is sequenced by a small state machine
// whose states are listed here, and its bit-serial address adder
// (ba_address_calc) runs one of three passes whose codes are listed here.
// The encodings are this design's own choice.
package vmem_pkg;

  // State of the block-access sequencer.
  //   BA_IDLE : default (random-access) mode, chain not in use
  //   BA_RUN  : pixel-serial accesses, chain shifts by the programmed step
  //   BA_WAIT : block end reached before the next addresses were ready (stall)
  //   BA_DONE : programmed number of blocks has been scanned
  typedef enum logic [1:0] {
    BA_IDLE = 2'd0,
    BA_RUN  = 2'd1,
    BA_WAIT = 2'd2,
    BA_DONE = 2'd3
  } ba_state_e;

  // Pass of the serial adder.
  //   SA_SIZE  : size  <= end - start          (after configuration)
  //   SA_START : start <= end + distance       (next block's start address)
  //   SA_END   : end   <= start + size         (next block's end address)
  typedef enum logic [1:0] {
    SA_NONE  = 2'd0,
    SA_SIZE  = 2'd1,
    SA_START = 2'd2,
    SA_END   = 2'd3
  } sa_pass_e;

endpackage
