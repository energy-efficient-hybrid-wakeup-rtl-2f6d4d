// wakeup_pkg: constants and types shared by the hybrid-wakeup issue stage.
//
// The default sizes are those of the evaluated core: a 96-entry centralized
// instruction window and an issue width of six. Register counts, the opcode
// width and the number of branch checkpoints are this design's own choices
// (64 logical registers as on a MIPS target, 160 physical registers so that
// every window entry can hold a renamed destination, four
// checkpoints as on the R10000).
//
// scheme_e selects how a producer with more than one dependent in the window
// is handled:
//   INDEXING_ONLY - the second dependent is not inserted; dispatch stalls
//                   until the producer completes.
//   HYBRID_PLAIN  - the producer's Broadcast bit is set and its result tag is
//                   compared by every window entry.
//   HYBRID_SNOOP  - as HYBRID_PLAIN, but only entries whose Snoop bit is set
//                   compare the broadcast tag (the default).
package wakeup_pkg;
  localparam int unsigned WIN_ENTRIES = 96;
  localparam int unsigned ISSUE_WIDTH = 6;
  localparam int unsigned WB_WIDTH    = 6;
  localparam int unsigned NUM_LREGS   = 64;
  localparam int unsigned NUM_PREGS   = 160;
  localparam int unsigned NUM_CKPT    = 4;
  localparam int unsigned OP_W        = 8;

  typedef enum logic [1:0] {
    INDEXING_ONLY = 2'd0,
    HYBRID_PLAIN  = 2'd1,
    HYBRID_SNOOP  = 2'd2
  } scheme_e;
endpackage
