// Shared types and widths of the SLC-enabled wear-leveling (SEWL) controller.
//
// The controller keeps most of an MLC phase-change memory in two-bit-per-cell
// mode and lets a few hot or weak pages run in one-bit-per-cell (SLC) mode,
// borrowing the missing half of their capacity from a small additional memory
// that always runs in SLC mode. This package holds what the modules share: the
// replacement policies of the SLC list, the controller's decisions and the
// page-rewrite operations. The three policies (FIFO, LRU, least worn) are the
// ones the scheme defines; the encodings and widths are this design's choice.
package sewl_pkg;

  // Endurance of a page in writes (MLC mean 1e5, 10 % sigma needs 17 bits).
  localparam int unsigned END_W = 20;
  // Write numbers, thresholds and counters.
  localparam int unsigned WN_W  = 32;

  // Replacement policy of the SLC list.
  typedef enum logic [1:0] {
    POL_FIFO = 2'd0,   // evict the page that entered the list first
    POL_LRU  = 2'd1,   // evict the page written least recently
    POL_LW   = 2'd2    // evict the page with the smallest wear rate
  } policy_e;

  // Outcome of one transformation request.
  typedef enum logic [1:0] {
    DEC_REJECT  = 2'd0,  // list full and requester is the least worn (LW only)
    DEC_REFRESH = 2'd1,  // requester already in SLC mode: record updated
    DEC_APPEND  = 2'd2,  // free slot: requester becomes SLC
    DEC_REPLACE = 2'd3   // victim goes back to MLC, requester takes its slot
  } decision_e;

  // Page rewrite operations of the transform engine.
  typedef enum logic [1:0] {
    OP_TO_SLC = 2'd0,  // spread an MLC page over itself and its additional page
    OP_TO_MLC = 2'd1,  // compress a page and its additional page back to MLC
    OP_SWAP   = 2'd2   // exchange the contents of two MLC pages
  } xop_e;

endpackage
