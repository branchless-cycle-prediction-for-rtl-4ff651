// blcp_pkg: sizes shared by the branchless-cycle predictor and the branch
// prediction unit around it.
//
// The filter defaults are the configuration chosen as the most efficient:
// a 3-bit global history (8 pattern-table entries) with 6-bit saturating
// counters, and a fetch-to-decode latency of 2 cycles. The BTB and bimodal
// sizes are those of the simulated XScale-like core (128 entries each, BTB
// direct mapped). The 32-bit program counter and 4-byte instructions are
// this design's own choice.
package blcp_pkg;

  // BLC-filter
  localparam int unsigned DEF_GHR_SIZE    = 3;  // history length C, PHT has 2^C entries
  localparam int unsigned DEF_CNT_W      = 6;  // saturating counter width
  localparam int unsigned DEF_FETCH_LAT  = 2;  // cycles from fetch to decode
  localparam int unsigned DEF_FETCH_W    = 1;  // instructions fetched per cycle

  // Branch predictor proper
  localparam int unsigned DEF_PC_W        = 32;
  localparam int unsigned DEF_BTB_ENTRIES = 128;
  localparam int unsigned DEF_BIM_ENTRIES = 128;

  // Outcome of one fetch cycle as recorded in the history register.
  typedef enum logic {
    BLC = 1'b0,   // branchless cycle: no branch among the fetched instructions
    BC  = 1'b1    // branch cycle: at least one branch fetched
  } cycle_kind_e;

endpackage
