// btb_pkg: shared types and constants for the drowsy BTB with next-entry
// pre-activation.
//
// The BTB is 512 entries, 4-way set associative, with a 2-bit bimodal
// direction predictor held in every entry. A BTB "location" is the flat entry
// index {set, way}; the Next BTB Entry Table (NBET) stores such locations.
//
// The predictor states and their transitions follow the document's state
// diagram: a taken branch enters the BTB weakly taken, a strong state steps to
// its weak neighbour on a mispredict, and a weak state that mispredicts jumps
// to the strong state of the other direction (WT -> SNT, WNT -> ST). The state
// encoding is this design's own choice; its top bit is the predicted direction.
package btb_pkg;

  // Document defaults (Table 1 and Section 4.3).
  localparam int unsigned BTB_ENTRIES_DEF    = 512;
  localparam int unsigned BTB_WAYS_DEF       = 4;
  localparam int unsigned DECAY_INTERVAL_DEF = 128;
  // Own choices: address width and local decay counter width.
  localparam int unsigned ADDR_W_DEF         = 32;
  localparam int unsigned LOCAL_BITS_DEF     = 2;

  typedef enum logic [1:0] {
    BP_SNT = 2'b00,  // strongly not taken
    BP_WNT = 2'b01,  // weakly not taken
    BP_WT  = 2'b10,  // weakly taken (state of a newly allocated branch)
    BP_ST  = 2'b11   // strongly taken
  } bp_state_t;

  // Predicted direction of a state.
  function automatic logic bp_pred(input bp_state_t s);
    return s[1];
  endfunction

  // Next state after a resolved branch.
  function automatic bp_state_t bp_next(input bp_state_t s, input logic taken);
    bp_state_t n;
    unique case (s)
      BP_ST:   n = taken ? BP_ST  : BP_WT;
      BP_WT:   n = taken ? BP_ST  : BP_SNT;
      BP_WNT:  n = taken ? BP_ST  : BP_SNT;
      BP_SNT:  n = taken ? BP_WNT : BP_SNT;
      default: n = BP_WT;
    endcase
    return n;
  endfunction

  // Event strobes brought out of the top for observation (one cycle each).
  typedef struct packed {
    logic lookup_hit;     // BTB hit on an entry in normal mode
    logic wake_stall;     // BTB hit on a drowsy entry: one-cycle wake-up
    logic alloc;          // new branch allocated in the BTB
    logic dir_change;     // resolved branch changed its predicted direction
    logic nbet_write;     // NBET field of the previous branch written
    logic nbet_lookup;    // NBET read for the entry hit in the previous cycle
    logic preact;         // pre-activation register holds a valid location
    logic preact_wake;    // pre-activation woke a drowsy entry
    logic deact;          // at least one entry put into drowsy mode
    logic deact_gated;    // the Location Register entry was kept awake
    logic decay_tick;     // global decay interval reached
  } btb_events_t;

endpackage
