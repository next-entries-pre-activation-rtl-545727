// drowsy_btb: set-associative branch target buffer whose entries can each be
// put into a drowsy (data-preserving, not readable) mode.
//
// Every entry holds a valid bit, a tag, a branch target and the 2-bit bimodal
// predictor state (the direction predictor is built into the BTB, as in the
// document's processor configuration: 512 entries, 4 ways).
//
// Lookup (every cycle, combinational on lk_pc): the indexed set is compared.
//   - hit on an entry in normal mode: lk_hit with lk_idx, lk_taken, lk_target;
//   - hit on a drowsy entry: lk_stall; the entry is woken and the same lookup
//     hits one cycle later (the one-cycle wake-up latency of a drowsy row).
// Update (branch resolution, written at the clock edge):
//   - a branch already in the BTB gets its predictor state stepped and, if
//     taken, its target rewritten; up_changed tells whether its predicted
//     direction changed;
//   - a taken branch that misses is allocated in state WT (up_alloc); an
//     invalid way is used first, otherwise a per-set round-robin victim;
//   - a not-taken branch that misses is not allocated (up_inbtb = 0).
//   up_idx is the branch's location after the update.
// Power modes: wake = demand wake | written entries | pre_act; deact puts an
// entry into drowsy mode. access marks the entries looked up with a hit or
// written this cycle (used by the decay counters).
//
// Own choices where the document is silent: the tags are compared whatever
// the mode (only a hit entry pays the wake-up), an update writes the entry
// without a wake-up stall, PCs are word aligned, the target is stored as a
// full word address, and the replacement policy is round-robin.
module drowsy_btb
  import btb_pkg::*;
#(
  parameter int unsigned ENTRIES = BTB_ENTRIES_DEF,
  parameter int unsigned WAYS    = BTB_WAYS_DEF,
  parameter int unsigned ADDR_W  = ADDR_W_DEF,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned WAY_W  = $clog2(WAYS),
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned TAG_W  = ADDR_W - 2 - SET_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup
  input  logic               lk_valid,
  input  logic [ADDR_W-1:0]  lk_pc,
  output logic               lk_hit,
  output logic               lk_stall,
  output logic [IDX_W-1:0]   lk_idx,
  output logic               lk_taken,
  output logic [ADDR_W-1:0]  lk_target,
  // update
  input  logic               up_valid,
  input  logic [ADDR_W-1:0]  up_pc,
  input  logic               up_taken,
  input  logic [ADDR_W-1:0]  up_target,
  output logic               up_inbtb,
  output logic [IDX_W-1:0]   up_idx,
  output logic               up_changed,
  output logic               up_alloc,
  // power mode management
  input  logic [ENTRIES-1:0] pre_act,
  input  logic [ENTRIES-1:0] deact,
  output logic [ENTRIES-1:0] awake,
  output logic [ENTRIES-1:0] access
);
  logic [ENTRIES-1:0]  valid_q;
  logic [TAG_W-1:0]    tag_q    [ENTRIES];
  logic [ADDR_W-3:0]   target_q [ENTRIES];
  bp_state_t           state_q  [ENTRIES];
  logic [WAY_W-1:0]    rr_q     [SETS];

  // ---------------- lookup ----------------
  logic [SET_W-1:0] lk_set;
  logic [TAG_W-1:0] lk_tag;
  logic             lk_match;
  logic [IDX_W-1:0] lk_mi;
  logic [ENTRIES-1:0] demand_wake;

  always_comb begin
    lk_set   = lk_pc[2 +: SET_W];
    lk_tag   = lk_pc[ADDR_W-1 -: TAG_W];
    lk_match = 1'b0;
    lk_mi    = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[{lk_set, WAY_W'(w)}] && tag_q[{lk_set, WAY_W'(w)}] == lk_tag) begin
        lk_match = 1'b1;
        lk_mi    = {lk_set, WAY_W'(w)};
      end
    end
    lk_hit      = lk_valid && lk_match && awake[lk_mi];
    lk_stall    = lk_valid && lk_match && !awake[lk_mi];
    lk_idx      = lk_mi;
    lk_taken    = bp_pred(state_q[lk_mi]);
    lk_target   = {target_q[lk_mi], 2'b00};
    demand_wake = '0;
    if (lk_stall) demand_wake[lk_mi] = 1'b1;
  end

  // ---------------- update ----------------
  logic [SET_W-1:0] up_set;
  logic [TAG_W-1:0] up_tag;
  logic             up_match, up_free;
  logic [WAY_W-1:0] up_way, free_way;
  logic [IDX_W-1:0] up_mi;
  logic             up_write;
  bp_state_t        up_next;
  logic             up_pred_unused, up_dchg;

  always_comb begin
    up_set   = up_pc[2 +: SET_W];
    up_tag   = up_pc[ADDR_W-1 -: TAG_W];
    up_match = 1'b0;
    up_way   = '0;
    up_free  = 1'b0;
    free_way = '0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (!valid_q[{up_set, WAY_W'(w)}]) begin
        up_free  = 1'b1;
        free_way = WAY_W'(w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[{up_set, WAY_W'(w)}] && tag_q[{up_set, WAY_W'(w)}] == up_tag) begin
        up_match = 1'b1;
        up_way   = WAY_W'(w);
      end
    end
    if (!up_match) up_way = up_free ? free_way : rr_q[up_set];
    up_mi      = {up_set, up_way};
    up_alloc   = up_valid && !up_match && up_taken;
    up_write   = up_valid && (up_match || up_taken);
    up_inbtb   = up_write;
    up_idx     = up_mi;
    up_changed = up_valid && up_match && up_dchg;
  end

  bimodal_counter u_bp (
    .state      (state_q[up_mi]),
    .taken      (up_taken),
    .next_state (up_next),
    .pred_taken (up_pred_unused),
    .dir_changed(up_dchg)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int s = 0; s < SETS; s++) rr_q[s] <= '0;
    end else if (up_write) begin
      if (up_alloc) begin
        valid_q[up_mi]  <= 1'b1;
        tag_q[up_mi]    <= up_tag;
        target_q[up_mi] <= up_target[ADDR_W-1:2];
        state_q[up_mi]  <= BP_WT;
        if (!up_free) rr_q[up_set] <= rr_q[up_set] + 1'b1;
      end else begin
        state_q[up_mi] <= up_next;
        if (up_taken) target_q[up_mi] <= up_target[ADDR_W-1:2];
      end
    end
  end

  // ---------------- power modes ----------------
  logic [ENTRIES-1:0] write_vec;
  always_comb begin
    write_vec = '0;
    if (up_write) write_vec[up_mi] = 1'b1;
    access = write_vec;
    if (lk_valid && lk_match) access[lk_mi] = 1'b1;
  end

  power_mode_ctrl #(.ENTRIES(ENTRIES)) u_pmc (
    .clk  (clk),
    .rst_n(rst_n),
    .wake (demand_wake | write_vec | pre_act),
    .deact(deact),
    .awake(awake)
  );
endmodule
