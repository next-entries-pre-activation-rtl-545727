// drowsy_btb_top: drowsy BTB with decay deactivation and next-entry
// pre-activation (one-direction NBET by default).
//
// NBET_FIELDS selects the scheme: 1 (default) is the one-direction NBET, one
// next location per branch along its predicted direction; 2 is the
// two-direction NBET, which records and pre-activates the successors along
// both the taken and the not-taken path (two pre-activation registers); 0 is
// the decay-only drowsy BTB the published scheme is compared against: no
// NBET, no pre-activation and no LR guard, so every first access to a drowsy
// entry costs a wake-up stall.
//
// Blocks and their connections:
//   drowsy_btb      BTB arrays, predictor, lookup/update and per-entry power
//                   mode register (normal / drowsy).
//   decay_ctrl      global + local decay counters; deactivates entries that
//                   have not been accessed for the decay interval.
//   deact_gate      masks the deactivation of the entry held in the Location
//                   Register, whose NBET field is still to be written.
//   loc_collect     LR/DIR; writes the current branch's location into the NBET
//                   field of the previous branch when that branch changed its
//                   predicted direction or was newly allocated (one-direction),
//                   or into the field of its resolved direction (two-direction).
//   nbet            Next BTB Entry Table, one or two fields per entry, same
//                   index as the BTB.
//   nbet_lookup     BTB location register and pre-activation register(s).
//   preact_decoder  pre-activation signal per entry.
//
// The structure (deactivation controller, drowsy BTB and NBET exchanging
// deactivation signals, BTB locations and pre-activation signals), the LR/DIR
// collection, the two-cycle NBET lookup and the LR guard follow the published
// scheme; the stall interface, reset state, replacement policy and widths are
// this design's own.
//
// Timing of a pre-activation: BTB hit in cycle t, NBET read in t+1,
// pre-activation signal in t+2, the next branch's entry is readable from t+3.
// A lookup hitting a drowsy entry raises lk_stall for one cycle and must be
// repeated by the front end in the following cycle. The NBET entries share
// the BTB entries' power modes. An entry is "accessed" for the decay counters
// when a lookup hits it, an update writes it or it is pre-activated; counting
// a pre-activation as an access is an own choice, made so that a woken entry
// that is then not used goes back to sleep after one decay interval.
//
// Outputs: lookup results, the awake vector (for energy accounting) and
// one-cycle event strobes (btb_events_t).
module drowsy_btb_top
  import btb_pkg::*;
#(
  parameter int unsigned ENTRIES        = BTB_ENTRIES_DEF,
  parameter int unsigned WAYS           = BTB_WAYS_DEF,
  parameter int unsigned ADDR_W         = ADDR_W_DEF,
  parameter int unsigned DECAY_INTERVAL = DECAY_INTERVAL_DEF,
  parameter int unsigned LOCAL_BITS     = LOCAL_BITS_DEF,
  parameter int unsigned NBET_FIELDS    = 1,
  localparam int unsigned IDX_W         = $clog2(ENTRIES),
  localparam int unsigned NF            = (NBET_FIELDS == 0) ? 1 : NBET_FIELDS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               lk_valid,
  input  logic [ADDR_W-1:0]  lk_pc,
  output logic               lk_hit,
  output logic               lk_stall,
  output logic               lk_taken,
  output logic [ADDR_W-1:0]  lk_target,
  input  logic               up_valid,
  input  logic [ADDR_W-1:0]  up_pc,
  input  logic               up_taken,
  input  logic [ADDR_W-1:0]  up_target,
  output logic [ENTRIES-1:0] awake,
  output btb_events_t        events
);
  logic [IDX_W-1:0]   lk_idx;
  logic               up_inbtb, up_changed, up_alloc;
  logic [IDX_W-1:0]   up_idx;
  logic [ENTRIES-1:0] pre_act, access, deact_raw, deact;
  logic               tick, gated;
  logic               nbet_we, nbet_wfield, lr_valid, nbet_re;
  logic [IDX_W-1:0]   nbet_waddr, nbet_wdata, lr, nbet_raddr;
  logic [NF-1:0]            nbet_rvalid, par_valid;
  logic [NF-1:0][IDX_W-1:0] nbet_rdata, par;

  drowsy_btb #(.ENTRIES(ENTRIES), .WAYS(WAYS), .ADDR_W(ADDR_W)) u_btb (
    .clk, .rst_n,
    .lk_valid, .lk_pc, .lk_hit, .lk_stall, .lk_idx, .lk_taken, .lk_target,
    .up_valid, .up_pc, .up_taken, .up_target,
    .up_inbtb, .up_idx, .up_changed, .up_alloc,
    .pre_act, .deact, .awake, .access
  );

  decay_ctrl #(.ENTRIES(ENTRIES), .DECAY_INTERVAL(DECAY_INTERVAL),
               .LOCAL_BITS(LOCAL_BITS)) u_decay (
    .clk, .rst_n,
    .access(access | pre_act),
    .tick,
    .deact (deact_raw)
  );

  deact_gate #(.ENTRIES(ENTRIES)) u_gate (
    .deact_in (deact_raw),
    .lr_valid,
    .lr,
    .deact_out(deact),
    .gated
  );

  if (NBET_FIELDS > 0) begin : g_nbet
    loc_collect #(.ENTRIES(ENTRIES), .TWO_DIR(NBET_FIELDS == 2)) u_collect (
      .clk, .rst_n,
      .up_inbtb, .up_idx, .up_taken, .up_changed, .up_alloc,
      .nbet_we, .nbet_wfield, .nbet_waddr, .nbet_wdata,
      .lr_valid, .lr
    );

    nbet #(.ENTRIES(ENTRIES), .FIELDS(NF)) u_nbet (
      .clk, .rst_n,
      .we      (nbet_we),
      .wfield  (nbet_wfield),
      .waddr   (nbet_waddr),
      .wdata   (nbet_wdata),
      .inv     (up_alloc),
      .inv_addr(up_idx),
      .raddr   (nbet_raddr),
      .rvalid  (nbet_rvalid),
      .rdata   (nbet_rdata)
    );

    nbet_lookup #(.ENTRIES(ENTRIES), .FIELDS(NF)) u_lookup (
      .clk, .rst_n,
      .btb_hit    (lk_hit),
      .btb_idx    (lk_idx),
      .nbet_re,
      .nbet_raddr,
      .nbet_rvalid,
      .nbet_rdata,
      .par_valid,
      .par
    );

    preact_decoder #(.ENTRIES(ENTRIES), .NREG(NF)) u_preact (
      .par_valid(par_valid),
      .par      (par),
      .pre_act  (pre_act)
    );
  end else begin : g_decay_only
    // decay only: no NBET, no pre-activation, no LR to guard
    assign nbet_we     = 1'b0;
    assign nbet_wfield = 1'b0;
    assign nbet_waddr  = '0;
    assign nbet_wdata  = '0;
    assign lr_valid    = 1'b0;
    assign lr          = '0;
    assign nbet_re     = 1'b0;
    assign nbet_raddr  = '0;
    assign nbet_rvalid = '0;
    assign nbet_rdata  = '0;
    assign par_valid   = '0;
    assign par         = '0;
    assign pre_act     = '0;
  end

  always_comb begin
    events.lookup_hit  = lk_hit;
    events.wake_stall  = lk_stall;
    events.alloc       = up_alloc;
    events.dir_change  = up_changed;
    events.nbet_write  = nbet_we;
    events.nbet_lookup = nbet_re;
    events.preact      = |par_valid;
    events.preact_wake = |(pre_act & ~awake);
    events.deact       = |(deact & awake);
    events.deact_gated = gated;
    events.decay_tick  = tick;
  end

  // The NBET shares the BTB power modes: it is only ever read or written in
  // an entry that is in normal mode.
  a_nbet_write_awake: assert property (@(posedge clk) disable iff (!rst_n)
    nbet_we && !(up_alloc && up_idx == nbet_waddr) |-> awake[nbet_waddr]);
  a_nbet_read_awake: assert property (@(posedge clk) disable iff (!rst_n)
    nbet_re |-> awake[nbet_raddr]);
  initial assert (NBET_FIELDS <= 2)
    else $error("NBET_FIELDS must be 0, 1 or 2");
  a_hit_stall_excl: assert property (@(posedge clk) disable iff (!rst_n)
    !(lk_hit && lk_stall));
endmodule
