// decay_ctrl: deactivation controller implementing the decay policy.
//
// A global counter wraps every GLOBAL_INTERVAL cycles and produces a one-cycle
// tick. Each entry has a LOCAL_BITS-bit local counter that is cleared when
// the entry is accessed and incremented (saturating) on every tick. A tick
// that finds an entry's local counter at its maximum deactivates that entry,
// so an entry idle for the whole decay interval goes drowsy between
// (2^LOCAL_BITS - 1) and 2^LOCAL_BITS global intervals after its last access.
// The global interval is DECAY_INTERVAL / 2^LOCAL_BITS (32 cycles for the
// document's 128-cycle decay interval).
//
// The global/local counter structure and the 128-cycle interval follow the
// document; the 2-bit local counter, the exact firing tick and the reset state
// (counters saturated, matching a BTB whose entries start drowsy) are own
// choices. An access in the same cycle as a tick wins, so an entry that is
// being used is never deactivated.
module decay_ctrl #(
  parameter int unsigned ENTRIES        = btb_pkg::BTB_ENTRIES_DEF,
  parameter int unsigned DECAY_INTERVAL = btb_pkg::DECAY_INTERVAL_DEF,
  parameter int unsigned LOCAL_BITS     = btb_pkg::LOCAL_BITS_DEF,
  localparam int unsigned GLOBAL_INTERVAL = DECAY_INTERVAL >> LOCAL_BITS,
  localparam int unsigned GW = (GLOBAL_INTERVAL > 1) ? $clog2(GLOBAL_INTERVAL) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ENTRIES-1:0] access,
  output logic               tick,
  output logic [ENTRIES-1:0] deact
);
  localparam logic [LOCAL_BITS-1:0] LMAX = '1;

  logic [GW-1:0]         gcnt_q;
  logic [LOCAL_BITS-1:0] lcnt_q [ENTRIES];

  assign tick = (gcnt_q == GW'(GLOBAL_INTERVAL - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) gcnt_q <= '0;
    else        gcnt_q <= tick ? '0 : gcnt_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < ENTRIES; i++) begin
      if (!rst_n)                            lcnt_q[i] <= LMAX;
      else if (access[i])                    lcnt_q[i] <= '0;
      else if (tick && lcnt_q[i] != LMAX)    lcnt_q[i] <= lcnt_q[i] + 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < ENTRIES; i++)
      deact[i] = tick && !access[i] && (lcnt_q[i] == LMAX);
  end

  initial assert (GLOBAL_INTERVAL >= 1)
    else $error("DECAY_INTERVAL must be at least 2^LOCAL_BITS");
endmodule
