// power_mode_ctrl: power mode register of every BTB entry (and of the NBET
// entry with the same index, whose mode is managed together with it).
//
// A '1' in awake means the entry's row is in normal mode and can be read; a
// '0' means drowsy: the contents are kept but the row must be woken before it
// is read. A wake request in cycle t makes the entry usable from cycle t+1,
// which models the one-cycle wake-up latency of a drowsy row. A wake request
// wins over a deactivation in the same cycle.
//
// After reset every entry is drowsy, since the BTB is empty (own choice; the
// document does not give a reset state).
module power_mode_ctrl #(
  parameter int unsigned ENTRIES = btb_pkg::BTB_ENTRIES_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ENTRIES-1:0] wake,
  input  logic [ENTRIES-1:0] deact,
  output logic [ENTRIES-1:0] awake
);
  always_ff @(posedge clk) begin
    if (!rst_n) awake <= '0;
    else        awake <= wake | (awake & ~deact);
  end
endmodule
