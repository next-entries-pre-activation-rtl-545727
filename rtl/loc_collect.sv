// loc_collect: next BTB location collection (Location Register and DIR bit).
//
// The location of a branch's successor is only known when that successor is
// resolved. The Location Register (LR) therefore keeps the BTB location of
// the last resolved branch that is in the BTB, and the DIR bit keeps what is
// needed to decide how its NBET entry is written when the next BTB-resident
// branch resolves (up_inbtb). Then the new branch's location (up_idx) is
// written into NBET[LR] and LR/DIR are loaded with the new branch.
//
// TWO_DIR = 0 (default, one-direction NBET): DIR records whether the branch in
//   LR changed its predicted direction or was newly allocated (its field is
//   still empty). The NBET is written only when DIR is set.
// TWO_DIR = 1 (two-direction NBET): DIR records the branch's resolved
//   direction and selects the field written (0 = taken, 1 = not taken). The
//   NBET is written on every BTB-resident branch.
//
// Interface: up_* come from the BTB update port in the same cycle; nbet_we,
// nbet_wfield, nbet_waddr, nbet_wdata drive the NBET write port
// combinationally; lr_valid and lr go to the deactivation gating. Branches
// that are not in the BTB after their update leave LR untouched (own choice:
// they have no location). Treating a new allocation as a direction change
// follows the published statement that a new taken branch records its
// taken-path successor.
module loc_collect #(
  parameter int unsigned ENTRIES = btb_pkg::BTB_ENTRIES_DEF,
  parameter bit          TWO_DIR = 1'b0,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             up_inbtb,
  input  logic [IDX_W-1:0] up_idx,
  input  logic             up_taken,
  input  logic             up_changed,
  input  logic             up_alloc,
  output logic             nbet_we,
  output logic             nbet_wfield,
  output logic [IDX_W-1:0] nbet_waddr,
  output logic [IDX_W-1:0] nbet_wdata,
  output logic             lr_valid,
  output logic [IDX_W-1:0] lr
);
  logic dir_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lr_valid <= 1'b0;
      lr       <= '0;
      dir_q    <= 1'b0;
    end else if (up_inbtb) begin
      lr_valid <= 1'b1;
      lr       <= up_idx;
      dir_q    <= TWO_DIR ? !up_taken : (up_changed | up_alloc);
    end
  end

  assign nbet_we     = up_inbtb && lr_valid && (TWO_DIR || dir_q);
  assign nbet_wfield = TWO_DIR && dir_q;
  assign nbet_waddr  = lr;
  assign nbet_wdata  = up_idx;
endmodule
