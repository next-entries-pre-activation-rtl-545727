// nbet_lookup: NBET look-up pipeline.
//
// Cycle t:   the BTB hits; its location is latched in the BTB location
//            register (blr).
// Cycle t+1: the NBET entry at blr is read (only if the BTB hit in cycle t);
//            each valid field is latched in its pre-activation register.
// Cycle t+2: par_valid/par present the next BTB location(s) to the
//            pre-activation decoder for exactly one cycle.
// FIELDS = 1 for the one-direction NBET (one register), 2 for the
// two-direction NBET (registers for the taken and not-taken successors).
// The two-stage structure follows the published scheme. Holding the
// pre-activation registers for one cycle only is this design's choice.
module nbet_lookup #(
  parameter int unsigned ENTRIES = btb_pkg::BTB_ENTRIES_DEF,
  parameter int unsigned FIELDS  = 1,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          btb_hit,
  input  logic [IDX_W-1:0]              btb_idx,
  output logic                          nbet_re,
  output logic [IDX_W-1:0]              nbet_raddr,
  input  logic [FIELDS-1:0]             nbet_rvalid,
  input  logic [FIELDS-1:0][IDX_W-1:0]  nbet_rdata,
  output logic [FIELDS-1:0]             par_valid,
  output logic [FIELDS-1:0][IDX_W-1:0]  par
);
  logic             blr_valid;
  logic [IDX_W-1:0] blr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blr_valid <= 1'b0;
      blr       <= '0;
      par_valid <= '0;
      par       <= '0;
    end else begin
      blr_valid <= btb_hit;
      if (btb_hit) blr <= btb_idx;
      for (int f = 0; f < FIELDS; f++) begin
        par_valid[f] <= blr_valid && nbet_rvalid[f];
        if (blr_valid && nbet_rvalid[f]) par[f] <= nbet_rdata[f];
      end
    end
  end

  assign nbet_re    = blr_valid;
  assign nbet_raddr = blr;
endmodule
