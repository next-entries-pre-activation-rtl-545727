// deact_gate: keeps the most recently resolved BTB entry awake.
//
// The Location Register (LR) holds the location of the last branch found in
// the BTB, whose NBET field is written only when the next branch resolves.
// If a long basic block follows, the decay policy could put that entry (and
// its NBET entry) to sleep first. This block decodes LR and masks the
// deactivation signal of that one entry; all other deactivation signals pass
// unchanged. Combinational. The masking function is the document's; masking
// only while LR holds a location (lr_valid) is an own choice.
module deact_gate #(
  parameter int unsigned ENTRIES = btb_pkg::BTB_ENTRIES_DEF,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic [ENTRIES-1:0] deact_in,
  input  logic               lr_valid,
  input  logic [IDX_W-1:0]   lr,
  output logic [ENTRIES-1:0] deact_out,
  output logic               gated
);
  logic [ENTRIES-1:0] lr_dec;
  always_comb begin
    lr_dec = '0;
    if (lr_valid) lr_dec[lr] = 1'b1;
    deact_out = deact_in & ~lr_dec;
    gated     = |(deact_in & lr_dec);
  end
endmodule
