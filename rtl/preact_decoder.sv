// preact_decoder: turns pre-activation registers into one pre-activation
// signal per BTB entry.
//
// Each of the NREG registers (valid + location) is decoded to a one-hot
// vector and an entry is pre-activated if any register selects it.
// Combinational. The one-direction NBET of this design uses a single register
// (NREG = 1); NREG = 2 gives the two-register circuit of the two-direction
// scheme.
module preact_decoder #(
  parameter int unsigned ENTRIES = btb_pkg::BTB_ENTRIES_DEF,
  parameter int unsigned NREG    = 1,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic [NREG-1:0]             par_valid,
  input  logic [NREG-1:0][IDX_W-1:0]  par,
  output logic [ENTRIES-1:0]          pre_act
);
  always_comb begin
    pre_act = '0;
    for (int r = 0; r < NREG; r++)
      if (par_valid[r]) pre_act[par[r]] = 1'b1;
  end
endmodule
