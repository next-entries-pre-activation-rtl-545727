// nbet: Next BTB Entry Table.
//
// One entry per BTB entry, at the same index. Each entry has FIELDS fields of
// {valid, BTB location}. With FIELDS = 1 (the default, one-direction scheme)
// the single field holds the location of the branch that followed this branch
// along its predicted direction. With FIELDS = 2 (two-direction scheme) field
// 0 holds the successor along the taken path and field 1 the successor along
// the not-taken path. Ports:
//   - write port (we/wfield/waddr/wdata), independent of the BTB, driven by
//     the location collection circuit; sets the written field valid (wfield
//     selects the field, and is ignored when FIELDS = 1);
//   - invalidate port (inv/inv_addr): the BTB entry at that index was
//     replaced, so all its fields are cleared; this wins over a write to the
//     same entry in the same cycle, since that write belongs to the evicted
//     branch;
//   - read port (raddr -> rvalid/rdata per field), combinational, used by the
//     NBET lookup one cycle after a BTB hit.
// All fields are invalid after reset, as in the published scheme. Priority of
// invalidation and the combinational read are this design's own choices.
module nbet #(
  parameter int unsigned ENTRIES = btb_pkg::BTB_ENTRIES_DEF,
  parameter int unsigned FIELDS  = 1,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic                          wfield,
  input  logic [IDX_W-1:0]              waddr,
  input  logic [IDX_W-1:0]              wdata,
  input  logic                          inv,
  input  logic [IDX_W-1:0]              inv_addr,
  input  logic [IDX_W-1:0]              raddr,
  output logic [FIELDS-1:0]             rvalid,
  output logic [FIELDS-1:0][IDX_W-1:0]  rdata
);
  logic [ENTRIES-1:0] valid_q [FIELDS];
  logic [IDX_W-1:0]   loc_q   [FIELDS][ENTRIES];
  logic [FIELDS-1:0]  wsel;

  assign wsel = (FIELDS == 1) ? FIELDS'(1) : FIELDS'(1) << wfield;

  for (genvar f = 0; f < FIELDS; f++) begin : g_field
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        valid_q[f] <= '0;
      end else begin
        if (we && wsel[f]) valid_q[f][waddr] <= 1'b1;
        if (inv) valid_q[f][inv_addr] <= 1'b0;
      end
    end

    always_ff @(posedge clk) begin
      if (we && wsel[f]) loc_q[f][waddr] <= wdata;
    end

    assign rvalid[f] = valid_q[f][raddr];
    assign rdata[f]  = loc_q[f][raddr];
  end
endmodule
