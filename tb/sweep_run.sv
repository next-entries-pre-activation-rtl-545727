// sweep_run: one run of the decay-interval sweep. Instantiates the drowsy BTB
// with the given decay interval and NBET scheme (FIELDS: 0 decay only, 1
// one-direction, 2 two-direction) and drives it with a program of PHASES
// successive loops, so that the set of live BTB entries moves over
// time the way a program's working set does. The whole phase sequence is run
// ROUNDS times, so each loop comes back after about 14K cycles: an entry that
// has decayed by then costs a wake-up stall unless it is pre-activated.
//
// Phase p is a loop of four branches b0..b3 (PCs 0x10000 + 16p + 4k, so all 64
// branches sit in different sets):
//   b0 always taken -> b1 (gap 5)
//   b1 taken three times, then not taken three times, repeating:
//      taken -> b2 (gap 8), not taken -> b3 (gap 3)
//   b2 always taken -> b3 (gap 6)
//   b3 taken back to b0 (gap 60) for LOOPS-1 iterations, then not taken into
//      the next phase (gap 10)
// A gap is a run of lookups of non-branch PCs. A lookup that stalls on a
// drowsy entry is repeated the next cycle.
//
// Reported when done is raised:
//   cycles        cycles from the first lookup to the end of the program;
//   stalls        wake-up stalls (the front end's extra cycles);
//   awake_cycles  sum over cycles of the number of entries in normal mode;
//   transitions   number of entry mode changes (either direction);
//   preacts       cycles with a pre-activation or a gated deactivation (must
//                 stay 0 in the decay-only build);
//   bad           lookups whose hit or target contradicted the program.
module sweep_run #(
  parameter int unsigned DI     = 128,
  parameter int unsigned FIELDS = 1,
  parameter int          PHASES = 16,
  parameter int          LOOPS  = 12,
  parameter int          ROUNDS = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    done,
  output longint  cycles,
  output longint  stalls,
  output longint  awake_cycles,
  output longint  transitions,
  output longint  preacts,
  output int      bad
);
  import btb_pkg::*;

  logic               lk_valid, lk_hit, lk_stall, lk_taken;
  logic [31:0]        lk_pc, lk_target;
  logic               up_valid, up_taken;
  logic [31:0]        up_pc, up_target;
  logic [511:0]       awake, awake_prev;
  btb_events_t        ev;

  drowsy_btb_top #(.DECAY_INTERVAL(DI), .NBET_FIELDS(FIELDS)) dut (
    .clk, .rst_n, .lk_valid, .lk_pc, .lk_hit, .lk_stall, .lk_taken, .lk_target,
    .up_valid, .up_pc, .up_taken, .up_target, .awake, .events(ev)
  );

  bit running = 0;
  bit in_btb [PHASES][4];
  logic [31:0] filler = 32'h4000_0000;

  always @(posedge clk) begin
    if (running) begin
      cycles       <= cycles + 1;
      awake_cycles <= awake_cycles + longint'($countones(awake));
      transitions  <= transitions + longint'($countones(awake ^ awake_prev));
      preacts      <= preacts + ((ev.preact || ev.deact_gated) ? 64'd1 : 64'd0);
    end
    awake_prev <= awake;
  end

  function automatic logic [31:0] bpc(int p, int k);
    return 32'h0001_0000 + 32'(p * 16 + k * 4);
  endfunction
  function automatic logic [31:0] btgt(int p, int k);
    return 32'h0002_0000 + 32'(p * 256 + k * 32);
  endfunction

  // look up one branch, repeating after a wake stall, then resolve it
  task automatic branch(input int p, input int k, input bit t);
    lk_valid = 1; lk_pc = bpc(p, k); up_valid = 0;
    #1;
    if (lk_stall) begin
      stalls++;
      @(posedge clk); #1;
    end
    if ((lk_hit != in_btb[p][k]) || (lk_hit && lk_target != btgt(p, k))) bad++;
    up_valid = 1; up_pc = bpc(p, k); up_taken = t; up_target = btgt(p, k);
    @(posedge clk); #1;
    up_valid = 0;
    if (t) in_btb[p][k] = 1;
  endtask

  task automatic gap(input int g);
    repeat (g) begin
      lk_valid = 1; lk_pc = filler; filler += 4;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    done = 0; cycles = 0; stalls = 0; awake_cycles = 0; transitions = 0; preacts = 0; bad = 0;
    lk_valid = 0; lk_pc = 0; up_valid = 0; up_pc = 0; up_taken = 0; up_target = 0;
    for (int p = 0; p < PHASES; p++) for (int k = 0; k < 4; k++) in_btb[p][k] = 0;
    @(posedge rst_n);
    @(posedge clk); #1;
    running = 1;
    for (int rd = 0; rd < ROUNDS; rd++)
    for (int p = 0; p < PHASES; p++) begin
      for (int i = 0; i < LOOPS; i++) begin
        bit t1;
        branch(p, 0, 1); gap(5);
        t1 = (i % 6) < 3;
        branch(p, 1, t1);
        if (t1) begin gap(8); branch(p, 2, 1); gap(6); end
        else    gap(3);
        branch(p, 3, i < LOOPS - 1);
        gap(i < LOOPS - 1 ? 60 : 10);
      end
    end
    running = 0;
    lk_valid = 0;
    done = 1;
  end
endmodule
