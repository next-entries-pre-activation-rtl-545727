// tb_drowsy_btb_top_2dir: end-to-end test of the two-direction variant
// (NBET_FIELDS = 2) with a 64-cycle decay interval, the best interval reported
// for that scheme, at the default BTB size (512 entries, 4 ways).
//
// The program and the checks are those of tb_drowsy_btb_top (five branches,
// 50 loop iterations, gaps longer than the decay interval), except that:
//   - the NBET holds a taken and a not-taken successor per branch, checked at
//     the end: n0 T -> n1, n1 T -> n3 and NT -> n3, n3 T -> n0 and NT -> n4,
//     n4 T -> n0;
//   - both successors of n3 are pre-activated together at least once;
//   - after the phase change of n3 no stall is allowed at n4 beyond its first
//     two visits, since the not-taken successor was already recorded.
module tb_drowsy_btb_top_2dir;
  import btb_pkg::*;

  localparam int ENTRIES = 512;
  localparam int IDX_W   = 9;
  localparam int NN      = 5;
  localparam int ITERS   = 50;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               lk_valid, lk_hit, lk_stall, lk_taken;
  logic [31:0]        lk_pc, lk_target;
  logic               up_valid, up_taken;
  logic [31:0]        up_pc, up_target;
  logic [ENTRIES-1:0] awake;
  btb_events_t        ev;

  drowsy_btb_top #(.NBET_FIELDS(2), .DECAY_INTERVAL(64)) dut (
    .clk, .rst_n, .lk_valid, .lk_pc, .lk_hit, .lk_stall, .lk_taken, .lk_target,
    .up_valid, .up_pc, .up_taken, .up_target, .awake, .events(ev)
  );

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---------------- program ----------------
  logic [31:0] npc [NN], ntgt [NN];
  int nextT [NN], nextN [NN], gapT [NN], gapN [NN];
  int execs [NN];
  bit ever_taken [NN];
  logic [1:0] ref_st [NN];   // reference predictor: 0 SNT 1 WNT 2 WT 3 ST

  function automatic bit outcome(int n, int e);
    case (n)
      0: return 1;
      1: return (e % 4) != 3;
      2: return 0;
      3: return e < 30;
      default: return 1;
    endcase
  endfunction

  // reference transition table, written from the state diagram
  function automatic logic [1:0] ref_next(logic [1:0] s, bit t);
    case ({s, t})
      3'b11_1: return 2'd3;  3'b11_0: return 2'd2;
      3'b10_1: return 2'd3;  3'b10_0: return 2'd0;
      3'b01_1: return 2'd3;  3'b01_0: return 2'd0;
      3'b00_1: return 2'd1;  default: return 2'd0;
    endcase
  endfunction

  function automatic logic [IDX_W-1:0] loc_of(int n);
    return {npc[n][8:2], 2'b00};  // each branch sits alone in its set: way 0
  endfunction

  // ---------------- mechanism counters ----------------
  int c_dual = 0, n4_stalls = 0, c_hit = 0, c_stall = 0, c_alloc = 0, c_dchg = 0, c_nbw = 0, c_nbl = 0, c_pre = 0, c_prew = 0, c_deact = 0, c_gated = 0, c_tick = 0;
  always @(posedge clk) if (rst_n) begin
    c_hit   += int'(ev.lookup_hit);
    c_stall += int'(ev.wake_stall);
    c_alloc += int'(ev.alloc);
    c_dchg  += int'(ev.dir_change);
    c_nbw   += int'(ev.nbet_write);
    c_nbl   += int'(ev.nbet_lookup);
    c_pre   += int'(ev.preact);
    c_prew  += int'(ev.preact_wake);
    c_deact += int'(ev.deact);
    c_gated += int'(ev.deact_gated);
    c_tick  += int'(ev.decay_tick);
    c_dual  += int'(dut.par_valid == 2'b11);
  end

  // watchdog
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle++;
  int n0_hit_cycle [$];
  bit n1_recorded = 0;

  // check pre-activation latency: two cycles after an n0 hit
  always @(negedge clk) if (rst_n) begin
    if (n0_hit_cycle.size() > 0 && n0_hit_cycle[0] + 2 == cycle) begin
      void'(n0_hit_cycle.pop_front());
      chk(dut.par_valid[0] && dut.par[0] == loc_of(1) && !dut.par_valid[1], "pre-activation of n1 two cycles after n0 hit");
    end
  end

  int late_stalls_other, late_stalls_n0;
  logic [31:0] filler;

  task automatic filler_cycle();
    lk_valid = 1; lk_pc = filler; filler += 4; up_valid = 0;
    @(posedge clk); #1;
    chk(!lk_hit && !lk_stall, "filler PC must miss");
  endtask

  initial begin
    npc[0] = 32'h0000_1000; ntgt[0] = 32'h0000_1100; nextT[0] = 1; nextN[0] = 1; gapT[0] = 4;   gapN[0] = 4;
    npc[1] = 32'h0000_1124; ntgt[1] = 32'h0000_1300; nextT[1] = 2; nextN[1] = 3; gapT[1] = 6;   gapN[1] = 2;
    npc[2] = 32'h0000_1308; ntgt[2] = 32'h0000_1400; nextT[2] = 3; nextN[2] = 3; gapT[2] = 3;   gapN[2] = 3;
    npc[3] = 32'h0000_1410; ntgt[3] = 32'h0000_1000; nextT[3] = 0; nextN[3] = 4; gapT[3] = 200; gapN[3] = 3;
    npc[4] = 32'h0000_1520; ntgt[4] = 32'h0000_1000; nextT[4] = 0; nextN[4] = 0; gapT[4] = 150; gapN[4] = 150;
    for (int n = 0; n < NN; n++) begin execs[n] = 0; ever_taken[n] = 0; ref_st[n] = 2'd2; end
    filler = 32'h4000_0000;
    lk_valid = 0; lk_pc = 0; up_valid = 0; up_pc = 0; up_taken = 0; up_target = 0;
    late_stalls_other = 0; late_stalls_n0 = 0; c_dual = 0; n4_stalls = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    begin
      int n, iter;
      n = 0; iter = 0;
      while (iter < ITERS) begin
        bit t, stalled;
        int g;
        t = outcome(n, execs[n]);
        // lookup, repeated while it stalls on a drowsy entry
        stalled = 0;
        lk_valid = 1; lk_pc = npc[n]; up_valid = 0;
        #1;
        if (iter >= ITERS - 15 && n != 0) chk(!lk_stall, $sformatf("pre-activated n%0d must not stall", n));
        if (lk_stall) begin
          stalled = 1;
          if (n == 4 && execs[4] >= 1) n4_stalls++;
          chk(ever_taken[n], "stall only for a branch in the BTB");
          if (iter >= ITERS - 15) begin
            if (n == 0) late_stalls_n0++; else late_stalls_other++;
          end
          @(posedge clk); #1;
          chk(lk_hit && !lk_stall, "repeated lookup hits one cycle after a wake stall");
        end
        chk((lk_hit || lk_stall) == ever_taken[n], $sformatf("hit iff in BTB (n%0d)", n));
        if (lk_hit) begin
          chk(lk_target == ntgt[n], "target");
          chk(lk_taken == ref_st[n][1], $sformatf("predicted direction n%0d", n));
          if (n == 0 && n1_recorded) n0_hit_cycle.push_back(cycle);
        end
        // resolve in the same cycle
        up_valid = 1; up_pc = npc[n]; up_taken = t; up_target = ntgt[n];
        @(posedge clk); #1;
        up_valid = 0;
        if (ever_taken[n]) ref_st[n] = ref_next(ref_st[n], t);
        else if (t) begin ever_taken[n] = 1; ref_st[n] = 2'd2; end
        if (n == 1) n1_recorded = 1;   // n0 -> n1 recorded when n1 resolves
        execs[n]++;
        g = t ? gapT[n] : gapN[n];
        if (n == 3 || n == 4) iter++;
        n = t ? nextT[n] : nextN[n];
        repeat (g) filler_cycle();
      end
    end

    chk(late_stalls_other == 0, $sformatf("no wake stalls hidden by pre-activation (got %0d)", late_stalls_other));
    chk(late_stalls_n0 > 0, "long-gap successor still pays wake-up");

    // NBET contents: field 0 = taken successor, field 1 = not-taken successor
    chk(dut.g_nbet.u_nbet.valid_q[0][loc_of(0)] && dut.g_nbet.u_nbet.loc_q[0][loc_of(0)] == loc_of(1), "NBET n0 T -> n1");
    chk(dut.g_nbet.u_nbet.valid_q[0][loc_of(1)] && dut.g_nbet.u_nbet.loc_q[0][loc_of(1)] == loc_of(3), "NBET n1 T -> n3");
    chk(dut.g_nbet.u_nbet.valid_q[1][loc_of(1)] && dut.g_nbet.u_nbet.loc_q[1][loc_of(1)] == loc_of(3), "NBET n1 NT -> n3");
    chk(dut.g_nbet.u_nbet.valid_q[0][loc_of(3)] && dut.g_nbet.u_nbet.loc_q[0][loc_of(3)] == loc_of(0), "NBET n3 T -> n0");
    chk(dut.g_nbet.u_nbet.valid_q[1][loc_of(3)] && dut.g_nbet.u_nbet.loc_q[1][loc_of(3)] == loc_of(4), "NBET n3 NT -> n4");
    chk(dut.g_nbet.u_nbet.valid_q[0][loc_of(4)] && dut.g_nbet.u_nbet.loc_q[0][loc_of(4)] == loc_of(0), "NBET n4 T -> n0");
    chk(!dut.g_nbet.u_nbet.valid_q[1][loc_of(0)] && !dut.g_nbet.u_nbet.valid_q[1][loc_of(4)], "NBET never-seen not-taken fields invalid");
    chk(!dut.g_nbet.u_nbet.valid_q[0][loc_of(2)] && !dut.g_nbet.u_nbet.valid_q[1][loc_of(2)], "NBET n2 never valid");
    chk(c_dual > 0, "mechanism: both successors pre-activated together");
    chk(n4_stalls <= 1, $sformatf("n4 stalls after its first visit (got %0d)", n4_stalls));

    // idle: everything decays except the Location Register's entry
    lk_valid = 0;
    repeat (300) @(posedge clk);
    #1;
    chk($countones(awake) == 1, $sformatf("one entry awake after idle (got %0d)", $countones(awake)));
    chk(dut.lr_valid && awake[dut.lr], "LR entry kept awake");

    chk(c_hit   > 0, "mechanism: lookup hit");
    chk(c_stall > 0, "mechanism: wake stall");
    chk(c_alloc == 4, $sformatf("mechanism: allocations (got %0d)", c_alloc));
    chk(c_dchg  > 0, "mechanism: direction change");
    chk(c_nbw   > 0, "mechanism: NBET write");
    chk(c_nbl   > 0, "mechanism: NBET lookup");
    chk(c_pre   > 0, "mechanism: pre-activation");
    chk(c_prew  > 0, "mechanism: pre-activation wake-up");
    chk(c_deact > 0, "mechanism: decay deactivation");
    chk(c_gated > 0, "mechanism: LR gating");
    chk(c_tick > 0, "mechanism: global decay tick");
    $display("events: hit=%0d stall=%0d alloc=%0d dirchg=%0d nbet_wr=%0d nbet_lk=%0d preact=%0d preact_wake=%0d deact=%0d gated=%0d",
             c_hit, c_stall, c_alloc, c_dchg, c_nbw, c_nbl, c_pre, c_prew, c_deact, c_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
