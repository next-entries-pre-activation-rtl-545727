// tb_decay_sweep: decay-interval sweep of the drowsy BTB, decay only (no
// NBET), one-direction and two-direction NBET, decay intervals 32, 128, 512,
// 2K, 8K and 32K cycles, all running the same 16-phase, 64-branch loop
// program, run twice through, in parallel (sweep_run).
//
// For each run it prints the wake-up stalls, the performance loss (stall
// cycles over the cycles the same program takes with a BTB that never sleeps)
// and a leakage estimate normalised to a BTB that is always in normal mode. The estimate uses per-bit energies
// of 0.001289 pJ/cycle (normal), 0.0001934 pJ/cycle (drowsy) and 0.043 pJ per
// mode change, and 56 bits per entry (23-bit tag, 30-bit target, 2-bit
// predictor, valid) plus 0 (decay only), 10 (one-direction) or 20
// (two-direction) NBET bits that share the entry's mode. The program touches 64 of the 512 entries, so
// the numbers show the shape of the trade-off, not a benchmark result.
// Checked:
//   - no run sees a lookup contradicting the program;
//   - the decay-only build never pre-activates or gates a deactivation, the
//     other two do;
//   - a longer decay interval never gives more stalls than 32 cycles does, and
//     the 32-cycle interval does stall (its loop back-edge gap is 60 cycles);
//   - the leakage estimate grows from the 32-cycle to the 32K-cycle interval;
//   - the two-direction scheme never stalls more than the one-direction
//     scheme, and the one-direction scheme never more than decay only, at the
//     same interval;
//   - at the 2K interval, where the revisited loops have decayed, each
//     pre-activation scheme stalls strictly less than the one before it.
module tb_decay_sweep;
  localparam int NR = 6;
  localparam int unsigned DIS [NR] = '{32, 128, 512, 2048, 8192, 32768};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NS = 3;  // schemes: NBET fields 0 (decay only), 1, 2
  localparam string SNAME [NS] = '{"decay only   ", "one-direction", "two-direction"};

  logic   done   [NS][NR];
  longint cyc    [NS][NR], stl [NS][NR], awk [NS][NR], trn [NS][NR], pre [NS][NR];
  int     bad    [NS][NR];
  int checks = 0, failures = 0;

  for (genvar f = 0; f < NS; f++) begin : g_scheme
    for (genvar r = 0; r < NR; r++) begin : g_run
      sweep_run #(.DI(DIS[r]), .FIELDS(f)) u_run (
        .clk, .rst_n, .done(done[f][r]), .cycles(cyc[f][r]), .stalls(stl[f][r]),
        .awake_cycles(awk[f][r]), .transitions(trn[f][r]), .preacts(pre[f][r]), .bad(bad[f][r]));
    end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real norm_leak(int f, int r);
    real bits, act, drw, tr, base;
    bits = 56.0 + 10.0 * real'(f);
    act  = real'(awk[f][r]) * bits * 0.001289;
    drw  = (real'(cyc[f][r]) * 512.0 - real'(awk[f][r])) * bits * 0.0001934;
    tr   = real'(trn[f][r]) * bits * 0.043;
    base = real'(cyc[f][r]) * 512.0 * 56.0 * 0.001289;
    return (act + drw + tr) / base;
  endfunction

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int f = 0; f < NS; f++) for (int r = 0; r < NR; r++) all_done &= done[f][r];
    end while (!all_done);
    #1;
    $display("scheme          decay   cycles  stalls  perf. loss  norm. leakage");
    for (int f = 0; f < NS; f++)
      for (int r = 0; r < NR; r++)
        $display("%s  %6d  %7d  %6d  %8.2f%%  %6.3f", SNAME[f], DIS[r], cyc[f][r], stl[f][r],
                 100.0 * real'(stl[f][r]) / real'(cyc[f][r] - stl[f][r]), norm_leak(f, r));
    for (int f = 0; f < NS; f++) begin
      for (int r = 0; r < NR; r++) begin
        chk(bad[f][r] == 0, $sformatf("lookups consistent (%s, decay %0d)", SNAME[f], DIS[r]));
        chk((f == 0) == (pre[f][r] == 0), $sformatf("pre-activation present exactly with an NBET (%s, decay %0d)", SNAME[f], DIS[r]));
        chk(stl[f][r] <= stl[f][0], $sformatf("stalls at decay %0d not above decay 32 (%s)", DIS[r], SNAME[f]));
        if (f > 0)
          chk(stl[f][r] <= stl[f-1][r], $sformatf("%s stalls not above %s at decay %0d", SNAME[f], SNAME[f-1], DIS[r]));
      end
      chk(stl[f][0] > stl[f][NR-1], $sformatf("short decay interval costs stalls (%s)", SNAME[f]));
      chk(norm_leak(f, 0) < norm_leak(f, NR-1), $sformatf("leakage grows with the decay interval (%s)", SNAME[f]));
    end
    // at 2K cycles the revisited loops have decayed: pre-activation must save
    // stalls over decay only, and the two-direction table more still
    chk(stl[1][3] < stl[0][3], "one-direction pre-activation saves stalls over decay only at 2K");
    chk(stl[2][3] < stl[1][3], "two-direction pre-activation saves stalls over one-direction at 2K");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
