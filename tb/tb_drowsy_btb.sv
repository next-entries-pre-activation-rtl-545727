// tb_drowsy_btb: 16-entry, 4-way BTB (4 sets) with 16-bit addresses, driven
// with random lookups and updates from a pool of 24 branch PCs (so sets
// overflow and entries are replaced) plus random pre-activation and
// deactivation requests. A reference model in the testbench (tag store,
// round-robin victim per set, predictor table from the state diagram,
// per-entry power mode) gives the expected lookup results, update outputs,
// awake vector and access vector every cycle. A directed part checks the
// one-cycle wake-up of a drowsy entry.
module tb_drowsy_btb;
  localparam int N = 16, W = 4, S = 4, AW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lk_valid, lk_hit, lk_stall, lk_taken;
  logic [AW-1:0] lk_pc, lk_target, up_pc, up_target;
  logic [3:0] lk_idx, up_idx;
  logic up_valid, up_taken, up_inbtb, up_changed, up_alloc;
  logic [N-1:0] pre_act, deact, awake, access;
  int checks = 0, failures = 0;

  drowsy_btb #(.ENTRIES(N), .WAYS(W), .ADDR_W(AW)) dut (
    .clk, .rst_n, .lk_valid, .lk_pc, .lk_hit, .lk_stall, .lk_idx, .lk_taken, .lk_target,
    .up_valid, .up_pc, .up_taken, .up_target, .up_inbtb, .up_idx, .up_changed, .up_alloc,
    .pre_act, .deact, .awake, .access);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // reference model
  bit          m_v [N];
  logic [11:0] m_tag [N];
  logic [AW-1:0] m_tgt [N];
  int          m_st [N];
  int          m_rr [S];
  bit          m_aw [N];
  logic [AW-1:0] pool [24];

  function automatic int nxt(int s, bit t);
    int tab [8] = '{0, 1, 0, 3, 0, 3, 2, 3};
    return tab[s * 2 + int'(t)];
  endfunction

  function automatic int find(logic [AW-1:0] pc);
    int s = int'(pc[3:2]);
    for (int w = 0; w < W; w++)
      if (m_v[s*W+w] && m_tag[s*W+w] == pc[15:4]) return s*W+w;
    return -1;
  endfunction

  initial begin
    for (int i = 0; i < 24; i++) pool[i] = AW'(32'h0400 + i * 32'h0034 + (i % 4) * 4);
    lk_valid = 0; lk_pc = 0; up_valid = 0; up_pc = 0; up_taken = 0; up_target = 0;
    pre_act = '0; deact = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) begin m_v[i] = 0; m_aw[i] = 0; end
    for (int s = 0; s < S; s++) m_rr[s] = 0;
    chk(awake == '0, "all drowsy after reset");

    // directed: allocate one branch, let it go drowsy, look it up
    up_valid = 1; up_pc = 16'h1234 & ~16'h3; up_taken = 1; up_target = 16'h2000;
    #1 chk(up_alloc && up_inbtb && !up_changed, "allocation");
    @(posedge clk); #1;
    up_valid = 0;
    begin
      int e;
      e = int'({up_pc[3:2], 2'b00});
      chk(awake[e], "written entry awake");
      deact = '0; deact[e] = 1'b1;
      @(posedge clk); #1;
      deact = '0;
      chk(!awake[e], "deactivated");
      lk_valid = 1; lk_pc = up_pc; #1;
      chk(lk_stall && !lk_hit, "drowsy hit stalls");
      @(posedge clk); #1;
      chk(lk_hit && !lk_stall && lk_target == 16'h2000 && lk_taken, "hit one cycle after wake-up");
      m_v[e] = 1; m_tag[e] = up_pc[15:4]; m_tgt[e] = 16'h2000; m_st[e] = 2; m_aw[e] = 1;
      m_rr[int'(up_pc[3:2])] = 0;
    end

    for (int c = 0; c < 6000; c++) begin
      int li, ui, s, victim;
      bit free;
      lk_valid = 1'($urandom);
      lk_pc    = pool[$urandom % 24];
      up_valid = ($urandom % 3) != 0;
      up_pc    = pool[$urandom % 24];
      up_taken = 1'($urandom);
      up_target = AW'($urandom) & ~AW'(3);
      pre_act = '0; deact = '0;
      for (int i = 0; i < N; i++) begin
        pre_act[i] = ($urandom % 13) == 0;
        deact[i]   = ($urandom % 4) == 0;
      end
      #1;
      // lookup
      li = find(lk_pc);
      chk(lk_hit   == (lk_valid && li >= 0 && m_aw[li]), "lk_hit");
      chk(lk_stall == (lk_valid && li >= 0 && !m_aw[li]), "lk_stall");
      if (lk_valid && li >= 0)
        chk(lk_idx == 4'(li) && lk_target == m_tgt[li] && lk_taken == (m_st[li] >= 2), "lookup data");
      // update
      ui = find(up_pc);
      s = int'(up_pc[3:2]);
      free = 0; victim = m_rr[s];
      for (int w = W - 1; w >= 0; w--) if (!m_v[s*W+w]) begin free = 1; victim = w; end
      chk(up_inbtb == (up_valid && (ui >= 0 || up_taken)), "up_inbtb");
      chk(up_alloc == (up_valid && ui < 0 && up_taken), "up_alloc");
      if (up_valid && ui >= 0) begin
        chk(up_idx == 4'(ui), "up_idx hit");
        chk(up_changed == ((m_st[ui] >= 2) != (nxt(m_st[ui], up_taken) >= 2)), "up_changed");
      end else if (up_valid && up_taken) begin
        chk(up_idx == 4'(s*W + victim), "up_idx victim");
      end
      begin
        logic [N-1:0] acc;
        acc = '0;
        if (lk_valid && li >= 0) acc[li] = 1;
        if (up_valid && ui >= 0) acc[ui] = 1;
        if (up_valid && ui < 0 && up_taken) acc[s*W + victim] = 1;
        chk(access == acc, "access vector");
      end
      @(posedge clk); #1;
      // reference next state
      begin
        bit wk [N];
        for (int i = 0; i < N; i++) wk[i] = pre_act[i];
        if (lk_valid && li >= 0 && !m_aw[li]) wk[li] = 1;
        if (up_valid && ui >= 0) begin
          wk[ui] = 1;
          if (up_taken) m_tgt[ui] = up_target;
          m_st[ui] = nxt(m_st[ui], up_taken);
        end else if (up_valid && up_taken) begin
          int e;
          e = s*W + victim;
          wk[e] = 1;
          m_v[e] = 1; m_tag[e] = up_pc[15:4]; m_tgt[e] = up_target; m_st[e] = 2;
          if (!free) m_rr[s] = (m_rr[s] + 1) % W;
        end
        for (int i = 0; i < N; i++) m_aw[i] = wk[i] || (m_aw[i] && !deact[i]);
      end
      for (int i = 0; i < N; i++) chk(awake[i] == m_aw[i], "awake");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
