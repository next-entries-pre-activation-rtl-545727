// tb_loc_collect: drives a sequence of resolved branches into a
// one-direction instance (design default) and a two-direction instance.
// One-direction: the location of each BTB-resident branch is written into the
// entry of the previous one only if that one changed its predicted direction
// or was newly allocated. Two-direction: it is always written, into the field
// of the previous branch's resolved direction. Branches not in the BTB are
// skipped by both.
module tb_loc_collect;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic up_inbtb, up_taken, up_changed, up_alloc;
  logic [5:0] up_idx;
  logic we1, wf1, lv1, we2, wf2, lv2;
  logic [5:0] wa1, wd1, lr1, wa2, wd2, lr2;
  int checks = 0, failures = 0;

  loc_collect #(.ENTRIES(64)) dut1 (.clk, .rst_n, .up_inbtb, .up_idx, .up_taken, .up_changed, .up_alloc,
    .nbet_we(we1), .nbet_wfield(wf1), .nbet_waddr(wa1), .nbet_wdata(wd1), .lr_valid(lv1), .lr(lr1));
  loc_collect #(.ENTRIES(64), .TWO_DIR(1'b1)) dut2 (.clk, .rst_n, .up_inbtb, .up_idx, .up_taken, .up_changed, .up_alloc,
    .nbet_we(we2), .nbet_wfield(wf2), .nbet_waddr(wa2), .nbet_wdata(wd2), .lr_valid(lv2), .lr(lr2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // reference
  bit   r_valid = 0, r_chg = 0, r_tk = 0;
  logic [5:0] r_lr = 0;

  initial begin
    up_inbtb = 0; up_idx = 0; up_taken = 0; up_changed = 0; up_alloc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(!lv1 && !we1 && !lv2 && !we2, "reset");
    // directed: alloc A(5) taken, then B(9) -> one-direction writes NBET[5]=9
    up_inbtb = 1; up_idx = 5; up_alloc = 1; up_taken = 1; #1;
    chk(!we1 && !we2, "first branch writes nothing");
    @(posedge clk); #1;
    up_idx = 9; up_alloc = 0; up_changed = 0; up_taken = 0; #1;
    chk(we1 && wa1 == 5 && wd1 == 9, "alloc write");
    chk(we2 && wa2 == 5 && wd2 == 9 && wf2 == 0, "two-direction write into taken field");
    @(posedge clk); #1;
    // B unchanged, not taken -> C(12): one-direction silent, two-direction NT field
    up_idx = 12; #1;
    chk(!we1, "no write without change");
    chk(we2 && wa2 == 9 && wf2 == 1, "two-direction write into not-taken field");
    @(posedge clk); #1;
    r_valid = 1; r_lr = 12; r_chg = 0; r_tk = 0;
    for (int c = 0; c < 3000; c++) begin
      up_inbtb   = 1'($urandom);
      up_idx     = 6'($urandom);
      up_taken   = 1'($urandom);
      up_changed = ($urandom % 5) == 0;
      up_alloc   = ($urandom % 7) == 0;
      #1;
      chk(we1 == (up_inbtb && r_valid && r_chg), "we one-direction");
      if (we1) chk(wa1 == r_lr && wd1 == up_idx, "addr/data one-direction");
      chk(we2 == (up_inbtb && r_valid), "we two-direction");
      if (we2) chk(wa2 == r_lr && wd2 == up_idx && wf2 == !r_tk, "addr/data/field two-direction");
      chk(lv1 == r_valid && lv2 == r_valid && (!r_valid || (lr1 == r_lr && lr2 == r_lr)), "LR");
      @(posedge clk); #1;
      if (up_inbtb) begin r_valid = 1; r_lr = up_idx; r_chg = up_changed || up_alloc; r_tk = up_taken; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
