// tb_bimodal_counter: exhaustive check of the bimodal predictor next-state
// logic against the state diagram (SNT, WNT, WT, ST; WT/NT -> SNT and
// WNT/T -> ST are the only direction changes).
module tb_bimodal_counter;
  import btb_pkg::*;
  bp_state_t state, next_state;
  logic taken, pred_taken, dir_changed;
  int checks = 0, failures = 0;

  bimodal_counter dut (.state, .taken, .next_state, .pred_taken, .dir_changed);

  // expected next state, predicted direction, direction change, per {state, taken}
  // state encoding: 0 SNT, 1 WNT, 2 WT, 3 ST
  int exp_next [8] = '{0, 1, 0, 3, 0, 3, 2, 3};
  int exp_pred [8] = '{0, 0, 0, 0, 1, 1, 1, 1};
  int exp_chg  [8] = '{0, 0, 0, 1, 1, 0, 0, 0};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      state = bp_state_t'(i >> 1);
      taken = i[0];
      #1;
      checks += 3;
      if (int'(next_state) != exp_next[i]) begin failures++; $display("FAIL next s=%0d t=%0d", i>>1, i&1); end
      if (int'(pred_taken) != exp_pred[i]) begin failures++; $display("FAIL pred s=%0d", i>>1); end
      if (int'(dir_changed) != exp_chg[i]) begin failures++; $display("FAIL chg s=%0d t=%0d", i>>1, i&1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
