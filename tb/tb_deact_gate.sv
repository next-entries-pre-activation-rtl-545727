// tb_deact_gate: random deactivation vectors and Location Register values;
// every deactivation must pass except the one at LR while LR is valid.
module tb_deact_gate;
  localparam int N = 32;
  logic [N-1:0] deact_in, deact_out, exp_out;
  logic lr_valid, gated;
  logic [4:0] lr;
  int checks = 0, failures = 0;

  deact_gate #(.ENTRIES(N)) dut (.deact_in, .lr_valid, .lr, .deact_out, .gated);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      deact_in = $urandom;
      lr       = 5'($urandom);
      lr_valid = 1'($urandom);
      if (k % 3 == 0) deact_in[lr] = 1'b1;
      #1;
      exp_out = deact_in;
      if (lr_valid) exp_out[lr] = 1'b0;
      checks += 2;
      if (deact_out !== exp_out) begin failures++; if (failures < 10) $display("FAIL out %h exp %h", deact_out, exp_out); end
      if (gated !== (lr_valid && deact_in[lr])) begin failures++; if (failures < 10) $display("FAIL gated"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
