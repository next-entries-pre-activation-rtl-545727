// tb_power_mode_ctrl: random wake/deactivation requests on 16 entries,
// compared cycle by cycle with a reference mode vector. Also checks the reset
// state (all drowsy) and the one-cycle wake-up.
module tb_power_mode_ctrl;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] wake, deact, awake, ref_awake;
  int checks = 0, failures = 0;

  power_mode_ctrl #(.ENTRIES(N)) dut (.clk, .rst_n, .wake, .deact, .awake);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wake = '0; deact = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (awake != '0) begin failures++; $display("FAIL reset state"); end
    ref_awake = '0;
    // single wake: usable one cycle later
    wake = N'(1) << 3;
    @(posedge clk); #1;
    wake = '0;
    checks++; if (awake != N'(1) << 3) begin failures++; $display("FAIL wake latency"); end
    ref_awake = N'(1) << 3;
    for (int c = 0; c < 1000; c++) begin
      wake  = N'($urandom) & N'($urandom);
      deact = N'($urandom);
      @(posedge clk); #1;
      for (int i = 0; i < N; i++)
        if (wake[i]) ref_awake[i] = 1'b1;
        else if (deact[i]) ref_awake[i] = 1'b0;
      checks++;
      if (awake !== ref_awake) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: %h vs %h", c, awake, ref_awake);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
