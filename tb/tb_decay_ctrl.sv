// tb_decay_ctrl: decay controller with 4 entries, a 16-cycle decay interval
// and 2-bit local counters (global interval 4 cycles).
// Reference: the number of global ticks seen since an entry's last access;
// a tick finding 3 earlier ticks since the last access deactivates it. Also
// checks the tick period and that a single access is followed by a
// deactivation between 12 and 16 cycles later.
module tb_decay_ctrl;
  localparam int N = 4, DI = 16, GI = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] access, deact;
  logic tick;
  int ticks_since [N];
  int checks = 0, failures = 0;

  decay_ctrl #(.ENTRIES(N), .DECAY_INTERVAL(DI), .LOCAL_BITS(2)) dut (.clk, .rst_n, .access, .tick, .deact);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_acc, fired;
    bit tk;
    access = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) ticks_since[i] = 3;
    cyc = 0;
    // random phase
    for (int c = 0; c < 4000; c++) begin
      for (int i = 0; i < N; i++) access[i] = ($urandom % 23) == 0;
      #1;
      checks++;
      if (tick !== ((cyc % GI) == GI - 1)) begin failures++; if (failures < 10) $display("FAIL tick at %0d", cyc); end
      for (int i = 0; i < N; i++) begin
        bit e;
        e = tick && !access[i] && ticks_since[i] >= 3;
        checks++;
        if (deact[i] !== e) begin failures++; if (failures < 10) $display("FAIL deact[%0d] at %0d got %0d ts %0d acc %0d cnt %0d", i, cyc, deact[i], ticks_since[i], access[i], dut.lcnt_q[i]); end
      end
      tk = tick;
      @(posedge clk); #1;
      for (int i = 0; i < N; i++)
        if (access[i]) ticks_since[i] = 0;
        else if (tk) ticks_since[i]++;
      cyc++;
    end
    // directed: one access, measure time to deactivation
    for (int k = 0; k < GI; k++) begin
      access = '0; access[0] = 1'b1;
      @(posedge clk); #1;
      access = '0;
      last_acc = 0; fired = -1;
      for (int c = 1; c <= 40 && fired < 0; c++) begin
        if (deact[0]) fired = c;
        @(posedge clk); #1;
      end
      checks++;
      if (fired <= DI - GI || fired > DI) begin failures++; $display("FAIL decay time %0d", fired); end
      repeat (k + 1) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
