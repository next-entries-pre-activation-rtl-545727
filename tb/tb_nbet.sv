// tb_nbet: random writes, invalidations and reads on a 32-entry table, for a
// one-field table (the design default) and a two-field table side by side,
// each compared with a reference array. Checks that all fields are invalid
// after reset, that the field select steers two-field writes, and that an
// invalidation wins over a write to the same entry.
module tb_nbet;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, wfield, inv;
  logic [4:0] waddr, wdata, inv_addr, raddr;
  logic [0:0]      rv1;
  logic [0:0][4:0] rd1;
  logic [1:0]      rv2;
  logic [1:0][4:0] rd2;
  bit   mv [3][N];      // [0]: one-field table, [1],[2]: two-field table fields
  logic [4:0] ml [3][N];
  int checks = 0, failures = 0;

  nbet #(.ENTRIES(N))              dut1 (.clk, .rst_n, .we, .wfield, .waddr, .wdata, .inv, .inv_addr, .raddr, .rvalid(rv1), .rdata(rd1));
  nbet #(.ENTRIES(N), .FIELDS(2))  dut2 (.clk, .rst_n, .we, .wfield, .waddr, .wdata, .inv, .inv_addr, .raddr, .rvalid(rv2), .rdata(rd2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input int f, input logic v, input logic [4:0] d, input string name);
    checks++;
    if (v !== mv[f][raddr] || (mv[f][raddr] && d !== ml[f][raddr])) begin
      failures++;
      if (failures < 10) $display("FAIL %s read %0d: %0d/%0d exp %0d/%0d", name, raddr, v, d, mv[f][raddr], ml[f][raddr]);
    end
  endtask

  initial begin
    we = 0; wfield = 0; inv = 0; waddr = 0; wdata = 0; inv_addr = 0; raddr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) begin
      raddr = 5'(i); #1;
      checks++; if (rv1 != 0 || rv2 != 0) begin failures++; $display("FAIL valid after reset %0d", i); end
      for (int f = 0; f < 3; f++) mv[f][i] = 0;
    end
    // invalidate beats write on the same entry
    we = 1; waddr = 7; wdata = 9; wfield = 1; inv = 1; inv_addr = 7;
    @(posedge clk); #1;
    we = 0; inv = 0; raddr = 7; #1;
    checks++; if (rv1 != 0 || rv2 != 0) begin failures++; $display("FAIL invalidate priority"); end
    for (int c = 0; c < 3000; c++) begin
      we = 1'($urandom); wfield = 1'($urandom); waddr = 5'($urandom); wdata = 5'($urandom);
      inv = ($urandom % 4) == 0; inv_addr = 5'($urandom);
      raddr = 5'($urandom);
      #1;
      cmp(0, rv1[0], rd1[0], "1-field");
      cmp(1, rv2[0], rd2[0], "2-field taken");
      cmp(2, rv2[1], rd2[1], "2-field not-taken");
      @(posedge clk); #1;
      if (we) begin
        mv[0][waddr] = 1; ml[0][waddr] = wdata;
        mv[1 + int'(wfield)][waddr] = 1; ml[1 + int'(wfield)][waddr] = wdata;
      end
      if (inv) for (int f = 0; f < 3; f++) mv[f][inv_addr] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
