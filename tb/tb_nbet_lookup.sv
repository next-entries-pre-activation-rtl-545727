// tb_nbet_lookup: BTB hits at random; the NBET is a reference table in the
// testbench read through the block's read port. A hit in cycle t must give a
// pre-activation register holding NBET[location] in cycle t+2 exactly when
// that NBET field is valid, and nothing otherwise. A one-field instance (the
// design default) and a two-field instance are checked side by side.
module tb_nbet_lookup;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic btb_hit;
  logic [3:0] btb_idx;
  logic re1, re2;
  logic [3:0] ra1, ra2;
  logic [0:0] rv1, pv1;
  logic [0:0][3:0] rd1, p1;
  logic [1:0] rv2, pv2;
  logic [1:0][3:0] rd2, p2;
  bit   tv [2][N];
  logic [3:0] tl [2][N];
  int checks = 0, failures = 0;

  nbet_lookup #(.ENTRIES(N)) dut1 (.clk, .rst_n, .btb_hit, .btb_idx, .nbet_re(re1), .nbet_raddr(ra1),
                                   .nbet_rvalid(rv1), .nbet_rdata(rd1), .par_valid(pv1), .par(p1));
  nbet_lookup #(.ENTRIES(N), .FIELDS(2)) dut2 (.clk, .rst_n, .btb_hit, .btb_idx, .nbet_re(re2), .nbet_raddr(ra2),
                                   .nbet_rvalid(rv2), .nbet_rdata(rd2), .par_valid(pv2), .par(p2));
  always_comb begin
    rv1[0] = tv[0][ra1]; rd1[0] = tl[0][ra1];
    for (int f = 0; f < 2; f++) begin rv2[f] = tv[f][ra2]; rd2[f] = tl[f][ra2]; end
  end

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

  bit   h1 = 0, h2 = 0;
  logic [3:0] i1 = 0, i2 = 0;

  initial begin
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < N; i++) begin tv[f][i] = 1'($urandom); tl[f][i] = 4'($urandom); end
    btb_hit = 0; btb_idx = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      btb_hit = 1'($urandom);
      btb_idx = 4'($urandom);
      #1;
      // h2/i2: hit two cycles ago
      chk(pv1[0] == (h2 && tv[0][i2]) && (!pv1[0] || p1[0] == tl[0][i2]), "one-field register");
      for (int f = 0; f < 2; f++)
        chk(pv2[f] == (h2 && tv[f][i2]) && (!pv2[f] || p2[f] == tl[f][i2]), "two-field registers");
      chk(re1 == h1 && re2 == h1 && (!h1 || (ra1 == i1 && ra2 == i1)), "read port");
      @(posedge clk); #1;
      h2 = h1; i2 = i1; h1 = btb_hit; i1 = btb_idx;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
