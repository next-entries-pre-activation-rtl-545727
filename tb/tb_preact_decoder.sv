// tb_preact_decoder: checks the single-register decoder (design default) and
// a two-register instance against an independently built one-hot vector.
module tb_preact_decoder;
  localparam int N = 64;
  logic [0:0]      v1;
  logic [0:0][5:0] p1;
  logic [N-1:0]    o1;
  logic [1:0]      v2;
  logic [1:0][5:0] p2;
  logic [N-1:0]    o2, e;
  int checks = 0, failures = 0;

  preact_decoder #(.ENTRIES(N))            dut1 (.par_valid(v1), .par(p1), .pre_act(o1));
  preact_decoder #(.ENTRIES(N), .NREG(2))  dut2 (.par_valid(v2), .par(p2), .pre_act(o2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      v1 = 1'($urandom); p1 = 6'($urandom);
      v2 = 2'($urandom); p2 = 12'($urandom);
      #1;
      e = '0;
      for (int i = 0; i < N; i++) if (v1[0] && p1[0] == 6'(i)) e[i] = 1'b1;
      checks++; if (o1 !== e) begin failures++; if (failures < 10) $display("FAIL single"); end
      e = '0;
      for (int i = 0; i < N; i++)
        if ((v2[0] && p2[0] == 6'(i)) || (v2[1] && p2[1] == 6'(i))) e[i] = 1'b1;
      checks++; if (o2 !== e) begin failures++; if (failures < 10) $display("FAIL dual"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
