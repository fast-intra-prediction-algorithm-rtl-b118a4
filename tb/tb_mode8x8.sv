// tb_mode8x8: checks the merge of four 4x4 candidate sets into 8x8 candidates (rule S_n, DC always, at most four modes) on random and hand-made sets.
module tb_mode8x8;
  import intra_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  logic [8:0] cand4 [4]; logic [8:0] cand8;
  mode8x8 dut (.*);
  initial begin
    // hand example: vertical in one block only, diagonal-down-left in two
    cand4[0] = 9'b000001100; cand4[1] = 9'b000001000; cand4[2] = 9'b000000100; cand4[3] = 9'b000000100;
    #1; check(cand8 == 9'b000001100, "hand example");
    for (int n = 0; n < 2000; n++) begin
      logic [8:0] exp; int cnt;
      for (int b = 0; b < 4; b++) cand4[b] = 9'($urandom);
      #1;
      exp = '0; cnt = 0;
      for (int m = 0; m < 9; m++) begin
        int s; logic keep;
        s = 0;
        for (int b = 0; b < 4; b++) if (cand4[b][m]) s++;
        keep = (m == 2) || (m < 2 && s > 0) || (m > 2 && s > 1);
        if (keep && cnt < 4) begin exp[m] = 1; cnt++; end
      end
      check(cand8 == exp, $sformatf("random %0d: %b vs %b", n, cand8, exp));
      check(cand8[2] && $countones(cand8) <= 4, "DC kept, at most four");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
