// tb_cost_mode: checks every input selection of the cost unit: SATD sums, AC2 and the two AC1 parts (together sum |Fij| * floor((i+j-1)/2)), the accumulator and its clear, the texture intensities and the 4x4 / 16x16 candidate rules.
module tb_cost_mode;
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
  logic in_valid, acc_clr, out_valid; logic [2:0] sel; coef_t coef [16];
  logic [31:0] acc, blk_cost; logic [8:0] cand4; logic [3:0] cand16; logic [19:0] iv, ih;
  cost_mode dut (.*);
  int f [4][4];
  function automatic int ab(input int x); return x < 0 ? -x : x; endfunction
  initial begin
    longint racc;
    in_valid = 0; acc_clr = 0; sel = 0;
    for (int i = 0; i < 16; i++) coef[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    racc = 0;
    for (int n = 0; n < 800; n++) begin
      int part, ivr, ihr, ac1; logic [8:0] e4; logic [3:0] e16;
      sel = 3'($urandom_range(0, 7));
      acc_clr = (n % 16 == 0);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        f[i][j] = (n % 5 == 1 && i > 0) ? 0 : (n % 5 == 2 && j > 0) ? 0 : int'($urandom_range(0, 2000)) - 1000;
        coef[4*i+j] = coef_t'(f[i][j]);
      end
      part = 0; ac1 = 0;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) ac1 += ab(f[i][j]) * ((i + j - 1) / 2);
      case (sel)
        0: part = ab(f[0][1]) + ab(f[1][0]) + ab(f[2][0]);
        1: for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) if ((i + j - 1) / 2 == 1) part += ab(f[i][j]);
        6: for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) if ((i + j - 1) / 2 == 2) part += 2 * ab(f[i][j]);
        4, 7: begin for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) part += ab(f[i][j]); part -= ab(f[0][0]); end
        default: for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) part += ab(f[i][j]);
      endcase
      racc = (acc_clr ? 0 : racc) + part;
      ivr = ab(f[0][1]) + ab(f[0][2]) + ab(f[0][3]);
      ihr = ab(f[1][0]) + ab(f[2][0]) + ab(f[3][0]);
      if (ivr > 2 * ihr)      e4 = 9'b010100101;
      else if (ihr > 2 * ivr) e4 = 9'b101000110;
      else                    e4 = 9'b000011111;
      e16 = (ivr > ihr) ? 4'b0101 : (ihr > ivr) ? 4'b0110 : 4'b1100;
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid, "latency");
      check(int'(blk_cost) == part, $sformatf("sel %0d part %0d vs %0d", sel, blk_cost, part));
      check(longint'(acc) == racc, $sformatf("sel %0d acc", sel));
      if (sel == 0) begin
        check(cand4 == e4, $sformatf("cand4 %b vs %b", cand4, e4));
        check(cand4[2] && $countones(cand4) <= 5, "4x4: DC always, at most five");
      end
      if (sel == 1) check(cand16 == e16, $sformatf("cand16 %b vs %b", cand16, e16));
      if (sel == 0 || sel == 1 || sel == 7) check(int'(iv) == ivr && int'(ih) == ihr, "intensities");
      // AC1 split: weight-1 part plus weight-2 part equals the document's AC1
      if (sel == 1) begin
        int p2;
        p2 = 0;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) if (i + j >= 5) p2 += 2 * ab(f[i][j]);
        check(int'(blk_cost) + p2 == ac1, "AC1 = weight-1 part + weight-2 part");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
