// tb_norm_minus: quantizes random coefficients, feeds the levels back and checks that the remainder equals W minus the rescaled level and stays within one quantization step.
module tb_norm_minus;
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
  logic [5:0] qp; logic half; coef_t coef [8], level [8], rem [8];
  norm_minus dut (.*);
  int MF [6][3] = '{'{13107,5243,8066}, '{11916,4660,7490}, '{10082,4194,6554},
                    '{9362,3647,5825}, '{8192,3355,5243}, '{7282,2893,4559}};
  initial begin
    for (int n = 0; n < 800; n++) begin
      qp = 6'($urandom_range(0, 45)); half = 1'($urandom);
      for (int i = 0; i < 8; i++) begin
        int c, qb, a, z;
        c = ((2*int'(half) + i/4) % 2 == 0 && (i % 4) % 2 == 0) ? 0 : (((2*int'(half) + i/4) % 2 == 1 && (i % 4) % 2 == 1) ? 1 : 2);
        coef[i] = coef_t'(int'($urandom_range(0, 30000)) - 15000);
        qb = 15 + int'(qp) / 6;
        a = coef[i] < 0 ? -int'(coef[i]) : int'(coef[i]);
        z = int'((longint'(a) * MF[qp % 6][c] + (longint'(1) << qb) / 3) >> qb);
        level[i] = coef_t'(coef[i] < 0 ? -z : z);
      end
      #1;
      for (int i = 0; i < 8; i++) begin
        int c, nf; longint recm; real step;
        c = ((2*int'(half) + i/4) % 2 == 0 && (i % 4) % 2 == 0) ? 0 : (((2*int'(half) + i/4) % 2 == 1 && (i % 4) % 2 == 1) ? 1 : 2);
        nf = (134217728 + MF[qp % 6][c] / 2) / MF[qp % 6][c];
        recm = ((longint'(level[i] < 0 ? -level[i] : level[i]) * nf * (longint'(1) << (qp / 6))) + 2048) / 4096;
        if (level[i] < 0) recm = -recm;
        check(longint'(rem[i]) == longint'(coef[i]) - recm, $sformatf("exact lane %0d", i));
        step = real'(longint'(1) << (15 + qp / 6)) / MF[qp % 6][c];
        check(real'(rem[i] < 0 ? -rem[i] : rem[i]) <= step + 1.0, $sformatf("within a step lane %0d: qp %0d W %0d Z %0d rem %0d step %f", i, qp, coef[i], level[i], rem[i], step));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
