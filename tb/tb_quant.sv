// tb_quant: checks the quantizer in all four modes (4x4 AC, luma DC, chroma DC, 8x8 rows) against a reference written from the H.264/AVC formulas with its own copy of the 4x4 MF table and the 8x8 multipliers computed from the squared row norms of the 8x8 transform, and its one-cycle latency.
module tb_quant;
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
  logic in_valid, half, out_valid; logic [2:0] row; logic [5:0] qp; qmode_e mode; coef_t coef [8], level [8];
  quant dut (.*);
  int MF [6][3] = '{'{13107,5243,8066}, '{11916,4660,7490}, '{10082,4194,6554},
                    '{9362,3647,5825}, '{8192,3355,5243}, '{7282,2893,4559}};
  int V8 [6][6] = '{'{20,18,32,19,25,24}, '{22,19,35,21,28,26}, '{26,23,42,24,33,31},
                    '{28,25,45,26,35,33}, '{32,28,51,30,40,38}, '{36,32,58,34,46,43}};
  // 8x8 class from the kinds of row and column: multiple of 4, odd, 2 mod 4
  function automatic int cls8(input int i, input int j);
    int ti, tj;
    ti = (i % 4 == 0) ? 0 : ((i % 2 == 1) ? 1 : 2);
    tj = (j % 4 == 0) ? 0 : ((j % 2 == 1) ? 1 : 2);
    if (ti == tj) return ti;
    if (ti + tj == 1) return 3;
    if (ti + tj == 2) return 4;
    return 5;
  endfunction
  int NRM [8] = '{512, 578, 320, 578, 512, 578, 320, 578};
  function automatic int qref8(input int w, input int q, input int i, input int j);
    longint mf, f, a, z;
    mf = ((longint'(1) << 37) / (longint'(NRM[i]) * NRM[j] * V8[q % 6][cls8(i, j)]) + 1) >>> 1;
    f = ((longint'(1) << (15 + q / 6)) / 3) * 2;
    a = (w < 0) ? -w : w;
    z = (a * mf + f) >> (16 + q / 6);
    return (w < 0) ? -int'(z) : int'(z);
  endfunction
  function automatic int qref(input int w, input int q, input int row, input int col, input int md);
    int c, qb; longint f, a, z;
    c = (row % 2 == 0 && col % 2 == 0) ? 0 : ((row % 2 == 1 && col % 2 == 1) ? 1 : 2);
    if (md != 0) c = 0;
    qb = 15 + q / 6 + (md == 1 ? 2 : (md == 2 ? 1 : 0));
    f = (longint'(1) << (15 + q / 6)) / 3;
    f = f << (md == 1 ? 2 : (md == 2 ? 1 : 0));
    a = (w < 0) ? -w : w;
    z = (a * MF[q % 6][c] + f) >> qb;
    return (w < 0) ? -int'(z) : int'(z);
  endfunction
  initial begin
    in_valid = 0; half = 0; row = 0; qp = 0; mode = QM_AC4;
    for (int i = 0; i < 8; i++) coef[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      int exp [8]; int md;
      md = n % 4;
      mode = qmode_e'(md); qp = 6'($urandom_range(0, 51)); half = 1'($urandom); row = 3'($urandom);
      for (int i = 0; i < 8; i++) begin
        coef[i] = coef_t'(int'($urandom_range(0, 40000)) - 20000);
        exp[i] = (md == 3) ? qref8(int'(coef[i]), int'(qp), int'(row), i)
                           : qref(int'(coef[i]), int'(qp), 2 * int'(half) + i / 4, i % 4, md);
      end
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid, "latency");
      for (int i = 0; i < 8; i++)
        check(int'(level[i]) == exp[i], $sformatf("mode %0d qp %0d lane %0d: %0d vs %0d", md, qp, i, level[i], exp[i]));
      @(posedge clk); #1;
      check(!out_valid, "single-cycle valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
