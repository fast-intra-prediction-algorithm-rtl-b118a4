// tb_iquant: checks the inverse quantizer in all four modes (4x4 AC, luma DC, chroma DC, 8x8 rows) against a reference with its own copy of the H.264/AVC 4x4 and 8x8 scale tables (8x8 written as the standard's 16*V8 level scale with a shift by 6), and its one-cycle latency.
module tb_iquant;
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
  logic in_valid, half, out_valid; logic [2:0] row; logic [5:0] qp; qmode_e mode; coef_t level [8], coef [8];
  iquant dut (.*);
  int V [6][3] = '{'{10,16,13}, '{11,18,14}, '{13,20,16}, '{14,23,18}, '{16,25,20}, '{18,29,23}};
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
  function automatic int dq8(input int z, input int q, input int i, input int j);
    longint p;
    p = longint'(z) * 16 * V8[q % 6][cls8(i, j)];
    if (q >= 36) return int'(p * (longint'(1) << (q / 6 - 6)));
    return int'((p * (longint'(1) << (q / 6)) + 32) >>> 6);
  endfunction
  function automatic int dq(input int z, input int q, input int row, input int col, input int md);
    int c; longint p;
    c = (row % 2 == 0 && col % 2 == 0) ? 0 : ((row % 2 == 1 && col % 2 == 1) ? 1 : 2);
    if (md != 0) c = 0;
    p = longint'(z) * V[q % 6][c] * (longint'(1) << (q / 6));
    if (md == 0) return int'(p);
    if (md == 1) return (q >= 12) ? int'(p / 4) : int'((p + 2) >>> 2);
    return int'(p >>> 1);
  endfunction
  initial begin
    in_valid = 0; half = 0; row = 0; qp = 0; mode = QM_AC4;
    for (int i = 0; i < 8; i++) level[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      int exp [8]; int md;
      md = n % 4;
      mode = qmode_e'(md); qp = 6'($urandom_range(0, (md == 3) ? 51 : 39)); half = 1'($urandom); row = 3'($urandom);
      for (int i = 0; i < 8; i++) begin
        level[i] = coef_t'(int'($urandom_range(0, 60)) - 30);
        exp[i] = (md == 3) ? dq8(int'(level[i]), int'(qp), int'(row), i)
                           : dq(int'(level[i]), int'(qp), 2 * int'(half) + i / 4, i % 4, md);
      end
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid, "latency");
      for (int i = 0; i < 8; i++)
        check(int'(coef[i]) == exp[i], $sformatf("mode %0d qp %0d lane %0d: %0d vs %0d", md, qp, i, coef[i], exp[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
