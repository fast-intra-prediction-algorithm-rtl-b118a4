// tb_trans48dc: self-checking test of the shared forward transform.
// 4x4 integer and Hadamard results are compared with the matrix products
// C*X*C^T; 8x8 results with the integer matrix M*X*M^T/64 on inputs that are
// multiples of 64 (where the butterfly shifts are exact) and with a separately
// written butterfly model on random residues. Latencies (1 cycle for 4x4,
// 4 cycles from the last 8x8 row pair to the first column pair) and the
// overlap of a 4x4 block with a draining 8x8 block are checked too.
module tb_trans48dc;
  import intra_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid; tkind_e in_kind; logic signed [15:0] in_data [16];
  logic ready8, out4_valid, out8_valid; tkind_e out4_kind; logic [1:0] out8_col;
  coef_t out4 [16], out8 [16];
  trans48dc dut (.*);

  int C4 [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
  int H4 [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
  int M8 [8][8] = '{'{8,8,8,8,8,8,8,8}, '{12,10,6,3,-3,-6,-10,-12}, '{8,4,-4,-8,-8,-4,4,8},
                    '{10,-3,-12,-6,6,12,3,-10}, '{8,-8,-8,8,8,-8,-8,8}, '{6,-12,3,10,-10,-3,12,-6},
                    '{4,-8,8,-4,-4,8,-8,4}, '{3,-6,10,-12,12,-10,6,-3}};

  function automatic void ref8row(input int p [8], output int o [8]);
    // independent butterfly model (JM style ordering)
    int s [4], d [4], e0, e1, e2, e3, f4, f5, f6, f7;
    for (int i = 0; i < 4; i++) begin s[i] = p[i] + p[7-i]; d[i] = p[i] - p[7-i]; end
    e0 = s[0] + s[3]; e1 = s[1] + s[2]; e2 = s[0] - s[3]; e3 = s[1] - s[2];
    o[0] = e0 + e1; o[4] = e0 - e1; o[2] = e2 + (e3 >>> 1); o[6] = (e2 >>> 1) - e3;
    f4 = d[1] + d[2] + (d[0] + (d[0] >>> 1));
    f5 = d[0] - d[3] - (d[2] + (d[2] >>> 1));
    f6 = d[0] + d[3] - (d[1] + (d[1] >>> 1));
    f7 = d[1] - d[2] + (d[3] + (d[3] >>> 1));
    o[1] = f4 + (f7 >>> 2); o[3] = f5 + (f6 >>> 2); o[5] = f6 - (f5 >>> 2); o[7] = (f4 >>> 2) - f7;
  endfunction

  int x4 [16], exp4 [16];
  int x8 [64], exp8 [64];

  task automatic ref4(input logic had);
    int t [16];
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i*4+j] = 0;
      for (int k = 0; k < 4; k++) t[i*4+j] += (had ? H4[i][k] : C4[i][k]) * x4[k*4+j];
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      exp4[i*4+j] = 0;
      for (int k = 0; k < 4; k++) exp4[i*4+j] += t[i*4+k] * (had ? H4[j][k] : C4[j][k]);
    end
  endtask

  task automatic ref8(input logic exact);
    int t [64], r [8], o [8];
    if (exact) begin
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        t[i*8+j] = 0; for (int k = 0; k < 8; k++) t[i*8+j] += x8[i*8+k] * M8[j][k];
      end
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        exp8[i*8+j] = 0; for (int k = 0; k < 8; k++) exp8[i*8+j] += M8[i][k] * t[k*8+j];
        exp8[i*8+j] /= 64;
      end
    end else begin
      for (int i = 0; i < 8; i++) begin
        for (int k = 0; k < 8; k++) r[k] = x8[i*8+k];
        ref8row(r, o); for (int k = 0; k < 8; k++) t[i*8+k] = o[k];
      end
      for (int j = 0; j < 8; j++) begin
        for (int k = 0; k < 8; k++) r[k] = t[k*8+j];
        ref8row(r, o); for (int k = 0; k < 8; k++) exp8[k*8+j] = o[k];
      end
    end
  endtask

  task automatic check4(input string what);
    int bad = 0;
    checks++;
    if (!out4_valid) bad = 1;
    for (int i = 0; i < 16; i++) if (int'(out4[i]) != exp4[i]) bad++;
    if (bad != 0) begin failures++; $display("FAIL %s: out4 mismatch (valid=%0b)", what, out4_valid); end
  endtask

  task automatic run8(input logic exact, input logic with4);
    int c0;
    for (int p = 0; p < 4; p++) begin
      in_valid = 1; in_kind = TK_INT8;
      for (int i = 0; i < 16; i++) in_data[i] = 16'(x8[p*16+i]);
      @(posedge clk); #1;
    end
    c0 = cyc;
    in_valid = 0;
    for (int c = 0; c < 4; c++) begin
      int bad = 0;
      if (with4) begin
        // a 4x4 block enters while the 8x8 block drains
        for (int i = 0; i < 16; i++) x4[i] = int'($urandom_range(0, 510)) - 255;
        in_valid = 1; in_kind = TK_INT4;
        for (int i = 0; i < 16; i++) in_data[i] = 16'(x4[i]);
        ref4(0);
      end
      checks++;
      if (!out8_valid || out8_col != 2'(c)) bad = 1;
      for (int k = 0; k < 2; k++) for (int r = 0; r < 8; r++)
        if (int'(out8[k*8+r]) != exp8[r*8 + c*2 + k]) bad++;
      if (bad != 0) begin failures++; $display("FAIL 8x8 column pair %0d (exact=%0b)", c, exact); end
      @(posedge clk); #1;
      in_valid = 0;
      if (with4) check4("4x4 during 8x8 drain");
    end
    checks++;
    if (out8_valid) begin failures++; $display("FAIL out8_valid stuck"); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_kind = TK_INT4;
    for (int i = 0; i < 16; i++) in_data[i] = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1; @(posedge clk); #1;
    // 4x4 integer and Hadamard, back to back
    for (int n = 0; n < 40; n++) begin
      logic had;
      had = n[0];
      for (int i = 0; i < 16; i++) x4[i] = had ? int'($urandom_range(0, 8160)) - 4080 : int'($urandom_range(0, 510)) - 255;
      in_valid = 1; in_kind = had ? TK_HAD4 : TK_INT4;
      for (int i = 0; i < 16; i++) in_data[i] = 16'(x4[i]);
      ref4(had);
      @(posedge clk); #1;
      in_valid = 0;
      check4(had ? "hadamard" : "int4");
      checks++;
      if (out4_kind != (had ? TK_HAD4 : TK_INT4)) begin failures++; $display("FAIL kind"); end
    end
    // 8x8 exact (matrix) and random (butterfly model), with and without overlap
    for (int n = 0; n < 12; n++) begin
      logic exact;
      exact = (n % 2 == 0);
      for (int i = 0; i < 64; i++)
        x8[i] = exact ? 64 * (int'($urandom_range(0, 7)) - 4) : int'($urandom_range(0, 510)) - 255;
      ref8(exact);
      run8(exact, n >= 6);
      checks++;
      if (!ready8) begin failures++; $display("FAIL ready8 low after drain"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
