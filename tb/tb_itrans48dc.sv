// tb_itrans48dc: self-checking test of the shared inverse transform.
// Random 4x4 integer, 4x4 Hadamard and 8x8 integer blocks are fed back to
// back; every output column is compared with a separately written model of
// the H.264/AVC inverse transforms (with the (x+32)>>6 rounding for integer
// blocks). Latencies are checked: 2 cycles from the second 4x4 input to the
// first column pair, and 1 cycle from the last 8x8 row to the first column.
// Some 4x4 blocks are loaded while an 8x8 block drains.
module tb_itrans48dc;
  import intra_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid; tkind_e in_kind; coef_t in_data [8];
  logic out4_valid, out4_half, out8_valid; tkind_e out4_kind; logic [2:0] out8_col;
  coef_t out4 [8], out8 [8];
  itrans48dc dut (.*);

  function automatic void m4(input int d [4], input logic had, output int o [4]);
    if (had) begin
      o[0] = d[0] + d[1] + d[2] + d[3]; o[1] = d[0] + d[1] - d[2] - d[3];
      o[2] = d[0] - d[1] - d[2] + d[3]; o[3] = d[0] - d[1] + d[2] - d[3];
    end else begin
      o[0] = d[0] + d[1] + d[2] + (d[3] >>> 1); o[1] = d[0] + (d[1] >>> 1) - d[2] - d[3];
      o[2] = d[0] - (d[1] >>> 1) - d[2] + d[3]; o[3] = d[0] - d[1] + d[2] - (d[3] >>> 1);
    end
  endfunction

  function automatic void m8(input int w [8], output int x [8]);
    int e [8], f [8];
    e[0] = w[0] + w[4]; e[1] = -w[3] + w[5] - w[7] - (w[7] >>> 1);
    e[2] = w[0] - w[4]; e[3] = w[1] + w[7] - w[3] - (w[3] >>> 1);
    e[4] = (w[2] >>> 1) - w[6]; e[5] = -w[1] + w[7] + w[5] + (w[5] >>> 1);
    e[6] = w[2] + (w[6] >>> 1); e[7] = w[3] + w[5] + w[1] + (w[1] >>> 1);
    f[0] = e[0] + e[6]; f[1] = e[1] + (e[7] >>> 2); f[2] = e[2] + e[4]; f[3] = e[3] + (e[5] >>> 2);
    f[4] = e[2] - e[4]; f[5] = (e[3] >>> 2) - e[5]; f[6] = e[0] - e[6]; f[7] = e[7] - (e[1] >>> 2);
    x[0] = f[0] + f[7]; x[1] = f[2] + f[5]; x[2] = f[4] + f[3]; x[3] = f[6] + f[1];
    x[4] = f[6] - f[1]; x[5] = f[4] - f[3]; x[6] = f[2] - f[5]; x[7] = f[0] - f[7];
  endfunction

  int y4 [16], e4 [16], y8 [64], e8 [64];

  task automatic model4(input logic had);
    int t [16], a [4], o [4];
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) a[c] = y4[r*4+c];
      m4(a, had, o); for (int c = 0; c < 4; c++) t[r*4+c] = o[c];
    end
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = t[r*4+c];
      m4(a, had, o);
      for (int r = 0; r < 4; r++) e4[r*4+c] = had ? o[r] : ((o[r] + 32) >>> 6);
    end
  endtask

  task automatic model8();
    int t [64], a [8], o [8];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) a[c] = y8[r*8+c];
      m8(a, o); for (int c = 0; c < 8; c++) t[r*8+c] = o[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) a[r] = t[r*8+c];
      m8(a, o); for (int r = 0; r < 8; r++) e8[r*8+c] = (o[r] + 32) >>> 6;
    end
  endtask

  task automatic chk4(input int h, input string what);
    int bad = 0;
    checks++;
    if (!out4_valid || out4_half != h[0]) bad = 1;
    for (int k = 0; k < 2; k++) for (int r = 0; r < 4; r++)
      if (int'(out4[k*4+r]) != e4[r*4 + h*2 + k]) bad++;
    if (bad != 0) begin failures++; $display("FAIL %s half %0d", what, h); end
  endtask

  task automatic send4(input logic had);
    for (int i = 0; i < 16; i++) y4[i] = had ? int'($urandom_range(0, 4000)) - 2000 : int'($urandom_range(0, 8000)) - 4000;
    for (int h = 0; h < 2; h++) begin
      in_valid = 1; in_kind = had ? TK_HAD4 : TK_INT4;
      for (int i = 0; i < 8; i++) in_data[i] = coef_t'(y4[h*8+i]);
      @(posedge clk); #1;
    end
    in_valid = 0;
  endtask

  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_kind = TK_INT4;
    for (int i = 0; i < 8; i++) in_data[i] = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1; @(posedge clk); #1;
    for (int n = 0; n < 40; n++) begin
      logic had;
      had = (n % 3 == 1);
      send4(had);
      model4(had);
      chk4(0, had ? "had4" : "int4");
      @(posedge clk); #1;
      chk4(1, had ? "had4" : "int4");
      @(posedge clk); #1;
      checks++;
      if (out4_valid) begin failures++; $display("FAIL out4_valid stuck"); end
    end
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < 64; i++) y8[i] = int'($urandom_range(0, 8000)) - 4000;
      model8();
      for (int r = 0; r < 8; r++) begin
        in_valid = 1; in_kind = TK_INT8;
        for (int i = 0; i < 8; i++) in_data[i] = coef_t'(y8[r*8+i]);
        @(posedge clk); #1;
      end
      in_valid = 0;
      for (int c = 0; c < 8; c++) begin
        int bad;
        bad = 0;
        if (n >= 5 && c < 2) begin
          // load a 4x4 block while the 8x8 block drains
          in_valid = 1; in_kind = TK_INT4;
          if (c == 0) for (int i = 0; i < 16; i++) y4[i] = int'($urandom_range(0, 8000)) - 4000;
          for (int i = 0; i < 8; i++) in_data[i] = coef_t'(y4[c*8+i]);
        end
        checks++;
        if (!out8_valid || out8_col != 3'(c)) bad = 1;
        for (int r = 0; r < 8; r++) if (int'(out8[r]) != e8[r*8+c]) bad++;
        if (bad != 0) begin failures++; $display("FAIL 8x8 column %0d", c); end
        if (n >= 5 && (c == 2 || c == 3)) begin
          if (c == 2) model4(0);
          chk4(c - 2, "int4 during 8x8 drain");
        end
        @(posedge clk); #1;
        in_valid = 0;
      end
      checks++;
      if (out8_valid) begin failures++; $display("FAIL out8_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
