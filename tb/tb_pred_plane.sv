// tb_pred_plane: checks 16x16 and chroma plane prediction against the H.264/AVC plane equations computed in the testbench, with the output order and the two-cycle start latency.
module tb_pred_plane;
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
  logic start, chroma, busy, pix_valid; logic [3:0] pix_row; pix_t top [16], left [16], corner, pix [16];
  pred_plane dut (.*);
  function automatic int pt(input int i); return i < 0 ? int'(corner) : int'(top[i]); endfunction
  function automatic int pl(input int i); return i < 0 ? int'(corner) : int'(left[i]); endfunction
  initial begin
    start = 0; chroma = 0; corner = 0;
    for (int i = 0; i < 16; i++) begin top[i] = 0; left[i] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int h, v, a, b, c, rows, xc;
      chroma = n[0];
      corner = 8'($urandom);
      for (int i = 0; i < 16; i++) begin
        // smooth ramps as well as noise
        top[i]  = (n % 3 == 0) ? 8'($urandom) : 8'(20 + 12 * i);
        left[i] = (n % 3 == 0) ? 8'($urandom) : 8'(230 - 13 * i);
      end
      h = 0; v = 0;
      if (chroma) begin
        for (int x = 0; x < 4; x++) begin h += (x + 1) * (pt(4 + x) - pt(2 - x)); v += (x + 1) * (pl(4 + x) - pl(2 - x)); end
        a = 16 * (pl(7) + pt(7)); b = (34 * h + 32) >>> 6; c = (34 * v + 32) >>> 6; rows = 4; xc = 3;
      end else begin
        for (int x = 0; x < 8; x++) begin h += (x + 1) * (pt(8 + x) - pt(6 - x)); v += (x + 1) * (pl(8 + x) - pl(6 - x)); end
        a = 16 * (pl(15) + pt(15)); b = (5 * h + 32) >>> 6; c = (5 * v + 32) >>> 6; rows = 16; xc = 7;
      end
      start = 1; @(posedge clk); #1; start = 0;
      check(!pix_valid, "no output one cycle after start");
      @(posedge clk); #1;
      for (int r = 0; r < rows; r++) begin
        check(pix_valid && int'(pix_row) == r, $sformatf("valid/row %0d", r));
        for (int i = 0; i < 16; i++) begin
          int x, y, e;
          x = chroma ? i % 8 : i; y = chroma ? 2 * r + i / 8 : r;
          e = (a + b * (x - xc) + c * (y - xc) + 16) >>> 5;
          e = e < 0 ? 0 : (e > 255 ? 255 : e);
          check(int'(pix[i]) == e, $sformatf("chroma=%0d (%0d,%0d): %0d vs %0d", chroma, x, y, pix[i], e));
        end
        @(posedge clk); #1;
      end
      check(!pix_valid && !busy, "block done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
