// tb_pred_dc: checks DC prediction of every block type under all four neighbour-availability cases against averages computed in the testbench, and the latency (one cycle; two input cycles for 16x16).
module tb_pred_dc;
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
  logic start, avail_top, avail_left, dc_valid; psize_e size; pix_t samples [16], dc [4];
  pred_dc dut (.*);
  int t [16], l [16];
  function automatic int avgr(input int s, input int n);
    return int'($floor(real'(s) / n + 0.5));
  endfunction
  initial begin
    start = 0; size = PS_4X4; avail_top = 0; avail_left = 0;
    for (int i = 0; i < 16; i++) samples[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int st, sl, e [4], sz, av;
      sz = n % 4; av = (n / 4) % 4;
      for (int i = 0; i < 16; i++) begin t[i] = int'($urandom_range(0, 255)); l[i] = int'($urandom_range(0, 255)); end
      size = psize_e'(sz); avail_top = av[0]; avail_left = av[1];
      start = 1;
      for (int i = 0; i < 16; i++) samples[i] = (sz == 0) ? pix_t'(i < 8 ? t[i % 4] : l[i % 4]) : pix_t'(i < 8 ? t[i] : l[i - 8]);
      if (sz == 2) for (int i = 0; i < 16; i++) samples[i] = pix_t'(t[i]);
      // expected
      if (sz == 3) begin
        int tq [2], lq [2];
        for (int h = 0; h < 2; h++) begin
          tq[h] = t[4*h] + t[4*h+1] + t[4*h+2] + t[4*h+3];
          lq[h] = l[4*h] + l[4*h+1] + l[4*h+2] + l[4*h+3];
        end
        for (int q = 0; q < 4; q++) begin
          int qx, qy;
          qx = q % 2; qy = q / 2;
          if (qx == qy) e[q] = (av == 3) ? avgr(tq[qx] + lq[qy], 8) : (av == 1) ? avgr(tq[qx], 4) : (av == 2) ? avgr(lq[qy], 4) : 128;
          else if (q == 1) e[q] = av[0] ? avgr(tq[1], 4) : (av[1] ? avgr(lq[0], 4) : 128);
          else e[q] = av[1] ? avgr(lq[1], 4) : (av[0] ? avgr(tq[0], 4) : 128);
        end
      end else begin
        int cnt;
        cnt = (sz == 0) ? 4 : (sz == 1) ? 8 : 16;
        st = 0; sl = 0;
        for (int i = 0; i < cnt; i++) begin st += t[i]; sl += l[i]; end
        for (int q = 0; q < 4; q++)
          e[q] = (av == 3) ? avgr(st + sl, 2 * cnt) : (av == 1) ? avgr(st, cnt) : (av == 2) ? avgr(sl, cnt) : 128;
      end
      @(posedge clk); #1;
      start = 0;
      if (sz == 2) begin
        check(!dc_valid, "16x16 needs a second cycle");
        for (int i = 0; i < 16; i++) samples[i] = pix_t'(l[i]);
        @(posedge clk); #1;
      end
      check(dc_valid, $sformatf("valid size %0d", sz));
      for (int q = 0; q < 4; q++) check(int'(dc[q]) == e[q], $sformatf("size %0d avail %0d q%0d: %0d vs %0d", sz, av, q, dc[q], e[q]));
      @(posedge clk); #1;
      check(!dc_valid, "single-cycle valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
