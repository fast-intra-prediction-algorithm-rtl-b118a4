// tb_block_size: checks the block size decision against the document's threshold fits evaluated in real arithmetic, on random AC1/AC2 values near the thresholds.
module tb_block_size;
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
  logic [5:0] qp; logic [31:0] ac1, ac2, th1, th2; bsize_e bsize;
  block_size dut (.*);
  initial begin
    for (int q = 0; q < 52; q++) begin
      real t1, t2; int e1, e2;
      t1 = 2571.4 * q * q - 1228.6 * q + 1000.0;
      t2 = 228.57 * q * q - 891.43 * q + 1220.0;
      e1 = int'($floor(t1)); e2 = int'($floor(t2));
      qp = 6'(q); ac1 = 0; ac2 = 0; #1;
      check(int'(th1) >= e1 - 1 && int'(th1) <= e1 + 1, $sformatf("TH1 qp=%0d %0d vs %0d", q, th1, e1));
      check(int'(th2) >= e2 - 1 && int'(th2) <= e2 + 1, $sformatf("TH2 qp=%0d %0d vs %0d", q, th2, e2));
      for (int n = 0; n < 20; n++) begin
        bsize_e exp;
        ac1 = 32'(int'(th1) + int'($urandom_range(0, 20)) - 10);
        ac2 = 32'(int'(th2) + int'($urandom_range(0, 20)) - 10);
        #1;
        if (ac1 >= th1) exp = BS_4X4; else if (ac2 >= th2) exp = BS_8X8; else exp = BS_16X16;
        check(bsize == exp, $sformatf("decision qp=%0d", q));
      end
    end
    // extremes
    qp = 28; ac1 = 32'hFFFF_FFFF; ac2 = 0; #1; check(bsize == BS_4X4, "rough MB -> 4x4");
    ac1 = 0; ac2 = 0; #1; check(bsize == BS_16X16, "flat MB -> 16x16");
    ac1 = 0; ac2 = 32'hFFFF_FFFF; #1; check(bsize == BS_8X8, "medium MB -> 8x8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
