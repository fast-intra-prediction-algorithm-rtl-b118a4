// tb_residue: checks 16-lane residue generation on random pixels, including the extremes.
module tb_residue;
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
  pix_t cur [16], pred [16]; logic signed [15:0] res [16];
  residue dut (.*);
  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 16; i++) begin
        cur[i] = (n == 0) ? 8'd0 : (n == 1) ? 8'd255 : 8'($urandom);
        pred[i] = (n == 0) ? 8'd255 : (n == 1) ? 8'd0 : 8'($urandom);
      end
      #1;
      for (int i = 0; i < 16; i++) check(int'(res[i]) == int'(cur[i]) - int'(pred[i]), "lane");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
