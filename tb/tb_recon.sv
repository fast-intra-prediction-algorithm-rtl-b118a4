// tb_recon: checks 8-lane reconstruction (prediction plus residual, clipped to 0..255).
module tb_recon;
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
  pix_t pred [8], pix [8]; coef_t res [8];
  recon dut (.*);
  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 8; i++) begin pred[i] = 8'($urandom); res[i] = coef_t'(int'($urandom_range(0, 800)) - 400); end
      #1;
      for (int i = 0; i < 8; i++) begin
        int s, e;
        s = int'(pred[i]) + int'(res[i]);
        e = s < 0 ? 0 : (s > 255 ? 255 : s);
        check(int'(pix[i]) == e, "lane");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
