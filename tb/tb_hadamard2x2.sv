// tb_hadamard2x2: checks the 2x2 chroma DC Hadamard against the matrix product, and that applying it twice gives 4x the input.
module tb_hadamard2x2;
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
  coef_t in_dc [4], out_dc [4], back [4];
  hadamard2x2 dut (.in_dc(in_dc), .out_dc(out_dc));
  hadamard2x2 dut2 (.in_dc(out_dc), .out_dc(back));
  int hm [4][4] = '{'{1,1,1,1}, '{1,-1,1,-1}, '{1,1,-1,-1}, '{1,-1,-1,1}};
  initial begin
    for (int n = 0; n < 200; n++) begin
      int e;
      for (int i = 0; i < 4; i++) in_dc[i] = coef_t'(int'($urandom_range(0, 16000)) - 8000);
      #1;
      for (int i = 0; i < 4; i++) begin
        e = 0; for (int k = 0; k < 4; k++) e += hm[i][k] * int'(in_dc[k]);
        check(int'(out_dc[i]) == e, $sformatf("out %0d", i));
        check(int'(back[i]) == 4 * int'(in_dc[i]), "involution");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
