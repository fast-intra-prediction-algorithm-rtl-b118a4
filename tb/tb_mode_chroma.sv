// tb_mode_chroma: checks the chroma candidate rule: DC and plane always, vertical or horizontal by the larger texture intensity.
module tb_mode_chroma;
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
  logic [19:0] iv, ih; logic [3:0] cand;
  mode_chroma dut (.*);
  initial begin
    for (int n = 0; n < 500; n++) begin
      iv = 20'($urandom_range(0, 1000)); ih = (n % 7 == 0) ? iv : 20'($urandom_range(0, 1000));
      #1;
      check(cand[0] && cand[3], "DC and plane present");
      check($countones(cand) == 3, "three candidates");
      check(cand[2] == (iv >= ih) && cand[1] == (iv < ih), "direction");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
