// tb_sram_sp: writes every word of the default-size (960 x 64) single-port buffer, reads all back in a different order against a shadow copy, and checks the one-cycle read latency and that a write does not disturb the read register.
module tb_sram_sp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  localparam int D = 960, W = 64;
  logic en, we; logic [9:0] addr; logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [D];
  sram_sp dut (.*);
  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(posedge clk); #1;
    for (int i = 0; i < D; i++) begin
      en = 1; we = 1; addr = 10'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
      @(posedge clk); #1;
    end
    for (int k = 0; k < D; k++) begin
      int i;
      i = (k * 7) % D;
      en = 1; we = 0; addr = 10'(i);
      @(posedge clk); #1;
      check(rdata == shadow[i], $sformatf("read %0d", i));
      // a write in the next cycle keeps the read result
      if (k % 50 == 0) begin
        en = 1; we = 1; addr = 10'((i + 1) % D); wdata = ~shadow[(i + 1) % D]; shadow[(i + 1) % D] = wdata;
        @(posedge clk); #1;
        check(rdata == shadow[i], "read register held during write");
      end
      en = 0; @(posedge clk); #1;
      check(rdata == shadow[i], "read register held while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
