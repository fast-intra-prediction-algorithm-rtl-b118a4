// tb_sram_dp: exercises both ports of the default-size (96 x 64) dual-port buffer at once: simultaneous writes to different words, simultaneous reads, and a read on one port while the other writes, against a shadow copy.
module tb_sram_dp;
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
  localparam int D = 96, W = 64;
  logic a_en, a_we, b_en, b_we; logic [6:0] a_addr, b_addr; logic [W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0] shadow [D];
  sram_dp dut (.*);
  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(posedge clk); #1;
    for (int i = 0; i < D / 2; i++) begin
      a_en = 1; a_we = 1; a_addr = 7'(i);         a_wdata = {$urandom, $urandom}; shadow[i] = a_wdata;
      b_en = 1; b_we = 1; b_addr = 7'(i + D / 2); b_wdata = {$urandom, $urandom}; shadow[i + D / 2] = b_wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      int ia, ib;
      ia = int'($urandom_range(0, D - 1)); ib = int'($urandom_range(0, D - 1));
      a_en = 1; a_we = 0; a_addr = 7'(ia);
      b_en = 1; b_we = (n % 3 == 0) && (ib != ia); b_addr = 7'(ib); b_wdata = {$urandom, $urandom};
      @(posedge clk); #1;
      check(a_rdata == shadow[ia], "port a read");
      if (b_we) shadow[ib] = b_wdata;
      else check(b_rdata == shadow[ib], "port b read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
