// tb_sram_tp: writes and reads the default-size (96 x 136) two-port buffer in the same cycles, checking read-before-write of the same word and the one-cycle read latency against a shadow copy.
module tb_sram_tp;
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
  localparam int D = 96, W = 136;
  logic we, re; logic [6:0] waddr, raddr; logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [D];
  sram_tp dut (.*);
  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    @(posedge clk); #1;
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = 7'(i); wdata = {$urandom, $urandom, $urandom, $urandom, $urandom}; shadow[i] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      int ir, iw; logic [W-1:0] old;
      ir = int'($urandom_range(0, D - 1)); iw = (n % 4 == 0) ? ir : int'($urandom_range(0, D - 1));
      re = 1; raddr = 7'(ir); old = shadow[ir];
      we = 1; waddr = 7'(iw); wdata = {$urandom, $urandom, $urandom, $urandom, $urandom};
      @(posedge clk); #1;
      shadow[iw] = wdata;
      check(rdata == old, "read returns contents before the same-cycle write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
