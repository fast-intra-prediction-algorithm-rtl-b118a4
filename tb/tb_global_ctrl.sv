// tb_global_ctrl: runs the start/end handshake with three stage models that take random numbers of cycles, checking that every round starts all stages together, waits for the slowest, toggles the ping-pong select and counts rounds.
module tb_global_ctrl;
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
  logic rst_n = 0, go, pingpong; logic [2:0] stage_start, stage_end, working; logic [15:0] rounds;
  global_ctrl dut (.*);
  int remain [3];
  logic [2:0] active;
  int round_len, max_len, starts;
  always @(posedge clk) begin
    stage_end <= '0;
    for (int s = 0; s < 3; s++) begin
      if (stage_start[s]) begin remain[s] <= int'($urandom_range(1, 12)); active[s] <= 1; end
      else if (active[s]) begin
        if (remain[s] == 1) begin stage_end[s] <= 1; active[s] <= 0; end
        remain[s] <= remain[s] - 1;
      end
    end
  end
  initial begin
    logic pp;
    go = 0; stage_end = '0; active = '0; starts = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    go = 1;
    for (int r = 0; r < 50; r++) begin
      // wait for a start
      while (stage_start == '0) begin @(posedge clk); #1; end
      starts++;
      check(stage_start == 3'b111, "all stages started together");
      pp = pingpong;
      if (r == 49) go = 0;
      @(posedge clk); #1;
      check(working == 3'b111, "all stages working");
      while (working != '0) begin
        check(pingpong == pp, "ping-pong stable within a round");
        @(posedge clk); #1;
      end
      check(pingpong != pp, "ping-pong swapped after all ends");
      check(int'(rounds) == r + 1, "round count");
    end
    repeat (5) @(posedge clk); #1;
    check(stage_start == '0 && working == '0, "idle after go drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
