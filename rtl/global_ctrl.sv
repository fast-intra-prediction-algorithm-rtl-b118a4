// global_ctrl: start/end handshake of the macroblock pipeline. While go is
// high it pulses stage_start to every stage, marks each stage working, and
// waits; each stage answers with a one-cycle stage_end pulse and returns to
// waiting. When all stages have ended, the ping-pong buffers between stages
// swap (pingpong toggles), the round counter advances and the next start is
// issued in the following cycle. This is the document's scheme; the one-cycle
// pulse encoding is this design's choice.
module global_ctrl #(
  parameter int NSTAGE = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  output logic [NSTAGE-1:0] stage_start,
  input  logic [NSTAGE-1:0] stage_end,
  output logic [NSTAGE-1:0] working,
  output logic              pingpong,
  output logic [15:0]       rounds
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} state_e;
  state_e state;
  logic [NSTAGE-1:0] pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pend <= '0; pingpong <= 1'b0; rounds <= '0;
      stage_start <= '0;
    end else begin
      stage_start <= '0;
      case (state)
        S_IDLE:  if (go) state <= S_START;
        S_START: begin
          stage_start <= '1;
          pend        <= '1;
          state       <= S_WAIT;
        end
        default: begin
          if ((pend & ~stage_end) == '0) begin
            pend     <= '0;
            pingpong <= ~pingpong;
            rounds   <= rounds + 16'd1;
            state    <= go ? S_START : S_IDLE;
          end else begin
            pend <= pend & ~stage_end;
          end
        end
      endcase
    end
  end
  assign working = pend;

  // a stage may only report the end of a round it was started for
  a_end_only_when_working: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WAIT) |-> ((stage_end & ~pend) == '0));
endmodule
