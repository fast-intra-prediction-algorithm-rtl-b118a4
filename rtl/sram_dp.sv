// sram_dp: true dual-port on-chip buffer: two independent ports, each able to
// read or write every cycle, reads registered (one cycle). Used for the
// current-MB pixels of the two interleaved macroblocks (96 x 64) and the best
// coefficients (24 x 76, four instances). The two ports must not write the
// same word in the same cycle. Defaults are the current-MB buffer.
module sram_dp #(
  parameter int DEPTH = 96,
  parameter int WIDTH = 64,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata <= mem[b_addr];
    end
  end
  a_no_collision: assert property (@(posedge clk)
    (a_en && a_we && b_en && b_we) |-> (a_addr != b_addr));
endmodule
