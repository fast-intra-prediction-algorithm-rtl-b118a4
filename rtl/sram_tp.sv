// sram_tp: two-port on-chip buffer, one write port and one read port usable in
// the same cycle, read registered (one cycle; a read of the word being
// written returns the old contents). Used for the pre-quantized coefficients
// and the scaled transform coefficients of the quality-layer loop
// (96 x 136, two instances each).
module sram_tp #(
  parameter int DEPTH = 96,
  parameter int WIDTH = 136,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
