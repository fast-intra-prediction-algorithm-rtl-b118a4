// sram_sp: single-port on-chip buffer, one read or write per cycle with a
// registered (one-cycle) read. Used for the neighbouring-pixel rows
// (960 x 64), neighbouring modes (240 x 16) and the reconstructed pixels of
// the base and enhancement layers (96 x 64). Written as an array so synthesis
// can map it to an SRAM macro. Defaults are the neighbouring-pixel buffer.
module sram_sp #(
  parameter int DEPTH = 960,
  parameter int WIDTH = 64,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
  a_addr: assert property (@(posedge clk) en |-> int'(addr) < DEPTH);
endmodule
