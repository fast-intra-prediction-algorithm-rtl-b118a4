// block_size: intra block size decision of a macroblock from two smoothness
// measures. AC1 (weighted high-frequency sum of the 4x4 Hadamard of the 16
// DC coefficients) separates intra 4x4 from the larger sizes: AC1 >= TH1
// selects 4x4. Otherwise AC2 (sum of the first three AC coefficients of all
// sixteen 4x4 integer transforms) separates 8x8 (AC2 >= TH2) from 16x16.
// The thresholds follow the document's QP fits
//   TH1 = 2571.4 QP^2 - 1228.6 QP + 1000,  TH2 = 228.57 QP^2 - 891.43 QP + 1220,
// evaluated here in fixed point (coefficients x10 and x100). Combinational.
// The direction of the AC2 comparison is this design's reading of the text.
module block_size
  import intra_pkg::*;
(
  input  logic [5:0]  qp,
  input  logic [31:0] ac1,
  input  logic [31:0] ac2,
  output logic [31:0] th1,
  output logic [31:0] th2,
  output bsize_e      bsize
);
  always_comb begin
    longint q;
    q   = longint'(qp);
    th1 = 32'((25714 * q * q - 12286 * q + 10000) / 10);
    th2 = 32'((22857 * q * q - 89143 * q + 122000) / 100);
    if (ac1 >= th1)      bsize = BS_4X4;
    else if (ac2 >= th2) bsize = BS_8X8;
    else                 bsize = BS_16X16;
  end
endmodule
