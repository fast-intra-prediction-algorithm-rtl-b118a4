// recon: reconstruction of LANES pixels per cycle (8 in the reconstruction
// path): predicted pixel plus decoded residual, clipped to 0..255. The same
// unit serves 4x4, 16x16, chroma and 8x8 blocks; only the order in which the
// caller presents pixels differs. Combinational.
module recon
  import intra_pkg::*;
#(
  parameter int LANES = 8
) (
  input  pix_t  pred [LANES],
  input  coef_t res  [LANES],
  output pix_t  pix  [LANES]
);
  always_comb
    for (int i = 0; i < LANES; i++)
      pix[i] = clip8(int'(pred[i]) + int'(res[i]));
endmodule
