// norm_minus: quality-layer refinement. The coefficients of a quality layer
// are the pre-quantized transform coefficients W minus what the previous
// layer already delivers: that layer's level Z, rescaled (normalized) back to
// the forward transform domain,
//   Wrec = sign(Z) * ((|Z| * N << QP/6) + 2048) >> 12,  N = round(2^27 / MF),
// so rem = W - Wrec is then quantized again with a smaller QP. Eight
// coefficients per cycle, lanes as in quant (AC positions of 4x4 blocks).
// Combinational. The document only names this unit; the formula is this
// design's own reading of "normalize and subtract".
module norm_minus
  import intra_pkg::*;
#(
  parameter int LANES = 8
) (
  input  logic [5:0] qp,      // QP of the layer that produced level
  input  logic       half,
  input  coef_t      coef  [LANES],
  input  coef_t      level [LANES],
  output coef_t      rem   [LANES]
);
  always_comb begin
    int unsigned qrem, qdiv;
    longint mag, rec;
    qrem = int'(qp) % 6; qdiv = int'(qp) / 6;
    for (int l = 0; l < LANES; l++) begin
      mag = (level[l] < 0) ? -longint'(level[l]) : longint'(level[l]);
      rec = (((mag * norm_factor(qrem, pos_class(2 * int'(half) + l / 4, l % 4))) << qdiv) + 2048) >> 12;
      if (level[l] < 0) rec = -rec;
      rem[l] = coef_t'(longint'(coef[l]) - rec);
    end
  end
endmodule
