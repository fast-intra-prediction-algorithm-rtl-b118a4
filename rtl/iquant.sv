// iquant: inverse quantizer (scaling) of the reconstruction path, eight
// levels per cycle, lanes laid out as in quant.
//   AC4:        W' = Z * V << QP/6
//   LUMA_DC:    applied after the inverse Hadamard: (Z*V00) << (QP/6 - 2) for
//               QP >= 12, else (Z*V00 + 2^(1-QP/6)) >> (2 - QP/6)
//   CHROMA_DC:  applied after the inverse 2x2 Hadamard: ((Z*V00) << QP/6) >> 1
//   AC8:        one row of an 8x8 block (row input, lane = column), flat
//               scaling: (Z*V8) << (QP/6 - 2) for QP >= 12, else
//               (Z*V8 + 2^(1-QP/6)) >> (2 - QP/6), the standard's
//               (Z*16*V8 << QP/6) >> 6 with rounding
// V is the H.264/AVC scale table. One register stage, like quant. The
// document names this unit without giving its insides.
module iquant
  import intra_pkg::*;
#(
  parameter int LANES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [5:0] qp,
  input  logic       half,
  input  logic [2:0] row,         // QM_AC8: row of the 8x8 block
  input  qmode_e     mode,
  input  coef_t      level [LANES],
  output logic       out_valid,
  output coef_t      coef  [LANES]
);
  coef_t w [LANES];
  always_comb begin
    int unsigned qrem, qdiv, cls;
    longint p, r;
    qrem = int'(qp) % 6; qdiv = int'(qp) / 6;
    for (int l = 0; l < LANES; l++) begin
      cls = (mode == QM_AC4) ? pos_class(2 * int'(half) + l / 4, l % 4) : 0;
      if (mode == QM_AC8) p = longint'(level[l]) * longint'(dequant_v8(qrem, pos_class8(int'(row), l % 8)));
      else                p = longint'(level[l]) * longint'(dequant_v(qrem, cls));
      case (mode)
        QM_LUMA_DC, QM_AC8:
                      r = (qdiv >= 2) ? (p <<< (qdiv - 2)) : ((p + (longint'(1) << (1 - qdiv))) >>> (2 - qdiv));
        QM_CHROMA_DC: r = (p <<< qdiv) >>> 1;
        default:      r = p <<< qdiv;
      endcase
      w[l] = coef_t'(r);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) coef[l] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) coef <= w;
    end
  end
endmodule
