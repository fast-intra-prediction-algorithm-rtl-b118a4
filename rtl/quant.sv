// quant: forward quantizer of the reconstruction path, eight coefficients per
// cycle (two rows of a 4x4 block, rows 2*half and 2*half+1).
//   AC4:        Z = sign(W) * ((|W| * MF + f) >> qbits), qbits = 15 + QP/6,
//               f = 2^qbits / 3 (intra rounding), MF by QP%6 and position.
//   LUMA_DC:    input is the unscaled 4x4 Hadamard of the sixteen DC terms,
//               i.e. twice the standard's value, so Z = (|W|*MF00 + 4f) >> (qbits+2).
//   CHROMA_DC:  Z = (|W| * MF00 + 2f) >> (qbits + 1).
//   AC8:        one row of an 8x8 block (row input, lane = column):
//               Z = (|W| * MF8 + 2f) >> (qbits + 1), MF8 from the 8x8 table.
// One register stage: level is valid the cycle after in_valid. The MF table
// tables are the H.264/AVC ones; the document names this unit without giving its
// insides.
module quant
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
  input  coef_t      coef  [LANES],
  output logic       out_valid,
  output coef_t      level [LANES]
);
  coef_t z [LANES];
  always_comb begin
    int unsigned qrem, qdiv, cls, qbits;
    longint mag, f, r;
    qrem = int'(qp) % 6; qdiv = int'(qp) / 6;
    qbits = 15 + qdiv;
    f = (longint'(1) << qbits) / 3;
    for (int l = 0; l < LANES; l++) begin
      cls = (mode == QM_AC4) ? pos_class(2 * int'(half) + l / 4, l % 4) : 0;
      mag = (coef[l] < 0) ? -longint'(coef[l]) : longint'(coef[l]);
      case (mode)
        QM_LUMA_DC:   r = (mag * quant_mf(qrem, 0) + 4 * f) >> (qbits + 2);
        QM_CHROMA_DC: r = (mag * quant_mf(qrem, 0) + 2 * f) >> (qbits + 1);
        QM_AC8:       r = (mag * quant_mf8(qrem, pos_class8(int'(row), l % 8)) + 2 * f) >> (qbits + 1);
        default:      r = (mag * quant_mf(qrem, cls) + f) >> qbits;
      endcase
      z[l] = (coef[l] < 0) ? coef_t'(-r) : coef_t'(r);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) level[l] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) level <= z;
    end
  end
endmodule
