// cost_mode: cost and mode-candidate unit shared by all block sizes. Each
// cycle it takes one transformed 4x4 block (16 coefficients, F[i][j] at
// index 4i+j, i = vertical frequency) and, by sel (the input selections of
// the document's table):
//   SEL_MODE4_AC2  texture intensities -> 4x4 candidates; acc += |F01|+|F10|+|F20|
//                  (the first three AC terms in zig-zag order: the AC2 measure)
//   SEL_MODE16_AC1 texture intensities of the DC Hadamard block -> 16x16
//                  candidates; acc += sum |Fij| for i+j in {3,4} (AC1, weight 1)
//   SEL_AC1_2      acc += 2 * sum |Fij| for i+j in {5,6}      (AC1, weight 2)
//   SEL_SATD4, SEL_SATD8, SEL_SATD16DC   acc += sum of all |Fij|
//   SEL_SATD16AC, SEL_SATDCH             acc += sum of |Fij| without the DC term
// AC1 thus equals sum |Fij| * floor((i+j-1)/2). The SATD is taken on integer
// transform coefficients, as in the document. Texture intensities: IV = sum
// |F0j| (energy of a block whose columns are flat, favouring vertical
// prediction), IH = sum |Fi0|. 4x4 candidates (at most five): DC always; if
// IV > 2 IH add vertical, vertical-right, vertical-left; if IH > 2 IV add
// horizontal, horizontal-down, horizontal-up; otherwise add vertical,
// horizontal and the two diagonal-down modes. 16x16 candidates (at most two):
// DC always, plus vertical, horizontal or plane by the same comparison.
// The intensity definitions and selection thresholds are this design's own:
// the reference rules the document adapts are not reproduced in it.
// Timing: results are registered, valid one cycle after in_valid; acc_clr
// with in_valid restarts the accumulation with the current block.
module cost_mode
  import intra_pkg::*;
#(
  parameter int AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [2:0]    sel,
  input  logic          acc_clr,
  input  coef_t         coef [16],
  output logic          out_valid,
  output logic [AW-1:0] acc,
  output logic [AW-1:0] blk_cost,
  output logic [8:0]    cand4,
  output logic [3:0]    cand16,
  output logic [19:0]   iv,
  output logic [19:0]   ih
);
  localparam logic [2:0] SEL_MODE4_AC2 = 3'd0, SEL_MODE16_AC1 = 3'd1, SEL_SATD4 = 3'd2,
                         SEL_SATD8 = 3'd3, SEL_SATD16AC = 3'd4, SEL_SATD16DC = 3'd5,
                         SEL_AC1_2 = 3'd6, SEL_SATDCH = 3'd7;

  int        mag [16];
  int        part;
  logic [19:0] iv_c, ih_c;
  logic [8:0]  c4;
  logic [3:0]  c16;

  always_comb begin
    int s_all, s_w1, s_w2;
    for (int k = 0; k < 16; k++) mag[k] = (coef[k] < 0) ? -int'(coef[k]) : int'(coef[k]);
    s_all = 0; s_w1 = 0; s_w2 = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      s_all += mag[4*i+j];
      if (i + j == 3 || i + j == 4) s_w1 += mag[4*i+j];
      if (i + j >= 5)               s_w2 += mag[4*i+j];
    end
    case (sel)
      SEL_MODE4_AC2:             part = mag[1] + mag[4] + mag[8];
      SEL_MODE16_AC1:            part = s_w1;
      SEL_AC1_2:                 part = 2 * s_w2;
      SEL_SATD16AC, SEL_SATDCH:  part = s_all - mag[0];
      default:                   part = s_all;
    endcase
    iv_c = 20'(mag[1] + mag[2] + mag[3]);
    ih_c = 20'(mag[4] + mag[8] + mag[12]);
    c4 = 9'b0;
    c4[M_DC] = 1'b1;
    if ({1'b0, iv_c} > {ih_c, 1'b0}) begin
      c4[M_VER] = 1'b1; c4[M_VR] = 1'b1; c4[M_VL] = 1'b1;
    end else if ({1'b0, ih_c} > {iv_c, 1'b0}) begin
      c4[M_HOR] = 1'b1; c4[M_HD] = 1'b1; c4[M_HU] = 1'b1;
    end else begin
      c4[M_VER] = 1'b1; c4[M_HOR] = 1'b1; c4[M_DDL] = 1'b1; c4[M_DDR] = 1'b1;
    end
    c16 = 4'b0;
    c16[M16_DC] = 1'b1;
    if (iv_c > ih_c)      c16[M16_VER] = 1'b1;
    else if (ih_c > iv_c) c16[M16_HOR] = 1'b1;
    else                  c16[M16_PLANE] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; acc <= '0; blk_cost <= '0;
      cand4 <= 9'b0; cand16 <= 4'b0; iv <= '0; ih <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc      <= (acc_clr ? '0 : acc) + AW'(part);
        blk_cost <= AW'(part);
        if (sel == SEL_MODE4_AC2 || sel == SEL_MODE16_AC1 || sel == SEL_SATDCH) begin
          iv <= iv_c; ih <= ih_c;
        end
        if (sel == SEL_MODE4_AC2)  cand4  <= c4;
        if (sel == SEL_MODE16_AC1) cand16 <= c16;
      end
    end
  end
endmodule
