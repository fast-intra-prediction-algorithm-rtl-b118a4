// intra_pkg: types, constants and small arithmetic helpers shared by the
// fast intra prediction datapath (H.264/AVC scalable extension intra encoder).
// Pixels are 8-bit unsigned; residues and transform coefficients travel as
// 18-bit signed values, wide enough for a 16x16 luma DC Hadamard of 9-bit
// residues. The quantization tables are the H.264/AVC 4x4 and 8x8 tables.
package intra_pkg;

  typedef logic [7:0]         pix_t;
  typedef logic signed [17:0] coef_t;

  // transform selector of the shared forward / inverse transform units
  typedef enum logic [1:0] {TK_INT4 = 2'd0, TK_HAD4 = 2'd1, TK_INT8 = 2'd2} tkind_e;

  // intra block size chosen for a macroblock
  typedef enum logic [1:0] {BS_4X4 = 2'd0, BS_8X8 = 2'd1, BS_16X16 = 2'd2} bsize_e;

  // prediction block type
  typedef enum logic [1:0] {PS_4X4 = 2'd0, PS_8X8 = 2'd1, PS_16X16 = 2'd2, PS_CHROMA = 2'd3} psize_e;

  // quantizer operating mode
  typedef enum logic [1:0] {QM_AC4 = 2'd0, QM_LUMA_DC = 2'd1, QM_CHROMA_DC = 2'd2, QM_AC8 = 2'd3} qmode_e;

  // intra 4x4 / 8x8 mode numbers
  localparam int M_VER = 0, M_HOR = 1, M_DC = 2, M_DDL = 3, M_DDR = 4,
                 M_VR = 5, M_HD = 6, M_VL = 7, M_HU = 8;
  // intra 16x16 / chroma mode numbers (H.264 numbering of 16x16)
  localparam int M16_VER = 0, M16_HOR = 1, M16_DC = 2, M16_PLANE = 3;

  // position class of coefficient (row i, column j) of a 4x4 block:
  // 0 = both even, 1 = both odd, 2 = mixed
  function automatic int unsigned pos_class(input int unsigned i, input int unsigned j);
    if ((i % 2 == 0) && (j % 2 == 0)) return 0;
    else if ((i % 2 == 1) && (j % 2 == 1)) return 1;
    else return 2;
  endfunction

  // forward quantization multiplier MF[qp%6][class]
  function automatic int unsigned quant_mf(input int unsigned qrem, input int unsigned cls);
    case ({qrem[2:0], cls[1:0]})
      5'b000_00: return 13107;  5'b000_01: return 5243;  5'b000_10: return 8066;
      5'b001_00: return 11916;  5'b001_01: return 4660;  5'b001_10: return 7490;
      5'b010_00: return 10082;  5'b010_01: return 4194;  5'b010_10: return 6554;
      5'b011_00: return  9362;  5'b011_01: return 3647;  5'b011_10: return 5825;
      5'b100_00: return  8192;  5'b100_01: return 3355;  5'b100_10: return 5243;
      default:   return (cls == 0) ? 7282 : ((cls == 1) ? 2893 : 4559);
    endcase
  endfunction

  // inverse quantization scale V[qp%6][class]
  function automatic int unsigned dequant_v(input int unsigned qrem, input int unsigned cls);
    case ({qrem[2:0], cls[1:0]})
      5'b000_00: return 10;  5'b000_01: return 16;  5'b000_10: return 13;
      5'b001_00: return 11;  5'b001_01: return 18;  5'b001_10: return 14;
      5'b010_00: return 13;  5'b010_01: return 20;  5'b010_10: return 16;
      5'b011_00: return 14;  5'b011_01: return 23;  5'b011_10: return 18;
      5'b100_00: return 16;  5'b100_01: return 25;  5'b100_10: return 20;
      default:   return (cls == 0) ? 18 : ((cls == 1) ? 29 : 23);
    endcase
  endfunction

  // position class of coefficient (row i, column j) of an 8x8 block:
  // 0 = both multiples of 4, 1 = both odd, 2 = both 2 mod 4,
  // 3 = one a multiple of 4 and the other odd, 4 = one a multiple of 4 and
  // the other 2 mod 4, 5 = one odd and the other 2 mod 4
  function automatic int unsigned pos_class8(input int unsigned i, input int unsigned j);
    if ((i % 4 == 0) && (j % 4 == 0)) return 0;
    else if ((i % 2 == 1) && (j % 2 == 1)) return 1;
    else if ((i % 4 == 2) && (j % 4 == 2)) return 2;
    else if (((i % 4 == 0) && (j % 2 == 1)) || ((i % 2 == 1) && (j % 4 == 0))) return 3;
    else if (((i % 4 == 0) && (j % 4 == 2)) || ((i % 4 == 2) && (j % 4 == 0))) return 4;
    else return 5;
  endfunction

  // 8x8 inverse quantization scale V8[qp%6][class] (H.264/AVC flat 8x8
  // scaling, LevelScale8 = 16 * V8)
  function automatic int unsigned dequant_v8(input int unsigned qrem, input int unsigned cls);
    case (6'(qrem * 6 + cls))
      6'd0: return 20;  6'd1: return 18;  6'd2: return 32;  6'd3: return 19;  6'd4: return 25;  6'd5: return 24;
      6'd6: return 22;  6'd7: return 19;  6'd8: return 35;  6'd9: return 21;  6'd10: return 28;  6'd11: return 26;
      6'd12: return 26;  6'd13: return 23;  6'd14: return 42;  6'd15: return 24;  6'd16: return 33;  6'd17: return 31;
      6'd18: return 28;  6'd19: return 25;  6'd20: return 45;  6'd21: return 26;  6'd22: return 35;  6'd23: return 33;
      6'd24: return 32;  6'd25: return 28;  6'd26: return 51;  6'd27: return 30;  6'd28: return 40;  6'd29: return 38;
      6'd30: return 36;  6'd31: return 32;  6'd32: return 58;  6'd33: return 34;  6'd34: return 46;  6'd35: return 43;
      default: return 0;
    endcase
  endfunction

  // 8x8 forward quantization multiplier, MF8 = round(2^36 / (n_i n_j V8)),
  // where n_k is the squared norm of row k of the 8x8 core transform scaled
  // by 8 (512 for rows 0 and 4, 320 for rows 2 and 6, 578 for odd rows)
  function automatic int unsigned quant_mf8(input int unsigned qrem, input int unsigned cls);
    case (6'(qrem * 6 + cls))
      6'd0: return 13107;  6'd1: return 11428;  6'd2: return 20972;  6'd3: return 12222;  6'd4: return 16777;  6'd5: return 15481;
      6'd6: return 11916;  6'd7: return 10826;  6'd8: return 19174;  6'd9: return 11058;  6'd10: return 14980;  6'd11: return 14290;
      6'd12: return 10082;  6'd13: return  8943;  6'd14: return 15978;  6'd15: return  9675;  6'd16: return 12710;  6'd17: return 11985;
      6'd18: return  9362;  6'd19: return  8228;  6'd20: return 14913;  6'd21: return  8931;  6'd22: return 11984;  6'd23: return 11259;
      6'd24: return  8192;  6'd25: return  7346;  6'd26: return 13159;  6'd27: return  7740;  6'd28: return 10486;  6'd29: return  9777;
      6'd30: return  7282;  6'd31: return  6428;  6'd32: return 11570;  6'd33: return  6830;  6'd34: return  9118;  6'd35: return  8640;
      default: return 0;
    endcase
  endfunction

  // rescale factor back to the forward-transform domain, 4096 x 2^15 / MF,
  // rounded, i.e. (2^27 + MF/2) / MF for each entry of the MF table: used by
  // the quality-layer refinement
  function automatic int unsigned norm_factor(input int unsigned qrem, input int unsigned cls);
    case ({qrem[2:0], cls[1:0]})
      5'b000_00: return 10240;  5'b000_01: return 25599;  5'b000_10: return 16640;
      5'b001_00: return 11264;  5'b001_01: return 28802;  5'b001_10: return 17920;
      5'b010_00: return 13313;  5'b010_01: return 32002;  5'b010_10: return 20479;
      5'b011_00: return 14336;  5'b011_01: return 36802;  5'b011_10: return 23042;
      5'b100_00: return 16384;  5'b100_01: return 40005;  5'b100_10: return 25599;
      default:   return (cls == 0) ? 18431 : ((cls == 1) ? 46394 : 29440);
    endcase
  endfunction

  function automatic pix_t clip8(input int signed v);
    if (v < 0) return 8'd0;
    else if (v > 255) return 8'd255;
    else return pix_t'(v);
  endfunction

endpackage
