// pred: the shared directional intra predictor. Each cycle it produces one
// 4x4 group of predicted pixels (16 pixels), each from at most three
// neighbouring samples, so a 4x4 block takes one cycle, an 8x8 block four
// (quad 0..3), a 16x16 block sixteen (quad 0..15) and an 8x8 chroma block four.
// 4x4 and 8x8 blocks support the eight directional modes (0,1,3..8 in the
// 4x4/8x8 numbering); 16x16 and chroma blocks use vertical (mode 0) and
// horizontal (mode 1); DC and plane are produced by pred_dc and pred_plane.
// The equations are the H.264/AVC ones written once for block size N = 4 or 8.
// Neighbours: top[i] = p[i,-1] (i = 0..2N-1, above-right included), left[j] =
// p[-1,j], corner = p[-1,-1]. The caller substitutes unavailable samples as the
// standard requires and, for 8x8 blocks, supplies the filtered reference
// samples. Combinational. Output pix[4*y+x] is pixel (x, y) of the selected
// 4x4 group; the group order (raster within the block) is this design's own.
module pred
  import intra_pkg::*;
(
  input  psize_e     size,
  input  logic [3:0] mode,
  input  logic [3:0] quad,
  input  pix_t       top  [16],
  input  pix_t       left [16],
  input  pix_t       corner,
  output pix_t       pix  [16]
);
  function automatic int tp(input int i);
    if (i < 0) return int'(corner);
    return int'(top[i > 15 ? 15 : i]);
  endfunction
  function automatic int lf(input int j);
    if (j < 0) return int'(corner);
    return int'(left[j > 15 ? 15 : j]);
  endfunction
  function automatic int r3(input int a, input int b, input int c);
    return (a + 2 * b + c + 2) >>> 2;
  endfunction
  function automatic int r2(input int a, input int b);
    return (a + b + 1) >>> 1;
  endfunction

  function automatic int predict(input int n, input int m, input int x, input int y);
    int z;
    case (m)
      M_VER: return tp(x);
      M_HOR: return lf(y);
      M_DDL: begin
        if (x == n - 1 && y == n - 1) return (tp(2*n-2) + 3 * tp(2*n-1) + 2) >>> 2;
        return r3(tp(x+y), tp(x+y+1), tp(x+y+2));
      end
      M_DDR: begin
        if (x > y) return r3(tp(x-y-2), tp(x-y-1), tp(x-y));
        if (x < y) return r3(lf(y-x-2), lf(y-x-1), lf(y-x));
        return r3(tp(0), int'(corner), lf(0));
      end
      M_VR: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) return r2(tp(x-(y>>1)-1), tp(x-(y>>1)));
        if (z >= 0)               return r3(tp(x-(y>>1)-2), tp(x-(y>>1)-1), tp(x-(y>>1)));
        if (z == -1)              return r3(lf(0), int'(corner), tp(0));
        return r3(lf(y-2*x-1), lf(y-2*x-2), lf(y-2*x-3));
      end
      M_HD: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) return r2(lf(y-(x>>1)-1), lf(y-(x>>1)));
        if (z >= 0)               return r3(lf(y-(x>>1)-2), lf(y-(x>>1)-1), lf(y-(x>>1)));
        if (z == -1)              return r3(lf(0), int'(corner), tp(0));
        return r3(tp(x-2*y-1), tp(x-2*y-2), tp(x-2*y-3));
      end
      M_VL: begin
        if (y % 2 == 0) return r2(tp(x+(y>>1)), tp(x+(y>>1)+1));
        return r3(tp(x+(y>>1)), tp(x+(y>>1)+1), tp(x+(y>>1)+2));
      end
      M_HU: begin
        z = x + 2 * y;
        if (z > 2*n-3)      return lf(n-1);
        if (z == 2*n-3)     return (lf(n-2) + 3 * lf(n-1) + 2) >>> 2;
        if (z % 2 == 0)     return r2(lf(y+(x>>1)), lf(y+(x>>1)+1));
        return r3(lf(y+(x>>1)), lf(y+(x>>1)+1), lf(y+(x>>1)+2));
      end
      default: return 0;
    endcase
  endfunction

  always_comb begin
    int n, x0, y0, m;
    case (size)
      PS_4X4:   begin n = 4; x0 = 0; y0 = 0; end
      PS_16X16: begin n = 16; x0 = 4 * (int'(quad) % 4); y0 = 4 * (int'(quad) / 4); end
      default:  begin n = 8; x0 = 4 * (int'(quad) % 2); y0 = 4 * ((int'(quad) / 2) % 2); end
    endcase
    m = int'(mode);
    // large blocks use vertical / horizontal only
    if ((size == PS_16X16 || size == PS_CHROMA) && m > M_HOR) m = M_DC;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        pix[4*y+x] = pix_t'(predict(n, m, x0 + x, y0 + y));
  end
endmodule
