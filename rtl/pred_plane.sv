// pred_plane: plane prediction for 16x16 luma and 8x8 chroma blocks, in two
// parts. The parameter part computes the gradients H and V from the top row
// and left column and from them a, b and c (one cycle, registered):
//   luma:   H = sum_{i=1..8} i*(p[7+i,-1] - p[7-i,-1]),  V likewise on the left,
//           a = 16*(p[-1,15] + p[15,-1]), b = (5H+32)>>6, c = (5V+32)>>6
//   chroma: H = sum_{i=1..4} i*(p[3+i,-1] - p[3-i,-1]),  V likewise,
//           a = 16*(p[-1,7] + p[7,-1]),  b = (34H+32)>>6, c = (34V+32)>>6
// (p[-1,-1] is the corner sample). The pixel part then emits 16 pixels per
// cycle, Pred(x,y) = clip((a + b(x-xc) + c(y-yc) + 16) >> 5) with xc = yc = 7
// (luma) or 3 (chroma): a luma block one row per cycle over 16 cycles, a
// chroma block two rows per cycle over 4 cycles (lanes 0-7 row 2k, 8-15 row
// 2k+1). Timing: start at t -> first pixels at t+2, pix_valid high until the
// block is done. Equations are the H.264/AVC ones; the document gives the
// luma equations and the two-part structure.
module pred_plane
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       chroma,
  input  pix_t       top  [16],
  input  pix_t       left [16],
  input  pix_t       corner,
  output logic       busy,
  output logic       pix_valid,
  output logic [3:0] pix_row,     // row (luma) or row pair (chroma) index
  output pix_t       pix  [16]
);
  int         a_r, b_r, c_r;
  logic       chr_r;
  logic       run;
  logic [3:0] row;

  function automatic int tpc(input int i);
    return (i < 0) ? int'(corner) : int'(top[i]);
  endfunction
  function automatic int lfc(input int j);
    return (j < 0) ? int'(corner) : int'(left[j]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    int h, v;
    if (!rst_n) begin
      a_r <= 0; b_r <= 0; c_r <= 0; chr_r <= 1'b0; run <= 1'b0; row <= '0;
    end else begin
      if (start) begin
        h = 0; v = 0;
        if (chroma) begin
          for (int i = 1; i <= 4; i++) begin
            h += i * (tpc(3 + i) - tpc(3 - i));
            v += i * (lfc(3 + i) - lfc(3 - i));
          end
          a_r <= 16 * (int'(left[7]) + int'(top[7]));
          b_r <= (34 * h + 32) >>> 6;
          c_r <= (34 * v + 32) >>> 6;
        end else begin
          for (int i = 1; i <= 8; i++) begin
            h += i * (tpc(7 + i) - tpc(7 - i));
            v += i * (lfc(7 + i) - lfc(7 - i));
          end
          a_r <= 16 * (int'(left[15]) + int'(top[15]));
          b_r <= (5 * h + 32) >>> 6;
          c_r <= (5 * v + 32) >>> 6;
        end
        chr_r <= chroma;
        run   <= 1'b1;
        row   <= '0;
      end else if (run) begin
        row <= row + 4'd1;
        if ((chr_r && row == 4'd3) || row == 4'd15) run <= 1'b0;
      end
    end
  end

  // pixel part: registered output row
  always_ff @(posedge clk or negedge rst_n) begin
    int x, y;
    if (!rst_n) begin
      pix_valid <= 1'b0; pix_row <= '0;
      for (int i = 0; i < 16; i++) pix[i] <= '0;
    end else begin
      pix_valid <= run && !start;
      pix_row   <= row;
      if (run && !start) begin
        for (int i = 0; i < 16; i++) begin
          if (chr_r) begin
            x = i % 8; y = 2 * int'(row) + i / 8;
            pix[i] <= clip8((a_r + b_r * (x - 3) + c_r * (y - 3) + 16) >>> 5);
          end else begin
            x = i; y = int'(row);
            pix[i] <= clip8((a_r + b_r * (x - 7) + c_r * (y - 7) + 16) >>> 5);
          end
        end
      end
    end
  end
  assign busy = run;
endmodule
