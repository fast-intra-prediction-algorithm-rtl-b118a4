// pred_dc: DC prediction for 4x4, 8x8, 16x16 luma and 8x8 chroma blocks.
// Neighbour samples arrive on a 16-lane bus: for 4x4, top in lanes 0-3 and
// left in lanes 8-11; for 8x8 luma and chroma, top in lanes 0-7 and left in
// lanes 8-15 (one cycle). A 16x16 block accumulates over two cycles: the 16
// top samples with start, the 16 left samples in the next cycle. The result
// is registered: dc_valid is high one cycle after the last samples. Missing
// neighbours follow the H.264/AVC rules (average of what is available, 128
// when nothing is). For chroma, dc[q] is the value of 4x4 quadrant q (raster
// order) with the standard's per-quadrant rules; for luma all four outputs are
// equal. The accumulation scheme follows the document; the bus layout is this
// design's own.
module pred_dc
  import intra_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  psize_e size,
  input  logic   avail_top,
  input  logic   avail_left,
  input  pix_t   samples [16],
  output logic   dc_valid,
  output pix_t   dc [4]
);
  logic        ph2;          // second cycle of a 16x16 block
  logic        at_r, al_r;
  logic [11:0] acc;

  function automatic pix_t avg(input int st, input int sl, input logic at, input logic al, input int lg);
    // lg = log2 of the number of samples on one side
    if (at && al)  return pix_t'((st + sl + (1 << lg)) >> (lg + 1));
    else if (at)   return pix_t'((st + (1 << (lg - 1))) >> lg);
    else if (al)   return pix_t'((sl + (1 << (lg - 1))) >> lg);
    else           return 8'd128;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    int st4a, st4b, sl4a, sl4b, s16;
    if (!rst_n) begin
      ph2 <= 1'b0; dc_valid <= 1'b0; at_r <= 1'b0; al_r <= 1'b0; acc <= '0;
      for (int q = 0; q < 4; q++) dc[q] <= '0;
    end else begin
      st4a = 0; st4b = 0; sl4a = 0; sl4b = 0; s16 = 0;
      for (int i = 0; i < 4; i++) begin
        st4a += int'(samples[i]);     st4b += int'(samples[4+i]);
        sl4a += int'(samples[8+i]);   sl4b += int'(samples[12+i]);
      end
      s16 = st4a + st4b + sl4a + sl4b;
      dc_valid <= 1'b0;
      if (ph2) begin
        // left column of a 16x16 block
        ph2 <= 1'b0;
        dc_valid <= 1'b1;
        for (int q = 0; q < 4; q++) dc[q] <= avg(int'(acc), s16, at_r, al_r, 4);
      end else if (start) begin
        case (size)
          PS_4X4: begin
            dc_valid <= 1'b1;
            for (int q = 0; q < 4; q++) dc[q] <= avg(st4a, sl4a, avail_top, avail_left, 2);
          end
          PS_8X8: begin
            dc_valid <= 1'b1;
            for (int q = 0; q < 4; q++) dc[q] <= avg(st4a + st4b, sl4a + sl4b, avail_top, avail_left, 3);
          end
          PS_CHROMA: begin
            dc_valid <= 1'b1;
            dc[0] <= avg(st4a, sl4a, avail_top, avail_left, 2);
            dc[3] <= avg(st4b, sl4b, avail_top, avail_left, 2);
            // top-right quadrant prefers the top row, bottom-left the left column
            dc[1] <= avail_top  ? avg(st4b, 0, 1'b1, 1'b0, 2) : avg(0, sl4a, 1'b0, avail_left, 2);
            dc[2] <= avail_left ? avg(0, sl4b, 1'b0, 1'b1, 2) : avg(st4a, 0, avail_top, 1'b0, 2);
          end
          default: begin
            ph2 <= 1'b1;
            acc <= 12'(s16);
            at_r <= avail_top; al_r <= avail_left;
          end
        endcase
      end
    end
  end
endmodule
