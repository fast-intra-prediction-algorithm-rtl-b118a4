// itrans48dc: shared inverse transform unit of the reconstruction path,
// eight coefficients per cycle. A horizontal stage takes either two rows of a
// 4x4 block (inverse integer transform or inverse Hadamard) or one row of an
// 8x8 block. Rows collect in a transpose buffer; once a block is complete it
// is copied to an output buffer and a vertical stage emits it column by
// column, so the next block can be loaded while the previous one drains.
// Integer results are rounded to residuals with (x + 32) >> 6; the inverse
// Hadamard (for DC coefficients) is left unscaled.
//
// Timing: 4x4 rows 0-1 at t, rows 2-3 at t+1 -> columns 0-1 at t+2, 2-3 at
// t+3. 8x8 rows 0..7 at t..t+7 -> columns 0..7 at t+8..t+15. A 4x4 block may
// be loaded while an 8x8 block drains (the overlap of the document's timing
// diagram). Equations are the H.264/AVC inverse transforms; buffering and
// widths are this design's own choices.
module itrans48dc
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  tkind_e     in_kind,
  input  coef_t      in_data [8],   // INT4/HAD4: [r*4+c], rows 2h, 2h+1; INT8: one row
  output logic       out4_valid,
  output logic       out4_half,     // 0: columns 0-1, 1: columns 2-3
  output tkind_e     out4_kind,
  output coef_t      out4 [8],      // [k*4+r]: row r, column 2*half+k
  output logic       out8_valid,
  output logic [2:0] out8_col,
  output coef_t      out8 [8]       // [r]: row r of column out8_col
);

  function automatic void it4(input int d [4], input logic had, output int o [4]);
    int e0, e1, e2, e3;
    e0 = d[0] + d[2];
    e1 = d[0] - d[2];
    e2 = had ? (d[1] - d[3]) : ((d[1] >>> 1) - d[3]);
    e3 = had ? (d[1] + d[3]) : (d[1] + (d[3] >>> 1));
    o[0] = e0 + e3; o[1] = e1 + e2; o[2] = e1 - e2; o[3] = e0 - e3;
  endfunction

  function automatic void it8(input int d [8], output int o [8]);
    int a0, a1, a2, a3, a4, a5, a6, a7, b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = d[0] + d[4];              a4 = d[0] - d[4];
    a2 = (d[2] >>> 1) - d[6];      a6 = d[2] + (d[6] >>> 1);
    b0 = a0 + a6; b2 = a4 + a2; b4 = a4 - a2; b6 = a0 - a6;
    a1 = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    a3 =  d[1] + d[7] - d[3] - (d[3] >>> 1);
    a5 = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    a7 =  d[3] + d[5] + d[1] + (d[1] >>> 1);
    b1 = a1 + (a7 >>> 2); b7 = a7 - (a1 >>> 2);
    b3 = a3 + (a5 >>> 2); b5 = (a3 >>> 2) - a5;
    o[0] = b0 + b7; o[1] = b2 + b5; o[2] = b4 + b3; o[3] = b6 + b1;
    o[4] = b6 - b1; o[5] = b4 - b3; o[6] = b2 - b5; o[7] = b0 - b7;
  endfunction

  // ---------------- horizontal stage ----------------
  int h4 [8], h8 [8];
  always_comb begin
    int d [4], o [4], p [8], q [8];
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < 4; c++) d[c] = int'(in_data[r*4+c]);
      it4(d, in_kind == TK_HAD4, o);
      for (int c = 0; c < 4; c++) h4[r*4+c] = o[c];
    end
    for (int c = 0; c < 8; c++) p[c] = int'(in_data[c]);
    it8(p, q);
    for (int c = 0; c < 8; c++) h8[c] = q[c];
  end

  // ---------------- buffers ----------------
  int         ib4 [8];          // rows 0-1 of the 4x4 block being loaded
  logic       half_in;
  int         ob4 [16];
  tkind_e     k4;
  logic       d4;               // 4x4 draining
  logic       dh;               // which column pair
  int         ib8 [64];
  logic [2:0] row8;
  int         ob8 [64];
  logic       d8;
  logic [2:0] dcol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_in <= 1'b0; d4 <= 1'b0; dh <= 1'b0; k4 <= TK_INT4;
      row8 <= '0; d8 <= 1'b0; dcol <= '0;
      for (int i = 0; i < 8; i++)  ib4[i] <= 0;
      for (int i = 0; i < 16; i++) ob4[i] <= 0;
      for (int i = 0; i < 64; i++) begin ib8[i] <= 0; ob8[i] <= 0; end
    end else begin
      // 4x4 drain
      if (d4) begin
        dh <= ~dh;
        if (dh) d4 <= 1'b0;
      end
      if (in_valid && in_kind != TK_INT8) begin
        if (!half_in) begin
          for (int i = 0; i < 8; i++) ib4[i] <= h4[i];
          half_in <= 1'b1;
        end else begin
          for (int i = 0; i < 8; i++) begin ob4[i] <= ib4[i]; ob4[8+i] <= h4[i]; end
          k4 <= in_kind;
          half_in <= 1'b0;
          d4 <= 1'b1; dh <= 1'b0;
        end
      end
      // 8x8 drain
      if (d8) begin
        dcol <= dcol + 3'd1;
        if (dcol == 3'd7) d8 <= 1'b0;
      end
      if (in_valid && in_kind == TK_INT8) begin
        row8 <= row8 + 3'd1;
        if (row8 == 3'd7) begin
          for (int i = 0; i < 56; i++) ob8[i] <= ib8[i];
          for (int i = 0; i < 8; i++)  ob8[56+i] <= h8[i];
          d8 <= 1'b1; dcol <= '0;
        end else begin
          for (int i = 0; i < 8; i++) ib8[int'(row8)*8 + i] <= h8[i];
        end
      end
    end
  end

  // ---------------- vertical stages ----------------
  always_comb begin
    int d [4], o [4];
    for (int k = 0; k < 2; k++) begin
      for (int r = 0; r < 4; r++) d[r] = ob4[r*4 + int'(dh)*2 + k];
      it4(d, k4 == TK_HAD4, o);
      for (int r = 0; r < 4; r++)
        out4[k*4+r] = (k4 == TK_HAD4) ? coef_t'(o[r]) : coef_t'((o[r] + 32) >>> 6);
    end
  end
  assign out4_valid = d4;
  assign out4_half  = dh;
  assign out4_kind  = k4;

  always_comb begin
    int d [8], o [8];
    for (int r = 0; r < 8; r++) d[r] = ob8[r*8 + int'(dcol)];
    it8(d, o);
    for (int r = 0; r < 8; r++) out8[r] = coef_t'((o[r] + 32) >>> 6);
  end
  assign out8_valid = d8;
  assign out8_col   = dcol;

  // an 8x8 block completes only after the previous one has drained
  a_no8_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_kind == TK_INT8 && row8 == 3'd7) |-> (!d8 || dcol == 3'd7));

endmodule
