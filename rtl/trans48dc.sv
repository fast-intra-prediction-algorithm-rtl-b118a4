// trans48dc: shared forward transform unit of the intra-residue path.
// One horizontal stage takes 16 samples per cycle, either four rows of a 4x4
// block (integer transform or Hadamard) or two rows of an 8x8 block (integer
// transform). Its results go to transpose buffers. A 4x4 vertical stage turns
// a buffered 4x4 block into its 16 coefficients in the following cycle; an 8x8
// vertical stage drains a complete 8x8 block two columns per cycle over four
// cycles. Because the two vertical stages are separate, 4x4 blocks can enter
// while an 8x8 block drains (the overlap of the document's timing diagram).
//
// Timing: 4x4 in at cycle t -> out4 valid at t+1. 8x8 row pairs in at t..t+3
// -> column pairs 0..3 at t+4..t+7. A new 8x8 block may not begin while the
// previous one drains (ready8 low). Transform equations are the H.264/AVC
// core transforms (4x4, 8x8 with the FRExt butterflies) and the unscaled 4x4
// Hadamard. Widths and the ready8 rule are this design's own choices.
module trans48dc
  import intra_pkg::*;
#(
  parameter int DW = 16   // input sample width (signed)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  tkind_e               in_kind,
  input  logic signed [DW-1:0] in_data [16],
  output logic                 ready8,
  output logic                 out4_valid,
  output tkind_e               out4_kind,
  output coef_t                out4 [16],     // row-major 4x4 coefficients
  output logic                 out8_valid,
  output logic [1:0]           out8_col,      // column pair index
  output coef_t                out8 [16]      // [k*8+i]: row i, column 2*col+k
);

  function automatic void t4(input int a [4], input logic had, output int o [4]);
    int s03, d03, s12, d12;
    s03 = a[0] + a[3]; d03 = a[0] - a[3];
    s12 = a[1] + a[2]; d12 = a[1] - a[2];
    o[0] = s03 + s12;
    o[2] = s03 - s12;
    o[1] = had ? (d03 + d12) : (2 * d03 + d12);
    o[3] = had ? (d03 - d12) : (d03 - 2 * d12);
  endfunction

  function automatic void t8(input int p [8], output int o [8]);
    int a0, a1, a2, a3, a4, a5, a6, a7, b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = p[0] + p[7]; a1 = p[1] + p[6]; a2 = p[2] + p[5]; a3 = p[3] + p[4];
    a4 = p[0] - p[7]; a5 = p[1] - p[6]; a6 = p[2] - p[5]; a7 = p[3] - p[4];
    b0 = a0 + a3; b1 = a1 + a2; b2 = a0 - a3; b3 = a1 - a2;
    b4 = a5 + a6 + ((a4 >>> 1) + a4);
    b5 = a4 - a7 - ((a6 >>> 1) + a6);
    b6 = a4 + a7 - ((a5 >>> 1) + a5);
    b7 = a5 - a6 + ((a7 >>> 1) + a7);
    o[0] = b0 + b1;            o[4] = b0 - b1;
    o[2] = b2 + (b3 >>> 1);    o[6] = (b2 >>> 1) - b3;
    o[1] = b4 + (b7 >>> 2);    o[7] = (b4 >>> 2) - b7;
    o[3] = b5 + (b6 >>> 2);    o[5] = b6 - (b5 >>> 2);
  endfunction

  // ---------------- horizontal stage ----------------
  int hrow4 [16];
  int hrow8 [16];
  always_comb begin
    int a [4], o [4], p [8], q [8];
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) a[c] = int'(in_data[r*4+c]);
      t4(a, in_kind == TK_HAD4, o);
      for (int c = 0; c < 4; c++) hrow4[r*4+c] = o[c];
    end
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < 8; c++) p[c] = int'(in_data[r*8+c]);
      t8(p, q);
      for (int c = 0; c < 8; c++) hrow8[r*8+c] = q[c];
    end
  end

  // ---------------- transpose buffers ----------------
  int         tb4 [16];
  logic       v4;
  tkind_e     k4;
  int         tb8 [64];
  logic [1:0] rp8;        // next row pair expected
  logic       drain;
  logic [1:0] dcol;

  assign ready8 = !drain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v4 <= 1'b0; k4 <= TK_INT4;
      rp8 <= '0; drain <= 1'b0; dcol <= '0;
      for (int i = 0; i < 16; i++) tb4[i] <= 0;
      for (int i = 0; i < 64; i++) tb8[i] <= 0;
    end else begin
      v4 <= in_valid && (in_kind != TK_INT8);
      if (in_valid && in_kind != TK_INT8) begin
        k4 <= in_kind;
        for (int i = 0; i < 16; i++) tb4[i] <= hrow4[i];
      end
      if (drain) begin
        dcol <= dcol + 2'd1;
        if (dcol == 2'd3) drain <= 1'b0;
      end
      if (in_valid && in_kind == TK_INT8) begin
        for (int i = 0; i < 16; i++) tb8[int'(rp8)*16 + i] <= hrow8[i];
        rp8 <= rp8 + 2'd1;
        if (rp8 == 2'd3) begin
          drain <= 1'b1;
          dcol  <= '0;
        end
      end
    end
  end

  // ---------------- vertical stages ----------------
  always_comb begin
    int a [4], o [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = tb4[r*4+c];
      t4(a, k4 == TK_HAD4, o);
      for (int r = 0; r < 4; r++) out4[r*4+c] = coef_t'(o[r]);
    end
  end
  assign out4_valid = v4;
  assign out4_kind  = k4;

  always_comb begin
    int p [8], q [8];
    for (int k = 0; k < 2; k++) begin
      for (int r = 0; r < 8; r++) p[r] = tb8[r*8 + int'(dcol)*2 + k];
      t8(p, q);
      for (int r = 0; r < 8; r++) out8[k*8+r] = coef_t'(q[r]);
    end
  end
  assign out8_valid = drain;
  assign out8_col   = dcol;

  // a new 8x8 block must wait until the previous one has drained
  a_no8_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_kind == TK_INT8 && rp8 == 2'd0) |-> !drain);

endmodule
