// hadamard2x2: 2x2 Hadamard transform of the four chroma DC coefficients of
// one chroma component (Cb or Cr). Forward and inverse are the same butterfly,
// so one unit serves the forward (before quantization) and inverse (after
// inverse quantization) directions. Purely combinational. Input and output
// order: [0] = DC(0,0), [1] = DC(0,1), [2] = DC(1,0), [3] = DC(1,1).
// The document lists this unit among the shared components; its equations are
// the H.264/AVC chroma DC transform.
module hadamard2x2
  import intra_pkg::*;
(
  input  coef_t in_dc  [4],
  output coef_t out_dc [4]
);
  always_comb begin
    int a, b, c, d;
    a = int'(in_dc[0]); b = int'(in_dc[1]); c = int'(in_dc[2]); d = int'(in_dc[3]);
    out_dc[0] = coef_t'(a + b + c + d);
    out_dc[1] = coef_t'(a - b + c - d);
    out_dc[2] = coef_t'(a + b - c - d);
    out_dc[3] = coef_t'(a - b - c + d);
  end
endmodule
