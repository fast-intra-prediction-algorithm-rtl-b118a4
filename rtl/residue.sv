// residue: prediction residue of LANES pixels per cycle (16 in the
// intra-residue path): current pixel minus predicted pixel, as a signed value.
// Combinational; lane order is whatever order the caller uses for both inputs.
module residue
  import intra_pkg::*;
#(
  parameter int LANES = 16
) (
  input  pix_t               cur  [LANES],
  input  pix_t               pred [LANES],
  output logic signed [15:0] res  [LANES]
);
  always_comb
    for (int i = 0; i < LANES; i++)
      res[i] = 16'(signed'({1'b0, cur[i]}) - signed'({1'b0, pred[i]}));
endmodule
