// mode8x8: intra 8x8 mode candidates merged from the 4x4 candidates of the
// four 4x4 blocks inside the 8x8 block, so no separate 8x8 mode analysis is
// needed. With S_n the number of 4x4 blocks listing mode n: modes 0 and 1 are
// kept when S_n > 0, modes 3..8 when S_n > 1, DC (mode 2) is always kept.
// Then the highest-numbered modes are dropped until at most MAX8 remain.
// Combinational; masks have bit n set for mode n. Follows the document's rule.
module mode8x8 #(
  parameter int MAX8 = 4
) (
  input  logic [8:0] cand4 [4],
  output logic [8:0] cand8
);
  always_comb begin
    int s, cnt;
    logic [8:0] m;
    for (int n = 0; n < 9; n++) begin
      s = 0;
      for (int b = 0; b < 4; b++) s += int'(cand4[b][n]);
      if (n < 2)       m[n] = (s > 0);
      else if (n == 2) m[n] = 1'b1;
      else             m[n] = (s > 1);
    end
    cnt = 0;
    for (int n = 0; n < 9; n++) begin
      if (m[n]) begin
        if (cnt >= MAX8) m[n] = 1'b0;
        else cnt++;
      end
    end
    cand8 = m;
  end
endmodule
