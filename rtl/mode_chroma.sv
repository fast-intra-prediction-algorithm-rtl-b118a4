// mode_chroma: chroma intra mode candidates from the texture intensities of
// the chroma block. DC and plane are always candidates (plane is enforced as
// in the document); the third candidate is vertical when the vertical-edge
// intensity IV is at least the horizontal one IH, otherwise horizontal, giving
// the three chroma candidates the throughput analysis assumes.
// Mask bits use the H.264 chroma numbering: 0 DC, 1 horizontal, 2 vertical,
// 3 plane. Combinational. The choice rule is this design's own.
module mode_chroma (
  input  logic [19:0] iv,
  input  logic [19:0] ih,
  output logic [3:0]  cand
);
  always_comb begin
    cand = 4'b1001;
    if (iv >= ih) cand[2] = 1'b1;
    else          cand[1] = 1'b1;
  end
endmodule
