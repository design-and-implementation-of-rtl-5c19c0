// bmu: branch metric unit for 3-bit soft decisions.
//
// Inputs are the two received soft values of one trellis step: i0 for the
// first code bit (generator G1) and i1 for the second (G2). For each of the
// four possible code pairs {c1, c0} it outputs the distance between the
// received point and the ideal point (0 or 7 on each axis) of the document's
// 8x8 received-symbol plane: a value r counts r against a sent 0 and 7 - r
// against a sent 1, and the two axes are added, so metrics run 0..14 and the
// smallest is the most likely pair (BMU00..BMU11 of the document). An erased
// (punctured) bit, flagged on er0 / er1, adds nothing, as the document asks of
// a depunctured stream. The per-axis absolute distance instead of a true
// Euclidean distance is this design's choice. Purely combinational.
module bmu
  import viterbi_pkg::*;
(
  input  soft_t   i0,
  input  soft_t   i1,
  input  logic    er0,
  input  logic    er1,
  output bm_vec_t bm
);

  function automatic bm_t axis_dist(soft_t r, logic c, logic erased);
    if (erased) return '0;
    return c ? bm_t'(SOFT_MAX - r) : bm_t'(r);
  endfunction

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      bm[p] = axis_dist(i0, p[1], er0) + axis_dist(i1, p[0], er1);
    end
  end

endmodule
