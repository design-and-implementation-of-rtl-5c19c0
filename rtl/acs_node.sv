// acs_node: add-compare-select for one trellis state, with the loop register.
//
// Two 8-bit adders form the candidate metrics pm_a + bm_a and pm_b + bm_b of
// the two branches entering the state (a from the predecessor whose oldest
// bit is 0, b from the one whose oldest bit is 1). The sums are registered
// when add_en is high: this register is the one the document places in the
// path-metric feedback loop to break the ACS recursion. In the following
// cycle the comparator and the select mux work on the registered sums:
// decision is 1 when sum_a > sum_b, and pm_new is the smaller sum (sum_a on
// a tie). decision is the survivor bit; pm_new goes to the path-metric
// storage of the enclosing unit. So a trellis step takes two clock cycles.
// The adders wrap modulo 256 and the comparison is made on the wrapped
// difference (see viterbi_pkg); that normalisation scheme and the placement
// of the loop register between the adders and the comparator are this
// design's choices.
module acs_node
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic add_en,
  input  pm_t  pm_a,
  input  bm_t  bm_a,
  input  pm_t  pm_b,
  input  bm_t  bm_b,
  output pm_t  pm_new,
  output logic decision
);

  pm_t sum_a_q, sum_b_q;

  always_ff @(posedge clk) begin
    if (add_en) begin
      sum_a_q <= pm_a + pm_t'(bm_a);
      sum_b_q <= pm_b + pm_t'(bm_b);
    end
  end

  always_comb begin
    decision = pm_greater(sum_a_q, sum_b_q);
    pm_new   = decision ? sum_b_q : sum_a_q;
  end

endmodule
