// acs_butterfly: one radix-2 butterfly of the 64-state trellis.
//
// Predecessor states i = {x, 0} and j = {x, 1} lead to the successor states
// p = {0, x} (input 0) and q = {1, x} (input 1). Because the input bit and the
// oldest register bit feed both generators, the branch words on i->p and j->q
// are equal, and those on j->p and i->q are their complement: the butterfly
// needs only the two branch metrics bm_ip and bm_jp, as in the document's
// butterfly drawing. Node p chooses between i (+bm_ip) and j (+bm_jp); node
// q between i (+bm_jp) and j (+bm_ip). Each node is an acs_node, so the
// outputs are valid in the cycle after add_en.
module acs_butterfly
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic add_en,
  input  pm_t  pm_i,
  input  pm_t  pm_j,
  input  bm_t  bm_ip,
  input  bm_t  bm_jp,
  output pm_t  pm_p,
  output pm_t  pm_q,
  output logic dec_p,
  output logic dec_q
);

  acs_node u_p (
    .clk(clk), .add_en(add_en),
    .pm_a(pm_i), .bm_a(bm_ip), .pm_b(pm_j), .bm_b(bm_jp),
    .pm_new(pm_p), .decision(dec_p)
  );

  acs_node u_q (
    .clk(clk), .add_en(add_en),
    .pm_a(pm_i), .bm_a(bm_jp), .pm_b(pm_j), .bm_b(bm_ip),
    .pm_new(pm_q), .decision(dec_q)
  );

endmodule
