// min_metric_select: finds the trellis state with the smallest path metric.
//
// A six-level binary comparison tree over the 64 path metrics; each node
// keeps the smaller metric and its state number, the lower-numbered state on
// a tie. Comparisons use the wrapped-metric rule of viterbi_pkg. The document
// names this unit between the ACSU and the SMU register; its tree structure
// and tie rule are this design's choices. Purely combinational: the
// enclosing decoder registers the result with the decisions.
module min_metric_select
  import viterbi_pkg::*;
(
  input  pm_t    pm [NSTATES],
  output state_t best_state,
  output pm_t    best_pm
);

  pm_t    lvl_pm [SW+1][NSTATES];
  state_t lvl_st [SW+1][NSTATES];

  always_comb begin
    for (int s = 0; s < NSTATES; s++) begin
      lvl_pm[0][s] = pm[s];
      lvl_st[0][s] = state_t'(s);
    end
    for (int l = 1; l <= SW; l++) begin
      for (int n = 0; n < NSTATES; n++) begin
        if (n < (NSTATES >> l)) begin
          if (pm_greater(lvl_pm[l-1][2*n], lvl_pm[l-1][2*n+1])) begin
            lvl_pm[l][n] = lvl_pm[l-1][2*n+1];
            lvl_st[l][n] = lvl_st[l-1][2*n+1];
          end else begin
            lvl_pm[l][n] = lvl_pm[l-1][2*n];
            lvl_st[l][n] = lvl_st[l-1][2*n];
          end
        end else begin
          lvl_pm[l][n] = '0;
          lvl_st[l][n] = '0;
        end
      end
    end
    best_pm    = lvl_pm[SW][0];
    best_state = lvl_st[SW][0];
  end

endmodule
