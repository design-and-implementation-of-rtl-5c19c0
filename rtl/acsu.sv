// acsu: add-compare-select unit for the 64-state trellis.
//
// Thirty-two acs_butterfly instances read the accumulated path metrics of
// all states and the four branch metrics of the current step. A step starts
// with bm_valid high (the adders' results are registered inside each node);
// in the next cycle the compare-select results are written back into the
// path-metric storage and the 64 decisions appear on dec with dec_valid high.
// bm_valid must therefore not be high in two consecutive cycles: one step is
// accepted every second cycle. init (or rst) loads the storage with the
// start-of-frame metrics: 0 for state 0, where every frame starts, and
// INIT_PM for every other state. pm_new shows the metrics the step writes
// back, valid together with dec. The wrapped 8-bit metrics, the value of INIT_PM and the
// two-cycle step are this design's choices; the 32 butterflies, the 8-bit
// adders and the storage follow the document.
module acsu
  import viterbi_pkg::*;
#(
  parameter pm_t INIT_PM = pm_t'(32)
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     init,
  input  logic     bm_valid,
  input  bm_vec_t  bm,
  output logic     dec_valid,
  output dec_vec_t dec,
  output pm_t      pm_new [NSTATES]
);

  pm_t  pm [NSTATES];        // accumulated path-metric storage
  pm_t  pm_next [NSTATES];
  logic sel_en;

  for (genvar x = 0; x < NBFLY; x++) begin : g_bfly
    // Branch word of predecessor {x,0} under input 0.
    localparam code_t CIP = enc_out(state_t'(2 * x), 1'b0);
    acs_butterfly u_bfly (
      .clk   (clk),
      .add_en(bm_valid),
      .pm_i  (pm[2*x]),
      .pm_j  (pm[2*x+1]),
      .bm_ip (bm[CIP]),
      .bm_jp (bm[~CIP]),
      .pm_p  (pm_next[x]),
      .pm_q  (pm_next[x+NBFLY]),
      .dec_p (dec[x]),
      .dec_q (dec[x+NBFLY])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) sel_en <= 1'b0;
    else     sel_en <= bm_valid;
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < NSTATES; s++) begin
      if (rst || init)  pm[s] <= (s == 0) ? pm_t'(0) : INIT_PM;
      else if (sel_en)  pm[s] <= pm_next[s];
    end
  end

  assign dec_valid = sel_en;
  assign pm_new    = pm_next;

  // A new step may only start once the previous one has been written back.
  assert property (@(posedge clk) disable iff (rst) bm_valid |=> !bm_valid)
    else $error("acsu: bm_valid high in two consecutive cycles");

endmodule
