// viterbi_decoder: pipelined 64-state soft-decision Viterbi decoder.
//
// The datapath has the three register cuts of the document's proposed
// decoder: the branch metrics of the BMU are registered before the ACSU; the
// ACSU has a register inside its path-metric loop (between the adders and the
// comparators, see acs_node); the 64 decisions and the output of the
// min-metric selection unit are registered before the SMU. A frame is NBITS
// data bits followed by six zero tail bits, DEPTH = NBITS + 6 trellis steps;
// the encoder starts and, with TERMINATED = 1, ends in state 0, and the
// traceback starts from state 0. With TERMINATED = 0 it starts from the
// state the min-metric unit found best after the last step.
//
// Interface: one trellis step (soft0 for the first code bit, soft1 for the
// second, each 0..7, with erasure flags er0 / er1) is taken when in_valid and
// in_ready are both high. in_ready is low every other cycle (a step takes
// two cycles in the ACS loop), after the DEPTH-th step of a frame, and until
// that frame's last bit has been sent. Decoded bits come out one per clock
// on out_bit / out_valid in transmission order, out_last marking the last of
// a frame; mismatch flags a bit whose path step matched no ROM entry.
// Latency: the first bit of a frame appears DEPTH + 5 cycles after its last
// step was taken. The handshake, frame framing and tail length are this
// design's choices; the block structure follows the document.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned NBITS      = DATA_BITS,
  parameter bit          TERMINATED = 1'b1,
  parameter pm_t         INIT_PM    = pm_t'(32)
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  output logic  in_ready,
  input  soft_t soft0,
  input  soft_t soft1,
  input  logic  er0,
  input  logic  er1,
  output logic  out_valid,
  output logic  out_bit,
  output logic  out_last,
  output logic  mismatch
);

  localparam int unsigned DEPTH = NBITS + TAIL_BITS;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic [CW-1:0] steps;          // steps of the current frame taken so far
  logic          take;
  bm_vec_t       bm, bm_q;
  logic          bm_valid_q;
  logic          acs_init;
  logic          dec_valid;
  dec_vec_t      dec;
  pm_t           pm_new [NSTATES];
  state_t        best_state;
  logic          dec_valid_q;
  dec_vec_t      dec_q;
  state_t        best_state_q;

  assign in_ready = !bm_valid_q && (steps < CW'(DEPTH));
  assign take     = in_valid && in_ready;

  // ---- stage 1: branch metrics, then register ----
  bmu u_bmu (.i0(soft0), .i1(soft1), .er0(er0), .er1(er1), .bm(bm));

  always_ff @(posedge clk) begin
    if (rst) bm_valid_q <= 1'b0;
    else     bm_valid_q <= take;
    if (take) bm_q <= bm;
  end

  // ---- frame counter: restart after the frame's last bit ----
  always_ff @(posedge clk) begin
    if (rst) begin
      steps    <= '0;
      acs_init <= 1'b0;
    end else begin
      acs_init <= out_last;
      if (out_last)  steps <= '0;
      else if (take) steps <= steps + 1'b1;
    end
  end

  // ---- stage 2: ACS recursion with its loop register ----
  acsu #(.INIT_PM(INIT_PM)) u_acsu (
    .clk(clk), .rst(rst), .init(acs_init),
    .bm_valid(bm_valid_q), .bm(bm_q),
    .dec_valid(dec_valid), .dec(dec), .pm_new(pm_new)
  );

  min_metric_select u_min (.pm(pm_new), .best_state(best_state), .best_pm());

  always_ff @(posedge clk) begin
    if (rst) dec_valid_q <= 1'b0;
    else     dec_valid_q <= dec_valid;
    if (dec_valid) begin
      dec_q        <= dec;
      best_state_q <= best_state;
    end
  end

  // ---- stage 3: survivor memory, traceback, decode ----
  smu #(.NBITS(NBITS), .DEPTH(DEPTH)) u_smu (
    .clk(clk), .rst(rst),
    .dec_valid(dec_valid_q), .dec(dec_q),
    .start_state(TERMINATED ? state_t'(0) : best_state_q),
    .out_valid(out_valid), .out_bit(out_bit), .out_last(out_last),
    .mismatch(mismatch), .busy(), .rom_ready()
  );

endmodule
