// viterbi_pkg: types, constants and trellis functions shared by the K=7,
// rate-1/2 soft-decision Viterbi decoder and its encoder.
//
// Code: constraint length 7, generators G1 = 1111001 (171 octal) and
// G2 = 1011011 (133 octal), the code of IEEE 802.11a/g and 802.16.
// State convention: the 6-bit state is the encoder shift register, bit 5
// holding the most recent input and bit 0 the oldest. An input u moves
// state s to {u, s[5:1]} and emits the pair {c1, c0}, c1 from G1 and c0 from
// G2. This reproduces the document's next-state table entry for entry.
// The soft width (3 bits), metric width (8 bits) and 35-bit frame follow the
// document; the metric initialisation value is this design's choice.
package viterbi_pkg;

  localparam int unsigned K          = 7;             // constraint length
  localparam int unsigned SW         = K - 1;         // state width
  localparam int unsigned NSTATES    = 1 << SW;       // 64 trellis states
  localparam int unsigned NBFLY      = NSTATES / 2;   // 32 butterflies
  localparam int unsigned SOFT_W     = 3;             // 3-bit soft decisions
  localparam int unsigned BM_W       = SOFT_W + 1;    // 0..14 branch metric
  localparam int unsigned PM_W       = 8;             // 8-bit path metrics
  localparam int unsigned DATA_BITS  = 35;            // information bits per frame
  localparam int unsigned TAIL_BITS  = K - 1;         // zero tail ends in state 0
  localparam logic [K-1:0] G1        = 7'b1111001;    // taps: input, s5..s0
  localparam logic [K-1:0] G2        = 7'b1011011;
  localparam logic [SOFT_W-1:0] SOFT_MAX = '1;        // "most confident 1"

  typedef logic [SW-1:0]     state_t;
  typedef logic [SOFT_W-1:0] soft_t;
  typedef logic [BM_W-1:0]   bm_t;
  typedef logic [PM_W-1:0]   pm_t;
  typedef logic [1:0]        code_t;                  // {c1 (G1), c0 (G2)}
  typedef bm_t  [3:0]        bm_vec_t;                // indexed by code_t
  typedef logic [NSTATES-1:0] dec_vec_t;              // one decision per state

  // Encoder output for state s and input u.
  function automatic code_t enc_out(state_t s, logic u);
    logic [K-1:0] r;
    r = {u, s};
    return {^(r & G1), ^(r & G2)};
  endfunction

  // Encoder next state for state s and input u.
  function automatic state_t next_state(state_t s, logic u);
    return {u, s[SW-1:1]};
  endfunction

  // One next-state ROM word: {next state, 2 code bits} for input 0, then for input 1.
  function automatic logic [15:0] rom_word(state_t s);
    return {next_state(s, 1'b0), enc_out(s, 1'b0), next_state(s, 1'b1), enc_out(s, 1'b1)};
  endfunction

  // Code rates reachable by puncturing the rate-1/2 mother code.
  typedef enum logic [2:0] {
    RATE_1_2 = 3'd0,
    RATE_2_3 = 3'd1,
    RATE_3_4 = 3'd2,
    RATE_5_6 = 3'd3,
    RATE_7_8 = 3'd4
  } rate_t;

  localparam int unsigned PUNCT_MAX = 7;              // longest puncturing period
  typedef logic [$clog2(PUNCT_MAX)-1:0] pcol_t;

  // Puncturing period (columns of the puncturing matrix).
  function automatic pcol_t punct_period(rate_t r);
    case (r)
      RATE_2_3: return pcol_t'(2);
      RATE_3_4: return pcol_t'(3);
      RATE_5_6: return pcol_t'(5);
      RATE_7_8: return pcol_t'(7);
      default:  return pcol_t'(1);
    endcase
  endfunction

  // Column col of the puncturing matrix: {keep c1 (row 1), keep c0 (row 2)}.
  // Rows, read left to right: 2/3: 10/11, 3/4: 101/110, 5/6: 10101/11010,
  // 7/8: 1000101/1111010; rate 1/2 keeps everything.
  function automatic logic [1:0] punct_keep(rate_t r, pcol_t col);
    logic [PUNCT_MAX-1:0] row1, row2;   // leftmost printed column in bit 6
    case (r)
      RATE_2_3: begin row1 = 7'b10_00000; row2 = 7'b11_00000; end
      RATE_3_4: begin row1 = 7'b101_0000; row2 = 7'b110_0000; end
      RATE_5_6: begin row1 = 7'b10101_00; row2 = 7'b11010_00; end
      RATE_7_8: begin row1 = 7'b1000101;  row2 = 7'b1111010;  end
      default:  begin row1 = 7'b1000000;  row2 = 7'b1000000;  end
    endcase
    return {row1[PUNCT_MAX-1-int'(col)], row2[PUNCT_MAX-1-int'(col)]};
  endfunction

  // Path metrics wrap modulo 2**PM_W. As long as all live metrics lie within
  // half the range of each other, a > b is decided by the sign of a - b.
  function automatic logic pm_greater(pm_t a, pm_t b);
    pm_t d;
    d = a - b;
    return (d != '0) && !d[PM_W-1];
  endfunction

endpackage
