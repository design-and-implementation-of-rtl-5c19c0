// puncturer: marks which coded bits of the rate-1/2 stream are sent.
//
// For every coded pair (code_valid, code) the puncturer registers the pair
// together with keep = {send c1, send c0}, taken from the current column of
// the puncturing matrix of the selected rate (1/2, 2/3, 3/4, 5/6 or 7/8, the
// matrices of the document's puncturing table). The matrix is applied
// cyclically, one column per pair, and starts again at column 0 at the start
// of every frame of DEPTH pairs, where the rate input is also sampled; so the
// two ends stay aligned frame by frame. Serialising the kept bits onto the
// channel is left to the modulator. One cycle of latency. The per-frame
// restart and the interface are this design's choices.
module puncturer
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = DATA_BITS + TAIL_BITS
) (
  input  logic       clk,
  input  logic       rst,
  input  rate_t      rate,
  input  logic       code_valid,
  input  code_t      code,
  output logic       out_valid,
  output code_t      out_code,
  output logic [1:0] keep
);

  localparam int unsigned CW = $clog2(DEPTH);

  rate_t         rate_q;
  pcol_t         col;
  logic [CW-1:0] step;
  rate_t         cur_rate;

  // the rate is taken at the first pair of each frame
  assign cur_rate = (step == '0) ? rate : rate_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rate_q    <= RATE_1_2;
      col       <= '0;
      step      <= '0;
      out_valid <= 1'b0;
      out_code  <= '0;
      keep      <= '0;
    end else begin
      out_valid <= code_valid;
      if (code_valid) begin
        out_code <= code;
        keep     <= punct_keep(cur_rate, col);
        rate_q   <= cur_rate;
        if (step == CW'(DEPTH - 1)) begin
          step <= '0;
          col  <= '0;
        end else begin
          step <= step + 1'b1;
          col  <= (col == punct_period(cur_rate) - 1'b1) ? '0 : col + 1'b1;
        end
      end
    end
  end

endmodule
