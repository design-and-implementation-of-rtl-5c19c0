// conv_encoder: rate-1/2, constraint-length-7 convolutional encoder.
//
// A six-stage shift register holds the last six input bits. On each cycle with
// in_valid high the coded pair {c1, c0} is registered onto code and the input
// bit is shifted into the register: c1 is the XOR of the input and the taps
// of G1 = 1111001, c0 that of G2 = 1011011, as drawn in the document's encoder
// diagram. code_valid follows in_valid by one cycle. Synchronous reset
// clears the register to state 0, the state the decoder assumes a frame
// starts in; the reset style is this design's choice.
module conv_encoder
  import viterbi_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  logic   in_bit,
  output logic   code_valid,
  output code_t  code,
  output state_t state
);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= '0;
      code       <= '0;
      code_valid <= 1'b0;
    end else begin
      code_valid <= in_valid;
      if (in_valid) begin
        code  <= enc_out(state, in_bit);
        state <= next_state(state, in_bit);
      end
    end
  end

endmodule
