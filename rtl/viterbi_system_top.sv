// viterbi_system_top: transmit encoder and receive chain of the coded link.
//
// Two independent halves share only the clock and reset.
//
// Transmit: the rate-1/2, K=7 convolutional encoder takes one data bit per
// cycle with tx_valid; two cycles later the puncturer presents the coded pair
// on tx_code with tx_code_valid, and tx_keep says which of the two bits the
// puncturing matrix of tx_rate sends (bit 1 for c1, bit 0 for c0). The kept
// bits go onto the channel c1 first. A frame is NBITS data bits followed by
// six zero tail bits, all sent by the user on tx_bit, so the encoder ends
// each frame in state 0 as the decoder expects.
//
// Receive: one received sample per transfer (rx_valid / rx_ready,
// rx_sample, signed SAMPLE_W bits, positive meaning 1) is quantised to a
// 3-bit soft decision; the depuncturer puts the values of each trellis step
// back in place for rx_rate, marking dropped bits as erasures; the pipelined
// Viterbi decoder decodes frames of NBITS data bits plus six zero tail bits;
// the decoded bits of a frame are gathered into rx_data (bit 0 = first bit
// sent) and presented with a one-cycle rx_data_valid pulse. They are also
// available one at a time on rx_bit / rx_bit_valid; rx_mismatch flags a bit
// whose path step matched no table entry.
//
// Both puncturer and depuncturer restart their matrix at each frame of
// NBITS + 6 steps and sample the rate there. The 35-bit frame follows the
// document's simulated frame and the puncturing matrices its table; the
// sample format, the interfaces and the output word are this design's
// choices. The channel between tx_code and rx_sample lies outside.
module viterbi_system_top
  import viterbi_pkg::*;
#(
  parameter int unsigned NBITS    = DATA_BITS,
  parameter int unsigned SAMPLE_W = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  // transmit side
  input  rate_t                      tx_rate,
  input  logic                       tx_valid,
  input  logic                       tx_bit,
  output logic                       tx_code_valid,
  output code_t                      tx_code,
  output logic [1:0]                 tx_keep,
  // receive side
  input  rate_t                      rx_rate,
  input  logic                       rx_valid,
  output logic                       rx_ready,
  input  logic signed [SAMPLE_W-1:0] rx_sample,
  output logic                       rx_bit_valid,
  output logic                       rx_bit,
  output logic                       rx_mismatch,
  output logic                       rx_data_valid,
  output logic [NBITS-1:0]           rx_data
);

  localparam int unsigned DEPTH = NBITS + TAIL_BITS;

  logic   enc_valid;
  code_t  enc_code;
  soft_t  rx_soft;
  logic   dp_valid, vd_ready;
  soft_t  soft0, soft1;
  logic   er0, er1;
  logic   last;
  logic [NBITS-2:0] shift;

  // ---- transmit ----
  conv_encoder u_enc (
    .clk(clk), .rst(rst), .in_valid(tx_valid), .in_bit(tx_bit),
    .code_valid(enc_valid), .code(enc_code), .state()
  );

  puncturer #(.DEPTH(DEPTH)) u_punct (
    .clk(clk), .rst(rst), .rate(tx_rate),
    .code_valid(enc_valid), .code(enc_code),
    .out_valid(tx_code_valid), .out_code(tx_code), .keep(tx_keep)
  );

  // ---- receive ----
  soft_demod #(.SAMPLE_W(SAMPLE_W)) u_demod (.sample(rx_sample), .level(rx_soft));

  depuncturer #(.DEPTH(DEPTH)) u_depunct (
    .clk(clk), .rst(rst), .rate(rx_rate),
    .in_valid(rx_valid), .in_ready(rx_ready), .in_soft(rx_soft),
    .out_valid(dp_valid), .out_ready(vd_ready),
    .soft0(soft0), .soft1(soft1), .er0(er0), .er1(er1)
  );

  viterbi_decoder #(.NBITS(NBITS)) u_vd (
    .clk(clk), .rst(rst),
    .in_valid(dp_valid), .in_ready(vd_ready),
    .soft0(soft0), .soft1(soft1), .er0(er0), .er1(er1),
    .out_valid(rx_bit_valid), .out_bit(rx_bit), .out_last(last),
    .mismatch(rx_mismatch)
  );

  // Bits arrive first-sent first; shifting right leaves bit 0 = first bit.
  always_ff @(posedge clk) begin
    if (rst) begin
      shift         <= '0;
      rx_data       <= '0;
      rx_data_valid <= 1'b0;
    end else begin
      rx_data_valid <= 1'b0;
      if (rx_bit_valid) begin
        shift <= {rx_bit, shift[NBITS-2:1]};
        if (last) begin
          rx_data       <= {rx_bit, shift};
          rx_data_valid <= 1'b1;
        end
      end
    end
  end

endmodule
