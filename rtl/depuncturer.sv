// depuncturer: rebuilds trellis steps from a punctured stream of soft values.
//
// Soft values arrive one at a time (in_valid / in_ready, in_soft) in the
// order they were sent: c1 before c0 within a step, bits dropped by the
// puncturing matrix missing. Following the same matrix column by column,
// the depuncturer puts each value in its place and marks the dropped place
// as an erasure, as the document describes; a complete step leaves on
// out_valid / out_ready with soft0, soft1, er0, er1 and goes to the
// decoder, which ignores erased values. Like the puncturer it restarts at
// column 0 every DEPTH steps and samples rate there. A step is sent the
// cycle after its last value is taken; one output register, so in_ready is
// low while a step waits. The interface and per-frame restart are this
// design's choices.
module depuncturer
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = DATA_BITS + TAIL_BITS
) (
  input  logic  clk,
  input  logic  rst,
  input  rate_t rate,
  input  logic  in_valid,
  output logic  in_ready,
  input  soft_t in_soft,
  output logic  out_valid,
  input  logic  out_ready,
  output soft_t soft0,
  output soft_t soft1,
  output logic  er0,
  output logic  er1
);

  localparam int unsigned CW = $clog2(DEPTH);

  rate_t         rate_q, cur_rate;
  pcol_t         col;
  logic [CW-1:0] step;
  logic          half;          // c1 of the current step taken, c0 awaited
  soft_t         held;
  logic [1:0]    k;
  logic          take, emit;
  soft_t         n_soft0, n_soft1;
  logic          n_er0, n_er1;

  assign cur_rate = (step == '0 && !half) ? rate : rate_q;
  assign k        = punct_keep(cur_rate, col);
  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  // Where the value taken now goes, and whether it completes the step.
  always_comb begin
    emit    = 1'b0;
    n_soft0 = '0;
    n_soft1 = '0;
    n_er0   = 1'b0;
    n_er1   = 1'b0;
    if (k[1] && !half) begin
      // value is c1; the step is complete if c0 was dropped
      emit    = !k[0];
      n_soft0 = in_soft;
      n_er1   = 1'b1;
    end else begin
      // value is c0; c1 was either taken before or dropped
      emit    = 1'b1;
      n_soft0 = k[1] ? held : '0;
      n_er0   = !k[1];
      n_soft1 = in_soft;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rate_q    <= RATE_1_2;
      col       <= '0;
      step      <= '0;
      half      <= 1'b0;
      held      <= '0;
      out_valid <= 1'b0;
      soft0     <= '0;
      soft1     <= '0;
      er0       <= 1'b0;
      er1       <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        rate_q <= cur_rate;
        if (!emit) begin
          half <= 1'b1;
          held <= in_soft;
        end else begin
          half      <= 1'b0;
          out_valid <= 1'b1;
          soft0     <= n_soft0;
          soft1     <= n_soft1;
          er0       <= n_er0;
          er1       <= n_er1;
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
  end

endmodule
