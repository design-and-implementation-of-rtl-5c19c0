// traceback: finds the maximum-likelihood path of a finished frame.
//
// On start the unit begins at trellis step DEPTH-1 in start_state (state 0
// for a zero-terminated frame, as in the document) and walks back one step
// per clock: it reads that step's survivor word, takes the decision bit of
// the current state, and forms the predecessor by shifting the state left one
// bit and appending the decision bit as the new low bit. The state it is in
// at each step is written into the ML path memory, so that path[t] holds the
// state reached after step t. After DEPTH cycles done pulses and the path can
// be read through the asynchronous port path_raddr / path_rdata. A counter
// counts the steps, as in the document's flow chart. The path memory's
// layout and read port are this design's choices.
module traceback
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = DATA_BITS + TAIL_BITS,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  state_t        start_state,
  // survivor memory read port
  output logic [AW-1:0] surv_raddr,
  input  dec_vec_t      surv_rdata,
  // ML path read port
  input  logic [AW-1:0] path_raddr,
  output state_t        path_rdata,
  output logic          busy,
  output logic          done
);

  state_t        path [DEPTH];
  state_t        cur;
  logic [AW-1:0] t;
  logic          d;

  assign surv_raddr = t;
  assign d          = surv_rdata[cur];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      t    <= '0;
      cur  <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        cur <= {cur[SW-2:0], d};
        if (t == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          t <= t - 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
        t    <= AW'(DEPTH - 1);
        cur  <= start_state;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy) path[t] <= cur;
  end

  assign path_rdata = path[path_raddr];

endmodule
