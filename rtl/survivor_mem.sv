// survivor_mem: survivor-path memory of one frame.
//
// DEPTH words of 64 bits, one word per trellis step, each holding the ACS
// decision bit of every state. Written once per step (we, waddr, wdata) by the
// ACS side and read by the traceback with an asynchronous read port (raddr,
// rdata), so the traceback can move one step per clock. The document calls
// this storage the survivor memory / path memory; the word layout and the
// asynchronous read are this design's choices. Contents are not reset.
module survivor_mem
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = DATA_BITS + TAIL_BITS,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  dec_vec_t      wdata,
  input  logic [AW-1:0] raddr,
  output dec_vec_t      rdata
);

  dec_vec_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
