// decode_block: turns the ML state path back into data bits.
//
// On start the block begins at time 0 in state 0 and, once per clock, reads
// the next-state ROM word of its current state and the ML path state reached
// after the current step. The ROM word gives the next state for input 0 and
// for input 1; whichever equals the path state tells the data bit, which is
// sent on out_bit with out_valid, and the path state becomes the current
// state. mismatch is raised with a bit if neither next state matches (the
// bit is then 0). NBITS bits are produced, the last with out_last; the zero
// tail steps that follow the data are not decoded. Bits come out in
// transmission order, one per clock; the first is registered out two cycles
// after the start pulse. Only the next-state fields of the ROM word are used;
// its code-pair fields complete the table entry (next state and output for
// each input) but are not needed to recover the data bit. The comparison against the ROM follows the document; the handshake is
// this design's choice.
module decode_block
  import viterbi_pkg::*;
#(
  parameter int unsigned NBITS = DATA_BITS,
  parameter int unsigned AW    = $clog2(NBITS + TAIL_BITS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  // ML path read port
  output logic [AW-1:0] path_raddr,
  input  state_t        path_rdata,
  // next-state ROM read port
  output state_t        rom_raddr,
  input  logic [15:0]   rom_rdata,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last,
  output logic          mismatch,
  output logic          busy
);

  state_t        cur;
  logic [AW-1:0] t;
  state_t        ns0, ns1;
  logic          same0, same1;

  assign path_raddr = t;
  assign rom_raddr  = cur;
  assign ns0        = rom_rdata[15:10];
  assign ns1        = rom_rdata[7:2];
  assign same0      = (ns0 == path_rdata);
  assign same1      = (ns1 == path_rdata);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      t         <= '0;
      cur       <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
      mismatch  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      mismatch  <= 1'b0;
      if (busy) begin
        out_valid <= 1'b1;
        out_bit   <= same1;
        mismatch  <= !same0 && !same1;
        cur       <= path_rdata;
        if (t == AW'(NBITS - 1)) begin
          busy     <= 1'b0;
          out_last <= 1'b1;
        end else begin
          t <= t + 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
        t    <= '0;
        cur  <= '0;
      end
    end
  end

endmodule
