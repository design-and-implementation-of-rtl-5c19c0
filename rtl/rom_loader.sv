// rom_loader: fills the next-state ROM after reset.
//
// While rst is high the loader is cleared; afterwards it writes the 64 table
// words, one per cycle, state 0 first, and then raises ready and stays idle.
// Each word is computed from the generator polynomials (viterbi_pkg::rom_word),
// so the table always agrees with the encoder. The document only says the
// ROM is initialised on reset; computing the words and writing them in the
// 64 cycles after reset are this design's choices. Two bits of wdata are
// constant by the structure of the code: the newest bit of the next state is
// the input itself, so bit 15 (next state for input 0) is always 0 and bit 7
// (next state for input 1) always 1.
module rom_loader
  import viterbi_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic        we,
  output state_t      waddr,
  output logic [15:0] wdata,
  output logic        ready
);

  always_ff @(posedge clk) begin
    if (rst) begin
      waddr <= '0;
      ready <= 1'b0;
    end else if (!ready) begin
      waddr <= waddr + 1'b1;
      if (waddr == state_t'(NSTATES - 1)) ready <= 1'b1;
    end
  end

  assign we    = !rst && !ready;
  assign wdata = rom_word(waddr);

endmodule
