// next_state_rom: next-state / output table of the encoder trellis.
//
// 64 words of 16 bits, one per state: {next state, code pair} for input 0 in
// bits 15:8 and the same for input 1 in bits 7:0, the layout of the
// document's table (six state bits then two output bits). As drawn in the
// document, the table is a writable memory: write enable selects the write
// address instead of the read address onto the single ROM address, and
// data_in is stored there. It is filled after reset by rom_loader. The read
// is asynchronous; contents are not reset.
module next_state_rom
  import viterbi_pkg::*;
(
  input  logic        clk,
  input  logic        we,
  input  state_t      waddr,
  input  state_t      raddr,
  input  logic [15:0] data_in,
  output logic [15:0] data_out
);

  logic [15:0] mem [NSTATES];
  state_t      rom_addr;

  assign rom_addr = we ? waddr : raddr;

  always_ff @(posedge clk) begin
    if (we) mem[rom_addr] <= data_in;
  end

  assign data_out = mem[rom_addr];

endmodule
