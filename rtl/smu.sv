// smu: survivor memory management unit, trace-back style.
//
// Collects the 64 ACS decisions of every trellis step of a frame in
// survivor_mem (dec_valid / dec, DEPTH steps per frame). When the last step
// of the frame has been written, traceback walks the survivor memory back
// from start_state (sampled then) and stores the ML state path; then
// decode_block walks that path forward from state 0 and, using the
// next-state ROM, outputs the NBITS data bits in order on out_bit /
// out_valid, the last with out_last. The next-state ROM is filled by
// rom_loader after reset; decoding waits for it. busy is high from the last
// step's write until the last bit, during which no new decisions may arrive.
// Timing: the traceback starts the cycle after the last write and takes
// DEPTH cycles; the first bit is valid DEPTH + 5 cycles after the cycle in
// which the last decision word is written, and the bits follow one per clock. The block split follows the document; the
// strictly sequential (non-overlapped) frame handling is this design's
// choice.
module smu
  import viterbi_pkg::*;
#(
  parameter int unsigned NBITS = DATA_BITS,
  parameter int unsigned DEPTH = NBITS + TAIL_BITS,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     dec_valid,
  input  dec_vec_t dec,
  input  state_t   start_state,
  output logic     out_valid,
  output logic     out_bit,
  output logic     out_last,
  output logic     mismatch,
  output logic     busy,
  output logic     rom_ready
);

  logic [AW-1:0] wptr;
  logic          tb_start, tb_busy, tb_done;
  logic          dec_pending, dec_start, dec_busy;
  logic [AW-1:0] surv_raddr, path_raddr;
  dec_vec_t      surv_rdata;
  state_t        path_rdata;
  state_t        rom_raddr, rom_waddr;
  logic [15:0]   rom_rdata, rom_wdata;
  logic          rom_we;
  state_t        start_state_q;

  // ---- survivor memory write side ----
  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      tb_start <= 1'b0;
    end else begin
      tb_start <= 1'b0;
      if (dec_valid) begin
        if (wptr == AW'(DEPTH - 1)) begin
          wptr     <= '0;
          tb_start <= 1'b1;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (dec_valid && wptr == AW'(DEPTH - 1)) start_state_q <= start_state;
  end

  survivor_mem #(.DEPTH(DEPTH), .AW(AW)) u_surv (
    .clk(clk), .we(dec_valid), .waddr(wptr), .wdata(dec),
    .raddr(surv_raddr), .rdata(surv_rdata)
  );

  traceback #(.DEPTH(DEPTH), .AW(AW)) u_tb (
    .clk(clk), .rst(rst), .start(tb_start), .start_state(start_state_q),
    .surv_raddr(surv_raddr), .surv_rdata(surv_rdata),
    .path_raddr(path_raddr), .path_rdata(path_rdata),
    .busy(tb_busy), .done(tb_done)
  );

  // ---- next-state ROM and its loader ----
  rom_loader u_load (
    .clk(clk), .rst(rst), .we(rom_we), .waddr(rom_waddr), .wdata(rom_wdata),
    .ready(rom_ready)
  );

  next_state_rom u_rom (
    .clk(clk), .we(rom_we), .waddr(rom_waddr), .raddr(rom_raddr),
    .data_in(rom_wdata), .data_out(rom_rdata)
  );

  // ---- decode, once the path is known and the ROM is filled ----
  always_ff @(posedge clk) begin
    if (rst)                   dec_pending <= 1'b0;
    else if (tb_done)          dec_pending <= 1'b1;
    else if (dec_start)        dec_pending <= 1'b0;
  end

  assign dec_start = dec_pending && rom_ready;

  decode_block #(.NBITS(NBITS), .AW(AW)) u_dec (
    .clk(clk), .rst(rst), .start(dec_start),
    .path_raddr(path_raddr), .path_rdata(path_rdata),
    .rom_raddr(rom_raddr), .rom_rdata(rom_rdata),
    .out_valid(out_valid), .out_bit(out_bit), .out_last(out_last),
    .mismatch(mismatch), .busy(dec_busy)
  );

  assign busy = tb_start || tb_busy || tb_done || dec_pending || dec_busy || out_valid;

  assert property (@(posedge clk) disable iff (rst) busy && !out_last |-> !dec_valid)
    else $error("smu: decisions arrived while a frame was being traced back");

endmodule
