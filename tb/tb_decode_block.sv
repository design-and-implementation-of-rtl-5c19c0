// tb_decode_block: the ML path memory and the next-state ROM are modelled in
// the testbench. For 20 random frames the path is the encoder state sequence
// of 35 random data bits and a zero tail; the block must return the 35 data
// bits in order, one per clock, the first two cycles after start, with out_last on
// the 35th and no mismatch. One more frame has a path state that cannot
// follow its predecessor, which must raise mismatch on that bit.
module tb_decode_block;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  localparam int NB = 35, DEPTH = 41;
  logic clk = 0, rst = 1, start = 0;
  always #5 clk = ~clk;
  logic [5:0] path_raddr;
  state_t path_rdata, rom_raddr;
  logic [15:0] rom_rdata;
  logic out_valid, out_bit, out_last, mismatch, busy;
  state_t path [DEPTH];
  int checks = 0, failures = 0;

  decode_block dut (.*);
  assign path_rdata = path[path_raddr];
  always_comb begin
    rom_rdata = {1'b0, rom_raddr[5:1], ref_branch(int'(rom_raddr), 1'b0),
                 1'b1, rom_raddr[5:1], ref_branch(int'(rom_raddr), 1'b1)};
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_mis;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int run = 0; run <= 20; run++) begin
      bit data[DEPTH];
      int st, got, bad_t;
      st = 0;
      for (int t = 0; t < DEPTH; t++) begin
        data[t] = (t < NB) ? bit'($urandom_range(0, 1)) : 1'b0;
        st = (int'(data[t]) << 5) | (st >> 1);
        path[t] = 6'(st);
      end
      bad_t = -1;
      if (run == 20) begin
        bad_t = 17;
        path[bad_t] = path[bad_t] ^ 6'b010000;     // not a successor of path[16]
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      @(negedge clk);
      got = 0; n_mis = 0;
      while (got < NB) begin
        check(out_valid, $sformatf("run %0d: bit %0d not on time", run, got));
        if (!out_valid) break;
        if (mismatch) n_mis++;
        if (got != bad_t && got != bad_t + 1)
          check(out_bit == data[got], $sformatf("run %0d bit %0d", run, got));
        if (got == bad_t) check(mismatch, "mismatch on the broken step");
        check(out_last == (got == NB - 1), "out_last on the last bit only");
        got++;
        @(negedge clk);
      end
      check(!out_valid && !busy, "idle after the frame");
      if (run < 20) check(n_mis == 0, "no mismatch on a valid path");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
