// tb_smu: six noisy frames. The ACS decisions of each frame come from the
// reference recursion over a noisy encoded frame and are fed one per cycle
// or one per two cycles; the start state is state 0, the best end state or
// a random state. The decoded bits must equal the reference traceback from
// that state; checks the first bit comes DEPTH + 4 cycles after the last
// decision word and that busy covers the whole frame.
module tb_smu;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  localparam int NB = 35, DEPTH = 41;
  logic clk = 0, rst = 1, dec_valid = 0;
  always #5 clk = ~clk;
  dec_vec_t dec;
  state_t start_state;
  logic out_valid, out_bit, out_last, mismatch, busy, rom_ready;
  int checks = 0, failures = 0;

  smu dut (.*);

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
    @(negedge clk); @(negedge clk);
    rst = 0;
    while (!rom_ready) @(negedge clk);
    for (int f = 0; f < 6; f++) begin
      int s0[], s1[], best, st, got, wait_c;
      bit e0[], e1[], bits[], data[];
      logic [63:0] d[];
      logic [6:0] r;
      s0 = new[DEPTH]; s1 = new[DEPTH]; e0 = new[DEPTH]; e1 = new[DEPTH]; data = new[DEPTH];
      r = '0;
      for (int t = 0; t < DEPTH; t++) begin
        logic [1:0] c;
        data[t] = (t < NB) ? bit'($urandom_range(0, 1)) : 1'b0;
        c = ref_enc_step(r, data[t]);
        s0[t] = c[1] ? $urandom_range(3, 7) : $urandom_range(0, 4);
        s1[t] = c[0] ? $urandom_range(3, 7) : $urandom_range(0, 4);
        e0[t] = 0; e1[t] = 0;
      end
      ref_trellis(DEPTH, s0, s1, e0, e1, 32, d, best);
      st = (f % 3 == 0) ? 0 : (f % 3 == 1) ? best : $urandom_range(0, 63);
      ref_traceback(DEPTH, d, st, bits);
      for (int t = 0; t < DEPTH; t++) begin
        @(negedge clk);
        dec_valid = 1; dec = d[t];
        start_state = (t == DEPTH - 1) ? 6'(st) : 6'($urandom);
        if (f % 2 == 1) begin
          @(negedge clk);
          dec_valid = 0;
        end
      end
      @(negedge clk);
      dec_valid = 0;
      start_state = 6'($urandom);
      wait_c = 1;
      while (!out_valid) begin
        check(busy, "busy while the frame is processed");
        @(negedge clk);
        wait_c++;
        if (wait_c > 200) break;
      end
      check(wait_c == DEPTH + 5 - (f % 2), $sformatf("first bit %0d cycles after the last word", wait_c));
      got = 0;
      while (out_valid) begin
        check(out_bit == bits[got], $sformatf("frame %0d bit %0d", f, got));
        check(!mismatch, "no mismatch");
        got++;
        @(negedge clk);
      end
      check(got == NB, $sformatf("%0d bits out", got));
      check(!busy, "not busy after the frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
