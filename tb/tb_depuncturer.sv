// tb_depuncturer: for two frames at each of the five rates, sends the kept
// soft values of random steps, in order, with random gaps on the input and
// random stalls on the output, and checks that each step comes out with the
// values in place and exactly the dropped positions flagged as erasures.
module tb_depuncturer;
  import viterbi_pkg::*;

  localparam int DEPTH = 41;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  rate_t rate = RATE_1_2;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  soft_t in_soft = 0, soft0, soft1;
  logic er0, er1;
  int checks = 0, failures = 0, stalls = 0;

  depuncturer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit keep_bit(int r, int row, int col);
    string r1[5] = '{"1", "10", "101", "10101", "1000101"};
    string r2[5] = '{"1", "11", "110", "11010", "1111010"};
    string s;
    s = (row == 1) ? r1[r] : r2[r];
    return s[col % s.len()] == "1";
  endfunction

  // expected steps
  int exp_s0[$], exp_s1[$];
  bit exp_e0[$], exp_e1[$];
  int got = 0;

  // out_ready changes on the falling edge; a transfer is seen just before the
  // rising edge that makes it
  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 3) != 0);
    #3;
    if (!rst) begin
      if (out_valid && out_ready) begin
        check(exp_s0.size() > 0, "unexpected step");
        if (exp_s0.size() > 0) begin
          check(er0 == exp_e0[0] && er1 == exp_e1[0], $sformatf("step %0d erasures %b%b", got, er0, er1));
          check((exp_e0[0] || soft0 == 3'(exp_s0[0])) && (exp_e1[0] || soft1 == 3'(exp_s1[0])),
                $sformatf("step %0d values %0d %0d exp %0d %0d e %b%b", got, soft0, soft1, exp_s0[0], exp_s1[0], exp_e0[0], exp_e1[0]));
          void'(exp_s0.pop_front()); void'(exp_s1.pop_front());
          void'(exp_e0.pop_front()); void'(exp_e1.pop_front());
          got++;
        end
      end
      if (in_valid && !in_ready) stalls++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals[$];
    repeat (2) @(negedge clk);
    rst = 0;
    for (int fr = 0; fr < 10; fr++) begin
      int rt;
      rt = fr / 2;
      for (int t = 0; t < DEPTH; t++) begin
        int a, b;
        bit k1, k0;
        a = $urandom_range(0, 7); b = $urandom_range(0, 7);
        k1 = keep_bit(rt, 1, t); k0 = keep_bit(rt, 2, t);
        exp_s0.push_back(a); exp_s1.push_back(b);
        exp_e0.push_back(!k1); exp_e1.push_back(!k0);
        if (k1) vals.push_back(a);
        if (k0) vals.push_back(b);
      end
      rate = rate_t'(rt);
      while (vals.size() > 0) begin
        bit fire;
        #1;
        in_valid = ($urandom_range(0, 4) != 0);
        in_soft = 3'(vals[0]);
        #2;
        fire = in_valid && in_ready;      // handshake seen before the rising edge
        @(posedge clk);
        if (fire) void'(vals.pop_front());
        @(negedge clk);
      end
      in_valid = 0;
    end
    repeat (20) @(negedge clk);
    check(got == 10 * DEPTH, $sformatf("%0d steps out", got));
    check(stalls > 0, "output stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
