// tb_puncturer: feeds random coded pairs, with idle gaps, for two frames at
// each of the five rates and checks that every pair comes out one cycle
// later unchanged, with the keep mask of the printed puncturing matrix,
// restarting at column 0 at each frame; also checks that a rate change in the
// middle of a frame waits for the next frame.
module tb_puncturer;
  import viterbi_pkg::*;

  localparam int DEPTH = 41;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  rate_t rate = RATE_1_2;
  logic code_valid = 0, out_valid;
  code_t code = 0, out_code;
  logic [1:0] keep;
  int checks = 0, failures = 0;

  puncturer dut (.*);

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
    for (int fr = 0; fr < 10; fr++) begin
      int rt;
      rt = fr / 2;
      for (int t = 0; t < DEPTH; t++) begin
        code_t c;
        c = 2'($urandom);
        @(negedge clk);
        code_valid = 1; code = c;
        rate = (t == 0) ? rate_t'(rt) : rate_t'((rt + 1 + t) % 5);   // only t == 0 counts
        @(negedge clk);
        code_valid = 0;
        check(out_valid && out_code == c, "pair passed through");
        check(keep == {keep_bit(rt, 1, t), keep_bit(rt, 2, t)},
              $sformatf("frame %0d rate %0d step %0d keep %b", fr, rt, t, keep));
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          check(!out_valid, "no output when idle");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
