// tb_soft_demod: exhaustive check of the 3-bit quantiser over all 256 8-bit
// samples against zone boundaries computed with real arithmetic, plus the
// two nominal points: -64 must read "most confident 0" (0) and +64 "most
// confident 1" (7).
module tb_soft_demod;
  import viterbi_pkg::*;

  logic signed [7:0] sample;
  soft_t level;
  int checks = 0, failures = 0;

  soft_demod dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++) begin
      int exp;
      real z;
      sample = 8'(x);
      #1;
      z = $floor(real'(x) / 16.0) + 4.0;
      exp = (z < 0.0) ? 0 : (z > 7.0) ? 7 : int'(z);
      check(int'(level) == exp, $sformatf("sample %0d level %0d expected %0d", x, level, exp));
    end
    sample = -8'sd64; #1; check(level == 3'd0, "nominal 0");
    sample = 8'sd64;  #1; check(level == 3'd7, "nominal 1");
    sample = 8'sd0;   #1; check(level == 3'd4, "zero reads least confident 1");
    sample = -8'sd1;  #1; check(level == 3'd3, "just below zero reads least confident 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
