// tb_conv_encoder: checks the encoder against the reference shift register
// for 500 random bits with random idle cycles, and the coded output of the
// single-1 impulse, which must spell out the two generators 1111001 and
// 1011011, one tap per step.
module tb_conv_encoder;
  import tb_ref_pkg::*;
  import viterbi_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_bit = 0, code_valid;
  code_t code;
  state_t state;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] r;
    logic [1:0] exp;
    logic [6:0] g1, g2;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // impulse response
    r = '0;
    for (int t = 0; t < 7; t++) begin
      @(negedge clk);
      in_valid = 1; in_bit = (t == 0);
      @(negedge clk);
      in_valid = 0;
      check(code_valid, "code_valid after input");
      g1[6-t] = code[1];
      g2[6-t] = code[0];
    end
    check(g1 == 7'b1111001, $sformatf("impulse on first output %b", g1));
    check(g2 == 7'b1011011, $sformatf("impulse on second output %b", g2));
    check(state == '0, "state back to 0 after six zeros");
    // random stream
    r = '0;
    for (int t = 0; t < 500; t++) begin
      logic b;
      b = 1'($urandom_range(0, 1));
      @(negedge clk);
      in_valid = 1; in_bit = b;
      exp = ref_enc_step(r, b);
      @(negedge clk);
      in_valid = 0;
      check(code_valid && code == exp, $sformatf("step %0d code %b expected %b", t, code, exp));
      check(state == {r[0], r[1], r[2], r[3], r[4], r[5]}, "state holds the last six inputs");
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        check(!code_valid, "code_valid low when idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
