// tb_rom_loader: records every write the loader makes after reset and
// checks there are exactly 64, to consecutive addresses from 0, holding the
// table words of the reference encoder, that ready rises after the last one
// and that nothing is written afterwards; then resets it and checks it
// reloads.
module tb_rom_loader;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic we, ready;
  state_t waddr;
  logic [15:0] wdata;
  int checks = 0, failures = 0;

  rom_loader dut (.*);

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
    for (int pass = 0; pass < 2; pass++) begin
      int n;
      rst = 1;
      repeat (3) @(negedge clk);
      check(!we, "no write during reset");
      rst = 0;
      n = 0;
      while (!ready && n < 100) begin
        #1;
        if (we) begin
          logic [15:0] exp;
          exp = {1'b0, 5'(n >> 1), ref_branch(n, 1'b0), 1'b1, 5'(n >> 1), ref_branch(n, 1'b1)};
          check(int'(waddr) == n, $sformatf("write %0d to address %0d", n, waddr));
          check(wdata == exp, $sformatf("word for state %0d: %h expected %h", n, wdata, exp));
          n++;
        end
        @(negedge clk);
      end
      check(n == 64, $sformatf("%0d words written", n));
      repeat (10) begin
        check(ready && !we, "idle and ready afterwards");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
