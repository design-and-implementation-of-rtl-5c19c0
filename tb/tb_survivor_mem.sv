// tb_survivor_mem: writes random 64-bit decision words to all 41 locations,
// reads them all back through the asynchronous port, then overwrites a
// random subset and checks that only those changed.
module tb_survivor_mem;
  import viterbi_pkg::*;

  logic clk = 0, we = 0;
  always #5 clk = ~clk;
  logic [5:0] waddr = 0, raddr = 0;
  dec_vec_t wdata, rdata;
  dec_vec_t model [41];
  int checks = 0, failures = 0;

  survivor_mem dut (.*);

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
    for (int a = 0; a < 41; a++) begin
      @(negedge clk);
      model[a] = {$urandom, $urandom};
      we = 1; waddr = 6'(a); wdata = model[a];
    end
    @(negedge clk); we = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < 41; a++) begin
        raddr = 6'(a); #1;
        check(rdata == model[a], $sformatf("pass %0d address %0d", pass, a));
      end
      for (int k = 0; k < 10; k++) begin
        int a;
        a = $urandom_range(0, 40);
        @(negedge clk);
        model[a] = {$urandom, $urandom};
        we = 1; waddr = 6'(a); wdata = model[a];
        @(negedge clk); we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
