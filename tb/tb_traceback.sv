// tb_traceback: the survivor memory is modelled in the testbench (random
// decision words, answered on the asynchronous read port). For 20 runs from
// random start states, checks that done comes exactly DEPTH cycles after
// start and that the stored path matches the expected state sequence, built
// by following the decision bits back from the start state.
module tb_traceback;
  import viterbi_pkg::*;

  localparam int DEPTH = 41;
  logic clk = 0, rst = 1, start = 0;
  always #5 clk = ~clk;
  state_t start_state, path_rdata;
  logic [5:0] surv_raddr, path_raddr = 0;
  dec_vec_t surv_rdata;
  logic busy, done;
  dec_vec_t model [DEPTH];
  int checks = 0, failures = 0;

  traceback dut (.*);
  assign surv_rdata = model[surv_raddr];

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
    for (int run = 0; run < 20; run++) begin
      int st, cycles;
      int exp_path[DEPTH];
      for (int t = 0; t < DEPTH; t++) model[t] = {$urandom, $urandom};
      st = (run == 0) ? 0 : $urandom_range(0, 63);
      start_state = 6'(st);
      for (int t = DEPTH - 1; t >= 0; t--) begin
        exp_path[t] = st;
        st = ((st << 1) & 63) | int'(model[t][st]);
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      start_state = 6'($urandom);
      cycles = 0;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      check(cycles == DEPTH, $sformatf("traceback took %0d cycles", cycles));
      @(negedge clk);
      check(!busy && !done, "idle after the trace");
      for (int t = 0; t < DEPTH; t++) begin
        path_raddr = 6'(t); #1;
        check(int'(path_rdata) == exp_path[t], $sformatf("run %0d step %0d state %0d expected %0d", run, t, path_rdata, exp_path[t]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
