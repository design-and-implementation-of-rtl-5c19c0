// tb_min_metric_select: random sets of 64 path metrics spread over less
// than 128 around a random base (so some sets wrap past 255), with forced
// ties; the expected state is the lowest-numbered one with the smallest
// unwrapped metric.
module tb_min_metric_select;
  import viterbi_pkg::*;

  pm_t pm [NSTATES];
  state_t best_state;
  pm_t best_pm;
  int checks = 0, failures = 0;

  min_metric_select dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int base, v[64], best;
      base = $urandom_range(0, 255);
      for (int s = 0; s < 64; s++) v[s] = base + $urandom_range(0, 100);
      if (n % 3 == 0) v[$urandom_range(0, 63)] = base;     // ties at the minimum
      if (n % 3 == 0) v[$urandom_range(0, 63)] = base;
      best = 0;
      for (int s = 1; s < 64; s++) if (v[s] < v[best]) best = s;
      for (int s = 0; s < 64; s++) pm[s] = 8'(v[s]);
      #1;
      check(int'(best_state) == best, $sformatf("set %0d: state %0d expected %0d", n, best_state, best));
      check(int'(best_pm) == v[best] % 256, "best metric");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
