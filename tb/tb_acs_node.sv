// tb_acs_node: random add-compare-select steps, including wrapped metrics
// and ties. The inputs are chosen around a random base so that the two
// candidates differ by less than 100; the expected choice is worked out on
// the unwrapped integer values. Checks that the result appears in the cycle
// after add_en and holds while add_en is low.
module tb_acs_node;
  import viterbi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic add_en = 0;
  pm_t pm_a, pm_b, pm_new;
  bm_t bm_a, bm_b;
  logic decision;
  int checks = 0, failures = 0, ties = 0, wraps = 0;

  acs_node dut (.*);

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
    for (int n = 0; n < 2000; n++) begin
      int base, a, b, ba, bb, sa, sb, exp_pm;
      bit exp_d;
      base = $urandom_range(0, 255);
      a  = base + $urandom_range(0, 40);
      b  = base + $urandom_range(0, 40);
      ba = $urandom_range(0, 14);
      bb = (n % 5 == 0) ? (a + ba - b) : $urandom_range(0, 14);   // force ties
      if (bb < 0 || bb > 14) bb = $urandom_range(0, 14);
      sa = a + ba; sb = b + bb;
      exp_d  = sa > sb;
      exp_pm = (exp_d ? sb : sa) % 256;
      if (sa == sb) ties++;
      if ((sa % 256) < (a % 256) || (sb % 256) < (b % 256) || (sa % 256) / 128 != (sb % 256) / 128) wraps++;
      @(negedge clk);
      pm_a = 8'(a); pm_b = 8'(b); bm_a = 4'(ba); bm_b = 4'(bb); add_en = 1;
      @(negedge clk);
      add_en = 0;
      pm_a = 8'($urandom); pm_b = 8'($urandom);
      check(decision == exp_d, $sformatf("decision %0d+%0d vs %0d+%0d", a, ba, b, bb));
      check(int'(pm_new) == exp_pm, $sformatf("pm_new %0d expected %0d", pm_new, exp_pm));
      @(negedge clk);
      check(int'(pm_new) == exp_pm, "result held without add_en");
    end
    check(ties > 0 && wraps > 0, "ties and wrapped metrics exercised");
    $display("ties %0d, wrapped cases %0d", ties, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
