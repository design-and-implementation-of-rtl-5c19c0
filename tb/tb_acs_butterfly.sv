// tb_acs_butterfly: random butterflies. Node p must choose between
// pm_i + bm_ip and pm_j + bm_jp, node q between pm_i + bm_jp and
// pm_j + bm_ip, the predecessor with the smaller sum (i on a tie).
module tb_acs_butterfly;
  import viterbi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic add_en = 0;
  pm_t pm_i, pm_j, pm_p, pm_q;
  bm_t bm_ip, bm_jp;
  logic dec_p, dec_q;
  int checks = 0, failures = 0;

  acs_butterfly dut (.*);

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
      int i, j, bip, bjp, p0, p1, q0, q1;
      i = $urandom_range(0, 60); j = $urandom_range(0, 60);
      bip = $urandom_range(0, 14); bjp = $urandom_range(0, 14);
      p0 = i + bip; p1 = j + bjp; q0 = i + bjp; q1 = j + bip;
      @(negedge clk);
      pm_i = 8'(i); pm_j = 8'(j); bm_ip = 4'(bip); bm_jp = 4'(bjp); add_en = 1;
      @(negedge clk);
      add_en = 0;
      check(dec_p == (p0 > p1) && int'(pm_p) == ((p0 > p1) ? p1 : p0), $sformatf("node p, i=%0d j=%0d bip=%0d bjp=%0d", i, j, bip, bjp));
      check(dec_q == (q0 > q1) && int'(pm_q) == ((q0 > q1) ? q1 : q0), $sformatf("node q, i=%0d j=%0d bip=%0d bjp=%0d", i, j, bip, bjp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
