// tb_acsu: runs three frames of 60 random trellis steps through the ACS unit
// and compares, at every step, all 64 decisions and all 64 new metrics (mod
// 256) with a reference recursion on unwrapped integers. The branch metrics
// come from random soft pairs through the reference metric. Also checks the
// start-of-frame metrics after init, that dec_valid follows bm_valid by one
// cycle, and that steps at the full rate of one per two cycles work.
module tb_acsu;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, init = 0, bm_valid = 0;
  always #5 clk = ~clk;
  bm_vec_t bm;
  logic dec_valid;
  dec_vec_t dec;
  pm_t pm_new [NSTATES];
  int checks = 0, failures = 0;

  acsu dut (.*);

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
    int pm[64], npm[64];
    logic [63:0] exp_dec;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int f = 0; f < 3; f++) begin
      if (f > 0) begin
        @(negedge clk); init = 1;
        @(negedge clk); init = 0;
      end
      for (int s = 0; s < 64; s++) pm[s] = (s == 0) ? 0 : 32;
      for (int t = 0; t < 60; t++) begin
        int r0, r1;
        r0 = $urandom_range(0, 7); r1 = $urandom_range(0, 7);
        if (f == 2) begin r0 = (r0 < 4) ? 0 : 7; end     // hard-limited frame: larger metric growth
        for (int p = 0; p < 4; p++) bm[p] = 4'(ref_bm(r0, r1, 0, 0, 2'(p)));
        for (int ns = 0; ns < 64; ns++) begin
          int pa, pb, ma, mb;
          pa = (ns & 31) << 1; pb = pa | 1;
          ma = pm[pa] + ref_bm(r0, r1, 0, 0, ref_branch(pa, ns[5]));
          mb = pm[pb] + ref_bm(r0, r1, 0, 0, ref_branch(pb, ns[5]));
          exp_dec[ns] = ma > mb;
          npm[ns] = (ma > mb) ? mb : ma;
        end
        bm_valid = 1;
        @(negedge clk);
        bm_valid = 0;
        bm = '0;
        check(dec_valid, "dec_valid one cycle after bm_valid");
        check(dec == exp_dec, $sformatf("frame %0d step %0d decisions", f, t));
        for (int s = 0; s < 64; s++)
          if (int'(pm_new[s]) != (npm[s] % 256)) begin
            check(0, $sformatf("frame %0d step %0d state %0d metric %0d expected %0d", f, t, s, pm_new[s], npm[s] % 256));
            break;
          end
        checks++;
        pm = npm;
        // the write-back cycle: no new step may start in it
        @(negedge clk);
        check(!dec_valid, "dec_valid low between steps");
        if (t % 7 == 3) begin
          @(negedge clk);
          check(!dec_valid, "dec_valid low when idle");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
