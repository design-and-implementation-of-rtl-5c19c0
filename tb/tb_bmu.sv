// tb_bmu: exhaustive check of the branch metric unit: all 64 soft pairs and
// the four erasure combinations, against the reference metric.
module tb_bmu;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  soft_t i0, i1;
  logic er0, er1;
  bm_vec_t bm;
  int checks = 0, failures = 0;

  bmu dut (.*);

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
    for (int e = 0; e < 4; e++)
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++) begin
          i0 = 3'(a); i1 = 3'(b); er0 = e[0]; er1 = e[1];
          #1;
          for (int p = 0; p < 4; p++)
            check(int'(bm[p]) == ref_bm(a, b, e[0], e[1], 2'(p)),
                  $sformatf("i0=%0d i1=%0d er=%0d pair %0d: %0d", a, b, e, p, bm[p]));
        end
    // the corner points of the symbol plane
    i0 = 0; i1 = 7; er0 = 0; er1 = 0; #1;
    check(bm[2'b01] == 0 && bm[2'b10] == 14, "point (0,7) is at distance 0 from 01 and 14 from 10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
