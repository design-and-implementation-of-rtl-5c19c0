// tb_viterbi_decoder: drives soft values straight into two decoders, the
// default one (zero-terminated frames, traceback from state 0) and one with
// TERMINATED = 0 (traceback from the best end state, frames without a zero
// tail). Ten noisy frames each, some with erasures; every decoded frame must
// equal the reference decoder's result for the same soft values. Also checks
// the step rate, the refusal of steps beyond a frame and the latency.
module tb_viterbi_decoder;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  localparam int NB = 35, DEPTH = 41;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic  in_valid = 0;
  soft_t sa0, sa1, sb0, sb1;
  logic  er0 = 0, er1 = 0;
  logic  rdy_a, rdy_b;
  logic  ov_a, ob_a, ol_a, mm_a, ov_b, ob_b, ol_b, mm_b;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  viterbi_decoder dut_a (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(rdy_a),
    .soft0(sa0), .soft1(sa1), .er0(er0), .er1(er1),
    .out_valid(ov_a), .out_bit(ob_a), .out_last(ol_a), .mismatch(mm_a));

  viterbi_decoder #(.TERMINATED(1'b0)) dut_b (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(rdy_b),
    .soft0(sb0), .soft1(sb1), .er0(er0), .er1(er1),
    .out_valid(ov_b), .out_bit(ob_b), .out_last(ol_b), .mismatch(mm_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int f = 0; f < 10; f++) begin
      int a0[], a1[], b0[], b1[], last_take, prev, got;
      bit e0[], e1[], ra[], rb[];
      logic [6:0] r, q;
      a0 = new[DEPTH]; a1 = new[DEPTH]; b0 = new[DEPTH]; b1 = new[DEPTH];
      e0 = new[DEPTH]; e1 = new[DEPTH];
      r = '0; q = '0;
      for (int t = 0; t < DEPTH; t++) begin
        logic [1:0] ca, cb;
        bit da, db;
        da = (t < NB) ? bit'($urandom_range(0, 1)) : 1'b0;
        db = bit'($urandom_range(0, 1));
        ca = ref_enc_step(r, da);
        cb = ref_enc_step(q, db);
        a0[t] = ca[1] ? $urandom_range(2, 7) : $urandom_range(0, 5);
        a1[t] = ca[0] ? $urandom_range(2, 7) : $urandom_range(0, 5);
        b0[t] = cb[1] ? $urandom_range(2, 7) : $urandom_range(0, 5);
        b1[t] = cb[0] ? $urandom_range(2, 7) : $urandom_range(0, 5);
        e0[t] = (f % 3 == 2) && (t % 3 == 1);
        e1[t] = (f % 3 == 2) && (t % 3 == 2);
      end
      ref_decode(DEPTH, a0, a1, e0, e1, 32, 1'b0, ra);
      ref_decode(DEPTH, b0, b1, e0, e1, 32, 1'b1, rb);
      prev = -1;
      for (int t = 0; t < DEPTH; t++) begin
        @(negedge clk);
        in_valid = 1;
        sa0 = 3'(a0[t]); sa1 = 3'(a1[t]); sb0 = 3'(b0[t]); sb1 = 3'(b1[t]);
        er0 = e0[t]; er1 = e1[t];
        while (!rdy_a) @(negedge clk);
        check(rdy_b, "both decoders ready together");
        if (prev >= 0) check(cyc - prev == 2, "one step per two cycles");
        prev = cyc;
      end
      last_take = cyc;
      @(negedge clk);
      check(!rdy_a && !rdy_b, "steps beyond the frame refused");
      in_valid = 0; er0 = 0; er1 = 0;
      while (!ov_a) @(negedge clk);
      check(cyc - last_take == DEPTH + 8, $sformatf("latency %0d", cyc - last_take));
      got = 0;
      while (ov_a) begin
        check(ov_b, "second decoder in step");
        check(ob_a == ra[got], $sformatf("frame %0d terminated decoder bit %0d", f, got));
        check(ob_b == rb[got], $sformatf("frame %0d best-state decoder bit %0d", f, got));
        check(ol_a == (got == NB - 1), "out_last");
        check(!mm_a && !mm_b, "no mismatch");
        got++;
        @(negedge clk);
      end
      check(got == NB, "35 bits per frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
