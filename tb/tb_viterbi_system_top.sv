// tb_viterbi_system_top: end-to-end test of the coded link at default sizes.
//
// Random 35-bit frames plus a six-bit zero tail go through the transmit
// side at each of the five code rates; every coded pair and keep mask is
// checked against the reference encoder and the puncturing matrices. The
// kept bits are sent c1 first, mapped to +/-64, disturbed by Gaussian noise
// of several strengths and fed one sample per transfer to the receive side.
// Each decoded frame is compared bit for bit with a reference Viterbi
// decoder working on the same quantised values and erasures, and with the
// data sent where the channel was clean. Also counted, and required to
// happen: receive back-pressure, erasures reaching the decoder, channel
// errors corrected, frame restarts, and frames at every rate.
module tb_viterbi_system_top;
  import tb_ref_pkg::*;

  localparam int NBITS = 35;
  localparam int DEPTH = NBITS + 6;
  localparam int NFRAMES = 30;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [2:0] tx_rate = 0, rx_rate = 0;
  logic tx_valid = 0, tx_bit = 0, tx_code_valid;
  logic [1:0] tx_code, tx_keep;
  logic rx_valid = 0, rx_ready;
  logic signed [7:0] rx_sample = 0;
  logic rx_bit_valid, rx_bit, rx_mismatch, rx_data_valid;
  logic [NBITS-1:0] rx_data;

  viterbi_system_top dut (
    .clk, .rst,
    .tx_rate(viterbi_pkg::rate_t'(tx_rate)), .tx_valid, .tx_bit, .tx_code_valid, .tx_code, .tx_keep,
    .rx_rate(viterbi_pkg::rate_t'(rx_rate)), .rx_valid, .rx_ready, .rx_sample,
    .rx_bit_valid, .rx_bit, .rx_mismatch, .rx_data_valid, .rx_data);

  int checks = 0, failures = 0;

  // mechanism counters
  int n_stall = 0, n_erased = 0, n_corrected = 0, n_frames = 0, n_restart = 0, n_mismatch = 0;
  int n_rate[5];

  always @(posedge clk) begin
    if (rx_valid && !rx_ready) n_stall++;
    if (rx_bit_valid && rx_mismatch) n_mismatch++;
    if (dut.dp_valid && dut.vd_ready && (dut.er0 || dut.er1)) n_erased++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Puncturing matrices, rows as printed (row 1 for c1, row 2 for c0).
  function automatic bit keep_bit(int rate, int row, int col);
    string r1[5] = '{"1", "10", "101", "10101", "1000101"};
    string r2[5] = '{"1", "11", "110", "11010", "1111010"};
    string r;
    r = (row == 1) ? r1[rate] : r2[rate];
    return r[col % r.len()] == "1";
  endfunction

  function automatic real gauss();
    real a = 0.0;
    for (int k = 0; k < 12; k++) a += real'($urandom_range(0, 65535)) / 65536.0;
    return a - 6.0;
  endfunction

  function automatic int quant(int x);   // 8 equal zones of 16 between -64 and +64
    int z;
    z = (x >= 0) ? x / 16 : -((-x + 15) / 16);
    if (z < -4) return 0;
    if (z > 3) return 7;
    return z + 4;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The receive side runs on its own, fed from a queue of frames.
  int   rxq_smp[$];
  int   frames_sent = 0;

  initial begin
    bit data[];
    logic [1:0] code[];
    int q0[], q1[];
    bit e0[], e1[], ref_bits[];
    logic [6:0] r;
    int hard_err, rate;
    real sigma;

    repeat (4) @(negedge clk);
    rst = 0;

    for (int f = 0; f < NFRAMES; f++) begin
      data = new[DEPTH]; code = new[DEPTH];
      q0 = new[DEPTH]; q1 = new[DEPTH]; e0 = new[DEPTH]; e1 = new[DEPTH];
      for (int t = 0; t < DEPTH; t++) data[t] = (t < NBITS) ? bit'($urandom_range(0, 1)) : 1'b0;
      rate = f % 5;
      case ((f / 5) % 6)
        0: sigma = 0.0;
        1: sigma = 0.3;
        2: sigma = 0.45;
        3: sigma = 0.6;
        4: sigma = 0.9;
        default: sigma = 0.2;
      endcase
      n_rate[rate]++;

      // ---- transmit: one bit per cycle ----
      r = '0;
      tx_rate = 3'(rate);
      // the coded pair of a bit appears two cycles after it (encoder, puncturer)
      for (int t = 0; t <= DEPTH + 1; t++) begin
        @(negedge clk);
        if (t > 1) begin
          bit k1, k0;
          k1 = keep_bit(rate, 1, t - 2);
          k0 = keep_bit(rate, 2, t - 2);
          check(tx_code_valid === 1'b1, "coded pair valid");
          code[t-2] = tx_code;
          check(tx_code == ref_enc_step(r, data[t-2]), $sformatf("encoder output frame %0d step %0d", f, t - 2));
          check(tx_keep == {k1, k0}, $sformatf("keep mask frame %0d rate %0d step %0d: %b", f, rate, t - 2, tx_keep));
        end
        tx_valid = (t < DEPTH);
        tx_bit = (t < DEPTH) ? data[t] : 1'b0;
      end
      tx_valid = 0;

      // ---- channel ----
      hard_err = 0;
      for (int t = 0; t < DEPTH; t++) begin
        e0[t] = !keep_bit(rate, 1, t);
        e1[t] = !keep_bit(rate, 2, t);
        q0[t] = 0; q1[t] = 0;
        for (int b = 1; b >= 0; b--) begin
          int a, smp;
          if ((b == 1 && e0[t]) || (b == 0 && e1[t])) continue;
          a = (code[t][b] ? 64 : -64) + int'(sigma * 64.0 * gauss());
          smp = (a > 127) ? 127 : (a < -128) ? -128 : a;
          rxq_smp.push_back(smp);
          if (b == 1) q0[t] = quant(smp); else q1[t] = quant(smp);
          if ((quant(smp) >= 4) != code[t][b]) hard_err++;
        end
      end
      ref_decode(DEPTH, q0, q1, e0, e1, 32, 1'b0, ref_bits);
      rx_rate = 3'(rate);
      frames_sent++;

      // ---- receive: samples, one per accepted transfer ----
      while (rxq_smp.size() > 0) begin
        @(negedge clk);
        rx_valid = 1;
        rx_sample = 8'(rxq_smp[0]);
        while (!rx_ready) @(negedge clk);
        void'(rxq_smp.pop_front());
      end
      @(negedge clk);
      rx_valid = 0;

      while (!rx_data_valid) @(negedge clk);
      begin
        bit ok_ref, ok_data;
        ok_ref = 1; ok_data = 1;
        for (int t = 0; t < NBITS; t++) begin
          if (rx_data[t] != ref_bits[t]) ok_ref = 0;
          if (rx_data[t] != data[t]) ok_data = 0;
        end
        check(ok_ref, $sformatf("frame %0d (sigma %.2f, rate %0d) differs from reference decoder", f, sigma, rate));
        if (sigma == 0.0) check(ok_data, $sformatf("clean frame %0d not decoded to the data sent", f));
        if (ok_data && hard_err > 0) n_corrected++;
        $display("frame %0d rate %0s sigma %.2f: channel bit errors %0d, data %0s", f,
                 rate == 0 ? "1/2" : rate == 1 ? "2/3" : rate == 2 ? "3/4" : rate == 3 ? "5/6" : "7/8",
                 sigma, hard_err, ok_data ? "recovered" : "not recovered");
      end
      n_frames++;
      if (f > 0) n_restart++;
    end

    check(n_stall > 0, "back-pressure never happened");
    check(n_erased > 0, "no erasures reached the decoder");
    check(n_corrected > 0, "no channel error was corrected");
    check(n_restart > 0, "no frame restart happened");
    for (int k = 0; k < 5; k++) check(n_rate[k] > 0, "a code rate was never used");
    check(n_mismatch == 0, "decode block reported a path mismatch");
    $display("frames %0d, stall cycles %0d, steps with erasures %0d, frames corrected %0d, restarts %0d",
             n_frames, n_stall, n_erased, n_corrected, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
