// tb_ber_sweep: bit-error-rate sweep of the complete link at default sizes.
//
// For code rates 1/2, 2/3 and 3/4 and Eb/N0 from 1 dB to 7 dB in 1 dB steps,
// FRAMES random 35-bit frames are encoded, punctured, sent as antipodal
// samples (amplitude 64) through additive Gaussian noise of standard
// deviation 64 / sqrt(2 * R * Eb/N0), quantised, depunctured and decoded. It
// prints the decoded BER next to the raw channel BER for every point. Every
// decoded frame must equal a reference decoder's result for the same
// quantised values; in addition the BER at 7 dB must be below the BER at 1 dB
// for every rate, and below the raw channel BER at 5 dB and above.
module tb_ber_sweep;
  import tb_ref_pkg::*;

  localparam int NBITS = 35;
  localparam int DEPTH = NBITS + 6;
  localparam int FRAMES = 1000;

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit keep_bit(int rate, int row, int col);
    string r1[3] = '{"1", "10", "101"};
    string r2[3] = '{"1", "11", "110"};
    string r;
    r = (row == 1) ? r1[rate] : r2[rate];
    return r[col % r.len()] == "1";
  endfunction

  function automatic real gauss();
    real a = 0.0;
    for (int k = 0; k < 12; k++) a += real'($urandom_range(0, 65535)) / 65536.0;
    return a - 6.0;
  endfunction

  function automatic int quant(int x);
    int z;
    z = (x >= 0) ? x / 16 : -((-x + 15) / 16);
    if (z < -4) return 0;
    if (z > 3) return 7;
    return z + 4;
  endfunction

  initial begin
    repeat (FRAMES * 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ber [3][8];
    real raw [3][8];
    real rates[3] = '{0.5, 2.0 / 3.0, 0.75};
    string names[3] = '{"1/2", "2/3", "3/4"};
    int sent = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    $display("rate  Eb/N0  decoded BER  channel BER");
    for (int rate = 0; rate < 3; rate++) begin
      for (int db = 1; db <= 7; db++) begin
        int err, raw_err, raw_bits;
        real sigma;
        err = 0; raw_err = 0; raw_bits = 0;
        sigma = 1.0 / $sqrt(2.0 * rates[rate] * (10.0 ** (real'(db) / 10.0)));
        for (int f = 0; f < FRAMES; f++) begin
          bit data[], e0[], e1[], ref_bits[];
          logic [1:0] code[];
          int q0[], q1[], smp[$];
          logic [6:0] r;
          data = new[DEPTH]; code = new[DEPTH]; q0 = new[DEPTH]; q1 = new[DEPTH];
          e0 = new[DEPTH]; e1 = new[DEPTH];
          for (int t = 0; t < DEPTH; t++) data[t] = (t < NBITS) ? bit'($urandom_range(0, 1)) : 1'b0;
          // transmit
          r = '0;
          tx_rate = 3'(rate);
          for (int t = 0; t <= DEPTH + 1; t++) begin
            @(negedge clk);
            if (t > 1) code[t-2] = tx_code;
            tx_valid = (t < DEPTH);
            tx_bit = (t < DEPTH) ? data[t] : 1'b0;
          end
          tx_valid = 0;
          // channel
          for (int t = 0; t < DEPTH; t++) begin
            e0[t] = !keep_bit(rate, 1, t);
            e1[t] = !keep_bit(rate, 2, t);
            q0[t] = 0; q1[t] = 0;
            for (int b = 1; b >= 0; b--) begin
              int a, s;
              if ((b == 1 && e0[t]) || (b == 0 && e1[t])) continue;
              a = (code[t][b] ? 64 : -64) + int'(sigma * 64.0 * gauss());
              s = (a > 127) ? 127 : (a < -128) ? -128 : a;
              smp.push_back(s);
              if (b == 1) q0[t] = quant(s); else q1[t] = quant(s);
              raw_bits++;
              if ((s >= 0) != code[t][b]) raw_err++;
            end
          end
          ref_decode(DEPTH, q0, q1, e0, e1, 32, 1'b0, ref_bits);
          // receive
          rx_rate = 3'(rate);
          while (smp.size() > 0) begin
            @(negedge clk);
            rx_valid = 1;
            rx_sample = 8'(smp[0]);
            while (!rx_ready) @(negedge clk);
            void'(smp.pop_front());
          end
          @(negedge clk);
          rx_valid = 0;
          while (!rx_data_valid) @(negedge clk);
          begin
            bit same;
            same = 1;
            for (int t = 0; t < NBITS; t++) begin
              if (rx_data[t] != ref_bits[t]) same = 0;
              if (rx_data[t] != data[t]) err++;
            end
            check(same, $sformatf("rate %0s %0d dB frame %0d differs from reference decoder", names[rate], db, f));
          end
          sent++;
        end
        ber[rate][db] = real'(err) / real'(FRAMES * NBITS);
        raw[rate][db] = real'(raw_err) / real'(raw_bits);
        $display("%0s   %0d dB   %.5f      %.5f", names[rate], db, ber[rate][db], raw[rate][db]);
      end
      check(ber[rate][7] < ber[rate][1], $sformatf("rate %0s: BER does not fall from 1 dB to 7 dB", names[rate]));
      for (int db = 5; db <= 7; db++)
        check(ber[rate][db] <= raw[rate][db], $sformatf("rate %0s %0d dB: decoding worse than the raw channel", names[rate], db));
    end
    $display("frames decoded %0d", sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
