// tb_next_state_rom: writes the 64-word table computed from the reference
// encoder, reads every word back and compares it with the reference and,
// for eight states, with the published table entries. Also checks that
// while write enable is high the memory address is the write address.
module tb_next_state_rom;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, we = 0;
  always #5 clk = ~clk;
  state_t waddr = 0, raddr = 0;
  logic [15:0] data_in = 0, data_out;
  logic [15:0] exp [64];
  int checks = 0, failures = 0;

  next_state_rom dut (.*);

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
    // {state, {next state, out}} for input 0 and 1, as printed
    logic [21:0] printed [8];
    printed = '{{6'b000000, 8'b00000000, 8'b10000011}, {6'b000011, 8'b00000110, 8'b10000101},
                {6'b001010, 8'b00010110, 8'b10010101}, {6'b010111, 8'b00101101, 8'b10101110},
                {6'b100000, 8'b01000010, 8'b11000001}, {6'b101010, 8'b01010100, 8'b11010111},
                {6'b110011, 8'b01100111, 8'b11100100}, {6'b111111, 8'b01111100, 8'b11111111}};
    for (int s = 0; s < 64; s++) begin
      logic [5:0] n0, n1;
      n0 = {1'b0, 5'(s >> 1)}; n1 = {1'b1, 5'(s >> 1)};
      exp[s] = {n0, ref_branch(s, 1'b0), n1, ref_branch(s, 1'b1)};
    end
    for (int s = 0; s < 64; s++) begin
      @(negedge clk);
      we = 1; waddr = 6'(s); data_in = exp[s]; raddr = 6'(63 - s);
    end
    @(negedge clk);
    we = 0;
    for (int s = 0; s < 64; s++) begin
      raddr = 6'(s); #1;
      check(data_out == exp[s], $sformatf("state %0d word %h expected %h", s, data_out, exp[s]));
    end
    for (int k = 0; k < 8; k++) begin
      raddr = printed[k][21:16]; #1;
      check(data_out == printed[k][15:0], $sformatf("published entry for state %b", printed[k][21:16]));
    end
    // the write address wins while write enable is high
    raddr = 6'd5; waddr = 6'd9; we = 1; data_in = exp[9]; #1;
    check(data_out == exp[9], "address mux selects the write address");
    @(negedge clk); we = 0; #1;
    check(data_out == exp[5], "address mux selects the read address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
