// tb_serial_pn_converter: self-checking testbench of the 6-bit serial
// pseudorandom/natural converter (X^6 + X^5 + 1, reference word 111100).
//
// Expected positions come from the published 63-bit m-sequence: the word
// made of bits p..p+5 of the sequence is p sectors from the reference word.
// For every p = 0..62 the input is held at that word and the test checks:
//   - the converted value equals p, with a one-cycle p_valid pulse;
//   - successive results are p + 1 clock cycles apart (one write cycle plus
//     p shift cycles), the conversion time the converter is specified for;
//   - the worked example 001000 gives p = 7 after 8 cycles.
// After reset the register is all zeros: the test checks that the converter
// leaves it through the all-zero recovery without a valid result.
module tb_serial_pn_converter;

  localparam logic [62:0] SEQ6 =
    63'b111100000100001100010100111101000111001001011011101100110101011;

  logic clk = 1'b0;
  logic rst_n;
  logic [5:0] y, p, sr_state;
  logic p_valid, gamma, zero_hit;
  int checks = 0, failures = 0;
  int cyc = 0;
  int zero_recoveries = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && zero_hit) zero_recoveries <= zero_recoveries + 1;
  end

  serial_pn_converter dut (.clk, .rst_n, .y, .p, .p_valid, .gamma, .zero_hit, .sr_state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [5:0] window(input int start);
    logic [5:0] w;
    for (int i = 0; i < 6; i++) w[5-i] = SEQ6[62 - ((start + i) % 63)];
    return w;
  endfunction

  task automatic wait_valid(output int at);
    int guard = 0;
    do begin
      @(posedge clk); #1;
      guard++;
    end while (!p_valid && guard < 200);
    at = cyc;
    check(p_valid, "p_valid within 200 cycles");
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, t2;
    rst_n = 1'b0;
    y = window(7);
    check(window(7) == 6'b001000, "sequence window 7 is 001000");
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(sr_state == 6'b000000 && zero_hit && !gamma, "all-zero after reset, gamma = 0");
    @(posedge clk); #1;
    check(sr_state == 6'b001000 && gamma, "recovery wrote the code word");
    check(!p_valid, "no valid result from the recovery write");
    check(zero_recoveries == 1, "one recovery cycle");

    // worked example: 001000 -> p = 7 after 8 clock cycles
    wait_valid(t0);
    check(p == 7, $sformatf("worked example: p = %0d, expected 7", p));
    wait_valid(t1);
    check(p == 7, "worked example again");
    check(t1 - t0 == 8, $sformatf("worked example takes %0d cycles, expected 8", t1 - t0));

    for (int k = 0; k < 63; k++) begin
      // the new word is taken at the next gamma = 0 edge; the result after
      // that is the first one for it, the next is one full conversion later
      @(negedge clk) y = window(k);
      wait_valid(t0);   // result of the conversion running when y changed
      wait_valid(t1);
      check(p == 6'(k), $sformatf("position %0d: got %0d", k, p));
      wait_valid(t2);
      check(p == 6'(k), $sformatf("position %0d repeated: got %0d", k, p));
      check(t2 - t1 == k + 1, $sformatf("position %0d: %0d cycles per conversion, expected %0d",
                                        k, t2 - t1, k + 1));
    end
    check(zero_recoveries == 1, "no all-zero state after start-up");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
