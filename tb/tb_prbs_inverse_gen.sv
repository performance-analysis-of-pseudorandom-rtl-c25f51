// tb_prbs_inverse_gen: self-checking testbench of the inverse PRBS generator.
//
// 6-bit generator loaded with 111100: the FF_1 input must reproduce the
// published 63-bit inverse sequence (the mirror image of the direct one), the
// states must begin 111100, 111110, 111111, 011111, 101111, 010111, 101011 and
// end 100000, 110000, 111000, returning to 111100 after 63 steps. Reset must
// give all zeros, and all zeros must persist while shifting. An 8-bit instance
// must visit the direct generator's states in reverse order (checked against
// a software model of the direct recurrence) with period 255.
module tb_prbs_inverse_gen;

  localparam logic [62:0] INV6 =
    63'b110101011001101110110100100111000101111001010001100001000001111;

  logic clk = 1'b0;
  logic rst_n;
  logic load;
  logic [5:0] load_word, state;
  logic prbs_inv;
  logic load8;
  logic [7:0] load_word8, state8;
  logic prbs_inv8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prbs_inverse_gen dut (.clk, .rst_n, .load, .load_word, .state, .prbs_inv);
  prbs_inverse_gen #(.N(8), .POLY(prbs_pkg::POLY8)) dut8 (
    .clk, .rst_n, .load(load8), .load_word(load_word8), .state(state8), .prbs_inv(prbs_inv8)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // direct 8-bit recurrence on X_8..X_1; the same word read as Y_1..Y_8 is the
  // inverse generator's state.
  function automatic logic [7:0] dstep8(input logic [7:0] x);
    return {x[6:0], x[7] ^ x[5] ^ x[4] ^ x[1]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] dseq [255];
    rst_n = 1'b0; load = 1'b0; load_word = '0; load8 = 1'b0; load_word8 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(state == '0 && state8 == '0, "reset clears to all zeros");
    repeat (3) @(posedge clk);
    #1 check(state == '0, "all-zero state cannot be left by shifting");

    load = 1'b1; load_word = 6'b111100;
    @(posedge clk); #1;
    load = 1'b0;
    check(state == 6'b111100, "load 111100");
    for (int k = 0; k < 63; k++) begin
      check(prbs_inv == INV6[62-k], $sformatf("inverse PRBS bit %0d", k));
      if (k == 1) check(state == 6'b111110, "state 1 = 111110");
      if (k == 2) check(state == 6'b111111, "state 2 = 111111");
      if (k == 3) check(state == 6'b011111, "state 3 = 011111");
      if (k == 4) check(state == 6'b101111, "state 4 = 101111");
      if (k == 5) check(state == 6'b010111, "state 5 = 010111");
      if (k == 6) check(state == 6'b101011, "state 6 = 101011");
      if (k == 60) check(state == 6'b100000, "state 60 = 100000");
      if (k == 61) check(state == 6'b110000, "state 61 = 110000");
      if (k == 62) check(state == 6'b111000, "state 62 = 111000");
      @(posedge clk); #1;
    end
    check(state == 6'b111100, "back to 111100 after 63 steps");

    // the worked example's walk from 001000
    load = 1'b1; load_word = 6'b001000;
    @(posedge clk); #1;
    load = 1'b0;
    begin
      logic [5:0] walk [8] = '{6'b001000, 6'b000100, 6'b000010, 6'b000001,
                               6'b100000, 6'b110000, 6'b111000, 6'b111100};
      for (int k = 0; k < 8; k++) begin
        check(state == walk[k], $sformatf("walk from 001000, step %0d: %b", k, state));
        @(posedge clk); #1;
      end
    end

    // 8-bit: reverse of the direct state sequence
    dseq[0] = 8'b1111_1110;
    for (int k = 1; k < 255; k++) dseq[k] = dstep8(dseq[k-1]);
    check(dstep8(dseq[254]) == dseq[0], "software model period 255");
    load8 = 1'b1; load_word8 = dseq[0];
    @(posedge clk); #1;
    load8 = 1'b0;
    for (int k = 1; k <= 255; k++) begin
      @(posedge clk); #1;
      check(state8 == dseq[(255 - k) % 255],
            $sformatf("8-bit inverse step %0d: %b", k, state8));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
