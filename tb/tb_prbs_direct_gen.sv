// tb_prbs_direct_gen: self-checking testbench of the direct PRBS generator.
//
// 6-bit generator (X^6 + X^5 + 1) from reference state 111100: the bit at FF_6
// must reproduce, bit for bit, the published 63-bit m-sequence for that
// polynomial and state; the states must begin 111100, 111000, 110000, 100000,
// 000001 and end 111111, 111110; all 63 states must differ and the register
// must return to 111100 after exactly 63 steps. Enable and load are checked.
// An 8-bit instance (X^8 + X^6 + X^5 + X^2 + 1) must have period 255 and
// match an independent software model of the recurrence.
module tb_prbs_direct_gen;

  localparam logic [62:0] SEQ6 =
    63'b111100000100001100010100111101000111001001011011101100110101011;

  logic clk = 1'b0;
  logic rst_n;
  logic load, en;
  logic [5:0] seed, state;
  logic prbs;
  logic [7:0] state8;
  logic prbs8;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  prbs_direct_gen dut (
    .clk, .rst_n, .load, .seed, .en, .state, .prbs
  );

  prbs_direct_gen #(.N(8), .POLY(prbs_pkg::POLY8), .SEED(8'h01)) dut8 (
    .clk, .rst_n, .load(1'b0), .seed(8'h00), .en, .state(state8), .prbs(prbs8)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Software model of the 8-bit recurrence: new X_1 = X_8 ^ X_6 ^ X_5 ^ X_2.
  function automatic logic [7:0] step8(input logic [7:0] x);
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
    bit seen6 [64];
    bit seen8 [256];
    logic [7:0] m8;
    int period8;
    rst_n = 1'b0; load = 1'b0; en = 1'b0; seed = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(state == 6'b111100, "reset state is SEED 111100");
    check(state8 == 8'h01, "8-bit reset state");

    // hold with en = 0
    @(posedge clk); #1;
    check(state == 6'b111100, "state holds with en = 0");

    // one full period, compare bit stream with the published sequence
    foreach (seen6[i]) seen6[i] = 1'b0;
    en = 1'b1;
    m8 = 8'h01;
    for (int k = 0; k < 63; k++) begin
      check(prbs == SEQ6[62-k], $sformatf("PRBS bit %0d", k));
      check(!seen6[state], $sformatf("state %b repeats at step %0d", state, k));
      seen6[state] = 1'b1;
      if (k == 1) check(state == 6'b111000, "state 1 = 111000");
      if (k == 2) check(state == 6'b110000, "state 2 = 110000");
      if (k == 3) check(state == 6'b100000, "state 3 = 100000");
      if (k == 4) check(state == 6'b000001, "state 4 = 000001");
      if (k == 61) check(state == 6'b111111, "state 61 = 111111");
      if (k == 62) check(state == 6'b111110, "state 62 = 111110");
      check(state8 == m8, $sformatf("8-bit state at step %0d", k));
      m8 = step8(m8);
      @(posedge clk); #1;
    end
    check(state == 6'b111100, "back to 111100 after 63 steps");
    check(!seen6[0], "all-zero state never entered");

    // load
    en = 1'b0; load = 1'b1; seed = 6'b001000;
    @(posedge clk); #1;
    load = 1'b0;
    check(state == 6'b001000, "load writes seed");
    en = 1'b1;
    @(posedge clk); #1;
    check(state == 6'b010000, "step after load: 001000 -> 010000");

    // 8-bit period: free-running continues; measure distance back to start
    foreach (seen8[i]) seen8[i] = 1'b0;
    m8 = state8;
    period8 = 0;
    do begin
      check(!seen8[state8], "8-bit state repeats early");
      seen8[state8] = 1'b1;
      @(posedge clk); #1;
      period8++;
    end while (state8 != m8 && period8 < 300);
    check(period8 == 255, $sformatf("8-bit period %0d, expected 255", period8));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
