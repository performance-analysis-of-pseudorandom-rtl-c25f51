// tb_converter_n8: the 8-bit converter configuration (X^8 + X^6 + X^5 + X^2
// + 1, three feedback XORs, reference word 11111110). Every one of the 255
// code words is converted; the expected position p of a word is the number of
// steps of the direct recurrence X_1' = X_8 ^ X_6 ^ X_5 ^ X_2 from the
// reference word to it, computed here in software. Each conversion must take
// p + 1 cycles, the longest (p = 254) 255 cycles.
module tb_converter_n8;

  logic clk = 1'b0;
  logic rst_n;
  logic [7:0] y, p, sr_state;
  logic p_valid, gamma, zero_hit;
  int checks = 0, failures = 0;
  int cyc = 0;
  int longest = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  serial_pn_converter #(.N(8), .POLY(prbs_pkg::POLY8), .REF(prbs_pkg::REF8)) dut (
    .clk, .rst_n, .y, .p, .p_valid, .gamma, .zero_hit, .sr_state
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] dstep8(input logic [7:0] x);
    return {x[6:0], x[7] ^ x[5] ^ x[4] ^ x[1]};
  endfunction

  task automatic wait_valid(output int at);
    int guard = 0;
    do begin
      @(posedge clk); #1;
      guard++;
    end while (!p_valid && guard < 600);
    at = cyc;
    check(p_valid, "p_valid within 600 cycles");
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] w;
    int t0, t1, t2;
    bit seen [256];
    foreach (seen[i]) seen[i] = 1'b0;
    rst_n = 1'b0;
    w = prbs_pkg::REF8;
    y = w;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 255; k++) begin
      check(!seen[w], "software model repeats a word");
      seen[w] = 1'b1;
      @(negedge clk) y = w;
      wait_valid(t0);
      wait_valid(t1);
      check(p == 8'(k), $sformatf("word %b: got %0d, expected %0d", w, p, k));
      wait_valid(t2);
      check(p == 8'(k), "repeated conversion");
      check(t2 - t1 == k + 1, $sformatf("position %0d: %0d cycles, expected %0d",
                                        k, t2 - t1, k + 1));
      if (t2 - t1 > longest) longest = t2 - t1;
      w = dstep8(w);
    end
    check(w == prbs_pkg::REF8, "software model period 255");
    check(longest == 255, $sformatf("longest conversion %0d cycles, expected 2^8 - 1", longest));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
