// tb_gamma_detect: exhaustive self-checking testbench of the gamma detector.
//
// Every 6-bit state with reference 111100 and every 8-bit state with
// reference 11111110: gamma must be 0 exactly for the reference word and for
// all zeros, ref_hit and zero_hit must flag those two words alone.
module tb_gamma_detect;

  logic [5:0] s6;
  logic g6, r6, z6;
  logic [7:0] s8;
  logic g8, r8, z8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  gamma_detect dut6 (.state(s6), .gamma(g6), .ref_hit(r6), .zero_hit(z6));
  gamma_detect #(.N(8), .REF(prbs_pkg::REF8)) dut8 (
    .state(s8), .gamma(g8), .ref_hit(r8), .zero_hit(z8)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      s6 = 6'(v);
      #1;
      check(r6 == (v == 'b111100), $sformatf("ref_hit for %b", s6));
      check(z6 == (v == 0), $sformatf("zero_hit for %b", s6));
      check(g6 == !(v == 'b111100 || v == 0), $sformatf("gamma for %b", s6));
    end
    for (int v = 0; v < 256; v++) begin
      s8 = 8'(v);
      #1;
      check(r8 == (v == 'b11111110), $sformatf("8-bit ref_hit for %b", s8));
      check(z8 == (v == 0), $sformatf("8-bit zero_hit for %b", s8));
      check(g8 == !(v == 'b11111110 || v == 0), $sformatf("8-bit gamma for %b", s8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
