// tb_conv_counter: self-checking testbench of the converter's cycle counter.
//
// Random clear pattern against a reference count: the count is 0 the cycle
// after a clear and grows by one on every other edge, wrapping at 2^6.
module tb_conv_counter;

  logic clk = 1'b0;
  logic rst_n, clr;
  logic [5:0] count;
  logic [5:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  conv_counter dut (.clk, .rst_n, .clr, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clr = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    model = '0;
    check(count == 0, "reset to 0");
    for (int k = 0; k < 1000; k++) begin
      clr = (k < 200) ? 1'b0 : ($urandom_range(0, 15) == 0);
      @(posedge clk); #1;
      model = clr ? 6'd0 : 6'(model + 1);
      check(count == model, $sformatf("cycle %0d: count %0d expected %0d", k, count, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
