// tb_output_register: self-checking testbench of the converter's output
// register: q takes d on an edge with we = 1 and holds otherwise; valid
// pulses for the one cycle after a write with valid_in = 1.
module tb_output_register;

  logic clk = 1'b0;
  logic rst_n, we, valid_in, valid;
  logic [5:0] d, q, model_q;
  logic model_v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  output_register dut (.clk, .rst_n, .we, .valid_in, .d, .q, .valid);

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
    rst_n = 1'b0; we = 1'b0; valid_in = 1'b0; d = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(q == 0 && valid == 0, "reset");
    model_q = '0;
    for (int k = 0; k < 1000; k++) begin
      we = ($urandom_range(0, 3) == 0);
      valid_in = $urandom_range(0, 1) == 1;
      d = 6'($urandom);
      @(posedge clk); #1;
      if (we) model_q = d;
      model_v = we & valid_in;
      check(q == model_q, $sformatf("cycle %0d: q %0d expected %0d", k, q, model_q));
      check(valid == model_v, $sformatf("cycle %0d: valid", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
