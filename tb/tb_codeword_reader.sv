// tb_codeword_reader: self-checking testbench of the single-head code word
// builder. A model track (the published 6-bit m-sequence) is read one bit per
// random-spaced step; after six steps the word must equal the six track bits
// last read, in reading order, and word_valid must rise on the sixth step.
module tb_codeword_reader;

  localparam logic [62:0] SEQ6 =
    63'b111100000100001100010100111101000111001001011011101100110101011;

  logic clk = 1'b0;
  logic rst_n, step, head_bit, word_valid;
  logic [5:0] word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  codeword_reader dut (.clk, .rst_n, .step, .head_bit, .word, .word_valid);

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

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; step = 1'b0; head_bit = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!word_valid, "not valid after reset");
    for (int k = 0; k < 130; k++) begin
      repeat ($urandom_range(0, 4)) @(posedge clk);
      #1;
      step = 1'b1;
      head_bit = SEQ6[62 - (k % 63)];
      @(posedge clk); #1;
      step = 1'b0;
      head_bit = ~head_bit;  // must be ignored without step
      check(word_valid == (k >= 5), $sformatf("word_valid after %0d steps", k + 1));
      if (k >= 5)
        check(word == window(k - 5), $sformatf("word after step %0d: %b expected %b",
                                               k, word, window(k - 5)));
      @(posedge clk); #1;
      if (k >= 5) check(word == window(k - 5), "word holds without step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
