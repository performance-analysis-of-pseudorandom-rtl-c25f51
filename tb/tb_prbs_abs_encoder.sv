// tb_prbs_abs_encoder: end-to-end testbench of the 6-bit encoder electronics
// at its default parameters (X^6 + X^5 + 1, reference word 111100).
//
// A model disk carries the published 63-bit m-sequence, one bit per sector;
// sector j's code word is bits j..j+5, so sector j is p = j sectors from the
// reference sector. The disk turns at a constant rate with a sector lasting
// SECTOR cycles and the head reports bit j+5 on entering sector j.
// Phases:
//   1. reset: the converter must leave the all-zero state (recovery seen);
//   2. two revolutions at SECTOR = 63 = 2^6 - 1 cycles, the fastest rotation
//      at which every sector is still converted; every result must equal
//      the position of the word loaded for it, and every sector of the
//      second revolution must be reported with its own number;
//   3. one revolution at a slower rate (SECTOR = 100);
//   4. track_sel = 1: the on-chip direct generator replaces the head; the
//      results must again equal the position of each converted word.
// Mechanisms counted: all-zero recovery, finished conversions, a conversion
// of the reference word itself (p = 0), the longest conversion (p = 62, 63
// cycles), and both track sources. Any that never happens is a failure.
module tb_prbs_abs_encoder;

  localparam logic [62:0] SEQ6 =
    63'b111100000100001100010100111101000111001001011011101100110101011;

  logic clk = 1'b0;
  logic rst_n, sector_step, head_bit, track_sel;
  logic [5:0] codeword, position;
  logic codeword_valid, position_valid, gamma, zero_recover;
  int checks = 0, failures = 0;
  int cyc = 0;

  // independent position table: word -> index in the sequence
  int pos_of [64];

  // monitor state
  logic [5:0] loaded_word, result_word;
  bit         loaded_ok, result_ok;
  int         last_load_cyc;
  int         n_recover = 0, n_conv = 0, n_p0 = 0, n_pmax = 0, n_head = 0, n_gen = 0;
  int         longest = 0;
  bit         reported [63];

  always #5 clk = ~clk;

  prbs_abs_encoder dut (
    .clk, .rst_n, .sector_step, .head_bit, .track_sel,
    .codeword, .codeword_valid, .position, .position_valid, .gamma, .zero_recover
  );

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

  // Converter monitor: a word is taken on every edge with gamma = 0; the
  // result of that conversion appears with the next position_valid.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (zero_recover) n_recover++;
      if (position_valid) begin
        n_conv++;
        if (result_ok) begin
          check(int'(position) == pos_of[result_word],
                $sformatf("cycle %0d: word %b converted to %0d, expected %0d",
                          cyc, result_word, position, pos_of[result_word]));
          reported[position] = 1'b1;
          if (position == 0) n_p0++;
          if (position == 62) n_pmax++;
          if (track_sel) n_gen++; else n_head++;
        end
      end
      if (!gamma) begin
        // span from this load edge back to the previous one is p + 1 cycles
        if (loaded_ok && !zero_recover && (cyc - last_load_cyc) > longest)
          longest = cyc - last_load_cyc;
        result_word   <= loaded_word;
        result_ok     <= loaded_ok && !zero_recover;
        loaded_word   <= codeword;
        loaded_ok     <= codeword_valid;
        last_load_cyc <= cyc;
      end
    end else begin
      loaded_ok <= 1'b0;
      result_ok <= 1'b0;
    end
  end

  // one revolution of the model disk, starting at sector 0
  task automatic revolve(input int sector_cycles, input bit check_cover);
    for (int j = 0; j < 63; j++) begin
      @(negedge clk);
      sector_step = 1'b1;
      head_bit    = SEQ6[62 - ((j + 5) % 63)];
      @(negedge clk);
      sector_step = 1'b0;
      if (codeword_valid && !track_sel)
        check(codeword == window(j), $sformatf("sector %0d word %b", j, codeword));
      repeat (sector_cycles - 1) @(negedge clk);
    end
    if (check_cover)
      foreach (reported[i]) check(reported[i], $sformatf("sector %0d never reported", i));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 63; i++) pos_of[window(i)] = i;
    pos_of[0] = -1;
    rst_n = 1'b0; sector_step = 1'b0; head_bit = 1'b0; track_sel = 1'b0;
    loaded_ok = 1'b0; result_ok = 1'b0; last_load_cyc = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // phase 1 + 2: the head starts at sector 58, so after five steps it is in sector 0
    for (int j = 58; j < 63; j++) begin
      @(negedge clk);
      sector_step = 1'b1;
      head_bit    = SEQ6[62 - ((j + 5) % 63)];
      @(negedge clk);
      sector_step = 1'b0;
      repeat (61) @(negedge clk);
    end
    check(!codeword_valid, "word not valid before six sectors");
    revolve(63, 1'b0);
    check(codeword_valid, "word valid");
    foreach (reported[i]) reported[i] = 1'b0;
    revolve(63, 1'b1);

    // phase 3: slower rotation
    foreach (reported[i]) reported[i] = 1'b0;
    revolve(100, 1'b1);

    // phase 4: built-in track source
    track_sel = 1'b1;
    foreach (reported[i]) reported[i] = 1'b0;
    repeat (8) begin
      @(negedge clk); sector_step = 1'b1;
      @(negedge clk); sector_step = 1'b0;
      repeat (61) @(negedge clk);
    end
    revolve(63, 1'b1);

    check(n_recover > 0, "all-zero recovery never happened");
    check(n_conv > 0, "no conversion finished");
    check(n_p0 > 0, "reference word (p = 0) never converted");
    check(n_pmax > 0, "farthest word (p = 62) never converted");
    check(n_head > 0, "no result from the reading head source");
    check(n_gen > 0, "no result from the on-chip track source");
    check(longest == 63, $sformatf("longest conversion %0d cycles, expected 63", longest));
    $display("mechanisms: recover=%0d conversions=%0d p0=%0d pmax=%0d head=%0d gen=%0d longest=%0d",
             n_recover, n_conv, n_p0, n_pmax, n_head, n_gen, longest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
