// tb_prbs_abs_encoder_n8: end-to-end testbench of the encoder electronics in
// the 8-bit configuration (X^8 + X^6 + X^5 + X^2 + 1, reference 11111110).
//
// The model track is generated in software by the direct recurrence
// X_1' = X_8 ^ X_6 ^ X_5 ^ X_2 from the reference word: state j is the code
// word of sector j and its bit X_8 is track bit j. The disk turns with 255
// cycles per sector (2^8 - 1, the fastest rate at which every sector is still
// converted) for two revolutions from the head, then one from the on-chip
// track source. Every result must equal the position of the converted word,
// every sector must be reported in each checked revolution, and all-zero
// recovery, p = 0 and p = 254 (a 255-cycle conversion) must each occur.
module tb_prbs_abs_encoder_n8;

  localparam int NS = 255;

  logic clk = 1'b0;
  logic rst_n, sector_step, head_bit, track_sel;
  logic [7:0] codeword, position;
  logic codeword_valid, position_valid, gamma, zero_recover;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [7:0] dseq [NS];
  int pos_of [256];

  logic [7:0] loaded_word, result_word;
  bit         loaded_ok, result_ok;
  int         last_load_cyc;
  int         n_recover = 0, n_conv = 0, n_p0 = 0, n_pmax = 0, n_gen = 0, longest = 0;
  bit         reported [NS];

  always #5 clk = ~clk;

  prbs_abs_encoder #(.N(8), .POLY(prbs_pkg::POLY8), .REF(prbs_pkg::REF8)) dut (
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

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (zero_recover) n_recover++;
      if (position_valid && result_ok) begin
        n_conv++;
        check(int'(position) == pos_of[result_word],
              $sformatf("cycle %0d: word %b converted to %0d, expected %0d",
                        cyc, result_word, position, pos_of[result_word]));
        if (int'(position) < NS) reported[position] = 1'b1;
        if (position == 0) n_p0++;
        if (position == 254) n_pmax++;
        if (track_sel) n_gen++;
      end
      if (!gamma) begin
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

  task automatic sector(input int j);
    @(negedge clk);
    sector_step = 1'b1;
    head_bit    = dseq[(j + 7) % NS][7];
    @(negedge clk);
    sector_step = 1'b0;
    if (codeword_valid && !track_sel)
      check(codeword == dseq[j % NS], $sformatf("sector %0d word %b", j, codeword));
    repeat (NS - 2) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dseq[0] = prbs_pkg::REF8;
    for (int k = 1; k < NS; k++)
      dseq[k] = {dseq[k-1][6:0], dseq[k-1][7] ^ dseq[k-1][5] ^ dseq[k-1][4] ^ dseq[k-1][1]};
    for (int i = 0; i < 256; i++) pos_of[i] = -1;
    for (int k = 0; k < NS; k++) pos_of[dseq[k]] = k;
    rst_n = 1'b0; sector_step = 1'b0; head_bit = 1'b0; track_sel = 1'b0;
    loaded_ok = 1'b0; result_ok = 1'b0; last_load_cyc = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int j = NS - 7; j < NS; j++) sector(j);
    for (int j = 0; j < NS; j++) sector(j);
    foreach (reported[i]) reported[i] = 1'b0;
    for (int j = 0; j < NS; j++) sector(j);
    foreach (reported[i]) check(reported[i], $sformatf("sector %0d never reported", i));

    track_sel = 1'b1;
    for (int j = 0; j < 10; j++) sector(j);
    foreach (reported[i]) reported[i] = 1'b0;
    for (int j = 0; j < NS; j++) sector(j);
    foreach (reported[i]) check(reported[i], $sformatf("on-chip source: sector %0d never reported", i));

    check(n_recover > 0, "all-zero recovery never happened");
    check(n_p0 > 0, "reference word (p = 0) never converted");
    check(n_pmax > 0, "farthest word (p = 254) never converted");
    check(n_gen > 0, "no result from the on-chip track source");
    check(longest == 255, $sformatf("longest conversion %0d cycles, expected 255", longest));
    $display("mechanisms: recover=%0d conversions=%0d p0=%0d pmax=%0d gen=%0d longest=%0d",
             n_recover, n_conv, n_p0, n_pmax, n_gen, longest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
