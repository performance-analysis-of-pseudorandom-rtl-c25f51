// serial_pn_converter: serial pseudorandom-to-natural binary code converter.
//
// A pseudorandom code word Y_1..Y_N read from the code disk is written into
// the shift register of an inverse PRBS generator. Each clock the register
// steps one state backwards along the m-sequence, towards the reference word,
// while a counter counts the steps. When the reference state appears, gamma
// falls to 0 and at the next edge three things happen together: the count,
// which now equals the distance p of the read word from the reference word,
// is written into the output register, the counter clears, and the next code
// word is written into the shift register. If the register ever holds all
// zeros (possible only at start-up) gamma also falls and a code word is
// written, which lets the converter leave that state.
//
// Timing: converting the code word at position p takes p + 1 clock cycles:
// one to write the word and p to reach the reference state; the result
// appears in p one cycle later, with a one-cycle p_valid pulse. The worst case
// is 2^N - 1 cycles (p = 2^N - 2).
//
// Interface: y[N-1] = Y_1 ... y[0] = Y_N; p[N-1] = P_1 (MSB). y is sampled at
// the edge where gamma = 0 and must be stable there (single clock domain).
//
// The datapath and gamma logic follow the published circuit. The reset
// (which clears the register to all zeros, so every start goes through the
// all-zero recovery), the synchronous counter clear and p_valid are this
// design's choices.
module serial_pn_converter #(
  parameter int unsigned  N    = 6,
  parameter logic [N:0]   POLY = prbs_pkg::POLY6,
  parameter logic [N-1:0] REF  = prbs_pkg::REF6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] y,
  output logic [N-1:0] p,
  output logic         p_valid,
  output logic         gamma,
  output logic         zero_hit,
  output logic [N-1:0] sr_state
);

  logic         ref_hit;
  logic [N-1:0] count;

  prbs_inverse_gen #(.N(N), .POLY(POLY)) u_sr (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (~gamma),
    .load_word(y),
    .state    (sr_state),
    .prbs_inv ()
  );

  gamma_detect #(.N(N), .REF(REF)) u_gamma (
    .state   (sr_state),
    .gamma   (gamma),
    .ref_hit (ref_hit),
    .zero_hit(zero_hit)
  );

  conv_counter #(.N(N)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (~gamma),
    .count(count)
  );

  output_register #(.N(N)) u_out (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (~gamma),
    .valid_in(ref_hit),
    .d       (count),
    .q       (p),
    .valid   (p_valid)
  );

  // A finished conversion can never report more than 2^N - 2 steps.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  ref_hit |-> (count != '1));

endmodule
