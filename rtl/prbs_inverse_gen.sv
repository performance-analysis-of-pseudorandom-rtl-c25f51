// prbs_inverse_gen: inverse PRBS generator with code-word write gates, the
// shift register at the core of the serial pseudorandom/natural converter.
//
// N flip-flops Y_1..Y_N. While shifting, FF_i (i >= 2) takes FF_{i-1} and FF_1
// takes the modulo-2 sum of FF_N and of each FF_i whose coefficient c_{N-i} is
// 1 (the mirror of the direct generator's taps). Starting from a code word, the
// register walks the m-sequence states in reverse order, one per clock, and
// its FF_1 input carries the mirrored (inverse) PRBS. When load is 1 the
// register instead takes load_word: this is the per-flip-flop AND/AND/OR write
// gate of the converter, selected by the converter's gamma bit.
//
// Interface: state[N-1] = Y_1 ... state[0] = Y_N; prbs_inv = FF_1 input.
// Timing: one step or one write per rising clock edge. The synchronous
// active-low reset clears the register to all zeros, the start-up state the
// converter must recover from; the reset itself is this design's addition.
module prbs_inverse_gen #(
  parameter int unsigned N    = 6,
  parameter logic [N:0]  POLY = prbs_pkg::POLY6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] load_word,
  output logic [N-1:0] state,
  output logic         prbs_inv
);

  // Y_i sits in state[N-i], and its tap is c_{N-i} = POLY[N-i]; Y_N pairs with
  // POLY[0] = 1. So the taps line up bit for bit with POLY[N-1:0].
  assign prbs_inv = ^(state & POLY[N-1:0]);

  always_ff @(posedge clk) begin
    if (!rst_n)    state <= '0;
    else if (load) state <= load_word;
    else           state <= {prbs_inv, state[N-1:1]};
  end

endmodule
