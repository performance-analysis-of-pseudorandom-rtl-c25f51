// prbs_direct_gen: direct pseudorandom binary sequence (m-sequence) generator.
//
// An N-bit linear feedback shift register FF_1..FF_N. Every FF_i (i >= 2)
// takes FF_{i-1}; FF_1 takes the modulo-2 sum of FF_N and of each FF_i whose
// polynomial coefficient c_i is 1. With a primitive polynomial the register
// visits all 2^N - 1 non-zero states, and the bit sequence at FF_N is the
// maximum-length PRBS written along the encoder's code track. Each state,
// read X_N..X_1, equals the N consecutive PRBS bits starting at the current one.
//
// Interface: state[N-1] = X_N ... state[0] = X_1; prbs = state[N-1].
// Timing: one step per rising clock edge with en = 1; load (priority over en)
// writes seed. Synchronous active-low reset to SEED.
//
// The shift structure and tap rule follow the published generator. The load
// and enable inputs and the reset are this design's additions so the
// generator can start from any reference state and be stepped once per sector.
module prbs_direct_gen #(
  parameter int unsigned  N    = 6,
  parameter logic [N:0]   POLY = prbs_pkg::POLY6,
  parameter logic [N-1:0] SEED = prbs_pkg::REF6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         en,
  output logic [N-1:0] state,
  output logic         prbs
);

  logic fb;

  // FF_1 input: X_N xor (sum of c_i * X_i, i = 1..N-1); X_i is state[i-1].
  assign fb   = state[N-1] ^ (^(state[N-2:0] & POLY[N-1:1]));
  assign prbs = state[N-1];

  always_ff @(posedge clk) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= seed;
    else if (en)   state <= {state[N-2:0], fb};
  end

endmodule
