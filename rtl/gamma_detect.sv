// gamma_detect: end-of-conversion and start-up detector of the serial
// pseudorandom/natural converter.
//
// Two N-input NAND gates watch the shift register. NAND1 sees each bit true
// where the reference word has a 1 and inverted where it has a 0, so its output
// falls exactly in the reference state. NAND0 sees every bit inverted, so its
// output falls in the all-zero state, which the register could never leave by
// shifting. gamma is the AND of the two NAND outputs: gamma = 0 means
// "conversion finished (or register stuck at zero): write the next code word".
//
// Interface: state[N-1] = Y_1 ... state[0] = Y_N; ref_hit and zero_hit are the
// inverted NAND outputs, brought out for observation.
// Timing: purely combinational.
//
// The gate structure follows the published converter; the reference word REF
// is a parameter, by default the 6-bit worked example's 111100.
module gamma_detect #(
  parameter int unsigned  N   = 6,
  parameter logic [N-1:0] REF = prbs_pkg::REF6
) (
  input  logic [N-1:0] state,
  output logic         gamma,
  output logic         ref_hit,
  output logic         zero_hit
);

  logic nand1, nand0;

  always_comb begin
    // inputs of NAND1: Q where REF has a 1, NOT Q where it has a 0
    nand1 = ~(&(~(state ^ REF)));
    // inputs of NAND0: NOT Q of every flip-flop
    nand0 = ~(&(~state));
    gamma    = nand1 & nand0;
    ref_hit  = ~nand1;
    zero_hit = ~nand0;
  end

endmodule
