// prbs_pkg: constants shared by the pseudorandom absolute encoder blocks.
//
// A generator polynomial P_n(X) = X^n + c_{n-1}X^{n-1} + ... + c_1X + 1 is
// stored as an (n+1)-bit vector whose bit j is the coefficient of X^j, so bit n
// and bit 0 are always 1. Code words are stored with the first printed bit in
// the MSB: the converter word Y_1..Y_n has Y_1 in bit n-1, the direct
// generator state X_n..X_1 has X_n in bit n-1.
//
// The two polynomials and the 6-bit reference word are the ones the encoder is
// specified with (n = 6 with one feedback XOR, n = 8 with three). The 8-bit
// reference word 1111_1110 follows the general rule "all ones except the last
// bit"; REF6 = 111100 is the reference word of the 6-bit worked example.
package prbs_pkg;

  localparam logic [6:0] POLY6 = 7'b110_0001;    // X^6 + X^5 + 1
  localparam logic [8:0] POLY8 = 9'b1_0110_0101; // X^8 + X^6 + X^5 + X^2 + 1

  localparam logic [5:0] REF6 = 6'b111100;
  localparam logic [7:0] REF8 = 8'b1111_1110;

endpackage
