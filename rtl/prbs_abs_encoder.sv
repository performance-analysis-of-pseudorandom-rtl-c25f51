// prbs_abs_encoder: electronics of a pseudorandom absolute position encoder.
//
// The code disk carries one track holding a maximum-length PRBS of 2^N - 1
// bits, one bit per angular sector; the N bits starting at any sector form a
// code word found nowhere else on the track. A single reading head delivers
// one new bit per sector (head_bit, with a sector_step pulse); the
// codeword_reader assembles the current N-bit word, and the embedded serial
// converter turns it into the natural binary sector number p, the distance of
// the current sector from the reference sector (the sector whose word is REF).
//
// For bench use without a disk, track_sel = 1 replaces the reading head by an
// on-chip direct PRBS generator stepped by sector_step: it produces the same
// m-sequence the track carries. This source is this design's own addition.
//
// Timing: the converter restarts on the current code word after every
// finished conversion; one conversion takes p + 1 clock cycles, at most
// 2^N - 1. For every sector to be converted, a sector must last at least
// 2^N - 1 clock cycles, that is rotation frequency f <= f_clk / (2^N - 1)^2.
// position_valid pulses once per finished conversion.
//
// Interface: sector_step is a one-cycle pulse synchronous to clk.
// Synchronous active-low reset; after it the converter recovers through the
// all-zero state (zero_recover) and codeword_valid rises after N sectors.
module prbs_abs_encoder #(
  parameter int unsigned  N    = 6,
  parameter logic [N:0]   POLY = prbs_pkg::POLY6,
  parameter logic [N-1:0] REF  = prbs_pkg::REF6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sector_step,
  input  logic         head_bit,
  input  logic         track_sel,
  output logic [N-1:0] codeword,
  output logic         codeword_valid,
  output logic [N-1:0] position,
  output logic         position_valid,
  output logic         gamma,
  output logic         zero_recover
);

  logic         gen_bit;
  logic         track_bit;

  prbs_direct_gen #(.N(N), .POLY(POLY), .SEED(REF)) u_track (
    .clk  (clk),
    .rst_n(rst_n),
    .load (1'b0),
    .seed (REF),
    .en   (sector_step),
    .state(),
    .prbs (gen_bit)
  );

  assign track_bit = track_sel ? gen_bit : head_bit;

  codeword_reader #(.N(N)) u_reader (
    .clk       (clk),
    .rst_n     (rst_n),
    .step      (sector_step),
    .head_bit  (track_bit),
    .word      (codeword),
    .word_valid(codeword_valid)
  );

  serial_pn_converter #(.N(N), .POLY(POLY), .REF(REF)) u_conv (
    .clk     (clk),
    .rst_n   (rst_n),
    .y       (codeword),
    .p       (position),
    .p_valid (position_valid),
    .gamma   (gamma),
    .zero_hit(zero_recover),
    .sr_state()
  );

endmodule
