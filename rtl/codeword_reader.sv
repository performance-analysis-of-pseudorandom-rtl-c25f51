// codeword_reader: builds the N-bit pseudorandom code word from a single
// reading head.
//
// Consecutive code words on an m-sequence track overlap in N-1 bits, so only
// the newly reached bit has to be read: at each sector step the stored word
// moves one place towards Y_1 and the head bit enters at Y_N. With the disk
// turning in the direction in which the track's PRBS is read in order, the
// word is then exactly the N-bit window of the track under the head.
// word_valid rises once N bits have entered since reset.
//
// Interface: word[N-1] = Y_1 ... word[0] = Y_N; step is a one-cycle pulse per
// sector boundary with head_bit valid in the same cycle.
// Timing: word changes one clock edge after step. Synchronous active-low reset.
//
// The single-head principle is the published one; the serial-in register, the
// rotation direction it supports and word_valid are this design's choices.
module codeword_reader #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         head_bit,
  output logic [N-1:0] word,
  output logic         word_valid
);

  logic [$clog2(N+1)-1:0] nread;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word  <= '0;
      nread <= '0;
    end else if (step) begin
      word <= {word[N-2:0], head_bit};
      if (nread != N[$clog2(N+1)-1:0]) nread <= nread + 1'b1;
    end
  end

  assign word_valid = (nread == N[$clog2(N+1)-1:0]);

endmodule
