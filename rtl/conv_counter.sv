// conv_counter: N-bit cycle counter of the serial pseudorandom/natural
// converter.
//
// Counts clock edges since the current code word was written into the shift
// register. When clr (= NOT gamma) is 1 the count goes to 0 at the next edge,
// the same edge at which the output register takes the count and the shift
// register takes the next code word. So the count reads 0 in the first cycle
// of a conversion and p when the register has made p steps; for a code word p
// sectors from the reference, the count is p when the reference state shows.
//
// Interface: count is natural binary, P_1 (most significant) in bit N-1.
// Timing: synchronous clear and count; synchronous active-low reset to 0.
// A synchronous clear is this design's choice: an asynchronous one would lose
// the count before the output register could take it.
module conv_counter #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  output logic [N-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) count <= '0;
    else               count <= count + 1'b1;
  end

endmodule
