// output_register: result register of the serial pseudorandom/natural
// converter.
//
// Holds the natural binary position P_1..P_N of the last finished conversion.
// It is written from the cycle counter on the clock edge at which gamma = 0
// (we = NOT gamma). valid pulses for one cycle after a write whose valid_in
// was 1, that is, a write caused by reaching the reference state rather than
// by the all-zero start-up recovery; the valid flag is this design's addition.
//
// Interface: q[N-1] = P_1 (most significant bit).
// Timing: one rising clock edge from we to q; synchronous active-low reset
// clears q and valid.
module output_register #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic         valid_in,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else begin
      if (we) q <= d;
      valid <= we & valid_in;
    end
  end

endmodule
