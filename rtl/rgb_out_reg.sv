// rgb_out_reg: the output flip-flop between the pixel colour and the pins.
//
// A W-bit D flip-flop clocked on the falling edge of clk, like the fd_1
// cell of the original design: rgb_stream changes at the rising edge and is
// caught half a clock later, so the pins change away from the edge on which
// the pixel logic switches. No reset; q follows d at every falling edge.
module rgb_out_reg #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(negedge clk) q <= d;

endmodule
