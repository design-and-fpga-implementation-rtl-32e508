// bin2bcd: binary to binary-coded-decimal converter.
//
// Combinational shift-and-add-3 ("double dabble"): the binary value is
// shifted in one bit at a time from the top, and before each shift every
// decimal digit of 5 or more gets 3 added, so that the shift carries it
// into the next digit. W input bits give DIGITS decimal digits, digit 0 in
// bcd[3:0]; the result is exact when bin < 10**DIGITS.
module bin2bcd #(
  parameter int unsigned W      = 10,
  parameter int unsigned DIGITS = 4
) (
  input  logic [W-1:0]        bin,
  output logic [4*DIGITS-1:0] bcd
);

  always_comb begin
    bcd = '0;
    for (int i = W - 1; i >= 0; i--) begin
      for (int d = 0; d < DIGITS; d++)
        if (bcd[4*d +: 4] >= 4'd5) bcd[4*d +: 4] = bcd[4*d +: 4] + 4'd3;
      bcd = {bcd[4*DIGITS-2:0], bin[i]};
    end
  end

endmodule
