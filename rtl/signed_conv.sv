// signed_conv: turns the unsigned 5-bit ADC codes of one 625MHz word into
// signed 6-bit integers centred on zero.
//
// Each lane computes s = 2*code - 31, which maps code 0..31 onto the odd
// values -31..+31 with no bias (the "x2" and "-31" boxes of the receiver
// diagram). Purely combinational; the 16 lanes are independent.
//   code[i] : ADC code of blind sample i of the word (lane 0 oldest)
//   s[i]    : signed result, same lane
module signed_conv
  import cdr_pkg::*;
#(
  parameter int unsigned LANES = N_PAR
) (
  input  logic        [ADC_W-1:0] code [LANES],
  output logic signed [S_W-1:0]   s    [LANES]
);

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      s[i] = $signed({code[i], 1'b0}) - S_W'(31);
    end
  end

endmodule
