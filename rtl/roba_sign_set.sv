// roba_sign_set -- output stage of the signed RoBA multiplier.
//
// Applies the product sign found by the sign detector to the unsigned
// approximate product: when neg is 1 the two's complement negation of the
// magnitude is output, otherwise the magnitude itself. The magnitude is at
// most 2^(2N-2), so the signed result always fits in W = 2N bits.
//
// Interface: mag is W-bit unsigned, neg selects negation, p is W-bit two's
// complement. Timing: purely combinational. Negating in two's complement
// follows the description ("the proper sign be applied").
module roba_sign_set #(
  parameter int unsigned W = 2 * roba_pkg::ROBA_N
) (
  input  logic [W-1:0] mag,
  input  logic         neg,
  output logic [W-1:0] p
);

  always_comb p = neg ? (~mag + 1'b1) : mag;

endmodule : roba_sign_set
